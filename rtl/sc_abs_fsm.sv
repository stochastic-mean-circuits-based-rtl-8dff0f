// sc_abs_fsm: stochastic absolute value of a bipolar bitstream with an
// NS-state saturating up/down counter.
//
// The state moves up on an input 1 and down on an input 0, saturating at
// 0 and NS-1. The output is a Moore function of the state: in the lower
// half even states output 1, in the upper half odd states output 1. When
// the input is strongly negative the state sits at the bottom and the
// output is mostly 1; when it is strongly positive it sits at the top and
// the output is again mostly 1; near zero it wanders and the output is
// half ones. So a stream coding A yields approximately |A| (bipolar).
//
// Timing: output is registered state, so it lags the input by one cycle.
// clear puts the state in the middle (NS/2). The 16-state count follows
// the published circuit; the output assignment is this implementation's reading of
// the usual stochastic absolute-value FSM.
module sc_abs_fsm
  import sc_pkg::*;
#(
  parameter int unsigned NS = 16   // number of states, even
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic en,
  input  logic x,
  output logic y
);

  localparam int unsigned SW = $clog2(NS);

  logic [SW-1:0] state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     state <= SW'(NS / 2);
    else if (clear) state <= SW'(NS / 2);
    else if (en) begin
      if (x && state != SW'(NS - 1)) state <= state + SW'(1);
      else if (!x && state != '0)    state <= state - SW'(1);
    end
  end

  assign y = (state < SW'(NS / 2)) ? ~state[0] : state[0];

endmodule
