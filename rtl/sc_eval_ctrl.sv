// sc_eval_ctrl: sequencer of one stochastic evaluation.
//
// A bitstream is 2^K bits long, so one evaluation is: one cycle with clear
// high (random sources back to their start, FSMs to their middle state,
// counters to zero), then 2^K cycles with en high, then a one-cycle done
// pulse while the counters hold the result. start is accepted only when
// idle; a start while busy is ignored. From the start edge to done is
// 2^K + 2 cycles. The sequence length follows the published 2^K-bit
// streams; the handshake is this implementation's own.
module sc_eval_ctrl
  import sc_pkg::*;
#(
  parameter int unsigned K = K_DEFAULT
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic busy,
  output logic clear,
  output logic en,
  output logic done
);

  typedef enum logic [1:0] {
    S_IDLE  = 2'd0,
    S_CLEAR = 2'd1,
    S_RUN   = 2'd2,
    S_DONE  = 2'd3
  } state_e;

  state_e     state;
  logic [K:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
    end else begin
      unique case (state)
        S_IDLE:  if (start) state <= S_CLEAR;
        S_CLEAR: begin
          state <= S_RUN;
          cnt   <= '0;
        end
        S_RUN: begin
          cnt <= cnt + (K+1)'(1);
          if (cnt == (K+1)'((1 << K) - 1)) state <= S_DONE;
        end
        S_DONE:  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy  = (state != S_IDLE);
  assign clear = (state == S_CLEAR);
  assign en    = (state == S_RUN);
  assign done  = (state == S_DONE);

  a_done_after_run : assert property (@(posedge clk) disable iff (!rst_n)
                                      done |-> $past(en));

endmodule
