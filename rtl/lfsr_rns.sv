// lfsr_rns: random number source built as a maximal-length Fibonacci LFSR.
//
// Every enabled cycle the register shifts left by one and the XOR of the
// tap bits enters at bit 0, so a K-bit source walks through all 2^K-1
// non-zero values before repeating (it never produces 0). The taps come
// from sc_pkg::lfsr_taps. The output r is the register itself, so a value
// is valid in the cycle it is held and changes after each enabled edge.
//
// Interface: clear reloads SEED (synchronous, wins over en); en advances.
// An asynchronous active-low reset also loads SEED. The LFSR as a random
// source follows the published circuit; its polynomial and seed are this
// implementation's own.
module lfsr_rns
  import sc_pkg::*;
#(
  parameter int unsigned K    = K_DEFAULT,
  parameter int unsigned SEED = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         en,
  output logic [K-1:0] r
);

  localparam logic [K-1:0] TAPS    = K'(lfsr_taps(K));
  localparam logic [K-1:0] SEED_NZ = (K'(SEED) == '0) ? K'(1) : K'(SEED);

  logic fb;
  assign fb = ^(r & TAPS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     r <= SEED_NZ;
    else if (clear) r <= SEED_NZ;
    else if (en)    r <= {r[K-2:0], fb};
  end

  // The all-zero state is a lock-up state and must never be reached.
  a_nonzero : assert property (@(posedge clk) disable iff (!rst_n) r != '0);

endmodule
