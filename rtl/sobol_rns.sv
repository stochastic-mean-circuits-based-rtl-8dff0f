// sobol_rns: random number source producing the first dimension of the
// Sobol sequence with K-bit resolution.
//
// It uses the Gray-code construction: a K-bit counter t, a detector of the
// least significant zero bit of t, an array of direction vectors and an
// XOR register. Each enabled cycle r <= r ^ V[c], c = index of the lowest
// zero of t, then t increments. For dimension one V[j] = 2^(K-1-j), so in
// 2^K cycles r visits every value 0..2^K-1 exactly once; after that the
// sequence starts again from 0.
//
// Interface: clear restarts the sequence at r = 0 (synchronous, wins over
// en); en advances. The structure (counter, least-significant-zero
// detector, direction vectors, XOR register) is the usual Sobol generator;
// restricting it to dimension one is this implementation's choice.
module sobol_rns
  import sc_pkg::*;
#(
  parameter int unsigned K = K_DEFAULT
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         en,
  output logic [K-1:0] r
);

  logic [K-1:0] t;
  logic [K-1:0] v;      // direction vector selected by the LSZ of t
  logic         wrap;   // t is all ones: the period ends

  always_comb begin
    v    = '0;
    wrap = 1'b1;
    for (int j = K - 1; j >= 0; j--) begin
      if (!t[j]) begin
        v    = K'(1) << (K - 1 - j);
        wrap = 1'b0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t <= '0;
      r <= '0;
    end else if (clear) begin
      t <= '0;
      r <= '0;
    end else if (en) begin
      t <= t + K'(1);
      r <= wrap ? '0 : (r ^ v);
    end
  end

endmodule
