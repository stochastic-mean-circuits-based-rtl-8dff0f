// sng_corr_bank: N stochastic number generators that share one random
// number r.
//
// Because every comparator sees the same r in the same cycle, the N
// bitstreams are maximally positively correlated: if b[i] <= b[j], then
// wherever stream i has a 1, stream j has a 1 too. This is the generator of
// correlated bitstreams the inner-product and mean circuits are built on.
// Combinational; one bit per stream per cycle.
module sng_corr_bank
  import sc_pkg::*;
#(
  parameter int unsigned N = N_DEFAULT,
  parameter int unsigned K = K_DEFAULT
) (
  input  logic [K:0]   b [N],
  input  logic [K-1:0] r,
  output logic [N-1:0] s
);

  for (genvar i = 0; i < N; i++) begin : g_sng
    sng #(.K(K)) u_sng (.b(b[i]), .r(r), .s(s[i]));
  end

endmodule
