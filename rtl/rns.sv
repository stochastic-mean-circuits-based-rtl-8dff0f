// rns: random number source selected by a parameter. KIND = RNS_LFSR gives
// a maximal-length LFSR (lfsr_rns), KIND = RNS_SOBOL a Sobol sequence
// generator (sobol_rns). Same interface and timing as those two: clear
// restarts the sequence, en advances it, r is registered.
module rns
  import sc_pkg::*;
#(
  parameter int unsigned K    = K_DEFAULT,
  parameter rns_kind_e   KIND = RNS_LFSR,
  parameter int unsigned SEED = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         en,
  output logic [K-1:0] r
);

  if (KIND == RNS_SOBOL) begin : g_sobol
    sobol_rns #(.K(K)) u_src (.clk, .rst_n, .clear, .en, .r);
  end else begin : g_lfsr
    lfsr_rns #(.K(K), .SEED(SEED)) u_src (.clk, .rst_n, .clear, .en, .r);
  end

endmodule
