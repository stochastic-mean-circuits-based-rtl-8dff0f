// smc_unipolar: unipolar stochastic mean circuit.
//
// It is the unipolar inner-product circuit with every weight equal: its
// running-sum thresholds are fixed to 1/N, 2/N, ..., N/N of 2^K (rounded to
// the nearest integer), so the output stream codes (Y_1 + ... + Y_N) / N.
// All N input streams come from SNGs sharing one random source, so no
// independent select streams are needed. Interface and timing as
// sipc_unipolar. The fixed thresholds follow the published circuit; rounding them to
// the nearest step of 2^K is this implementation's choice.
module smc_unipolar
  import sc_pkg::*;
#(
  parameter int unsigned N    = N_DEFAULT,
  parameter int unsigned K    = K_DEFAULT,
  parameter rns_kind_e   KIND = RNS_LFSR,
  parameter int unsigned SEED = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         en,
  input  logic [K-1:0] y [N],   // unipolar inputs, Y_i = y[i] / 2^K
  output logic         f        // stream of the mean
);

  logic [K:0] thr [N];

  for (genvar i = 0; i < N; i++) begin : g_thr
    assign thr[i] = (K+1)'(scaled_thr(i + 1, N, K));
  end

  sipc_unipolar #(.N(N), .K(K), .KIND(KIND), .SEED(SEED)) u_sipc (
    .clk, .rst_n, .clear, .en, .cum_thr(thr), .y, .f
  );

endmodule
