// smc_bipolar: bipolar stochastic mean circuit.
//
// It is the bipolar inner-product circuit with every weight of magnitude
// 1/N: its running-sum thresholds are fixed to 1/N, 2/N, ..., N/N of 2^K,
// and the sign pins stay programmable, so the output codes
// (s_1*Y_1 + ... + s_N*Y_N) / N with s_i = -1 where neg[i] = 1 and +1
// otherwise. With neg = 0 it averages the bipolar inputs and is the same
// circuit as the unipolar mean with a different coding. Interface and
// timing as sipc_bipolar.
module smc_bipolar
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
  input  logic [N-1:0] neg,     // 1: subtract input i instead of adding it
  input  logic [K-1:0] y [N],   // bipolar inputs, Y_i = 2*y[i]/2^K - 1
  output logic         f        // bipolar stream of the signed mean
);

  logic [K:0] thr [N];

  for (genvar i = 0; i < N; i++) begin : g_thr
    assign thr[i] = (K+1)'(scaled_thr(i + 1, N, K));
  end

  sipc_bipolar #(.N(N), .K(K), .KIND(KIND), .SEED(SEED)) u_sipc (
    .clk, .rst_n, .clear, .en, .cum_thr(thr), .neg, .y, .f
  );

endmodule
