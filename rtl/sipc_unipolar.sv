// sipc_unipolar: unipolar stochastic inner-product circuit built on one
// random number source.
//
// It computes F = sum_i (X_i / S) * Y_i with S = X_1 + ... + X_N and all
// values in [0, 1]. The caller supplies the scaled running sums
//   cum_thr[i] = round(2^K * (X_1 + ... + X_{i+1}) / S),  cum_thr[N-1] = 2^K,
// not the X_i themselves. N SNGs sharing the random number r turn them into
// positively correlated streams c_i. XOR of neighbours, x_i = c_i ^ c_{i-1}
// (c_{-1} = 0), takes their absolute difference: x_i is 1 exactly when r
// lies in [cum_thr[i-1], cum_thr[i]), so the x_i are mutually exclusive
// (maximally negatively correlated) with probabilities X_i / S. The inputs
// Y_i go through N more SNGs fed by the same r with its bits in reversed
// order, which decorrelates them from the x_i; AND gates multiply, and one
// OR gate adds the mutually exclusive products.
//
// Timing: f is combinational from the registered random number; one output
// bit per enabled cycle, a full product after 2^K cycles. clear restarts
// the random sequence, en advances it. The structure follows the published circuit;
// taking pre-scaled running sums as inputs, the bit-reversal as the
// "inverse order" of the shared source and the control pins are this
// implementation's choices.
module sipc_unipolar
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
  input  logic [K:0]   cum_thr [N],  // scaled running sums of the weights
  input  logic [K-1:0] y       [N],  // unipolar inputs, Y_i = y[i] / 2^K
  output logic         f             // output bitstream
);

  logic [K-1:0] r, r_rev;
  logic [K:0]   y_ext [N];
  logic [N-1:0] c, x, ys, a;

  rns #(.K(K), .KIND(KIND), .SEED(SEED)) u_rns (.clk, .rst_n, .clear, .en, .r);

  always_comb begin
    for (int b = 0; b < K; b++) r_rev[b] = r[K-1-b];
  end

  always_comb begin
    for (int i = 0; i < N; i++) y_ext[i] = {1'b0, y[i]};
  end

  sng_corr_bank #(.N(N), .K(K)) u_xbank (.b(cum_thr), .r(r),     .s(c));
  sng_corr_bank #(.N(N), .K(K)) u_ybank (.b(y_ext),   .r(r_rev), .s(ys));

  assign x = c ^ {c[N-2:0], 1'b0};
  assign a = x & ys;
  assign f = |a;

  // With non-decreasing running sums at most one selector is active.
  a_x_exclusive : assert property (@(posedge clk) disable iff (!rst_n)
                                   en |-> $onehot0(x));

endmodule
