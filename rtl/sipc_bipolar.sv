// sipc_bipolar: bipolar stochastic inner-product circuit built on one
// random number source.
//
// It computes F = sum_i sign(X_i) * (|X_i| / S) * Y_i with S = sum |X_i|
// and Y_i, F in [-1, 1] (a bipolar stream of probability p codes 2p-1).
// The selector part is the unipolar one applied to the magnitudes: the
// caller supplies cum_thr[i] = round(2^K * (|X_1|+...+|X_{i+1}|) / S), a
// bank of SNGs sharing r makes correlated streams, XORs of neighbours give
// mutually exclusive selectors x_i with probabilities |X_i| / S. Each input
// stream y_i (SNG fed by the bit-reversed r, probability y[i]/2^K, i.e.
// Y_i = 2*y[i]/2^K - 1) is multiplied by its sign in bipolar form: an XNOR
// with a pin tied to 1 for a positive and 0 for a negative weight (neg[i]
// = 1 marks a negative weight). AND with x_i and one OR gate then add the
// signed terms.
//
// Timing as sipc_unipolar: f is combinational from the registered random
// number, one bit per enabled cycle, one result per 2^K cycles. The sign
// pins as an input port, pre-scaled running sums and bit-reversal of the
// shared source are this implementation's choices.
module sipc_bipolar
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
  input  logic [K:0]   cum_thr [N],  // scaled running sums of |X_i|
  input  logic [N-1:0] neg,          // 1: weight X_i is negative
  input  logic [K-1:0] y       [N],  // bipolar inputs, Y_i = 2*y[i]/2^K - 1
  output logic         f             // bipolar output bitstream
);

  logic [K-1:0] r, r_rev;
  logic [K:0]   y_ext [N];
  logic [N-1:0] c, x, ys, sign_pin, yb, a;

  rns #(.K(K), .KIND(KIND), .SEED(SEED)) u_rns (.clk, .rst_n, .clear, .en, .r);

  always_comb begin
    for (int b = 0; b < K; b++) r_rev[b] = r[K-1-b];
  end

  always_comb begin
    for (int i = 0; i < N; i++) y_ext[i] = {1'b0, y[i]};
  end

  sng_corr_bank #(.N(N), .K(K)) u_xbank (.b(cum_thr), .r(r),     .s(c));
  sng_corr_bank #(.N(N), .K(K)) u_ybank (.b(y_ext),   .r(r_rev), .s(ys));

  assign x        = c ^ {c[N-2:0], 1'b0};
  assign sign_pin = ~neg;
  assign yb       = ~(ys ^ sign_pin);   // bipolar multiply by +1 / -1
  assign a        = x & yb;
  assign f        = |a;

  a_x_exclusive : assert property (@(posedge clk) disable iff (!rst_n)
                                   en |-> $onehot0(x));

endmodule
