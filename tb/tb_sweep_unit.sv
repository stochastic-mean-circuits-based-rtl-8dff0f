// tb_sweep_unit: helper of tb_workload_input_sweep. Holds one
// inner-product circuit of N inputs (unipolar or bipolar, K-bit LFSR or
// Sobol source) or,
// with MEAN = 1, one mean circuit, runs TRIALS random 2^K-cycle products
// once go rises and reports the mean squared error against the exact
// result. Weights are random integers 0..15 (signed -15..15 for bipolar),
// inputs uniform K-bit values.
module tb_sweep_unit #(
  parameter int N      = 16,
  parameter bit BIP    = 1'b0,
  parameter bit MEAN   = 1'b0,
  parameter int TRIALS = 20,
  parameter int K      = 8,
  parameter sc_pkg::rns_kind_e KIND = sc_pkg::RNS_LFSR
) (
  input  logic clk,
  input  logic rst_n,
  input  logic go,
  output logic finished,
  output real  mse
);
  import tb_sc_model_pkg::*;
  localparam int L = 1 << K;

  logic         clear = 0, en = 0;
  logic [K:0]   thr [N];
  logic [N-1:0] neg;
  logic [K-1:0] y   [N];
  logic         f;

  if (MEAN && BIP) begin : g_smc_b
    smc_bipolar #(.N(N), .K(K), .KIND(KIND)) dut (.clk, .rst_n, .clear, .en, .neg, .y, .f);
  end else if (MEAN) begin : g_smc_u
    smc_unipolar #(.N(N), .K(K), .KIND(KIND)) dut (.clk, .rst_n, .clear, .en, .y, .f);
  end else if (BIP) begin : g_sipc_b
    sipc_bipolar #(.N(N), .K(K), .KIND(KIND)) dut (.clk, .rst_n, .clear, .en, .cum_thr(thr), .neg, .y, .f);
  end else begin : g_sipc_u
    sipc_unipolar #(.N(N), .K(K), .KIND(KIND)) dut (.clk, .rst_n, .clear, .en, .cum_thr(thr), .y, .f);
  end

  initial begin
    int w [N];
    int unsigned tot, cum;
    int cnt;
    real exact, est, se;
    finished = 0;
    mse = 0;
    se = 0;
    wait (go);
    for (int trial = 0; trial < TRIALS; trial++) begin
      tot = 0;
      for (int i = 0; i < N; i++) begin
        if (MEAN) w[i] = (BIP && $urandom_range(0, 1)) ? -1 : 1;
        else      w[i] = BIP ? ($urandom_range(0, 30) - 15) : $urandom_range(0, 15);
        tot += (w[i] < 0) ? -w[i] : w[i];
      end
      if (tot == 0) begin w[0] = 1; tot = 1; end
      cum = 0;
      exact = 0;
      for (int i = 0; i < N; i++) begin
        int unsigned yv;
        yv = $urandom_range(0, L - 1);
        cum += (w[i] < 0) ? -w[i] : w[i];
        thr[i] = (K+1)'(thr_of(cum, tot, K));
        neg[i] = (w[i] < 0);
        y[i]   = K'(yv);
        if (BIP) exact += real'(w[i]) / real'(tot) * (2.0 * real'(yv) / real'(L) - 1.0);
        else     exact += real'(w[i]) / real'(tot) * real'(yv) / real'(L);
      end
      @(negedge clk); clear = 1;
      @(negedge clk); clear = 0; en = 1;
      cnt = 0;
      for (int t = 0; t < L; t++) begin
        #1 cnt += f;
        @(negedge clk);
      end
      en = 0;
      est = BIP ? (2.0 * real'(cnt) / real'(L) - 1.0) : real'(cnt) / real'(L);
      se += (est - exact) * (est - exact);
    end
    mse = se / real'(TRIALS);
    finished = 1;
  end
endmodule
