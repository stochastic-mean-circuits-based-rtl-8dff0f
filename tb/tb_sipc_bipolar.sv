// tb_sipc_bipolar: bipolar inner-product circuit, N = 9, K = 8, LFSR and
// Sobol sources side by side. Random signed weights (including the Sobel
// kernel) and inputs; every output bit is checked against a model
// (selector interval of r, input SNG on the bit-reversed r, inverted for
// a negative weight), the ones count against the model and the bipolar
// estimate against sum_i sign(X_i)|X_i|/S * Y_i within a tolerance.
module tb_sipc_bipolar;
  import tb_sc_model_pkg::*;
  localparam int N = 9;
  localparam int K = 8;

  logic         clk = 0, rst_n = 0, clear = 0, en = 0;
  logic [K:0]   thr [N];
  logic [N-1:0] neg;
  logic [K-1:0] y   [N];
  logic         f_l, f_s;
  int checks = 0, failures = 0;

  sipc_bipolar #(.N(N), .K(K), .KIND(sc_pkg::RNS_LFSR), .SEED(1)) dut_l (
    .clk, .rst_n, .clear, .en, .cum_thr(thr), .neg, .y, .f(f_l));
  sipc_bipolar #(.N(N), .K(K), .KIND(sc_pkg::RNS_SOBOL)) dut_s (
    .clk, .rst_n, .clear, .en, .cum_thr(thr), .neg, .y, .f(f_s));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int          w [N];
    int unsigned yv [N], tv [];
    int unsigned tot, cum, rl, rs;
    int cnt_l, cnt_s, mdl_l, mdl_s, sel, n_neg;
    real exact, err_l, err_s;
    int sobel [9] = '{-1, 0, 1, -2, 0, 2, -1, 0, 1};
    tv = new[N];
    n_neg = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 60; trial++) begin
      tot = 0;
      for (int i = 0; i < N; i++) begin
        w[i]  = (trial < 2) ? sobel[i] : $urandom_range(0, 30) - 15;
        yv[i] = (trial == 1) ? ((i % 3 == 2) ? 255 : 0) : $urandom_range(0, 255);
        tot += (w[i] < 0) ? -w[i] : w[i];
      end
      if (tot == 0) begin w[0] = -1; tot = 1; end
      cum = 0;
      exact = 0;
      for (int i = 0; i < N; i++) begin
        cum += (w[i] < 0) ? -w[i] : w[i];
        tv[i] = thr_of(cum, tot, K);
        thr[i] = (K+1)'(tv[i]);
        neg[i] = (w[i] < 0);
        n_neg += neg[i];
        y[i] = K'(yv[i]);
        exact += real'(w[i]) / real'(tot) * (2.0 * real'(yv[i]) / 256.0 - 1.0);
      end
      @(negedge clk); clear = 1;
      @(negedge clk); clear = 0; en = 1;
      rl = 1; cnt_l = 0; cnt_s = 0; mdl_l = 0; mdl_s = 0;
      for (int t = 0; t < 256; t++) begin
        bit el, es;
        rs  = sobol_at(t, K);
        sel = sel_index(rl, tv, N);
        el  = (sel >= 0) && ((yv[sel] > rev(rl, K)) != (w[sel] < 0));
        sel = sel_index(rs, tv, N);
        es  = (sel >= 0) && ((yv[sel] > rev(rs, K)) != (w[sel] < 0));
        #1;
        chk(f_l == el, $sformatf("lfsr bit trial=%0d t=%0d", trial, t));
        chk(f_s == es, $sformatf("sobol bit trial=%0d t=%0d", trial, t));
        cnt_l += f_l; cnt_s += f_s; mdl_l += el; mdl_s += es;
        @(negedge clk);
        rl = lfsr8_next(8'(rl));
      end
      en = 0;
      chk(cnt_l == mdl_l && cnt_s == mdl_s, "counts");
      err_l = 2.0 * real'(cnt_l) / 256.0 - 1.0 - exact;
      err_s = 2.0 * real'(cnt_s) / 256.0 - 1.0 - exact;
      chk(err_l < 0.12 && err_l > -0.12, $sformatf("lfsr accuracy %f vs %f", 2.0*real'(cnt_l)/256.0-1.0, exact));
      chk(err_s < 0.08 && err_s > -0.08, $sformatf("sobol accuracy %f vs %f", 2.0*real'(cnt_s)/256.0-1.0, exact));
    end
    chk(n_neg > 0, "negative weights exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
