// tb_sipc_unipolar: unipolar inner-product circuit, N = 9, K = 8, with an
// LFSR source and with a Sobol source side by side. For random weights and
// inputs it runs one 256-cycle stream and checks every output bit against a
// model (selector interval of r, input SNG on the bit-reversed r), the
// ones count against the model, and the estimate against the exact
// sum_i (X_i/S) Y_i within a tolerance. Also checks that the output is
// 0 with all inputs 0 and 255 ones with all inputs at 255 for the Sobol
// source, which visits every r.
module tb_sipc_unipolar;
  import tb_sc_model_pkg::*;
  localparam int N = 9;
  localparam int K = 8;

  logic         clk = 0, rst_n = 0, clear = 0, en = 0;
  logic [K:0]   thr [N];
  logic [K-1:0] y   [N];
  logic         f_l, f_s;
  int checks = 0, failures = 0;

  sipc_unipolar #(.N(N), .K(K), .KIND(sc_pkg::RNS_LFSR), .SEED(1)) dut_l (
    .clk, .rst_n, .clear, .en, .cum_thr(thr), .y, .f(f_l));
  sipc_unipolar #(.N(N), .K(K), .KIND(sc_pkg::RNS_SOBOL)) dut_s (
    .clk, .rst_n, .clear, .en, .cum_thr(thr), .y, .f(f_s));

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
    int unsigned w [N], yv [N], tv [];
    int unsigned tot, cum, rl, rs;
    int cnt_l, cnt_s, mdl_l, mdl_s, sel;
    real exact, err_l, err_s, mse_l, mse_s;
    tv = new[N];
    mse_l = 0; mse_s = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 60; trial++) begin
      tot = 0;
      for (int i = 0; i < N; i++) begin
        w[i]  = (trial == 0) ? ((i % 3 == 1 ? 2 : 1) * (i / 3 == 1 ? 2 : 1)) : $urandom_range(0, 15);
        yv[i] = (trial == 1) ? 0 : (trial == 2) ? 255 : $urandom_range(0, 255);
        tot += w[i];
      end
      if (tot == 0) begin w[0] = 1; tot = 1; end
      cum = 0;
      exact = 0;
      for (int i = 0; i < N; i++) begin
        cum += w[i];
        tv[i] = thr_of(cum, tot, K);
        thr[i] = (K+1)'(tv[i]);
        y[i] = K'(yv[i]);
        exact += real'(w[i]) / real'(tot) * real'(yv[i]) / 256.0;
      end
      @(negedge clk); clear = 1;
      @(negedge clk); clear = 0; en = 1;
      rl = 1; cnt_l = 0; cnt_s = 0; mdl_l = 0; mdl_s = 0;
      for (int t = 0; t < 256; t++) begin
        bit el, es;
        rs  = sobol_at(t, K);
        sel = sel_index(rl, tv, N);
        el  = (sel >= 0) && (yv[sel] > rev(rl, K));
        sel = sel_index(rs, tv, N);
        es  = (sel >= 0) && (yv[sel] > rev(rs, K));
        #1;
        chk(f_l == el, $sformatf("lfsr bit trial=%0d t=%0d", trial, t));
        chk(f_s == es, $sformatf("sobol bit trial=%0d t=%0d", trial, t));
        cnt_l += f_l; cnt_s += f_s; mdl_l += el; mdl_s += es;
        @(negedge clk);
        rl = lfsr8_next(8'(rl));
      end
      en = 0;
      chk(cnt_l == mdl_l && cnt_s == mdl_s, "counts");
      err_l = real'(cnt_l) / 256.0 - exact;
      err_s = real'(cnt_s) / 256.0 - exact;
      mse_l += err_l * err_l; mse_s += err_s * err_s;
      chk(err_l < 0.06 && err_l > -0.06, $sformatf("lfsr accuracy %f vs %f", real'(cnt_l)/256.0, exact));
      chk(err_s < 0.04 && err_s > -0.04, $sformatf("sobol accuracy %f vs %f", real'(cnt_s)/256.0, exact));
      if (trial == 1) chk(cnt_s == 0 && cnt_l == 0, "all-zero inputs");
      if (trial == 2) chk(cnt_s == 255, "all inputs 255: every r but one");
    end
    $display("MSE lfsr=%g sobol=%g", mse_l / 60.0, mse_s / 60.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
