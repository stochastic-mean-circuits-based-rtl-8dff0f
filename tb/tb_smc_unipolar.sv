// tb_smc_unipolar: unipolar mean circuit, N = 9 and K = 8, LFSR and Sobol
// sources side by side, plus a 4-input LFSR instance. For random inputs
// every output bit is checked against a model with thresholds
// round(i * 2^K / N), the count against the model, and the estimate
// against the exact mean within a tolerance.
module tb_smc_unipolar;
  import tb_sc_model_pkg::*;
  localparam int K = 8;

  logic         clk = 0, rst_n = 0, clear = 0, en = 0;
  logic [K-1:0] y [9];
  logic [K-1:0] y4 [4];
  logic         f_l, f_s, f_4;
  int checks = 0, failures = 0;

  smc_unipolar #(.N(9), .K(K), .KIND(sc_pkg::RNS_LFSR))  dut_l (.clk, .rst_n, .clear, .en, .y, .f(f_l));
  smc_unipolar #(.N(9), .K(K), .KIND(sc_pkg::RNS_SOBOL)) dut_s (.clk, .rst_n, .clear, .en, .y, .f(f_s));
  smc_unipolar #(.N(4), .K(K), .KIND(sc_pkg::RNS_LFSR))  dut_4 (.clk, .rst_n, .clear, .en, .y(y4), .f(f_4));

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
    int unsigned yv [9], tv [], tv4 [];
    int unsigned rl, rs;
    int cnt_l, cnt_s, cnt_4, mdl_l, mdl_s, mdl_4, sel;
    real exact, exact4, e;
    tv = new[9];
    tv4 = new[4];
    for (int i = 0; i < 9; i++) tv[i] = thr_of(i + 1, 9, K);
    for (int i = 0; i < 4; i++) tv4[i] = thr_of(i + 1, 4, K);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 60; trial++) begin
      exact = 0; exact4 = 0;
      for (int i = 0; i < 9; i++) begin
        yv[i] = $urandom_range(0, 255);
        y[i]  = K'(yv[i]);
        exact += real'(yv[i]) / 256.0 / 9.0;
        if (i < 4) begin
          y4[i] = K'(yv[i]);
          exact4 += real'(yv[i]) / 256.0 / 4.0;
        end
      end
      @(negedge clk); clear = 1;
      @(negedge clk); clear = 0; en = 1;
      rl = 1; cnt_l = 0; cnt_s = 0; cnt_4 = 0; mdl_l = 0; mdl_s = 0; mdl_4 = 0;
      for (int t = 0; t < 256; t++) begin
        bit el, es, e4;
        rs  = sobol_at(t, K);
        sel = sel_index(rl, tv, 9);
        el  = (sel >= 0) && (yv[sel] > rev(rl, K));
        sel = sel_index(rs, tv, 9);
        es  = (sel >= 0) && (yv[sel] > rev(rs, K));
        sel = sel_index(rl, tv4, 4);
        e4  = (sel >= 0) && (yv[sel] > rev(rl, K));
        #1;
        chk(f_l == el, $sformatf("lfsr bit trial=%0d t=%0d", trial, t));
        chk(f_s == es, $sformatf("sobol bit trial=%0d t=%0d", trial, t));
        chk(f_4 == e4, $sformatf("4-input bit trial=%0d t=%0d", trial, t));
        cnt_l += f_l; cnt_s += f_s; cnt_4 += f_4; mdl_l += el; mdl_s += es; mdl_4 += e4;
        @(negedge clk);
        rl = lfsr8_next(8'(rl));
      end
      en = 0;
      chk(cnt_l == mdl_l && cnt_s == mdl_s && cnt_4 == mdl_4, "counts");
      e = real'(cnt_l) / 256.0 - exact;
      chk(e < 0.05 && e > -0.05, $sformatf("lfsr accuracy %f vs %f", real'(cnt_l)/256.0, exact));
      e = real'(cnt_s) / 256.0 - exact;
      chk(e < 0.04 && e > -0.04, $sformatf("sobol accuracy %f vs %f", real'(cnt_s)/256.0, exact));
      e = real'(cnt_4) / 256.0 - exact4;
      chk(e < 0.05 && e > -0.05, $sformatf("4-input accuracy %f vs %f", real'(cnt_4)/256.0, exact4));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
