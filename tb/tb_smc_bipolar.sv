// tb_smc_bipolar: bipolar mean circuit, N = 9 and K = 8, LFSR and Sobol
// sources. Half the trials use all-positive signs (plain bipolar mean),
// half random signs. Every output bit is checked against a model, the
// count against the model and the bipolar estimate against
// sum_i s_i Y_i / N within a tolerance.
module tb_smc_bipolar;
  import tb_sc_model_pkg::*;
  localparam int K = 8;

  logic         clk = 0, rst_n = 0, clear = 0, en = 0;
  logic [8:0]   neg;
  logic [K-1:0] y [9];
  logic         f_l, f_s;
  int checks = 0, failures = 0;

  smc_bipolar #(.N(9), .K(K), .KIND(sc_pkg::RNS_LFSR))  dut_l (.clk, .rst_n, .clear, .en, .neg, .y, .f(f_l));
  smc_bipolar #(.N(9), .K(K), .KIND(sc_pkg::RNS_SOBOL)) dut_s (.clk, .rst_n, .clear, .en, .neg, .y, .f(f_s));

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
    int unsigned yv [9], tv [];
    int unsigned rl, rs;
    int cnt_l, cnt_s, mdl_l, mdl_s, sel;
    real exact, e;
    tv = new[9];
    for (int i = 0; i < 9; i++) tv[i] = thr_of(i + 1, 9, K);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 60; trial++) begin
      exact = 0;
      for (int i = 0; i < 9; i++) begin
        yv[i]  = $urandom_range(0, 255);
        y[i]   = K'(yv[i]);
        neg[i] = (trial % 2 == 1) ? 1'($urandom_range(0, 1)) : 1'b0;
        exact += (neg[i] ? -1.0 : 1.0) * (2.0 * real'(yv[i]) / 256.0 - 1.0) / 9.0;
      end
      @(negedge clk); clear = 1;
      @(negedge clk); clear = 0; en = 1;
      rl = 1; cnt_l = 0; cnt_s = 0; mdl_l = 0; mdl_s = 0;
      for (int t = 0; t < 256; t++) begin
        bit el, es;
        rs  = sobol_at(t, K);
        sel = sel_index(rl, tv, 9);
        el  = (sel >= 0) && ((yv[sel] > rev(rl, K)) != neg[sel]);
        sel = sel_index(rs, tv, 9);
        es  = (sel >= 0) && ((yv[sel] > rev(rs, K)) != neg[sel]);
        #1;
        chk(f_l == el, $sformatf("lfsr bit trial=%0d t=%0d", trial, t));
        chk(f_s == es, $sformatf("sobol bit trial=%0d t=%0d", trial, t));
        cnt_l += f_l; cnt_s += f_s; mdl_l += el; mdl_s += es;
        @(negedge clk);
        rl = lfsr8_next(8'(rl));
      end
      en = 0;
      chk(cnt_l == mdl_l && cnt_s == mdl_s, "counts");
      e = 2.0 * real'(cnt_l) / 256.0 - 1.0 - exact;
      chk(e < 0.1 && e > -0.1, $sformatf("lfsr accuracy %f vs %f", 2.0*real'(cnt_l)/256.0-1.0, exact));
      e = 2.0 * real'(cnt_s) / 256.0 - 1.0 - exact;
      chk(e < 0.08 && e > -0.08, $sformatf("sobol accuracy %f vs %f", 2.0*real'(cnt_s)/256.0-1.0, exact));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
