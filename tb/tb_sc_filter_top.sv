// tb_sc_filter_top: end-to-end test of the 3x3 stochastic window processor
// at its default parameters (K = 8, LFSR source).
//
// Windows (structured edges, flat, noisy, random) are processed one after
// another. For each, the testbench replays the 256-cycle run in a model of
// the random source, the selectors, the input SNGs and the 16-state FSMs
// and requires every count to match exactly; it also checks each decoded
// result against the exact arithmetic (Gaussian, mean and signed mean
// within small bounds, gradients and magnitudes within looser ones) and
// the start-to-done latency of 2^K + 2 cycles. Counted mechanisms, each
// of which must happen: accepted start, start ignored while busy,
// negative sign in the bipolar mean, negative and positive gradient,
// absolute-value fold of a negative gradient.
module tb_sc_filter_top;
  import tb_sc_model_pkg::*;
  localparam int K = 8;
  localparam int NWIN = 24;

  logic         clk = 0, rst_n = 0, start = 0;
  logic [K-1:0] pix [9];
  logic [8:0]   mean_b_neg;
  logic         busy, done;
  logic [K:0]   gauss_cnt, gx_cnt, gy_cnt, abs_gx_cnt, abs_gy_cnt, mean_u_cnt, mean_b_cnt;
  int checks = 0, failures = 0;

  sc_filter_top dut (
    .clk, .rst_n, .start, .pix, .mean_b_neg, .busy, .done,
    .gauss_cnt, .gx_cnt, .gy_cnt, .abs_gx_cnt, .abs_gy_cnt, .mean_u_cnt, .mean_b_cnt);

  always #5 clk = ~clk;

  initial begin
    repeat (NWIN * 300 + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL: %s", what);
    end
  endtask

  // One output bit of an inner-product circuit with integer weights w.
  function automatic bit ip_bit(int unsigned r, int w [9], int unsigned pv [9], bit bipolar);
    int unsigned tv [];
    int unsigned cum, tot;
    int sel;
    tv = new[9];
    tot = 0;
    for (int i = 0; i < 9; i++) tot += (w[i] < 0) ? -w[i] : w[i];
    cum = 0;
    for (int i = 0; i < 9; i++) begin
      cum += (w[i] < 0) ? -w[i] : w[i];
      tv[i] = thr_of(cum, tot, K);
    end
    sel = sel_index(r, tv, 9);
    if (sel < 0) return 1'b0;
    return (pv[sel] > rev(r, K)) != (bipolar && w[sel] < 0);
  endfunction

  function automatic real bip(int c);
    return 2.0 * real'(c) / 256.0 - 1.0;
  endfunction

  function automatic real fabs(real v);
    return (v < 0) ? -v : v;
  endfunction

  int n_start, n_ignored, n_neg_mean, n_neg_grad, n_pos_grad, n_fold;

  initial begin
    int wg [9] = '{1, 2, 1, 2, 4, 2, 1, 2, 1};
    int wx [9] = '{-1, 0, 1, -2, 0, 2, -1, 0, 1};
    int wy [9] = '{-1, -2, -1, 0, 0, 0, 1, 2, 1};
    int wm [9];
    int wu [9] = '{1, 1, 1, 1, 1, 1, 1, 1, 1};
    int unsigned pv [9];
    int unsigned r, sx, sy;
    int mg, mx, my, max_, may, mu, mb, lat, Gx, Gy;
    real eg, ex, ey, eu, eb, e;
    n_start = 0; n_ignored = 0; n_neg_mean = 0; n_neg_grad = 0; n_pos_grad = 0; n_fold = 0;
    mean_b_neg = '0;
    for (int i = 0; i < 9; i++) pix[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < NWIN; w++) begin
      for (int i = 0; i < 9; i++) begin
        case (w)
          0: pv[i] = (i % 3 == 2) ? 250 : 5;
          1: pv[i] = (i % 3 == 0) ? 250 : 5;
          2: pv[i] = (i / 3 == 2) ? 230 : 20;
          3: pv[i] = 100;
          4: pv[i] = (i == 4) ? 255 : 60;          // salt noise in the centre
          5: pv[i] = (i == 4) ? 0 : 200;           // pepper noise in the centre
          default: pv[i] = $urandom_range(0, 255);
        endcase
      end
      // Each window is driven with start; the sign vector is random from
      // window 6 on.
      @(negedge clk);
      for (int i = 0; i < 9; i++) begin
        pix[i] = K'(pv[i]);
        wm[i]  = (w >= 6 && $urandom_range(0, 2) == 0) ? -1 : 1;
        mean_b_neg[i] = (wm[i] < 0);
      end
      start = 1;
      @(negedge clk);
      start = 0;
      n_start++;
      // Scramble the inputs: the window was captured at the start edge.
      for (int i = 0; i < 9; i++) pix[i] = K'($urandom);
      mean_b_neg = 9'($urandom);
      lat = 1;
      while (!done && lat < 400) begin
        if (lat == 50 && (w % 4 == 1)) begin
          start = 1;
          n_ignored++;
        end else start = 0;
        @(negedge clk);
        lat++;
      end
      start = 0;
      chk(lat == 258, $sformatf("window %0d latency %0d", w, lat));
      // Reference: replay the stream.
      r = 1; sx = 8; sy = 8;
      mg = 0; mx = 0; my = 0; max_ = 0; may = 0; mu = 0; mb = 0;
      for (int t = 0; t < 256; t++) begin
        bit bx, by;
        bx = ip_bit(r, wx, pv, 1'b1);
        by = ip_bit(r, wy, pv, 1'b1);
        mg += ip_bit(r, wg, pv, 1'b0);
        mu += ip_bit(r, wu, pv, 1'b0);
        mb += ip_bit(r, wm, pv, 1'b1);
        mx += bx; my += by;
        max_ += abs_out(sx, 16); may += abs_out(sy, 16);
        sx = abs_next(sx, bx, 16);
        sy = abs_next(sy, by, 16);
        r = lfsr8_next(8'(r));
      end
      chk(int'(gauss_cnt) == mg,   $sformatf("w%0d gauss %0d model %0d", w, gauss_cnt, mg));
      chk(int'(gx_cnt) == mx,      $sformatf("w%0d gx %0d model %0d", w, gx_cnt, mx));
      chk(int'(gy_cnt) == my,      $sformatf("w%0d gy %0d model %0d", w, gy_cnt, my));
      chk(int'(abs_gx_cnt) == max_, $sformatf("w%0d |gx| %0d model %0d", w, abs_gx_cnt, max_));
      chk(int'(abs_gy_cnt) == may, $sformatf("w%0d |gy| %0d model %0d", w, abs_gy_cnt, may));
      chk(int'(mean_u_cnt) == mu,  $sformatf("w%0d mean %0d model %0d", w, mean_u_cnt, mu));
      chk(int'(mean_b_cnt) == mb,  $sformatf("w%0d signed mean %0d model %0d", w, mean_b_cnt, mb));
      // Exact arithmetic.
      eg = 0; eu = 0; eb = 0; Gx = 0; Gy = 0;
      for (int i = 0; i < 9; i++) begin
        eg += real'(wg[i]) / 16.0 * real'(pv[i]) / 256.0;
        eu += real'(pv[i]) / 256.0 / 9.0;
        eb += real'(wm[i]) / 9.0 * (2.0 * real'(pv[i]) / 256.0 - 1.0);
        Gx += wx[i] * int'(pv[i]);
        Gy += wy[i] * int'(pv[i]);
      end
      ex = 2.0 * real'(Gx) / 2048.0;
      ey = 2.0 * real'(Gy) / 2048.0;
      e = real'(gauss_cnt) / 256.0 - eg;  chk(fabs(e) < 0.06, $sformatf("w%0d gaussian %f vs %f", w, real'(gauss_cnt)/256.0, eg));
      e = real'(mean_u_cnt) / 256.0 - eu; chk(fabs(e) < 0.05, $sformatf("w%0d mean %f vs %f", w, real'(mean_u_cnt)/256.0, eu));
      e = bip(mean_b_cnt) - eb;           chk(fabs(e) < 0.1,  $sformatf("w%0d signed mean %f vs %f", w, bip(mean_b_cnt), eb));
      e = bip(gx_cnt) - ex;               chk(fabs(e) < 0.12, $sformatf("w%0d Gx' %f vs %f", w, bip(gx_cnt), ex));
      e = bip(gy_cnt) - ey;               chk(fabs(e) < 0.12, $sformatf("w%0d Gy' %f vs %f", w, bip(gy_cnt), ey));
      e = bip(abs_gx_cnt) - fabs(ex);     chk(fabs(e) < 0.3,  $sformatf("w%0d |Gx'| %f vs %f", w, bip(abs_gx_cnt), ex));
      e = bip(abs_gy_cnt) - fabs(ey);     chk(fabs(e) < 0.3,  $sformatf("w%0d |Gy'| %f vs %f", w, bip(abs_gy_cnt), ey));
      foreach (wm[i]) if (wm[i] < 0) begin n_neg_mean++; break; end
      if (ex < -0.3 || ey < -0.3) n_neg_grad++;
      if (ex > 0.3 || ey > 0.3) n_pos_grad++;
      if ((ex < -0.3 && bip(abs_gx_cnt) > 0.3) || (ey < -0.3 && bip(abs_gy_cnt) > 0.3)) n_fold++;
      @(negedge clk);
      chk(!busy, "idle after done");
    end
    $display("mechanisms: start=%0d ignored_start=%0d neg_mean_sign=%0d neg_grad=%0d pos_grad=%0d abs_fold=%0d",
             n_start, n_ignored, n_neg_mean, n_neg_grad, n_pos_grad, n_fold);
    chk(n_start == NWIN, "starts");
    chk(n_ignored > 0, "start while busy");
    chk(n_neg_mean > 0, "negative mean sign");
    chk(n_neg_grad > 0, "negative gradient");
    chk(n_pos_grad > 0, "positive gradient");
    chk(n_fold > 0, "absolute value of a negative gradient");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
