// tb_workload_images: the three image applications on a generated test
// image. A 32x32 8-bit image (a diagonal gradient with a bright square and
// a dark disc) is polluted with salt-and-pepper noise of density 0.01 and
// every pixel's 3x3 window (borders replicated) is processed by two window
// processors, one with LFSR sources (default) and one with Sobol sources.
// The decoded Gaussian, mean, |Gx'| and |Gy'| images are compared with the
// exact filters on the same noisy image and the PSNR (peak 1.0) of each is
// printed. Gaussian and mean are checked against 45 dB for both sources,
// the edge magnitudes against 20 dB for the LFSR source.
module tb_workload_images;
  localparam int W = 32;
  localparam int H = 32;
  localparam int K = 8;

  logic         clk = 0, rst_n = 0, start = 0;
  logic [K-1:0] pix [9];
  logic         busy_l, done_l, busy_s, done_s;
  logic [K:0]   g_l, gx_l, gy_l, ax_l, ay_l, mu_l, mb_l;
  logic [K:0]   g_s, gx_s, gy_s, ax_s, ay_s, mu_s, mb_s;
  int checks = 0, failures = 0;

  sc_filter_top dut_l (
    .clk, .rst_n, .start, .pix, .mean_b_neg(9'd0), .busy(busy_l), .done(done_l),
    .gauss_cnt(g_l), .gx_cnt(gx_l), .gy_cnt(gy_l), .abs_gx_cnt(ax_l), .abs_gy_cnt(ay_l),
    .mean_u_cnt(mu_l), .mean_b_cnt(mb_l));
  sc_filter_top #(.KIND(sc_pkg::RNS_SOBOL)) dut_s (
    .clk, .rst_n, .start, .pix, .mean_b_neg(9'd0), .busy(busy_s), .done(done_s),
    .gauss_cnt(g_s), .gx_cnt(gx_s), .gy_cnt(gy_s), .abs_gx_cnt(ax_s), .abs_gy_cnt(ay_s),
    .mean_u_cnt(mu_s), .mean_b_cnt(mb_s));

  always #5 clk = ~clk;

  initial begin
    repeat (W * H * 270 + 2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic real fabs(real v);
    return (v < 0) ? -v : v;
  endfunction

  function automatic real psnr(real se, int n);
    return 10.0 * $log10(1.0 / (se / real'(n)));
  endfunction

  int img [H][W];

  function automatic int px(int y, int x);
    if (y < 0) y = 0;
    if (y >= H) y = H - 1;
    if (x < 0) x = 0;
    if (x >= W) x = W - 1;
    return img[y][x];
  endfunction

  initial begin
    int gk [9] = '{1, 2, 1, 2, 4, 2, 1, 2, 1};
    int kx [9] = '{-1, 0, 1, -2, 0, 2, -1, 0, 1};
    int ky [9] = '{-1, -2, -1, 0, 0, 0, 1, 2, 1};
    real se_g [2], se_m [2], se_x [2], se_y [2];
    real eg, em, ex, ey, d;
    int n, noisy;
    noisy = 0;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int v;
        v = 40 + 4 * (x + y);
        if (x >= 6 && x < 14 && y >= 6 && y < 14) v = 235;
        if ((x - 22) * (x - 22) + (y - 20) * (y - 20) < 36) v = 15;
        if ($urandom_range(0, 999) < 10) begin
          v = $urandom_range(0, 1) ? 255 : 0;
          noisy++;
        end
        img[y][x] = (v > 255) ? 255 : v;
      end
    foreach (se_g[i]) begin se_g[i] = 0; se_m[i] = 0; se_x[i] = 0; se_y[i] = 0; end
    n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int gx, gy;
        eg = 0; em = 0; gx = 0; gy = 0;
        @(negedge clk);
        for (int i = 0; i < 9; i++) begin
          int v;
          v = px(y + i / 3 - 1, x + i % 3 - 1);
          pix[i] = K'(v);
          eg += real'(gk[i]) / 16.0 * real'(v) / 256.0;
          em += real'(v) / 256.0 / 9.0;
          gx += kx[i] * v;
          gy += ky[i] * v;
        end
        ex = fabs(2.0 * real'(gx) / 2048.0);
        ey = fabs(2.0 * real'(gy) / 2048.0);
        start = 1;
        @(negedge clk);
        start = 0;
        while (!done_l) @(negedge clk);
        d = real'(g_l) / 256.0 - eg;               se_g[0] += d * d;
        d = real'(g_s) / 256.0 - eg;               se_g[1] += d * d;
        d = real'(mu_l) / 256.0 - em;              se_m[0] += d * d;
        d = real'(mu_s) / 256.0 - em;              se_m[1] += d * d;
        d = 2.0 * real'(ax_l) / 256.0 - 1.0 - ex;  se_x[0] += d * d;
        d = 2.0 * real'(ax_s) / 256.0 - 1.0 - ex;  se_x[1] += d * d;
        d = 2.0 * real'(ay_l) / 256.0 - 1.0 - ey;  se_y[0] += d * d;
        d = 2.0 * real'(ay_s) / 256.0 - 1.0 - ey;  se_y[1] += d * d;
        n++;
        @(negedge clk);
      end
    $display("noisy pixels: %0d of %0d", noisy, W * H);
    $display("PSNR LFSR : gaussian %5.2f dB  mean %5.2f dB  |Gx'| %5.2f dB  |Gy'| %5.2f dB",
             psnr(se_g[0], n), psnr(se_m[0], n), psnr(se_x[0], n), psnr(se_y[0], n));
    $display("PSNR Sobol: gaussian %5.2f dB  mean %5.2f dB  |Gx'| %5.2f dB  |Gy'| %5.2f dB",
             psnr(se_g[1], n), psnr(se_m[1], n), psnr(se_x[1], n), psnr(se_y[1], n));
    chk(n == W * H, "all windows processed");
    for (int k = 0; k < 2; k++) begin
      chk(psnr(se_g[k], n) > 45.0, $sformatf("gaussian PSNR source %0d", k));
      chk(psnr(se_m[k], n) > 45.0, $sformatf("mean PSNR source %0d", k));
    end
    // The absolute-value FSM needs a stream whose ones are spread randomly
    // in time; with the ordered Sobol source it is not, so edges are
    // checked for the LFSR source only.
    chk(psnr(se_x[0], n) > 20.0, "|Gx'| PSNR, LFSR source");
    chk(psnr(se_y[0], n) > 20.0, "|Gy'| PSNR, LFSR source");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
