// tb_sobel_edge: Sobel unit with an LFSR source. For random and structured
// windows (vertical edge, horizontal edge, flat) it checks each cycle the
// Gx' and Gy' streams against a bipolar inner-product model with the Sobel
// kernels, and the |Gx'|, |Gy'| streams against an FSM model. It then
// checks the decoded gradients against the exact values 2*G/(8*256) and
// the decoded magnitudes loosely against their absolute values.
module tb_sobel_edge;
  import tb_sc_model_pkg::*;
  localparam int K = 8;

  logic         clk = 0, rst_n = 0, clear = 0, en = 0;
  logic [K-1:0] pix [9];
  logic         gx, gy, abs_gx, abs_gy;
  int checks = 0, failures = 0;

  sobel_edge #(.K(K), .KIND(sc_pkg::RNS_LFSR)) dut (
    .clk, .rst_n, .clear, .en, .pix, .gx, .gy, .abs_gx, .abs_gy);

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

  function automatic bit sipc_bit(int unsigned r, int w [9], int unsigned pv [9]);
    int unsigned tv [];
    int unsigned cum;
    int sel;
    tv = new[9];
    cum = 0;
    for (int i = 0; i < 9; i++) begin
      cum += (w[i] < 0) ? -w[i] : w[i];
      tv[i] = thr_of(cum, 8, K);
    end
    sel = sel_index(r, tv, 9);
    return (sel >= 0) && ((pv[sel] > rev(r, K)) != (w[sel] < 0));
  endfunction

  initial begin
    int wx [9] = '{-1, 0, 1, -2, 0, 2, -1, 0, 1};
    int wy [9] = '{-1, -2, -1, 0, 0, 0, 1, 2, 1};
    int unsigned pv [9];
    int unsigned r, sx, sy;
    int cgx, cgy, cax, cay, Gx, Gy;
    real ex, ey, e;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 40; trial++) begin
      for (int i = 0; i < 9; i++) begin
        case (trial)
          0: pv[i] = (i % 3 == 2) ? 250 : 5;      // vertical edge
          1: pv[i] = (i / 3 == 0) ? 240 : 10;     // horizontal edge
          2: pv[i] = 128;                         // flat
          default: pv[i] = $urandom_range(0, 255);
        endcase
        pix[i] = K'(pv[i]);
      end
      Gx = 0; Gy = 0;
      for (int i = 0; i < 9; i++) begin
        Gx += wx[i] * int'(pv[i]);
        Gy += wy[i] * int'(pv[i]);
      end
      ex = 2.0 * real'(Gx) / (8.0 * 256.0);
      ey = 2.0 * real'(Gy) / (8.0 * 256.0);
      @(negedge clk); clear = 1;
      @(negedge clk); clear = 0; en = 1;
      r = 1; sx = 8; sy = 8; cgx = 0; cgy = 0; cax = 0; cay = 0;
      for (int t = 0; t < 256; t++) begin
        bit bx, by;
        bx = sipc_bit(r, wx, pv);
        by = sipc_bit(r, wy, pv);
        #1;
        chk(gx == bx && gy == by, $sformatf("gradient bits trial=%0d t=%0d", trial, t));
        chk(abs_gx == abs_out(sx, 16) && abs_gy == abs_out(sy, 16),
            $sformatf("abs bits trial=%0d t=%0d", trial, t));
        cgx += gx; cgy += gy; cax += abs_gx; cay += abs_gy;
        @(negedge clk);
        sx = abs_next(sx, bx, 16);
        sy = abs_next(sy, by, 16);
        r = lfsr8_next(8'(r));
      end
      en = 0;
      e = 2.0 * real'(cgx) / 256.0 - 1.0 - ex;
      chk(e < 0.12 && e > -0.12, $sformatf("Gx' %f vs %f", 2.0*real'(cgx)/256.0-1.0, ex));
      e = 2.0 * real'(cgy) / 256.0 - 1.0 - ey;
      chk(e < 0.12 && e > -0.12, $sformatf("Gy' %f vs %f", 2.0*real'(cgy)/256.0-1.0, ey));
      e = 2.0 * real'(cax) / 256.0 - 1.0 - (ex < 0 ? -ex : ex);
      chk(e < 0.3 && e > -0.3, $sformatf("|Gx'| %f vs %f", 2.0*real'(cax)/256.0-1.0, ex));
      e = 2.0 * real'(cay) / 256.0 - 1.0 - (ey < 0 ? -ey : ey);
      chk(e < 0.3 && e > -0.3, $sformatf("|Gy'| %f vs %f", 2.0*real'(cay)/256.0-1.0, ey));
      if (trial == 0) chk(cax > 200 && cay < 180, "vertical edge seen in x only");
      if (trial == 1) chk(cay > 200 && cax < 180, "horizontal edge seen in y only");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
