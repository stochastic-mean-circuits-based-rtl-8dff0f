// tb_workload_correlation: the correlated-stream arithmetic the circuits
// rely on, for LFSR and Sobol sources of K = 4..8 bits.
//
// For random pairs X, Y two SNGs share one random number r (positively
// correlated streams) and a third SNG sees the complement ~r (negatively
// correlated with the first). Over one 2^K-cycle stream the testbench
// measures:
//   - XOR of the positively correlated pair against |X - Y| (absolute
//     subtraction),
//   - OR of the negatively correlated pair against min(X + Y, 1)
//     (saturated addition),
//   - the stochastic computing correlation (SCC) of each pair.
// With the Sobol source, which visits every r once, both gates must be
// exact (MSE 0). With the LFSR, which never produces r = 0, the error must
// stay below 1/2^K per result. The average |SCC| of the positive pairs
// must be at least 0.95.
module tb_workload_correlation;
  import tb_sc_model_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0, en = 0;
  int checks = 0, failures = 0;

  localparam int KW [5] = '{4, 5, 6, 7, 8};
  logic [7:0] r_l [5];
  logic [7:0] r_s [5];
  logic [8:0] bx, by;
  logic [2:0] s_l [5];
  logic [2:0] s_s [5];

  for (genvar k = 0; k < 5; k++) begin : g_k
    localparam int K = KW[k];
    logic [K-1:0] rl, rs;
    logic [K:0]   b [2];
    logic [1:0]   sl_pos, ss_pos;
    logic         sl_neg, ss_neg;
    lfsr_rns  #(.K(K)) u_l (.clk, .rst_n, .clear, .en, .r(rl));
    sobol_rns #(.K(K)) u_s (.clk, .rst_n, .clear, .en, .r(rs));
    assign b[0] = {1'b0, bx[K-1:0]};
    assign b[1] = {1'b0, by[K-1:0]};
    sng_corr_bank #(.N(2), .K(K)) u_bl (.b, .r(rl), .s(sl_pos));
    sng_corr_bank #(.N(2), .K(K)) u_bs (.b, .r(rs), .s(ss_pos));
    sng #(.K(K)) u_nl (.b(b[1]), .r(~rl), .s(sl_neg));
    sng #(.K(K)) u_ns (.b(b[1]), .r(~rs), .s(ss_neg));
    assign s_l[k] = {sl_neg, sl_pos};
    assign s_s[k] = {ss_neg, ss_pos};
    assign r_l[k] = 8'(rl);
    assign r_s[k] = 8'(rs);
  end

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real scc(int n11, int n1x, int nx1, int len);
    real px, py, pxy, d;
    px = real'(n1x) / len; py = real'(nx1) / len; pxy = real'(n11) / len;
    d = pxy - px * py;
    if (d > 0)      return d / (((px < py) ? px : py) - px * py);
    else if (d < 0) return d / (px * py - ((px + py - 1.0 > 0) ? px + py - 1.0 : 0.0));
    else            return 0.0;
  endfunction

  initial begin
    real se_xor [2][5], se_or [2][5], scc_pos [2][5];
    int  n_pos [2][5];
    foreach (se_xor[s, k]) begin
      se_xor[s][k] = 0; se_or[s][k] = 0; scc_pos[s][k] = 0; n_pos[s][k] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 30; trial++) begin
      int cx [2][5], cy [2][5], cxy [2][5], cxor [2][5], cor [2][5];
      bx = 9'($urandom_range(0, 255));
      by = 9'($urandom_range(0, 255));
      foreach (cx[s, k]) begin cx[s][k] = 0; cy[s][k] = 0; cxy[s][k] = 0; cxor[s][k] = 0; cor[s][k] = 0; end
      @(negedge clk); clear = 1;
      @(negedge clk); clear = 0; en = 1;
      for (int t = 0; t < 256; t++) begin
        #1;
        for (int k = 0; k < 5; k++) begin
          if (t < (1 << KW[k])) begin
            logic [2:0] v [2];
            v[0] = s_l[k];
            v[1] = s_s[k];
            for (int s = 0; s < 2; s++) begin
              cx[s][k]   += v[s][0];
              cy[s][k]   += v[s][1];
              cxy[s][k]  += v[s][0] & v[s][1];
              cxor[s][k] += v[s][0] ^ v[s][1];
              cor[s][k]  += v[s][0] | v[s][2];
            end
          end
        end
        @(negedge clk);
      end
      en = 0;
      for (int k = 0; k < 5; k++) begin
        real L, X, Y, ex, eo, sc;
        L = real'(1 << KW[k]);
        X = real'(bx % (1 << KW[k])) / L;
        Y = real'(by % (1 << KW[k])) / L;
        for (int s = 0; s < 2; s++) begin
          ex = real'(cxor[s][k]) / L - ((X > Y) ? X - Y : Y - X);
          eo = real'(cor[s][k]) / L - ((X + Y > 1.0) ? 1.0 : X + Y);
          se_xor[s][k] += ex * ex;
          se_or[s][k]  += eo * eo;
          checks++;
          if ((s == 1 && (ex != 0.0 || eo != 0.0)) ||
              ex > 1.01 / L || ex < -1.01 / L || eo > 1.01 / L || eo < -1.01 / L) begin
            failures++;
            $display("FAIL: %s K=%0d X=%f Y=%f xor err %f or err %f",
                     s ? "Sobol" : "LFSR", KW[k], X, Y, ex, eo);
          end
          if (cx[s][k] > 0 && cy[s][k] > 0 && cx[s][k] < L && cy[s][k] < L && cx[s][k] != cy[s][k]) begin
            sc = scc(cxy[s][k], cx[s][k], cy[s][k], int'(L));
            scc_pos[s][k] += (sc < 0) ? -sc : sc;
            n_pos[s][k]++;
          end
        end
      end
    end
    for (int s = 0; s < 2; s++)
      for (int k = 0; k < 5; k++) begin
        real avg;
        avg = (n_pos[s][k] > 0) ? scc_pos[s][k] / n_pos[s][k] : 0.0;
        $display("%-5s K=%0d  |SCC| %6.4f  MSE xor %8.2e  MSE or %8.2e",
                 s ? "Sobol" : "LFSR", KW[k], avg, se_xor[s][k] / 30.0, se_or[s][k] / 30.0);
        checks++;
        if (!(avg >= 0.95)) begin
          failures++;
          $display("FAIL: average |SCC| %f", avg);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
