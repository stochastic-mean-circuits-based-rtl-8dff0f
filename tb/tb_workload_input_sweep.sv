// tb_workload_input_sweep: accuracy against the number of inputs and
// against the source width, the sweeps the design is characterised by.
// Number of inputs, 8-bit LFSR sources: Unipolar
// inner-product circuits of 4, 16, 64, 256 and 1024 inputs, bipolar ones
// of 4, 16 and 64 inputs, and unipolar / bipolar mean circuits of 64 and
// 1024 / 64 inputs each run 20 random products; the mean squared error of
// each is printed and checked against a bound (2e-3 unipolar, 4e-3
// bipolar). Expected orders of magnitude: ~1e-4 for a few inputs,
// ~5e-4 for 1024 unipolar and ~1e-3 for 64 bipolar inputs.
// Source width: 9-input unipolar and bipolar SIPCs and the unipolar SMC
// with LFSR and Sobol sources of K = 4, 6, 8 and 10 bits (streams of 2^K
// bits); the MSE must fall as K grows (from 4 to 8 and from 6 to 10 bits,
// for each circuit and source). LFSR and Sobol results are printed side
// by side; each unit draws its own random trials, so they are not compared.
module tb_workload_input_sweep;
  logic clk = 0, rst_n = 0, go = 0;
  localparam int NU = 9;
  localparam int NB = 5;
  logic fin [NU + NB];
  real  mse [NU + NB];
  int checks = 0, failures = 0;

  // unipolar inner products
  tb_sweep_unit #(.N(4),    .BIP(0)) u0 (.clk, .rst_n, .go, .finished(fin[0]), .mse(mse[0]));
  tb_sweep_unit #(.N(16),   .BIP(0)) u1 (.clk, .rst_n, .go, .finished(fin[1]), .mse(mse[1]));
  tb_sweep_unit #(.N(64),   .BIP(0)) u2 (.clk, .rst_n, .go, .finished(fin[2]), .mse(mse[2]));
  tb_sweep_unit #(.N(256),  .BIP(0)) u3 (.clk, .rst_n, .go, .finished(fin[3]), .mse(mse[3]));
  tb_sweep_unit #(.N(1024), .BIP(0)) u4 (.clk, .rst_n, .go, .finished(fin[4]), .mse(mse[4]));
  // unipolar means
  tb_sweep_unit #(.N(64),   .BIP(0), .MEAN(1)) u5 (.clk, .rst_n, .go, .finished(fin[5]), .mse(mse[5]));
  tb_sweep_unit #(.N(1024), .BIP(0), .MEAN(1)) u6 (.clk, .rst_n, .go, .finished(fin[6]), .mse(mse[6]));
  tb_sweep_unit #(.N(9),    .BIP(0), .MEAN(1)) u7 (.clk, .rst_n, .go, .finished(fin[7]), .mse(mse[7]));
  tb_sweep_unit #(.N(9),    .BIP(0))           u8 (.clk, .rst_n, .go, .finished(fin[8]), .mse(mse[8]));
  // bipolar
  tb_sweep_unit #(.N(4),    .BIP(1)) b0 (.clk, .rst_n, .go, .finished(fin[9]),  .mse(mse[9]));
  tb_sweep_unit #(.N(16),   .BIP(1)) b1 (.clk, .rst_n, .go, .finished(fin[10]), .mse(mse[10]));
  tb_sweep_unit #(.N(64),   .BIP(1)) b2 (.clk, .rst_n, .go, .finished(fin[11]), .mse(mse[11]));
  tb_sweep_unit #(.N(64),   .BIP(1), .MEAN(1)) b3 (.clk, .rst_n, .go, .finished(fin[12]), .mse(mse[12]));
  tb_sweep_unit #(.N(9),    .BIP(1))           b4 (.clk, .rst_n, .go, .finished(fin[13]), .mse(mse[13]));

  // source width sweep: [circuit][source][width]
  localparam int KW [4] = '{4, 6, 8, 10};
  logic kfin [3][2][4];
  real  kmse [3][2][4];
  for (genvar c = 0; c < 3; c++) begin : g_c
    for (genvar s = 0; s < 2; s++) begin : g_s
      for (genvar k = 0; k < 4; k++) begin : g_k
        tb_sweep_unit #(.N(9), .BIP(c == 1), .MEAN(c == 2), .TRIALS(40), .K(KW[k]),
                        .KIND(s == 0 ? sc_pkg::RNS_LFSR : sc_pkg::RNS_SOBOL))
          u (.clk, .rst_n, .go, .finished(kfin[c][s][k]), .mse(kmse[c][s][k]));
      end
    end
  end
  string cname [3] = '{"SIPC-u 9", "SIPC-b 9", "SMC-u 9"};
  string sname [2] = '{"LFSR", "Sobol"};

  string names [NU + NB] = '{"SIPC-u 4", "SIPC-u 16", "SIPC-u 64", "SIPC-u 256", "SIPC-u 1024",
                             "SMC-u 64", "SMC-u 1024", "SMC-u 9", "SIPC-u 9",
                             "SIPC-b 4", "SIPC-b 16", "SIPC-b 64", "SMC-b 64", "SIPC-b 9"};

  always #5 clk = ~clk;

  initial begin
    repeat (40 * 1030 + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) go = 1;
    foreach (fin[i]) wait (fin[i]);
    foreach (kfin[c, s, k]) wait (kfin[c][s][k]);
    foreach (mse[i]) begin
      real bound;
      bound = (i < NU) ? 2e-3 : 4e-3;
      $display("%-12s MSE %8.2e", names[i], mse[i]);
      checks++;
      if (!(mse[i] < bound)) begin
        failures++;
        $display("FAIL: %s MSE above %g", names[i], bound);
      end
    end
    foreach (kmse[c, s]) begin
      $display("%-9s %-5s MSE vs K=4,6,8,10: %8.2e %8.2e %8.2e %8.2e", cname[c], sname[s],
               kmse[c][s][0], kmse[c][s][1], kmse[c][s][2], kmse[c][s][3]);
      checks++;
      if (!(kmse[c][s][2] < kmse[c][s][0] && kmse[c][s][3] < kmse[c][s][1])) begin
        failures++;
        $display("FAIL: %s %s MSE does not fall with K", cname[c], sname[s]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
