// tb_sobol_rns: checks the Sobol generator against the closed form
// rev(gray(t)), that 2^K consecutive values are a permutation of
// 0..2^K-1, the wrap back to 0, hold when en is low and restart on clear.
module tb_sobol_rns;
  import tb_sc_model_pkg::*;

  logic       clk = 0, rst_n = 0, clear = 0, en = 0;
  logic [7:0] r;
  int checks = 0, failures = 0;

  sobol_rns #(.K(8)) dut (.clk, .rst_n, .clear, .en, .r);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  initial begin
    bit seen [256];
    int distinct;
    logic [7:0] held;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    en = 1;
    for (int t = 0; t < 512; t++) begin
      chk(r == 8'(sobol_at(t, 8)), $sformatf("t=%0d r=%0d model=%0d", t, r, sobol_at(t, 8)));
      if (t < 256) seen[r] = 1;
      @(posedge clk); #1;
    end
    distinct = 0;
    foreach (seen[i]) distinct += seen[i];
    chk(distinct == 256, $sformatf("distinct=%0d", distinct));
    en = 0;
    held = r;
    repeat (3) @(posedge clk);
    #1 chk(r == held, "hold");
    en = 1;
    repeat (5) @(posedge clk);
    clear = 1;
    @(posedge clk); #1;
    chk(r == 0, "clear");
    clear = 0;
    @(posedge clk); #1;
    chk(r == 128, "first step after clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
