// tb_lfsr_rns: checks the 8-bit LFSR against a bit-level model of
// x^8+x^6+x^5+x^4+1, its period of 255 distinct non-zero values, hold
// when en is low and reload on clear. A 5-bit instance is checked for its
// full period of 31 distinct values.
module tb_lfsr_rns;
  import tb_sc_model_pkg::*;

  logic       clk = 0, rst_n = 0, clear = 0, en = 0;
  logic [7:0] r;
  logic [4:0] r5;
  int checks = 0, failures = 0;

  lfsr_rns #(.K(8), .SEED(8'h5A)) dut   (.clk, .rst_n, .clear, .en, .r);
  lfsr_rns #(.K(5), .SEED(1))     dut5  (.clk, .rst_n, .clear, .en, .r(r5));

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
    logic [7:0] model;
    bit seen [256];
    bit seen5 [32];
    int distinct;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    chk(r == 8'h5A, "seed after reset");
    model = 8'h5A;
    en = 1;
    for (int t = 0; t < 255; t++) begin
      chk(r == model, $sformatf("t=%0d r=%02x model=%02x", t, r, model));
      chk(r != 0, "zero state");
      seen[r] = 1;
      seen5[r5] = 1;
      model = lfsr8_next(model);
      @(posedge clk); #1;
    end
    chk(r == 8'h5A, "period 255");
    distinct = 0;
    foreach (seen[i]) distinct += seen[i];
    chk(distinct == 255, $sformatf("distinct=%0d", distinct));
    distinct = 0;
    foreach (seen5[i]) distinct += seen5[i];
    chk(distinct == 31 && !seen5[0], $sformatf("5-bit distinct=%0d", distinct));
    // hold
    @(posedge clk); #1;
    en = 0;
    model = r;
    repeat (3) @(posedge clk);
    #1 chk(r == model, "hold when en low");
    // clear wins over en
    en = 1; clear = 1;
    @(posedge clk); #1;
    chk(r == 8'h5A, "reload on clear");
    clear = 0; en = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
