// tb_sc_counter: random bits with random enables; the count must equal the
// number of enabled ones, hold while en is low and return to 0 on clear.
module tb_sc_counter;
  logic       clk = 0, rst_n = 0, clear = 0, en = 0, bit_in = 0;
  logic [8:0] count;
  int checks = 0, failures = 0;

  sc_counter #(.K(8)) dut (.clk, .rst_n, .clear, .en, .bit_in, .count);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int model;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 4; run++) begin
      @(negedge clk); clear = 1;
      @(negedge clk); clear = 0;
      model = 0;
      checks++;
      if (count != 0) begin failures++; $display("FAIL clear"); end
      for (int t = 0; t < 256 + run * 40; t++) begin
        en = ($urandom_range(0, 3) != 0) || run == 3;
        bit_in = (run == 3) ? 1'b1 : 1'($urandom_range(0, 1));
        @(negedge clk);
        if (en && bit_in && model < 511) model++;
        checks++;
        if (int'(count) != model && run != 3) begin
          failures++;
          $display("FAIL run=%0d t=%0d count=%0d model=%0d", run, t, count, model);
        end
        if (run == 3 && t == 255) begin
          checks++;
          if (count != 256) begin failures++; $display("FAIL all-ones count=%0d", count); end
        end
      end
      en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
