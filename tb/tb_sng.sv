// tb_sng: exhaustive check of the 4-bit SNG comparator (b = 0..16,
// r = 0..15): s must be 1 exactly when b > r, so b = 16 gives all ones.
module tb_sng;
  logic [4:0] b;
  logic [3:0] r;
  logic       s;
  int checks = 0, failures = 0;

  sng #(.K(4)) dut (.b, .r, .s);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int bi = 0; bi <= 16; bi++) begin
      int ones;
      ones = 0;
      for (int ri = 0; ri < 16; ri++) begin
        b = 5'(bi);
        r = 4'(ri);
        #1;
        checks++;
        if (s !== (bi > ri)) begin
          failures++;
          $display("FAIL b=%0d r=%0d s=%0b", bi, ri, s);
        end
        ones += s;
      end
      checks++;
      if (ones != bi) begin
        failures++;
        $display("FAIL b=%0d ones=%0d", bi, ones);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
