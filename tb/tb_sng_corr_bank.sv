// tb_sng_corr_bank: drives random thresholds and sweeps the shared random
// number over all values. Checks every stream bit against b > r, the ones
// count of each stream (b/2^K of the sweep) and the nesting property of
// correlated streams: a stream with the smaller threshold never has a 1
// where one with a larger threshold has a 0.
module tb_sng_corr_bank;
  localparam int N = 5;
  logic [8:0] b [N];
  logic [7:0] r;
  logic [N-1:0] s;
  int checks = 0, failures = 0;

  sng_corr_bank #(.N(N), .K(8)) dut (.b, .r, .s);

  initial begin
    #10000000;
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
    int bv [N];
    int ones [N];
    for (int trial = 0; trial < 20; trial++) begin
      for (int i = 0; i < N; i++) begin
        bv[i] = (trial == 0 && i == 0) ? 256 : int'($urandom_range(0, 256));
        b[i] = 9'(bv[i]);
        ones[i] = 0;
      end
      for (int rv = 0; rv < 256; rv++) begin
        r = 8'(rv);
        #1;
        for (int i = 0; i < N; i++) begin
          chk(s[i] == (bv[i] > rv), $sformatf("bit i=%0d b=%0d r=%0d", i, bv[i], rv));
          ones[i] += s[i];
          for (int j = 0; j < N; j++)
            if (bv[i] <= bv[j]) chk(!(s[i] && !s[j]), "nesting");
        end
      end
      for (int i = 0; i < N; i++) chk(ones[i] == bv[i], $sformatf("ones i=%0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
