// tb_sc_eval_ctrl: checks the run sequence: one clear cycle, exactly 2^K
// enable cycles, a one-cycle done pulse 2^K + 2 cycles after the start
// edge, busy throughout, and that a start during a run is ignored.
module tb_sc_eval_ctrl;
  logic clk = 0, rst_n = 0, start = 0;
  logic busy, clear, en, done;
  int checks = 0, failures = 0;

  sc_eval_ctrl #(.K(8)) dut (.clk, .rst_n, .start, .busy, .clear, .en, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
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
    int n_clear, n_en, lat;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 3; run++) begin
      @(negedge clk);
      chk(!busy && !en && !clear && !done, "idle outputs");
      start = 1;
      @(negedge clk);
      start = 0;
      n_clear = 0; n_en = 0; lat = 1;
      while (!done) begin
        chk(busy, "busy during run");
        n_clear += clear;
        n_en    += en;
        if (run == 1 && lat == 100) start = 1;   // ignored
        if (run == 1 && lat == 101) start = 0;
        @(negedge clk);
        lat++;
        if (lat > 1000) break;
      end
      chk(n_clear == 1, $sformatf("clear cycles %0d", n_clear));
      chk(n_en == 256, $sformatf("en cycles %0d", n_en));
      chk(lat == 258, $sformatf("latency %0d", lat));
      @(negedge clk);
      chk(!done && !busy, "done is one cycle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
