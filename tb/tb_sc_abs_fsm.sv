// tb_sc_abs_fsm: 16-state absolute-value FSM. Drives random bitstreams of
// several probabilities; checks the output every cycle against a state
// model (saturating up/down counter, Moore output) and checks that the
// output's bipolar value approaches |2p - 1| of the input. Also checks
// the start state after clear and saturation at both ends.
module tb_sc_abs_fsm;
  import tb_sc_model_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0, en = 0, x = 0;
  logic y;
  int checks = 0, failures = 0;

  sc_abs_fsm #(.NS(16)) dut (.clk, .rst_n, .clear, .en, .x, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  initial begin
    int unsigned s;
    int ones, sat_lo, sat_hi;
    int probs [7] = '{0, 5, 25, 50, 75, 95, 100};
    real a_in, a_out;
    sat_lo = 0; sat_hi = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (probs[k]) begin
      @(negedge clk); clear = 1;
      @(negedge clk); clear = 0; en = 1;
      s = 8; ones = 0;
      for (int t = 0; t < 4096; t++) begin
        x = ($urandom_range(0, 99) < probs[k]);
        #1;
        chk(y == abs_out(s, 16), $sformatf("p=%0d t=%0d state=%0d", probs[k], t, s));
        ones += y;
        if (s == 0) sat_lo++;
        if (s == 15) sat_hi++;
        @(negedge clk);
        s = abs_next(s, x, 16);
      end
      en = 0;
      a_in  = 2.0 * real'(probs[k]) / 100.0 - 1.0;
      if (a_in < 0) a_in = -a_in;
      a_out = 2.0 * real'(ones) / 4096.0 - 1.0;
      chk(a_out - a_in < 0.2 && a_in - a_out < 0.2,
          $sformatf("abs p=%0d: |A|=%f out=%f", probs[k], a_in, a_out));
    end
    chk(sat_lo > 0 && sat_hi > 0, "saturation at both ends");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
