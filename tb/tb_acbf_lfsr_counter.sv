// tb_acbf_lfsr_counter: drives the 3-bit up/down LFSR counter with random
// enable/direction and compares its state with an integer count mapped
// through the hand-derived state sequence; checks both saturation points.
module tb_acbf_lfsr_counter;
  import acbf_ref_pkg::*;

  logic clk, rst = 1, en = 0, up = 0;
  logic [2:0] q;
  logic at_max, at_zero;
  int checks = 0, failures = 0, cnt = 0, n_sat = 0, n_udf = 0;

  acbf_lfsr_counter dut (.clk, .rst, .en, .up, .q, .at_max, .at_zero);

  initial clk = 0;
  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s: q=%b cnt=%0d", what, q, cnt);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    check(q == 3'b000, "reset state");
    // Full up sweep then full down sweep, step by step.
    for (int k = 0; k < 16; k++) begin
      en = 1; up = (k < 8);
      @(posedge clk); #1;
      if (up) begin
        if (cnt == MAXC) n_sat++; else cnt++;
      end else begin
        if (cnt == 0) n_udf++; else cnt--;
      end
      check(q == lfsr_state(cnt), "sweep state");
    end
    // Random operation.
    for (int k = 0; k < 3000; k++) begin
      en = ($urandom % 4) != 0;
      up = 1'($urandom % 2);
      @(posedge clk); #1;
      if (en) begin
        if (up) begin if (cnt == MAXC) n_sat++; else cnt++; end
        else    begin if (cnt == 0) n_udf++; else cnt--; end
      end
      check(q == lfsr_state(cnt), "random state");
      check(at_zero == (cnt == 0), "at_zero");
      check(at_max == (cnt == MAXC), "at_max");
    end
    check(n_sat > 0 && n_udf > 0, "both saturation points reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
