// tb_acbf_partition: random update/decoder-enable/direction/probe on one
// partition; checks that the counter only moves when both update and the
// decoder enable are 1, that the zero detector reports a non-zero count and
// that the output is driven exactly while probing.
module tb_acbf_partition;
  import acbf_ref_pkg::*;

  logic clk, rst = 1, update = 0, dec_en = 0, incdec = 0, probe = 0;
  logic zd_out, zd_drive;
  logic [2:0] count;
  int checks = 0, failures = 0, cnt = 0, n_upd = 0, n_blocked = 0;

  acbf_partition dut (.clk, .rst, .update, .dec_en, .incdec, .probe, .zd_out, .zd_drive, .count);

  initial clk = 0;
  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s: count=%b cnt=%0d", what, count, cnt);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int k = 0; k < 4000; k++) begin
      update = ($urandom % 2) == 1;
      dec_en = ($urandom % 2) == 1;
      incdec = ($urandom % 8) < 5;
      probe  = !update && (($urandom % 2) == 1);
      #1;
      check(zd_drive == probe, "drive follows probe");
      check(zd_out == (cnt != 0), "zero detector");
      @(posedge clk); #1;
      if (update && dec_en) begin
        n_upd++;
        if (incdec) begin if (cnt < MAXC) cnt++; end
        else        begin if (cnt > 0) cnt--; end
      end else if (update) n_blocked++;
      check(count == lfsr_state(cnt), "counter state");
    end
    // Reset clears the counter.
    rst = 1; @(posedge clk); #1 rst = 0; cnt = 0;
    check(count == 3'b000 && zd_out == 0, "reset clears");
    check(n_upd > 0 && n_blocked > 0, "coverage");
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
