// tb_acbf_bank: random increments, decrements, probes and idle cycles on one
// 256-entry counter bank; every probe result is compared with an array of
// integer counts, and every counter is read back by probing all addresses.
module tb_acbf_bank;
  import acbf_ref_pkg::*;
  localparam int AW = 8, N = 2**AW;

  logic clk, rst = 1, update = 0, incdec = 0, probe = 0;
  logic [AW-1:0] addr = '0;
  logic hit, hit_valid;
  int checks = 0, failures = 0;
  int cnt [N];
  int n_inc = 0, n_dec = 0, n_probe = 0, n_hit = 0;

  acbf_bank #(.ADDR_W(AW), .LOCAL_W(4)) dut (.clk, .rst, .update, .incdec, .probe, .addr, .hit, .hit_valid);

  initial clk = 0;
  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s addr=%0d cnt=%0d hit=%b", what, addr, cnt[addr], hit);
    end
  endtask

  task automatic do_probe(int a);
    update = 0; probe = 1; addr = AW'(a);
    #1;
    n_probe++;
    if (cnt[a] != 0) n_hit++;
    check(hit_valid == 1, "hit_valid");
    check(hit == (cnt[a] != 0), "probe");
    @(posedge clk); #1;
  endtask

  initial begin
    foreach (cnt[i]) cnt[i] = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int k = 0; k < 6000; k++) begin
      int a, o;
      a = (k < 3000) ? ($urandom % 32) : ($urandom % N);
      o = $urandom % 8;
      if (o < 3) begin
        update = 1; incdec = 1; probe = 0; addr = AW'(a);
        #1 check(hit_valid == 0, "no drive while updating");
        @(posedge clk); #1;
        if (cnt[a] < MAXC) cnt[a]++;
        n_inc++;
      end else if (o < 5) begin
        update = 1; incdec = 0; probe = 0; addr = AW'(a);
        @(posedge clk); #1;
        if (cnt[a] > 0) cnt[a]--;
        n_dec++;
      end else if (o < 7) begin
        do_probe(a);
      end else begin
        update = 0; probe = 0; addr = AW'($urandom);
        @(posedge clk); #1;
      end
    end
    for (int a = 0; a < N; a++) do_probe(a);
    check(n_inc > 0 && n_dec > 0 && n_hit > 0 && n_hit < n_probe, "coverage");
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
