// tb_acbf_decision: random probe-valid, per-bank hit bits and keys; checks
// the registered decision one cycle later (any zero -> not an intrusion, all
// non-zero -> search request with the key).
module tb_acbf_decision;
  localparam int K = 3, KW = 48;
  logic clk, rst = 1, probe_valid = 0;
  logic [K-1:0] hits = '0;
  logic [KW-1:0] key = '0;
  logic result_valid, not_intrusion, sram_search;
  logic [KW-1:0] search_key;
  int checks = 0, failures = 0, n_ni = 0, n_ss = 0;

  acbf_decision #(.NUM_HASH(K), .KEY_W(KW)) dut (.clk, .rst, .probe_valid, .hits, .key,
    .result_valid, .not_intrusion, .sram_search, .search_key);

  initial clk = 0;
  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    logic pv; logic [K-1:0] ph; logic [KW-1:0] pk;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int k = 0; k < 2000; k++) begin
      pv = $urandom % 4 != 0;
      ph = ($urandom % 3 == 0) ? '1 : K'($urandom);
      pk = 48'({$urandom, $urandom});
      probe_valid = pv; hits = ph; key = pk;
      @(posedge clk); #1;
      check(result_valid == pv, "result_valid one cycle later");
      check(not_intrusion == (pv && ph != '1), "not_intrusion");
      check(sram_search == (pv && ph == '1), "sram_search");
      if (pv) check(search_key == pk, "search_key");
      if (pv && ph != '1) n_ni++;
      if (pv && ph == '1) n_ss++;
    end
    check(n_ni > 0 && n_ss > 0, "coverage");
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
