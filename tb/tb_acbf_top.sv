// tb_acbf_top: end-to-end test of the complete filter at its default size
// (three hash functions, 6-field 48-bit keys, 3 x 256 LFSR counters).
//
// A signature set is inserted, members and non-members are probed, one
// signature is inserted until its counters saturate, part of the set is
// deleted, keys that were never inserted are deleted (the counters must not
// go below zero), idle cycles are mixed in and a reset clears everything.
// Every result is compared with a model holding integer counts per bank and
// using the reference hash; the result must appear exactly one cycle after
// the probe. Each mechanism (increment, decrement, probe, idle, not an
// intrusion, search request, false positive, saturation, delete at zero,
// reset) is counted and must occur at least once.
module tb_acbf_top;
  import acbf_pkg::*;
  import acbf_ref_pkg::*;

  localparam int K = 3, NF = 6, W = 8, N = 2**W;

  logic clk, rst = 1;
  op_e op = OP_IDLE;
  logic [NF-1:0][W-1:0] key = '0;
  logic result_valid, not_intrusion, sram_search;
  logic [NF*W-1:0] sram_key;

  acbf_top dut (.clk, .rst, .op, .key, .result_valid, .not_intrusion, .sram_search, .sram_key);

  initial clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cnt [K][N];
  int n_inc = 0, n_dec = 0, n_probe = 0, n_idle = 0, n_ni = 0, n_ss = 0;
  int n_fp = 0, n_sat = 0, n_dec_zero = 0, n_reset = 0;
  logic [NF-1:0][W-1:0] members [$];
  logic [NF-1:0][W-1:0] deleted [$];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s key=%h t=%0t", what, key, $time);
    end
  endtask

  function automatic bit is_member(logic [NF-1:0][W-1:0] k);
    foreach (members[i]) if (members[i] == k) return 1;
    return 0;
  endfunction

  // Apply one operation for one cycle and check the registered result.
  task automatic apply(op_e o, logic [NF-1:0][W-1:0] k, bit expect_member = 0);
    bit exp_search;
    op = o; key = k;
    exp_search = 1;
    for (int i = 0; i < K; i++) begin
      int h;
      h = ref_hash(i, NF, W, 256'(k));
      if (cnt[i][h] == 0) exp_search = 0;
    end
    @(posedge clk); #1;
    // model update at this edge
    for (int i = 0; i < K; i++) begin
      int h;
      h = ref_hash(i, NF, W, 256'(k));
      if (o == OP_INC) begin
        if (cnt[i][h] == MAXC) n_sat++; else cnt[i][h]++;
      end else if (o == OP_DEC) begin
        if (cnt[i][h] == 0) n_dec_zero++; else cnt[i][h]--;
      end
    end
    case (o)
      OP_INC:  n_inc++;
      OP_DEC:  n_dec++;
      OP_IDLE: n_idle++;
      default: n_probe++;
    endcase
    // result registered at this edge: valid exactly one cycle after probe
    check(result_valid == (o == OP_PROBE), "result_valid latency");
    if (o == OP_PROBE) begin
      check(sram_search == exp_search, "search decision");
      check(not_intrusion == !exp_search, "not-intrusion decision");
      check(sram_key == k, "search key");
      if (expect_member) check(sram_search == 1, "no false negative for a member");
      if (sram_search) n_ss++; else n_ni++;
      if (sram_search && !is_member(k)) n_fp++;
    end else begin
      check(!not_intrusion && !sram_search, "no result without probe");
    end
  endtask

  function automatic logic [NF-1:0][W-1:0] rand_key();
    return 48'({$urandom, $urandom});
  endfunction

  initial begin
    logic [NF-1:0][W-1:0] k;
    foreach (cnt[i, j]) cnt[i][j] = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;

    // 1. Build the signature set.
    for (int s = 0; s < 60; s++) begin
      k = rand_key();
      members.push_back(k);
      apply(OP_INC, k);
      if (s % 7 == 0) apply(OP_IDLE, rand_key());
    end
    // 2. Members must all request the exact search.
    foreach (members[i]) apply(OP_PROBE, members[i], 1);
    // 3. Random non-members.
    for (int s = 0; s < 2000; s++) apply(OP_PROBE, rand_key());
    // 4. Saturate the counters of one signature.
    repeat (9) apply(OP_INC, members[0]);
    apply(OP_PROBE, members[0], 1);
    // 5. Delete a third of the set, then probe everything again.
    for (int s = 0; s < 20; s++) begin
      k = members.pop_back();
      deleted.push_back(k);
      apply(OP_DEC, k);
    end
    foreach (members[i]) apply(OP_PROBE, members[i], 1);
    foreach (deleted[i]) apply(OP_PROBE, deleted[i]);
    // 6. Delete keys that were never inserted (counters stay at zero).
    for (int s = 0; s < 40; s++) apply(OP_DEC, rand_key());
    foreach (members[i]) apply(OP_PROBE, members[i]);
    // 7. Random mixture.
    for (int s = 0; s < 3000; s++) begin
      int o;
      o = $urandom % 10;
      if (o < 3) begin
        k = rand_key(); members.push_back(k); apply(OP_INC, k);
      end else if (o < 4 && members.size() > 0) begin
        int idx; idx = $urandom % members.size();
        k = members[idx]; members.delete(idx); apply(OP_DEC, k);
      end else if (o < 8) begin
        apply(OP_PROBE, (($urandom % 2) == 1 && members.size() > 0) ? members[$urandom % members.size()]
                                                             : rand_key());
      end else apply(OP_IDLE, rand_key());
    end
    // 8. Reset clears every counter.
    rst = 1; @(posedge clk); #1 rst = 0; n_reset++;
    foreach (cnt[i, j]) cnt[i][j] = 0;
    members.delete();
    for (int s = 0; s < 50; s++) begin
      apply(OP_PROBE, rand_key());
      check(not_intrusion == 1, "empty after reset");
    end

    $display("mechanisms: inc=%0d dec=%0d probe=%0d idle=%0d not_intrusion=%0d search=%0d",
             n_inc, n_dec, n_probe, n_idle, n_ni, n_ss);
    $display("            false_positive=%0d saturate=%0d dec_at_zero=%0d reset=%0d",
             n_fp, n_sat, n_dec_zero, n_reset);
    check(n_inc > 0, "increment happened");
    check(n_dec > 0, "decrement happened");
    check(n_probe > 0, "probe happened");
    check(n_idle > 0, "idle happened");
    check(n_ni > 0, "not-intrusion result happened");
    check(n_ss > 0, "search request happened");
    check(n_fp > 0, "false positive happened");
    check(n_sat > 0, "counter saturation happened");
    check(n_dec_zero > 0, "delete at zero happened");
    check(n_reset > 0, "reset happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
