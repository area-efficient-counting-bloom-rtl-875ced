// tb_acbf_hash: random keys through three hash instances (different
// constants); outputs are compared with the field-by-field reference
// h = XOR_j (d_j AND X_j). Also checks that the instances differ.
module tb_acbf_hash;
  import acbf_ref_pkg::*;
  localparam int NF = 6, W = 8;
  logic [NF-1:0][W-1:0] key;
  logic [W-1:0] h0, h1, h2;
  int checks = 0, failures = 0, n_differ = 0;
  logic clk;

  acbf_hash #(.KEY_FIELDS(NF), .HASH_W(W), .HASH_IDX(0)) dut0 (.key, .h(h0));
  acbf_hash #(.KEY_FIELDS(NF), .HASH_W(W), .HASH_IDX(1)) dut1 (.key, .h(h1));
  acbf_hash #(.KEY_FIELDS(NF), .HASH_W(W), .HASH_IDX(2)) dut2 (.key, .h(h2));

  initial clk = 0;
  always #5 clk = ~clk;

  task automatic check(int unsigned got, int unsigned exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s key=%h got=%h exp=%h", what, key, got, exp);
    end
  endtask

  initial begin
    for (int r = 0; r < 3000; r++) begin
      key = 48'({$urandom, $urandom});
      if (r < NF * W) key = '0 | (48'd1 << r);   // single-bit keys first
      #1;
      check(int'(h0), ref_hash(0, NF, W, 256'(key)), "h0");
      check(int'(h1), ref_hash(1, NF, W, 256'(key)), "h1");
      check(int'(h2), ref_hash(2, NF, W, 256'(key)), "h2");
      if (h0 != h1 || h1 != h2) n_differ++;
    end
    checks++;
    if (n_differ < 1000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
