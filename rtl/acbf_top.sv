// acbf_top: area-efficient counting Bloom filter (A-CBF) for signature
// pre-filtering in a network intrusion detection system.
//
// A signature key of KEY_FIELDS x HASH_W bits is hashed by NUM_HASH universal
// hash functions. Each hash value addresses one of 2^HASH_W 3-bit up/down
// LFSR counters in that hash function's own bank. Increment adds a signature
// (every addressed counter steps up), decrement deletes one (steps down),
// probe tests membership and idle does nothing. A probe reports "not an
// intrusion" when any addressed counter is zero, and otherwise requests the
// exact search of the signature memory, which lies outside this block; its
// request and key are brought out as ports.
//
// Following the design: the hash formula, the hierarchical decoder, the
// LFSR counters with their polynomials and XNOR feedback, the OR zero
// detectors with probe-enabled output buffers, the local/global multiplexer
// and the zero test. This implementation's choices: one bank of counters per
// hash function (a partitioned filter), three hash functions, the operation
// encoding, clock enables instead of gated clocks, counter saturation,
// synchronous reset and a registered result.
//
// Timing: one operation per clock. Updates take effect at the rising edge of
// the cycle in which op is INC or DEC. A probe issued in cycle t sees every
// update of cycles before t; its result appears in cycle t+1 (result_valid).
module acbf_top
  import acbf_pkg::*;
#(
  parameter int unsigned NUM_HASH   = 3,
  parameter int unsigned KEY_FIELDS = 6,
  parameter int unsigned HASH_W     = 8,
  parameter int unsigned LOCAL_W    = 4
) (
  input  logic                             clk,
  input  logic                             rst,
  input  op_e                              op,
  input  logic [KEY_FIELDS-1:0][HASH_W-1:0] key,
  output logic                             result_valid,
  output logic                             not_intrusion,
  output logic                             sram_search,
  output logic [KEY_FIELDS*HASH_W-1:0]     sram_key
);

  logic update, incdec, probe;
  logic [NUM_HASH-1:0] hit, hit_valid;

  assign update = (op == OP_INC) || (op == OP_DEC);
  assign incdec = (op == OP_INC);
  assign probe  = (op == OP_PROBE);

  for (genvar i = 0; i < NUM_HASH; i++) begin : g_hash
    logic [HASH_W-1:0] h;

    acbf_hash #(
      .KEY_FIELDS(KEY_FIELDS),
      .HASH_W    (HASH_W),
      .HASH_IDX  (i)
    ) u_hash (
      .key(key),
      .h  (h)
    );

    acbf_bank #(
      .ADDR_W (HASH_W),
      .LOCAL_W(LOCAL_W)
    ) u_bank (
      .clk      (clk),
      .rst      (rst),
      .update   (update),
      .incdec   (incdec),
      .probe    (probe),
      .addr     (h),
      .hit      (hit[i]),
      .hit_valid(hit_valid[i])
    );
  end

  acbf_decision #(
    .NUM_HASH(NUM_HASH),
    .KEY_W   (KEY_FIELDS * HASH_W)
  ) u_decide (
    .clk          (clk),
    .rst          (rst),
    .probe_valid  (&hit_valid),
    .hits         (hit),
    .key          (key),
    .result_valid (result_valid),
    .not_intrusion(not_intrusion),
    .sram_search  (sram_search),
    .search_key   (sram_key)
  );

endmodule
