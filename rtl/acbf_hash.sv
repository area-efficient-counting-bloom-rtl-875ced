// acbf_hash: universal hash function of the counting Bloom filter.
//
// The signature key X = <X_1, ..., X_6> is split into KEY_FIELDS fields of
// HASH_W bits. Hash function i computes
//   h_i(X) = (d_i1 & X_1) ^ (d_i2 & X_2) ^ ... ^ (d_iKEY_FIELDS & X_KEY_FIELDS)
// with '&' the bitwise AND, '^' the bitwise XOR and d_ij predetermined random
// numbers in 0 .. 2^HASH_W - 1. The formula, the six fields and the 8-bit
// output that addresses 256 counters follow the design. The field width
// (equal to the hash width, so the AND is between equal-width words) and the
// constants themselves are this implementation's choice: they come from
// acbf_pkg::hash_const(HASH_IDX, j), so instances with different HASH_IDX
// realise different hash functions.
//
// Purely combinational.
module acbf_hash
  import acbf_pkg::*;
#(
  parameter int unsigned KEY_FIELDS = 6,
  parameter int unsigned HASH_W     = 8,
  parameter int unsigned HASH_IDX   = 0
) (
  input  logic [KEY_FIELDS-1:0][HASH_W-1:0] key,
  output logic [HASH_W-1:0]                 h
);

  function automatic logic [KEY_FIELDS-1:0][HASH_W-1:0] default_d();
    logic [KEY_FIELDS-1:0][HASH_W-1:0] d;
    for (int j = 0; j < KEY_FIELDS; j++) begin
      d[j] = HASH_W'(hash_const(HASH_IDX, j));
    end
    return d;
  endfunction

  localparam logic [KEY_FIELDS-1:0][HASH_W-1:0] D = default_d();

  always_comb begin
    h = '0;
    for (int j = 0; j < KEY_FIELDS; j++) begin
      h ^= D[j] & key[j];
    end
  end

endmodule
