// acbf_pkg: types, constants and helper functions shared by the area-efficient
// counting Bloom filter (A-CBF).
//
// The filter is driven by a two-bit operation select with the four operations
// the design names: increment (add a signature), decrement (delete a
// signature), probe (membership test) and idle. The binary encoding of the
// four operations is this implementation's choice.
//
// Every counter is a 3-bit maximum-length LFSR with XNOR feedback. Counting up
// uses the polynomial 1+X^2+X^3 and shifts towards the MSB; counting down uses
// the reciprocal polynomial 1+X+X^3 and shifts towards the LSB, so the down
// step exactly undoes the up step. With XNOR feedback the all-zero state is
// part of the cycle and stands for "count 0"; the all-ones state is the
// lock-up state and is never reached. Counting up from zero visits
//   000 -> 001 -> 011 -> 110 -> 101 -> 010 -> 100 (-> 000)
// i.e. counts 0..6. Saturation at count 6 and at count 0 is this
// implementation's choice (the wrap-around 100 -> 000 is never taken).
//
// hash_const() supplies the predetermined "random" constants d_ij of the
// universal hash. They are produced by a fixed xorshift32 generator:
//   s0 = (i+1)*32'h9E3779B9 ^ (j+1)*32'h85EBCA6B, then three rounds of
//   s ^= s<<13; s ^= s>>17; s ^= s<<5
// Any other fixed constants may be used instead.
package acbf_pkg;

  typedef enum logic [1:0] {
    OP_IDLE  = 2'b00,
    OP_INC   = 2'b01,
    OP_DEC   = 2'b10,
    OP_PROBE = 2'b11
  } op_e;

  localparam int unsigned CNT_W = 3;
  typedef logic [CNT_W-1:0] lfsr_t;

  localparam lfsr_t LFSR_ZERO = 3'b000;  // count 0
  localparam lfsr_t LFSR_MAX  = 3'b100;  // count 6, last state before wrap

  // One up step: 1+X^2+X^3, shift towards MSB, XNOR of bits 2 and 1 enters bit 0.
  function automatic lfsr_t lfsr_up(lfsr_t s);
    return {s[1:0], ~(s[2] ^ s[1])};
  endfunction

  // One down step: 1+X+X^3, shift towards LSB, XNOR of bits 0 and 2 enters bit 2.
  function automatic lfsr_t lfsr_down(lfsr_t s);
    return {~(s[0] ^ s[2]), s[2:1]};
  endfunction

  // Predetermined hash constant d_ij for hash function i and key field j.
  function automatic logic [31:0] hash_const(int unsigned i, int unsigned j);
    logic [31:0] s;
    s = ((i + 1) * 32'h9E3779B9) ^ ((j + 1) * 32'h85EBCA6B);
    for (int r = 0; r < 3; r++) begin
      s = s ^ (s << 13);
      s = s ^ (s >> 17);
      s = s ^ (s << 5);
    end
    return s;
  endfunction

endpackage
