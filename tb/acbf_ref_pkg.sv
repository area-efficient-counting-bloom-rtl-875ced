// acbf_ref_pkg: reference models used by the A-CBF testbenches, written
// independently of the RTL.
//
// lfsr_state(n) gives the counter state that holds count n, from the
// sequence 000,001,011,110,101,010,100 worked out by hand from the up
// polynomial 1+X^2+X^3 with XNOR feedback. ref_const()/ref_hash() recompute
// the hash constants (xorshift32 generator, see acbf_pkg) and the hash
// h = XOR_j (d_j AND X_j) field by field.
package acbf_ref_pkg;

  localparam int MAXC = 6;

  function automatic logic [2:0] lfsr_state(int n);
    case (n)
      0: return 3'b000;
      1: return 3'b001;
      2: return 3'b011;
      3: return 3'b110;
      4: return 3'b101;
      5: return 3'b010;
      6: return 3'b100;
      default: return 3'b111;
    endcase
  endfunction

  function automatic int unsigned ref_const(int unsigned i, int unsigned j);
    int unsigned s;
    s = ((i + 1) * 32'h9E3779B9) ^ ((j + 1) * 32'h85EBCA6B);
    repeat (3) begin
      s ^= s << 13;
      s ^= s >> 17;
      s ^= s << 5;
    end
    return s;
  endfunction

  // key given as a flat vector of up to 16 fields of w bits (w <= 16)
  function automatic int unsigned ref_hash(int unsigned i, int unsigned nf, int unsigned w,
                                           logic [255:0] key);
    int unsigned h, mask;
    mask = (1 << w) - 1;
    h = 0;
    for (int unsigned j = 0; j < nf; j++) begin
      h ^= (ref_const(i, j) & mask) & (32'(key >> (j * w)) & mask);
    end
    return h;
  endfunction

endpackage
