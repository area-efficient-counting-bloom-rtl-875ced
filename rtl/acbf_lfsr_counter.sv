// acbf_lfsr_counter: 3-bit up/down LFSR counter, the storage of one counting
// Bloom filter entry.
//
// Each flip-flop takes its next value through a 2:1 multiplexer controlled by
// the up/down line: counting up, every bit takes its lower neighbour and bit 0
// takes XNOR(q[2], q[1]) (polynomial 1+X^2+X^3); counting down, every bit
// takes its upper neighbour and bit 2 takes XNOR(q[0], q[2]) (polynomial
// 1+X+X^3). State 000 is count 0, so the zero detector is a 3-input OR.
// The structure, the polynomials and the XNOR feedback follow the design;
// the saturation (no increment at count 6, no decrement at count 0), the
// synchronous active-high reset and the use of a clock enable in place of a
// gated clock are this implementation's choices.
//
// Interface: en advances the counter by one step at the rising clock edge,
// up selects the direction (1 = increment). q is the LFSR state, at_max and
// at_zero flag the two saturation points. One step per clock, no latency
// beyond the register.
module acbf_lfsr_counter
  import acbf_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  en,
  input  logic  up,
  output lfsr_t q,
  output logic  at_max,
  output logic  at_zero
);

  lfsr_t q_next;

  assign at_max  = (q == LFSR_MAX);
  assign at_zero = (q == LFSR_ZERO);

  always_comb begin
    q_next = q;
    if (en) begin
      if (up && !at_max)         q_next = lfsr_up(q);
      else if (!up && !at_zero)  q_next = lfsr_down(q);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) q <= LFSR_ZERO;
    else     q <= q_next;
  end

  // The XNOR lock-up state must never be reached.
  a_no_lockup: assert property (@(posedge clk) disable iff (rst) q != 3'b111);

endmodule
