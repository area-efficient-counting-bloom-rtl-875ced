// acbf_partition: one entry (partition) of the area-efficient counting Bloom
// filter: a clock-enabled LFSR counter, a zero detector and an output that is
// driven only while probing.
//
// The counter steps when the filter is in update mode and the decoder selects
// this partition; incdec picks increment (1) or decrement (0). The zero
// detector ORs the three counter bits, giving 1 when the entry holds at least
// one signature. The design places a tri-state buffer behind the zero
// detector, enabled by probe, feeding a shared multiplexer. Here that buffer
// is expressed as a data bit plus a drive flag (zd_drive = probe): the
// multiplexer that follows only takes the data of a driving partition, so no
// Hi-Z net is needed. The design gates the counter clock with an AND of
// update, clk and the decoder enable; here the same condition is a clock
// enable on an ungated clock, which synthesis may turn back into a clock gate.
//
// Interface and timing: update/dec_en/incdec are sampled at the rising edge
// of clk; zd_out and zd_drive are combinational from the counter state and
// probe.
module acbf_partition
  import acbf_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  update,    // update mode (increment or decrement)
  input  logic  dec_en,    // this partition is selected by the decoder
  input  logic  incdec,    // 1 = increment, 0 = decrement
  input  logic  probe,     // probe mode: output buffer enabled
  output logic  zd_out,    // zero detector: 1 = counter is non-zero
  output logic  zd_drive,  // output buffer enabled (not Hi-Z)
  output lfsr_t count      // counter state, for observation
);

  logic cnt_en;
  logic at_max, at_zero;

  // Clock gate condition of the design, used as a clock enable.
  assign cnt_en = update & dec_en;

  acbf_lfsr_counter u_cnt (
    .clk    (clk),
    .rst    (rst),
    .en     (cnt_en),
    .up     (incdec),
    .q      (count),
    .at_max (at_max),
    .at_zero(at_zero)
  );

  // Zero detector: OR of all counter bits.
  assign zd_out   = |count;
  assign zd_drive = probe;

  // The OR detector and the all-zero state test must agree.
  a_zero_consistent: assert property (@(posedge clk) zd_out == !at_zero);

  logic unused_at_max;
  assign unused_at_max = at_max;

endmodule
