// acbf_bank: the counter array of one hash function: hierarchical decoder,
// 2^ADDR_W partitions and the local/global output multiplexer.
//
// In update mode (update = 1) the decoder selects the partition addressed by
// the hash value and its counter steps up (incdec = 1) or down at the next
// rising clock edge; all other counters hold. In probe mode the partitions
// drive their zero-detector bits and the multiplexer returns the one at the
// hash address: hit = 1 means the addressed counter is non-zero. hit_valid is
// 1 while probing. The decoder is enabled only in update mode, which is this
// implementation's choice; the chain hash -> decoder -> partitions ->
// multiplexer follows the design.
//
// Timing: updates take effect at the clock edge; the probe path from addr to
// hit is combinational and sees all updates of earlier cycles.
module acbf_bank
  import acbf_pkg::*;
#(
  parameter int unsigned ADDR_W  = 8,
  parameter int unsigned LOCAL_W = 4
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              update,
  input  logic              incdec,
  input  logic              probe,
  input  logic [ADDR_W-1:0] addr,
  output logic              hit,
  output logic              hit_valid
);

  localparam int unsigned N = 2 ** ADDR_W;

  logic [N-1:0] dec_en;
  logic [N-1:0] zd_out, zd_drive;

  acbf_hier_decoder #(.ADDR_W(ADDR_W)) u_dec (
    .en     (update),
    .addr   (addr),
    .dec_out(dec_en)
  );

  for (genvar k = 0; k < N; k++) begin : g_part
    lfsr_t unused_count;
    acbf_partition u_part (
      .clk     (clk),
      .rst     (rst),
      .update  (update),
      .dec_en  (dec_en[k]),
      .incdec  (incdec),
      .probe   (probe),
      .zd_out  (zd_out[k]),
      .zd_drive(zd_drive[k]),
      .count   (unused_count)
    );
  end

  acbf_hier_mux #(.ADDR_W(ADDR_W), .LOCAL_W(LOCAL_W)) u_mux (
    .din       (zd_out),
    .drive     (zd_drive),
    .sel       (addr),
    .dout      (hit),
    .dout_valid(hit_valid)
  );

  // Updating and probing are exclusive modes.
  a_mode_exclusive: assert property (@(posedge clk) disable iff (rst) !(update && probe));

endmodule
