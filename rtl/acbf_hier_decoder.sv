// acbf_hier_decoder: hierarchical address decoder that turns the hash output
// into one partition-select line per counter.
//
// The ADDR_W-bit hash output is split into ADDR_W/2 two-bit groups. Each group
// drives a 2:4 predecoder with active-low outputs (for the default 8-bit hash:
// four predecoders on bits 1:0, 3:2, 5:4 and 7:6). Output line k of the local
// decoder is a NOR gate over one predecoded line of every group, the line
// picked by the corresponding two-bit digit of k, so exactly one of the
// 2^ADDR_W lines (0..255 by default) is 1 when en is 1. The structure
// (2:4 predecoders, NOR local decoder, 256 outputs) follows the design; the
// active-low predecoder outputs follow from its NAND-NOR choice, and the
// enable input is this implementation's.
//
// Purely combinational.
module acbf_hier_decoder #(
  parameter int unsigned ADDR_W = 8   // must be even
) (
  input  logic                 en,
  input  logic [ADDR_W-1:0]    addr,
  output logic [2**ADDR_W-1:0] dec_out
);

  localparam int unsigned GROUPS = ADDR_W / 2;
  localparam int unsigned LINES  = 2 ** ADDR_W;

  // Active-low predecoded lines, four per group.
  logic [GROUPS-1:0][3:0] pre_n;

  for (genvar g = 0; g < GROUPS; g++) begin : g_pre
    acbf_predec2to4 u_pre (
      .en   (en),
      .a    (addr[2*g +: 2]),
      .n_out(pre_n[g])
    );
  end

  // Local decoder: one NOR gate per output line.
  for (genvar k = 0; k < LINES; k++) begin : g_local
    logic [GROUPS-1:0] nor_in;
    for (genvar g = 0; g < GROUPS; g++) begin : g_in
      assign nor_in[g] = pre_n[g][(k >> (2*g)) & 3];
    end
    assign dec_out[k] = ~(|nor_in);
  end

  initial begin
    assert (ADDR_W % 2 == 0 && ADDR_W >= 2)
      else $error("acbf_hier_decoder: ADDR_W must be even and at least 2");
  end

endmodule
