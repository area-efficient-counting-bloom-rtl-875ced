// acbf_hier_mux: two-level output multiplexer that picks the zero-detector
// output of the addressed partition.
//
// The 2^ADDR_W partition outputs are split into groups of 2^LOCAL_W. A local
// multiplexer per group selects on the LOCAL_W least significant address bits;
// a global multiplexer selects one group result on the remaining most
// significant bits. The LSB/MSB split into local and global stages follows
// the design; the split point (LOCAL_W) is this implementation's choice.
// Each partition output comes with a drive flag standing for its tri-state
// buffer: dout_valid is the drive flag of the selected partition and dout is
// its data (0 when not driven).
//
// Purely combinational.
module acbf_hier_mux #(
  parameter int unsigned ADDR_W  = 8,
  parameter int unsigned LOCAL_W = 4   // 1 .. ADDR_W-1
) (
  input  logic [2**ADDR_W-1:0] din,
  input  logic [2**ADDR_W-1:0] drive,
  input  logic [ADDR_W-1:0]    sel,
  output logic                 dout,
  output logic                 dout_valid
);

  localparam int unsigned GLOBAL_W = ADDR_W - LOCAL_W;
  localparam int unsigned NLOCAL   = 2 ** LOCAL_W;
  localparam int unsigned NGROUP   = 2 ** GLOBAL_W;

  logic [NGROUP-1:0] loc_d, loc_v;

  for (genvar g = 0; g < NGROUP; g++) begin : g_local
    logic [NLOCAL-1:0] grp_d, grp_v;
    assign grp_d = din  [g*NLOCAL +: NLOCAL];
    assign grp_v = drive[g*NLOCAL +: NLOCAL];
    assign loc_d[g] = grp_d[sel[LOCAL_W-1:0]] & grp_v[sel[LOCAL_W-1:0]];
    assign loc_v[g] = grp_v[sel[LOCAL_W-1:0]];
  end

  assign dout       = loc_d[sel[ADDR_W-1:LOCAL_W]];
  assign dout_valid = loc_v[sel[ADDR_W-1:LOCAL_W]];

  initial begin
    assert (LOCAL_W >= 1 && LOCAL_W < ADDR_W)
      else $error("acbf_hier_mux: LOCAL_W must lie in 1..ADDR_W-1");
  end

endmodule
