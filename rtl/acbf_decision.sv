// acbf_decision: the final zero test of the filter.
//
// A signature can be in the set only if the counters addressed by all
// NUM_HASH hash functions are non-zero. If any probed counter is zero the key
// is definitely not a stored signature ("not an intrusion"); otherwise the
// key is a possible match and the exact search in the signature memory must
// be started ("search SRAM"). This decision follows the design; registering
// the result (one cycle after the probe) and passing the key along with the
// search request are this implementation's choices.
//
// Interface: probe_valid marks a probe cycle and hits carries one bit per
// hash bank. One cycle later result_valid is 1 with exactly one of
// not_intrusion / sram_search set, and search_key holds the probed key.
module acbf_decision #(
  parameter int unsigned NUM_HASH = 3,
  parameter int unsigned KEY_W    = 48
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                probe_valid,
  input  logic [NUM_HASH-1:0] hits,
  input  logic [KEY_W-1:0]    key,
  output logic                result_valid,
  output logic                not_intrusion,
  output logic                sram_search,
  output logic [KEY_W-1:0]    search_key
);

  always_ff @(posedge clk) begin
    if (rst) begin
      result_valid  <= 1'b0;
      not_intrusion <= 1'b0;
      sram_search   <= 1'b0;
      search_key    <= '0;
    end else begin
      result_valid  <= probe_valid;
      not_intrusion <= probe_valid & ~(&hits);
      sram_search   <= probe_valid &  (&hits);
      if (probe_valid) search_key <= key;
    end
  end

  a_one_result: assert property (@(posedge clk) disable iff (rst)
    result_valid |-> (not_intrusion ^ sram_search));

endmodule
