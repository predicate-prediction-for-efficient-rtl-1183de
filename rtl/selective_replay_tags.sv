// selective_replay_tags: recovery tags for selective-replay predicate recovery.
//
// With selective replay every instruction, predicted qualified true or false,
// enters the issue queue, and a replay must be able to reach the right value
// without going through the renamer again. Besides the normal (predicted)
// data-flow tag of each source operand, an instruction therefore carries:
//   - a recovery tag per source: the nearest earlier definition of that register
//     whatever its qualifying predicate, and
//   - a destination recovery tag: the previous definition of its destination
//     register, also whatever its predicate. A replayed instruction that turns
//     out qualified false passes that value through like a move, so the
//     definitions of a register form a serial chain along which the right value
//     always reaches every use.
// This block keeps the "conservative" map that produces these tags: every
// register-writing instruction updates it at rename, independent of its
// predicate. Reads are combinational on the instruction being renamed; the
// update happens at the edge when ren_en is high. A commit clears mappings to the
// committing slot (clr_*), after which the architectural file holds the value.
// The full map is brought out so that it can be copied into the predicted map
// after a misprediction (the recovery data-flow is then the right one).
module selective_replay_tags
  import pp_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ren_en,
  input  logic [TAG_W-1:0] ren_tag,
  input  logic [GR_W-1:0]  src_idx [2],
  input  logic             dst_we,
  input  logic [GR_W-1:0]  dst,
  output src_tag_t         src_rec [2],
  output src_tag_t         dst_rec,
  input  logic             clr_en,
  input  logic [TAG_W-1:0] clr_tag,
  output logic [N_GR-1:0]  map_valid,
  output logic [TAG_W-1:0] map_tag [N_GR]
);
  for (genvar k = 0; k < 2; k++) begin : g_src
    assign src_rec[k].inflight = map_valid[src_idx[k]];
    assign src_rec[k].tag      = map_tag[src_idx[k]];
  end
  assign dst_rec.inflight = map_valid[dst];
  assign dst_rec.tag      = map_tag[dst];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      map_valid <= '0;
      for (int i = 0; i < N_GR; i++) map_tag[i] <= '0;
    end else begin
      for (int i = 0; i < N_GR; i++)
        if (clr_en && map_tag[i] == clr_tag) map_valid[i] <= 1'b0;
      if (ren_en && dst_we) begin
        map_valid[dst] <= 1'b1;
        map_tag[dst]   <= ren_tag;
      end
    end
  end

endmodule
