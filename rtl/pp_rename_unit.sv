// pp_rename_unit: rename unit of an out-of-order core with predicate prediction.
//
// Problem: with conditional-writer predication several instructions guarded by
// different predicates may write the same register; when a later instruction is
// renamed and those predicates are not yet computed, the renamer cannot tell
// which definition it should read. This unit predicts every predicate when its
// compare is decoded and renames as if the predictions were right; a wrong
// prediction is repaired by replaying instructions through the renamer.
//
// Pipeline (one instruction per cycle):
//   REN1  the decoded instruction is registered; for a compare the predicate
//         predictor is looked up on the way in, so its prediction is ready here.
//   REN2  early evaluation: the qualifying predicate (resolved if its compare has
//         written back, else predicted) decides whether the instruction is
//         qualified true or false. Qualified-false instructions are NOPs: they do
//         not touch the register map and do not enter the issue queue. A compare
//         records its predicted outputs. The instruction is written into the
//         recovery queue (RecQ) whatever its qualification, and qualified-true
//         ones, and every compare and broadside write, are dispatched.
//         The first instruction that uses a given prediction checkpoints the
//         register maps.
//   write-back  the execution side returns compare results (wb_*). A result that
//         differs from a prediction some instruction used is a misprediction.
//   commit  in order from the RecQ head, one per cycle; compares train the
//         predictor and write the architectural predicate file.
//
// Recovery (parameter RECOVERY):
//   REC_RENAME_REPLAY (default): the maps are restored from the checkpoint of the
//         first use, squash_* tells the issue queue to discard everything from that
//         instruction on, the front end stalls, and after RECOVERY_LAT cycles the
//         RecQ entries from the first use to the tail are renamed again in place,
//         now with the real predicate value, and dispatched again (disp_replay).
//   REC_SELECTIVE_REPLAY: every instruction is dispatched, also those predicted
//         qualified false, with recovery tags for its sources and destination
//         (selective_replay_tags). On a misprediction sel_replay_* tells the
//         scheduler where its replay starts, and the predicted map is replaced by
//         the conservative one. The RecQ completion flags from the first user on
//         are cleared, and the scheduler reports those instructions complete
//         again once any re-execution is done.
// Broadside predicate writes take a vector of the predicate file at rename (stall
// if none is free); instructions whose predicate comes from a broadside write that
// has not executed wait in REN2.
//
// Interfaces: in_valid/in_ready handshake from decode; disp_* is a registered
// dispatch port (one cycle after REN2) without back-pressure; squash_* and
// sel_replay_* are combinational and valid in the write-back cycle that finds the
// misprediction; wb_* is always accepted. A misprediction found during a
// replay restarts the recovery from its own first user. commit_* is registered and
// reports each retired RecQ slot. Slot numbers (tags) are RecQ indices.
// Single-instruction width, one write-back port and one commit per cycle, the
// checkpoint count and the use of RecQ slots as register tags are this design's
// choices; the table sizes, the 7-cycle recovery and the two broadside vectors
// follow the evaluated machine.
// arch_pr[0] is p0 and is constant 1. Some outputs of the sub-blocks are left
// unused here (predicted values at commit, RecQ empty/count, replay_last, the
// whole-map views of the two rename maps); they serve the blocks' own tests and
// other uses of the blocks.
module pp_rename_unit
  import pp_pkg::*;
#(
  parameter recovery_e   RECOVERY     = REC_RENAME_REPLAY,
  parameter int unsigned NUM_CKPT     = 8,
  parameter int unsigned NUM_VEC      = 2,
  parameter int unsigned RECOVERY_LAT = 7,
  parameter int unsigned BIM_ENTRIES  = 16384,
  parameter int unsigned PHT_ENTRIES  = 16384,
  parameter int unsigned CHO_ENTRIES  = 16384,
  parameter int unsigned LHT_ENTRIES  = 1024
) (
  input  logic                       clk,
  input  logic                       rst_n,
  output logic                       ready,
  // from decode
  input  logic                       in_valid,
  input  uop_t                       in_uop,
  output logic                       in_ready,
  // to the issue queue
  output logic                       disp_valid,
  output logic [TAG_W-1:0]           disp_tag,
  output uop_t                       disp_uop,
  output logic                       disp_qual,
  output logic                       disp_replay,
  output src_tag_t                   disp_src1,
  output src_tag_t                   disp_src2,
  output src_tag_t                   disp_src1_rec,
  output src_tag_t                   disp_src2_rec,
  output src_tag_t                   disp_dst_rec,
  output logic                       disp_qp_inflight,
  output ptag_t                      disp_qp_tag,
  output logic [$clog2(NUM_VEC)-1:0] disp_vec,
  // recovery requests to the issue queue / scheduler
  output logic                       squash_valid,
  output logic [TAG_W-1:0]           squash_start,
  output logic                       sel_replay_valid,
  output logic [TAG_W-1:0]           sel_replay_start,
  // write-back from execution
  input  logic                       wb_valid,
  input  logic [TAG_W-1:0]           wb_tag,
  input  logic                       wb_is_cmp,
  input  logic [1:0]                 wb_pvals,
  input  logic                       wb_is_bsw,
  input  logic [$clog2(NUM_VEC)-1:0] wb_vec,
  input  logic [N_PR-1:0]            wb_bsw_value,
  // retirement
  output logic                       commit_valid,
  output logic [TAG_W-1:0]           commit_tag,
  output uop_t                       commit_uop,
  output logic [N_PR-1:0]            arch_pr,
  // events, one pulse per occurrence
  output logic                       ev_mispredict,
  output logic                       ev_ckpt,
  output logic                       ev_stall_ckpt,
  output logic                       ev_stall_vec,
  output logic                       ev_stall_sync,
  output logic                       ev_qual_false
);
  localparam int unsigned VW = $clog2(NUM_VEC);
  localparam int unsigned CW = $clog2(NUM_CKPT);
  localparam bit SEL = (RECOVERY == REC_SELECTIVE_REPLAY);

  // ---------------------------------------------------------------- REN1
  logic       r1_valid;
  uop_t       r1_uop;
  logic       pp_ready;
  logic       pp_value, pp_bim, pp_loc;
  logic [LHIST_W-1:0] pp_hist;
  logic       r1_adv;
  logic       rp_busy;

  assign ready    = pp_ready;
  assign in_ready = pp_ready && (!r1_valid || r1_adv);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r1_valid <= 1'b0;
      r1_uop   <= '0;
    end else if (in_ready) begin
      r1_valid <= in_valid;
      if (in_valid) r1_uop <= in_uop;
    end
  end

  // commit-side predictor training signals
  logic            upd_en;
  logic [1:0]      cm_value, cm_pred;
  recq_entry_t     head_data;

  predicate_predictor #(
    .BIM_ENTRIES(BIM_ENTRIES), .PHT_ENTRIES(PHT_ENTRIES),
    .CHO_ENTRIES(CHO_ENTRIES), .LHT_ENTRIES(LHT_ENTRIES), .HIST_W(LHIST_W)
  ) u_pred (
    .clk, .rst_n, .ready(pp_ready),
    .lookup_en(in_valid && in_ready && in_uop.op == OP_CMP),
    .lookup_pc(in_uop.pc),
    .pred_value(pp_value), .pred_hist(pp_hist), .pred_bim(pp_bim), .pred_loc(pp_loc),
    .upd_en, .upd_pc(head_data.uop.pc), .upd_hist(head_data.pp_hist),
    .upd_bim(head_data.pp_bim), .upd_loc(head_data.pp_loc),
    .upd_pred(head_data.pp_value), .upd_outcome(cm_value[0])
  );

  // ---------------------------------------------------------------- REN2 source
  logic             rp_valid, rp_ack, rp_last;
  logic [TAG_W-1:0] rp_idx;
  recq_entry_t      rp_data;
  logic [TAG_W-1:0] q_tail, q_head;
  logic             q_full, q_empty, q_head_done;
  logic             mis;
  logic [TAG_W-1:0] mis_start;
  logic [CW-1:0]    mis_ckpt;

  recq_entry_t      s_ent;      // instruction in REN2
  logic             s_valid;
  logic             s_replay;
  logic [TAG_W-1:0] s_tag;

  always_comb begin
    s_replay = rp_valid;
    if (rp_valid) begin
      s_ent   = rp_data;
      s_valid = 1'b1;
      s_tag   = rp_idx;
    end else begin
      s_ent.uop      = r1_uop;
      s_ent.pp_value = pp_value;
      s_ent.pp_hist  = pp_hist;
      s_ent.pp_bim   = pp_bim;
      s_ent.pp_loc   = pp_loc;
      s_ent.vec      = '0;
      s_valid = r1_valid && !rp_busy && !q_full;
      s_tag   = q_tail;
    end
  end

  // ---------------------------------------------------------------- qualifying predicate
  logic             pm_valid [1];
  logic [PTAG_W-1:0] pm_tag  [1];
  logic [PR_W-1:0]  pm_rd    [1];
  ptag_t            qp_tag;
  logic             qp_inflight;
  logic             ps_value, ps_resolved, ps_used;
  logic             bs_value, bs_ready;
  logic             qp_value, qp_resolved, qp_pending;
  logic             bs_alloc_ok;
  logic [VW-1:0]    bs_alloc_id;
  logic             ps_ckpt_ok;
  logic [CW-1:0]    ps_ckpt_id;

  assign pm_rd[0]    = s_ent.uop.qp;
  assign qp_inflight = pm_valid[0];
  assign qp_tag      = ptag_t'(pm_tag[0]);

  always_comb begin
    if (qp_inflight && !qp_tag.is_vec) begin
      qp_value    = ps_value;
      qp_resolved = ps_resolved;
      qp_pending  = 1'b0;
    end else begin
      qp_value    = bs_value;
      qp_resolved = bs_ready;
      qp_pending  = !bs_ready;
    end
  end

  logic ee_stall, ee_qual, ee_used, ee_toiq, ee_pv1, ee_pv2;
  pred_early_eval u_ee (
    .op(s_ent.uop.op), .qp(s_ent.uop.qp),
    .qp_value, .qp_resolved, .qp_pending,
    .cmp_prediction(s_ent.pp_value),
    .stall(ee_stall), .qual_true(ee_qual), .used_prediction(ee_used),
    .to_issue_queue(ee_toiq), .cmp_pv1(ee_pv1), .cmp_pv2(ee_pv2)
  );

  // ---------------------------------------------------------------- REN2 decision
  logic first_use, need_ckpt, is_bsw_new, to_iq, go;
  always_comb begin
    first_use  = ee_used && !ps_used;
    need_ckpt  = first_use && !SEL;
    is_bsw_new = (s_ent.uop.op == OP_BSW) && !s_replay;
    to_iq      = SEL ? 1'b1 : ee_toiq;
    go = s_valid && !mis && !ee_stall
         && !(need_ckpt && !ps_ckpt_ok)
         && !(is_bsw_new && !bs_alloc_ok);
  end
  assign r1_adv = go && !s_replay;
  assign rp_ack = go && s_replay;

  logic [VW-1:0] s_vec;
  assign s_vec = is_bsw_new ? bs_alloc_id : VW'(s_ent.vec);

  recq_entry_t alloc_data;
  always_comb begin
    alloc_data     = s_ent;
    alloc_data.vec = TAG_W'(s_vec);
  end

  // ---------------------------------------------------------------- register maps
  logic             gm_valid [2];
  logic [TAG_W-1:0] gm_tag   [2];
  logic [GR_W-1:0]  gm_rd    [2];
  logic             gm_wen   [1];
  logic [GR_W-1:0]  gm_widx  [1];
  logic [TAG_W-1:0] gm_wtag  [1];
  logic             pm_wen   [2];
  logic [PR_W-1:0]  pm_widx  [2];
  logic [PTAG_W-1:0] pm_wtag [2];
  logic [N_GR-1:0]  cons_valid;
  logic [TAG_W-1:0] cons_tag [N_GR];
  logic [N_GR-1:0]  gm_map_valid;
  logic [TAG_W-1:0] gm_map_tag [N_GR];
  logic [N_PR-1:0]  pm_map_valid;
  logic [PTAG_W-1:0] pm_map_tag [N_PR];
  logic [PTAG_W-1:0] pm_zero [N_PR];
  logic             do_commit;
  logic             restore;
  logic [PTAG_W-1:0] pm_clr_tag, pm_clr_mask;
  logic             pm_clr_en;

  always_comb for (int i = 0; i < N_PR; i++) pm_zero[i] = '0;

  assign gm_rd[0]   = s_ent.uop.src1;
  assign gm_rd[1]   = s_ent.uop.src2;
  assign gm_wen[0]  = go && s_ent.uop.op == OP_ALU && s_ent.uop.dst_we && ee_qual;
  assign gm_widx[0] = s_ent.uop.dst;
  assign gm_wtag[0] = s_tag;
  assign pm_wen[0]  = go && s_ent.uop.op == OP_CMP && s_ent.uop.pd1 != '0;
  assign pm_wen[1]  = go && s_ent.uop.op == OP_CMP && s_ent.uop.pd2 != '0;
  assign pm_widx[0] = s_ent.uop.pd1;
  assign pm_widx[1] = s_ent.uop.pd2;
  assign pm_wtag[0] = PTAG_W'({1'b0, s_tag, 1'b0});
  assign pm_wtag[1] = PTAG_W'({1'b0, s_tag, 1'b1});
  assign restore    = mis && !SEL;

  rename_map #(
    .N_ARCH(N_GR), .TW(TAG_W), .NUM_CKPT(NUM_CKPT), .RD_PORTS(2), .WR_PORTS(1)
  ) u_gmap (
    .clk, .rst_n,
    .rd_idx(gm_rd), .rd_valid(gm_valid), .rd_tag(gm_tag),
    .wr_en(gm_wen), .wr_idx(gm_widx), .wr_tag(gm_wtag),
    .wr_all_en(1'b0), .wr_all_tag('0),
    .clr_en(do_commit), .clr_tag(q_head), .clr_mask('0),
    .ckpt_save(go && need_ckpt), .ckpt_save_id(ps_ckpt_id),
    .ckpt_restore(restore), .ckpt_restore_id(mis_ckpt),
    .load_en(mis && SEL), .load_valid(cons_valid), .load_tag(cons_tag),
    .map_valid(gm_map_valid), .map_tag(gm_map_tag)
  );

  rename_map #(
    .N_ARCH(N_PR), .TW(PTAG_W), .NUM_CKPT(NUM_CKPT), .RD_PORTS(1), .WR_PORTS(2)
  ) u_pmap (
    .clk, .rst_n,
    .rd_idx(pm_rd), .rd_valid(pm_valid), .rd_tag(pm_tag),
    .wr_en(pm_wen), .wr_idx(pm_widx), .wr_tag(pm_wtag),
    .wr_all_en(go && s_ent.uop.op == OP_BSW),
    .wr_all_tag(PTAG_W'({1'b1, TAG_W'(s_vec), 1'b0})),
    .clr_en(pm_clr_en), .clr_tag(pm_clr_tag), .clr_mask(pm_clr_mask),
    .ckpt_save(go && need_ckpt), .ckpt_save_id(ps_ckpt_id),
    .ckpt_restore(restore), .ckpt_restore_id(mis_ckpt),
    .load_en(1'b0), .load_valid('0), .load_tag(pm_zero),
    .map_valid(pm_map_valid), .map_tag(pm_map_tag)
  );

  logic [GR_W-1:0] sr_src [2];
  src_tag_t        sr_rec [2];
  src_tag_t        sr_dst;
  assign sr_src[0] = s_ent.uop.src1;
  assign sr_src[1] = s_ent.uop.src2;

  selective_replay_tags u_srt (
    .clk, .rst_n,
    .ren_en(go && !s_replay), .ren_tag(s_tag),
    .src_idx(sr_src),
    .dst_we(s_ent.uop.op == OP_ALU && s_ent.uop.dst_we), .dst(s_ent.uop.dst),
    .src_rec(sr_rec), .dst_rec(sr_dst),
    .clr_en(do_commit), .clr_tag(q_head),
    .map_valid(cons_valid), .map_tag(cons_tag)
  );

  // ---------------------------------------------------------------- predicate state
  logic [TAG_W-1:0] inv_len;
  logic             inv_en;
  // A misprediction found while a replay is in progress restarts the recovery
  // from its own first user: its checkpoint was taken before that user and is
  // still valid, and the restart also covers whatever the running replay had
  // left to do.
  // In selective-replay mode nothing is renamed again, so only the RecQ
  // completion flags of the replay window are cleared (the scheduler reports
  // those instructions complete again); predicate results, uses and broadside
  // vectors are kept.
  logic wb_acc, rr_inv_en;
  assign wb_acc    = wb_valid;
  assign inv_en    = mis;
  assign rr_inv_en = mis && !SEL;
  assign inv_len = q_tail - mis_start;

  predicate_state #(.DEPTH(ROB_DEPTH), .NUM_CKPT(NUM_CKPT)) u_ps (
    .clk, .rst_n,
    .def_en(go && s_ent.uop.op == OP_CMP), .def_idx(s_tag), .def_pv({ee_pv2, ee_pv1}),
    .rd_idx(qp_tag.idx), .rd_which(qp_tag.which),
    .rd_value(ps_value), .rd_resolved(ps_resolved), .rd_used(ps_used),
    .ckpt_ok(ps_ckpt_ok), .ckpt_id(ps_ckpt_id),
    .use_en(go && ee_used && qp_inflight && !qp_tag.is_vec),
    .use_idx(qp_tag.idx), .use_which(qp_tag.which), .use_at(s_tag),
.wb_en(wb_valid && wb_is_cmp), .wb_idx(wb_tag), .wb_value(wb_pvals),
    .mis, .mis_start, .mis_ckpt,
    .inv_en(rr_inv_en), .inv_start(mis_start), .inv_len,
    .cm_idx(q_head), .cm_value, .cm_pred
  );

  // ---------------------------------------------------------------- broadside file
  logic cw_en [2];
  logic [PR_W-1:0] cw_idx [2];
  logic cw_val [2];
  logic head_is_cmp, head_is_bsw;
  assign head_is_cmp = head_data.uop.op == OP_CMP;
  assign head_is_bsw = head_data.uop.op == OP_BSW;
  assign cw_en[0]  = do_commit && head_is_cmp;
  assign cw_en[1]  = do_commit && head_is_cmp;
  assign cw_idx[0] = head_data.uop.pd1;
  assign cw_idx[1] = head_data.uop.pd2;
  assign cw_val[0] = cm_value[0];
  assign cw_val[1] = cm_value[1];

  broadside_pred_rf #(.NUM_VEC(NUM_VEC)) u_bs (
    .clk, .rst_n,
    .alloc_ok(bs_alloc_ok), .alloc_id(bs_alloc_id),
    .alloc_en(go && is_bsw_new), .alloc_owner(s_tag),
    .wr_en(wb_acc && wb_is_bsw), .wr_id(wb_vec), .wr_value(wb_bsw_value),
    .commit_en(do_commit && head_is_bsw), .commit_id(VW'(head_data.vec)),
    .cw_en, .cw_idx, .cw_val,
    .inv_en(rr_inv_en), .inv_start(mis_start), .inv_len,
    .rd_is_vec(qp_inflight && qp_tag.is_vec), .rd_vec(VW'(qp_tag.idx)),
    .rd_pnum(s_ent.uop.qp), .rd_value(bs_value), .rd_ready(bs_ready),
    .arch_pr
  );

  // ---------------------------------------------------------------- RecQ and replay
  logic [TAG_W:0] q_count;
  recovery_queue #(.DEPTH(ROB_DEPTH)) u_recq (
    .clk, .rst_n,
    .alloc_en(go && !s_replay), .alloc_data,
    .tail(q_tail), .full(q_full), .empty(q_empty),
    .done_en0(go && !to_iq), .done_idx0(s_tag),
    .done_en1(wb_acc), .done_idx1(wb_tag),
    .inv_en, .inv_start(mis_start),
    .rd_idx(rp_idx), .rd_data(rp_data),
    .head(q_head), .head_data, .head_done(q_head_done),
    .commit_en(1'b1), .count(q_count)
  );
  assign do_commit = q_head_done;

  if (SEL) begin : g_sel
    assign rp_busy  = 1'b0;
    assign rp_valid = 1'b0;
    assign rp_idx   = '0;
    assign rp_last  = 1'b0;
  end else begin : g_rr
    replay_controller #(.DEPTH(ROB_DEPTH), .RECOVERY_LAT(RECOVERY_LAT)) u_rc (
      .clk, .rst_n, .mis, .mis_start, .tail(q_tail),
      .busy(rp_busy), .replay_valid(rp_valid), .replay_idx(rp_idx),
      .replay_ack(rp_ack), .replay_last(rp_last)
    );
  end

  // commit side
  assign upd_en = do_commit && head_is_cmp && cm_value != 2'b00;
  always_comb begin
    pm_clr_en   = do_commit && (head_is_cmp || head_is_bsw);
    pm_clr_tag  = head_is_bsw ? PTAG_W'({1'b1, head_data.vec, 1'b0})
                              : PTAG_W'({1'b0, q_head, 1'b0});
    pm_clr_mask = head_is_bsw ? '0 : PTAG_W'(1);
  end

  // ---------------------------------------------------------------- outputs
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      disp_valid       <= 1'b0;
      disp_tag         <= '0;
      disp_uop         <= '0;
      disp_qual        <= 1'b0;
      disp_replay      <= 1'b0;
      disp_src1        <= '0;
      disp_src2        <= '0;
      disp_src1_rec    <= '0;
      disp_src2_rec    <= '0;
      disp_dst_rec     <= '0;
      disp_qp_inflight <= 1'b0;
      disp_qp_tag      <= '0;
      disp_vec         <= '0;
      commit_valid     <= 1'b0;
      commit_tag       <= '0;
      commit_uop       <= '0;
    end else begin
      disp_valid <= go && to_iq;
      if (go) begin
        disp_tag         <= s_tag;
        disp_uop         <= s_ent.uop;
        disp_qual        <= ee_qual;
        disp_replay      <= s_replay;
        disp_src1        <= '{inflight: gm_valid[0] && s_ent.uop.src1_v, tag: gm_tag[0]};
        disp_src2        <= '{inflight: gm_valid[1] && s_ent.uop.src2_v, tag: gm_tag[1]};
        disp_src1_rec    <= sr_rec[0];
        disp_src2_rec    <= sr_rec[1];
        disp_dst_rec     <= sr_dst;
        disp_qp_inflight <= qp_inflight;
        disp_qp_tag      <= qp_tag;
        disp_vec         <= s_vec;
      end
      commit_valid <= do_commit;
      if (do_commit) begin
        commit_tag <= q_head;
        commit_uop <= head_data.uop;
      end
    end
  end

  // recovery requests leave in the misprediction cycle itself
  assign squash_valid     = mis && !SEL;
  assign squash_start     = mis_start;
  assign sel_replay_valid = mis && SEL;
  assign sel_replay_start = mis_start;

  assign ev_mispredict = mis;
  assign ev_ckpt       = go && need_ckpt;
  assign ev_stall_ckpt = s_valid && !mis && !ee_stall && need_ckpt && !ps_ckpt_ok;
  assign ev_stall_vec  = s_valid && !mis && is_bsw_new && !bs_alloc_ok;
  assign ev_stall_sync = s_valid && !mis && ee_stall;
  assign ev_qual_false = go && !ee_qual;

endmodule
