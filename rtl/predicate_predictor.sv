// predicate_predictor: predicts the value of the first predicate a compare defines.
//
// A predicate that a compare defines used to be a branch condition before
// if-conversion, so it is predicted with branch-prediction structures, indexed by
// the PC of the compare: a meta chooser selects between a bimodal table of 2-bit
// counters and a local two-level predictor (per-address history, then a table of
// 2-bit counters). Only local information is used, so predictions do not depend
// on one another. A "true" prediction corresponds to a taken branch.
//
// Timing: a lookup presented in cycle t (lookup_en, lookup_pc) returns its result
// in the registers pred_* from cycle t+1 (the REN1 stage); they hold until the
// next lookup. The local history of the PC is updated speculatively with the
// prediction at lookup. Counters are trained at commit through the upd_* port
// with the history and component predictions recorded at lookup; when the
// committed predicate was mispredicted, the speculative history of that PC is
// repaired to the recorded history followed by the real outcome.
// After reset the tables are swept to their initial values, one entry per cycle
// in every table at once; `ready` is low until the sweep ends.
//
// Sizes follow the predicate predictor the design is built around: a 16K-entry
// chooser, a 16K-entry bimodal table and a 16K-entry local pattern table. The
// size of the local history table (1024 x 10 bits), the way the pattern table is
// indexed (4 PC bits above 10 history bits, a per-address pattern-table
// approximation), the PC bits used (word address) and the initial counter values
// (weakly false, chooser weakly bimodal) are this design's own choices.
module predicate_predictor
  import pp_pkg::*;
#(
  parameter int unsigned BIM_ENTRIES = 16384,
  parameter int unsigned PHT_ENTRIES = 16384,
  parameter int unsigned CHO_ENTRIES = 16384,
  parameter int unsigned LHT_ENTRIES = 1024,
  parameter int unsigned HIST_W     = 10
) (
  input  logic               clk,
  input  logic               rst_n,
  output logic               ready,
  // lookup (decode -> REN1)
  input  logic               lookup_en,
  input  logic [PC_W-1:0]    lookup_pc,
  output logic               pred_value,   // predicted value of the first predicate
  output logic [HIST_W-1:0] pred_hist,    // local history used
  output logic               pred_bim,     // bimodal component prediction
  output logic               pred_loc,     // local component prediction
  // training at commit
  input  logic               upd_en,
  input  logic [PC_W-1:0]    upd_pc,
  input  logic [HIST_W-1:0] upd_hist,
  input  logic               upd_bim,
  input  logic               upd_loc,
  input  logic               upd_pred,
  input  logic               upd_outcome
);
  localparam int unsigned BIM_W = $clog2(BIM_ENTRIES);
  localparam int unsigned PHT_W = $clog2(PHT_ENTRIES);
  localparam int unsigned CHO_W = $clog2(CHO_ENTRIES);
  localparam int unsigned LHT_W = $clog2(LHT_ENTRIES);
  localparam int unsigned PHT_PC_W = PHT_W - HIST_W;
  localparam int unsigned MAX_ENTRIES =
      (BIM_ENTRIES > PHT_ENTRIES) ? ((BIM_ENTRIES > CHO_ENTRIES) ? BIM_ENTRIES : CHO_ENTRIES)
                                  : ((PHT_ENTRIES > CHO_ENTRIES) ? PHT_ENTRIES : CHO_ENTRIES);
  localparam int unsigned INIT_W = $clog2(MAX_ENTRIES) + 1;

  logic [1:0]         bim [BIM_ENTRIES];
  logic [1:0]         pht [PHT_ENTRIES];
  logic [1:0]         cho [CHO_ENTRIES];
  logic [HIST_W-1:0] lht [LHT_ENTRIES];

  logic [INIT_W-1:0]  init_cnt;
  logic               init_busy;
  assign ready = !init_busy;

  function automatic logic [1:0] sat_update(input logic [1:0] c, input logic up);
    if (up) return (c == 2'd3) ? 2'd3 : c + 2'd1;
    else    return (c == 2'd0) ? 2'd0 : c - 2'd1;
  endfunction

  // word address of an instruction
  function automatic logic [PC_W-1:0] waddr(input logic [PC_W-1:0] pc);
    return pc >> 2;
  endfunction

  function automatic logic [PHT_W-1:0] pht_index(input logic [PC_W-1:0] pc,
                                                 input logic [HIST_W-1:0] h);
    logic [PC_W-1:0] w;
    w = waddr(pc);
    return {w[PHT_PC_W-1:0], h};
  endfunction

  // lookup datapath
  logic [PC_W-1:0]    lw;
  logic [HIST_W-1:0] l_hist;
  logic               l_bim, l_loc, l_use_loc, l_pred;
  always_comb begin
    lw        = waddr(lookup_pc);
    l_hist    = lht[lw[LHT_W-1:0]];
    l_bim     = bim[lw[BIM_W-1:0]][1];
    l_loc     = pht[pht_index(lookup_pc, l_hist)][1];
    l_use_loc = cho[lw[CHO_W-1:0]][1];
    l_pred    = l_use_loc ? l_loc : l_bim;
  end

  logic [PC_W-1:0] uw;
  assign uw = waddr(upd_pc);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_cnt   <= '0;
      init_busy  <= 1'b1;
      pred_value <= 1'b0;
      pred_hist  <= '0;
      pred_bim   <= 1'b0;
      pred_loc   <= 1'b0;
    end else if (init_busy) begin
      if (init_cnt < INIT_W'(BIM_ENTRIES)) bim[init_cnt[BIM_W-1:0]] <= 2'd1;
      if (init_cnt < INIT_W'(PHT_ENTRIES)) pht[init_cnt[PHT_W-1:0]] <= 2'd1;
      if (init_cnt < INIT_W'(CHO_ENTRIES)) cho[init_cnt[CHO_W-1:0]] <= 2'd1;
      if (init_cnt < INIT_W'(LHT_ENTRIES)) lht[init_cnt[LHT_W-1:0]] <= '0;
      init_cnt <= init_cnt + 1'b1;
      if (init_cnt == INIT_W'(MAX_ENTRIES - 1)) init_busy <= 1'b0;
    end else begin
      if (upd_en) begin
        bim[uw[BIM_W-1:0]] <= sat_update(bim[uw[BIM_W-1:0]], upd_outcome);
        pht[pht_index(upd_pc, upd_hist)] <=
            sat_update(pht[pht_index(upd_pc, upd_hist)], upd_outcome);
        if (upd_bim != upd_loc)
          cho[uw[CHO_W-1:0]] <= sat_update(cho[uw[CHO_W-1:0]], upd_loc == upd_outcome);
      end
      // The lookup's speculative history write wins over a repair of the same
      // entry in the same cycle, since it is the younger of the two.
      if (upd_en && (upd_pred != upd_outcome))
        lht[uw[LHT_W-1:0]] <= {upd_hist[HIST_W-2:0], upd_outcome};
      if (lookup_en) begin
        lht[lw[LHT_W-1:0]] <= {l_hist[HIST_W-2:0], l_pred};
        pred_value <= l_pred;
        pred_hist  <= l_hist;
        pred_bim   <= l_bim;
        pred_loc   <= l_loc;
      end
    end
  end

endmodule
