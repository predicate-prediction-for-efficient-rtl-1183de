// predicate_state: state of every in-flight compare's two predicates.
//
// Indexed by the compare's recovery-queue slot. At rename a compare records the
// values predicted for its two predicates (def_*). The renamer reads a
// predicate through rd_*: the resolved value once the compare has written back,
// the predicted value before. When an instruction is early-evaluated on a
// predicted value for the first time (use_*), the state records that the
// prediction was used, the slot of that first user and the register-map
// checkpoint taken there; checkpoints are allocated here (ckpt_ok / ckpt_id).
// Only the first use allocates a checkpoint; later uses only mark the output used.
//
// When the compare writes back (wb_*), the state compares the real values with
// the predicted ones. A difference on an output that some instruction used is a
// predicate misprediction: mis is raised in that cycle (combinationally) with the
// first user's slot and the checkpoint to restore. A difference nobody used is
// not a misprediction. A write-back is bypassed to the read port in its own
// cycle. Either way the checkpoint of the compare is freed at that
// edge.
// inv_* (a replay of [inv_start, inv_start + inv_len)) forgets the results of
// compares in the range, which will execute again, and forgets every first use
// that lies in the range, freeing its checkpoint, since those instructions will be
// renamed again.
module predicate_state
  import pp_pkg::*;
#(
  parameter int unsigned DEPTH    = ROB_DEPTH,
  parameter int unsigned NUM_CKPT = 8
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        def_en,
  input  logic [$clog2(DEPTH)-1:0]    def_idx,
  input  logic [1:0]                  def_pv,
  input  logic [$clog2(DEPTH)-1:0]    rd_idx,
  input  logic                        rd_which,
  output logic                        rd_value,
  output logic                        rd_resolved,
  output logic                        rd_used,
  output logic                        ckpt_ok,
  output logic [$clog2(NUM_CKPT)-1:0] ckpt_id,
  input  logic                        use_en,
  input  logic [$clog2(DEPTH)-1:0]    use_idx,
  input  logic                        use_which,
  input  logic [$clog2(DEPTH)-1:0]    use_at,
  input  logic                        wb_en,
  input  logic [$clog2(DEPTH)-1:0]    wb_idx,
  input  logic [1:0]                  wb_value,
  output logic                        mis,
  output logic [$clog2(DEPTH)-1:0]    mis_start,
  output logic [$clog2(NUM_CKPT)-1:0] mis_ckpt,
  input  logic                        inv_en,
  input  logic [$clog2(DEPTH)-1:0]    inv_start,
  input  logic [$clog2(DEPTH)-1:0]    inv_len,
  input  logic [$clog2(DEPTH)-1:0]    cm_idx,
  output logic [1:0]                  cm_value,
  output logic [1:0]                  cm_pred
);
  localparam int unsigned IW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(NUM_CKPT);

  logic [1:0]        pv    [DEPTH];
  logic [1:0]        rv    [DEPTH];
  logic [DEPTH-1:0]  res;
  logic [1:0]        used  [DEPTH];
  logic [IW-1:0]     first [DEPTH];
  logic [CW-1:0]     ck    [DEPTH];
  logic [NUM_CKPT-1:0] ck_busy;

  function automatic logic in_range(input logic [IW-1:0] i);
    return inv_en && ((i - inv_start) < inv_len);
  endfunction

  // wb_drop refuses the write-back (no state changes) while mis still reports it.
// A write-back in the same cycle is bypassed to the read port, so a predicate
  // that resolves while its user is being renamed is never counted as used.
  logic rd_bypass;
  assign rd_bypass   = wb_en && (wb_idx == rd_idx);
  assign rd_value    = rd_bypass   ? wb_value[rd_which] :
                       res[rd_idx] ? rv[rd_idx][rd_which] : pv[rd_idx][rd_which];
  assign rd_resolved = rd_bypass || res[rd_idx];
  assign rd_used     = (used[rd_idx] != 2'b00);
  assign cm_value    = rv[cm_idx];
  assign cm_pred     = pv[cm_idx];

  always_comb begin
    ckpt_ok = 1'b0;
    ckpt_id = '0;
    for (int c = NUM_CKPT - 1; c >= 0; c--)
      if (!ck_busy[c]) begin
        ckpt_ok = 1'b1;
        ckpt_id = CW'(c);
      end
  end

  logic [1:0] wb_diff;
  assign wb_diff   = (wb_value ^ pv[wb_idx]) & used[wb_idx];
  assign mis       = wb_en && (wb_diff != 2'b00);
  assign mis_start = first[wb_idx];
  assign mis_ckpt  = ck[wb_idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res     <= '0;
      ck_busy <= '0;
      for (int i = 0; i < DEPTH; i++) used[i] <= 2'b00;
    end else begin
      for (int i = 0; i < DEPTH; i++) begin
        if (in_range(IW'(i))) res[i] <= 1'b0;
        if (used[i] != 2'b00 && in_range(first[i])) begin
          used[i]        <= 2'b00;
          ck_busy[ck[i]] <= 1'b0;
        end
      end
      if (wb_en) begin
        res[wb_idx] <= 1'b1;
        rv[wb_idx]  <= wb_value;
        if (used[wb_idx] != 2'b00) begin
          used[wb_idx] <= 2'b00;
          ck_busy[ck[wb_idx]] <= 1'b0;
        end
      end
      if (def_en) begin
        pv[def_idx]   <= def_pv;
        res[def_idx]  <= 1'b0;
        used[def_idx] <= 2'b00;
      end
      if (use_en) begin
        if (used[use_idx] == 2'b00) begin
          first[use_idx]   <= use_at;
          ck[use_idx]      <= ckpt_id;
          ck_busy[ckpt_id] <= 1'b1;
        end
        used[use_idx][use_which] <= 1'b1;
      end
    end
  end

endmodule
