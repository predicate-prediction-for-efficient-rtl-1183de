// broadside_pred_rf: predicate register file with renamed broadside vectors.
//
// A broadside write (IA64 "mov pr = r") assigns all 64 predicates at once. To
// rename it without allocating 64 separate physical predicates, the file holds,
// besides the committed (architectural) predicates, NUM_VEC spare vectors of 64
// physical predicates. A broadside write takes a whole free vector at rename
// and every predicate map entry then names that vector by one tag; a predicate
// is read as vector[tag][predicate number]. If no vector is free the renamer
// stalls (alloc_ok low). The vector is written when the broadside write executes
// (wr_*), and at its commit the vector is copied into the architectural file and
// freed. Compares write their committed predicates into the architectural file
// through cw_* at their commit. p0 reads as 1 everywhere.
// inv_* clears the written flag of vectors whose owner lies in a replayed range
// [inv_start, inv_start + inv_len) of the recovery queue, since those writes
// will execute again.
// Two vectors, as in the evaluated machine. Reads are combinational; writes take
// effect at the clock edge. The lowest free vector is allocated.
module broadside_pred_rf
  import pp_pkg::*;
#(
  parameter int unsigned NUM_VEC = 2
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // allocation at rename
  output logic                       alloc_ok,
  output logic [$clog2(NUM_VEC)-1:0] alloc_id,
  input  logic                       alloc_en,
  input  logic [TAG_W-1:0]           alloc_owner,
  // write-back of a broadside write
  input  logic                       wr_en,
  input  logic [$clog2(NUM_VEC)-1:0] wr_id,
  input  logic [N_PR-1:0]            wr_value,
  // commit of a broadside write
  input  logic                       commit_en,
  input  logic [$clog2(NUM_VEC)-1:0] commit_id,
  // commit of a compare: two predicate writes into the architectural file
  input  logic                       cw_en   [2],
  input  logic [PR_W-1:0]            cw_idx  [2],
  input  logic                       cw_val  [2],
  // replay invalidation
  input  logic                       inv_en,
  input  logic [TAG_W-1:0]           inv_start,
  input  logic [TAG_W-1:0]           inv_len,
  // read port
  input  logic                       rd_is_vec,
  input  logic [$clog2(NUM_VEC)-1:0] rd_vec,
  input  logic [PR_W-1:0]            rd_pnum,
  output logic                       rd_value,
  output logic                       rd_ready,
  output logic [N_PR-1:0]            arch_pr
);
  localparam int unsigned VW = $clog2(NUM_VEC);

  logic [N_PR-1:0]    vec   [NUM_VEC];
  logic [NUM_VEC-1:0] busy;
  logic [NUM_VEC-1:0] written;
  logic [TAG_W-1:0]   owner [NUM_VEC];

  always_comb begin
    alloc_ok = 1'b0;
    alloc_id = '0;
    for (int v = NUM_VEC - 1; v >= 0; v--)
      if (!busy[v]) begin
        alloc_ok = 1'b1;
        alloc_id = VW'(v);
      end
  end

  always_comb begin
    if (rd_pnum == '0) begin
      rd_value = 1'b1;
      rd_ready = 1'b1;
    end else if (rd_is_vec) begin
      rd_value = vec[rd_vec][rd_pnum];
      rd_ready = written[rd_vec];
    end else begin
      rd_value = arch_pr[rd_pnum];
      rd_ready = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      arch_pr <= N_PR'(1);
      busy    <= '0;
      written <= '0;
    end else begin
      for (int v = 0; v < NUM_VEC; v++)
        if (inv_en && ((owner[v] - inv_start) < inv_len)) written[v] <= 1'b0;
      if (alloc_en && alloc_ok) begin
        busy[alloc_id]    <= 1'b1;
        written[alloc_id] <= 1'b0;
        owner[alloc_id]   <= alloc_owner;
      end
      if (wr_en) begin
        vec[wr_id]     <= wr_value | N_PR'(1);
        written[wr_id] <= 1'b1;
      end
      for (int k = 0; k < 2; k++)
        if (cw_en[k] && cw_idx[k] != '0) arch_pr[cw_idx[k]] <= cw_val[k];
      if (commit_en) begin
        arch_pr         <= vec[commit_id] | N_PR'(1);
        busy[commit_id] <= 1'b0;
      end
    end
  end

endmodule
