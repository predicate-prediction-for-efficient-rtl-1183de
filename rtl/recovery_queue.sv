// recovery_queue: the RecQ, an in-order circular buffer of renamed instructions.
//
// Every instruction that leaves rename is written at the tail, whether it is
// qualified true (and also sent to the issue queue) or qualified false (kept
// only here). The slot number is the instruction's tag. An entry leaves from the
// head, one per cycle, when it is done: a qualified-false instruction is done
// at rename, the others when they write back.
//
// Rename-replay: when a predicate misprediction is found, inv_en clears "done"
// for every entry from inv_start (the first user of the mispredicted predicate)
// up to the tail; the replay then reads those entries in order through rd_idx
// (combinational read) and sends them through the renamer again, in place.
// The RecQ is therefore sized like the reorder buffer it shadows.
// Ports done_en0/1 mark an entry done (rename and write-back); they are applied
// after inv_en, and an entry allocated in the same cycle as inv_en is cleared too.
module recovery_queue
  import pp_pkg::*;
#(
  parameter int unsigned DEPTH = ROB_DEPTH
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     alloc_en,
  input  recq_entry_t              alloc_data,
  output logic [$clog2(DEPTH)-1:0] tail,
  output logic                     full,
  output logic                     empty,
  input  logic                     done_en0,
  input  logic [$clog2(DEPTH)-1:0] done_idx0,
  input  logic                     done_en1,
  input  logic [$clog2(DEPTH)-1:0] done_idx1,
  input  logic                     inv_en,
  input  logic [$clog2(DEPTH)-1:0] inv_start,
  input  logic [$clog2(DEPTH)-1:0] rd_idx,
  output recq_entry_t              rd_data,
  output logic [$clog2(DEPTH)-1:0] head,
  output recq_entry_t              head_data,
  output logic                     head_done,
  input  logic                     commit_en,
  output logic [$clog2(DEPTH):0]   count
);
  localparam int unsigned IW = $clog2(DEPTH);

  recq_entry_t       mem  [DEPTH];
  logic [DEPTH-1:0]  done;

  assign full      = (count == (IW+1)'(DEPTH));
  assign empty     = (count == '0);
  assign rd_data   = mem[rd_idx];
  assign head_data = mem[head];
  assign head_done = !empty && done[head];

  logic do_alloc, do_commit;
  assign do_alloc  = alloc_en && !full;
  assign do_commit = commit_en && head_done;

  // entries between inv_start and the tail (after this cycle's allocation)
  logic [IW-1:0]    inv_len;
  logic [DEPTH-1:0] inv_mask;
  always_comb begin
    inv_len = tail - inv_start + IW'(do_alloc);
    for (int i = 0; i < DEPTH; i++)
      inv_mask[i] = inv_en && ((IW'(i) - inv_start) < inv_len);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head  <= '0;
      tail  <= '0;
      count <= '0;
      done  <= '0;
    end else begin
      if (do_alloc) begin
        mem[tail]  <= alloc_data;
        done[tail] <= 1'b0;
        tail       <= tail + 1'b1;
      end
      done <= (do_alloc ? (done & ~(DEPTH'(1) << tail)) : done) & ~inv_mask;
      if (done_en0) done[done_idx0] <= 1'b1;
      if (done_en1) done[done_idx1] <= 1'b1;
      if (do_commit) head <= head + 1'b1;
      count <= count + (IW+1)'(do_alloc) - (IW+1)'(do_commit);
    end
  end

endmodule
