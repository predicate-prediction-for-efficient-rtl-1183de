// pp_pkg: shared types and constants of the predicate-prediction rename unit.
//
// The unit renames an IA64-like instruction stream that uses conditional-writer
// predication: every instruction names a qualifying predicate (qp), and compares
// write two predicate registers. Architectural sizes follow IA64 (128 general
// registers, 64 predicate registers with p0 always true). In-flight producers
// are named by their slot in the recovery queue (RecQ), which also plays the part
// of the reorder buffer, so a register tag is a RecQ index.
package pp_pkg;

  // Architectural state (IA64).
  localparam int unsigned N_GR   = 128;
  localparam int unsigned GR_W   = 7;
  localparam int unsigned N_PR   = 64;
  localparam int unsigned PR_W   = 6;
  localparam int unsigned PC_W   = 64;

  // Instruction window: RUU of 256 entries; the RecQ is a view of it.
  localparam int unsigned ROB_DEPTH = 256;
  localparam int unsigned TAG_W     = 8;

  // Predicate tags: an in-flight predicate is either output 0/1 of a compare in
  // RecQ slot `idx`, or predicate number (its own) of broadside vector `idx`.
  localparam int unsigned PTAG_W = TAG_W + 2;

  typedef enum logic [1:0] {
    OP_ALU = 2'd0,   // any register-writing (or non-writing) operation
    OP_CMP = 2'd1,   // unconditional compare: writes pd1 = cond, pd2 = !cond
    OP_BSW = 2'd2    // broadside predicate write (mov pr = r): writes p1..p63
  } op_e;

  // Decoded micro-op as it leaves decode.
  typedef struct packed {
    op_e              op;
    logic [PC_W-1:0]  pc;
    logic [PR_W-1:0]  qp;      // qualifying predicate
    logic             dst_we;  // writes general register dst
    logic [GR_W-1:0]  dst;
    logic             src1_v;
    logic [GR_W-1:0]  src1;
    logic             src2_v;
    logic [GR_W-1:0]  src2;
    logic [PR_W-1:0]  pd1;     // compare destinations
    logic [PR_W-1:0]  pd2;
  } uop_t;

  // A renamed source: in flight (producer's RecQ slot) or in the architectural file.
  typedef struct packed {
    logic             inflight;
    logic [TAG_W-1:0] tag;
  } src_tag_t;

  typedef struct packed {
    logic              is_vec;   // 1: broadside vector, 0: compare output
    logic [TAG_W-1:0]  idx;      // compare RecQ slot or vector number
    logic              which;    // compare output 0 (pd1) or 1 (pd2)
  } ptag_t;

  // Local history length of the predicate predictor, recorded per compare.
  localparam int unsigned LHIST_W = 10;

  // What the recovery queue keeps for each instruction besides its place:
  // the decoded instruction, the prediction made for a compare (with what the
  // predictor needs to be trained at commit) and the vector of a broadside write.
  typedef struct packed {
    uop_t               uop;
    logic               pp_value;
    logic [LHIST_W-1:0] pp_hist;
    logic               pp_bim;
    logic               pp_loc;
    logic [TAG_W-1:0]   vec;
  } recq_entry_t;

  // Recovery-tag selection of the top: rename-replay or selective-replay.
  typedef enum logic {
    REC_RENAME_REPLAY    = 1'b0,
    REC_SELECTIVE_REPLAY = 1'b1
  } recovery_e;

endpackage
