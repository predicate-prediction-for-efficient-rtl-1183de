// tb_pp_rename_unit_selective: end-to-end test of the rename unit built for
// selective-replay recovery (RECOVERY = REC_SELECTIVE_REPLAY), other parameters
// at their defaults.
//
// The same predicated loop and sequential reference model as tb_pp_rename_unit
// drive the unit; the execution side writes every dispatched instruction back
// after a random latency with the reference results. In this mode nothing is
// squashed: a misprediction only asks the scheduler to re-execute the dependent
// instructions (sel_replay_*), and the execution side then reports every
// dispatched instruction from the replay start on complete again. Checks:
//   - instructions commit in program order and every one is dispatched exactly
//     once, also those predicted qualified false, and never as a rename replay;
//   - each source recovery tag names the last older writer of that register in
//     program order whatever its predicate (or nothing if that writer has
//     committed), and the destination recovery tag names the previous writer of
//     the destination the same way;
//   - each in-flight predicted source tag names an older writer of the register;
//   - a selective replay starts inside the window of uncommitted instructions;
//   - no squash and no map checkpoint ever happens;
//   - the architectural predicate file matches the reference at the end.
// Misprediction, selective replay, instructions dispatched on a wrong predicted
// qualification, and the broadside vector and synchronisation stalls must occur.
module tb_pp_rename_unit_selective;
  import pp_pkg::*;

  localparam int N     = 4000;   // dynamic instructions
  localparam int BODY  = 120;    // static loop body
  localparam int RLAT  = 7;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic ready, in_valid, in_ready;
  uop_t in_uop;
  logic disp_valid, disp_qual, disp_replay;
  logic [TAG_W-1:0] disp_tag;
  uop_t disp_uop;
  src_tag_t disp_src1, disp_src2, disp_src1_rec, disp_src2_rec, disp_dst_rec;
  logic disp_qp_inflight;
  ptag_t disp_qp_tag;
  logic [0:0] disp_vec;
  logic squash_valid, sel_replay_valid;
  logic [TAG_W-1:0] squash_start, sel_replay_start;
  logic wb_valid, wb_is_cmp, wb_is_bsw;
  logic [TAG_W-1:0] wb_tag;
  logic [1:0] wb_pvals;
  logic [0:0] wb_vec;
  logic [N_PR-1:0] wb_bsw_value, arch_pr;
  logic commit_valid;
  logic [TAG_W-1:0] commit_tag;
  uop_t commit_uop;
  logic ev_mispredict, ev_ckpt, ev_stall_ckpt, ev_stall_vec, ev_stall_sync, ev_qual_false;

  pp_rename_unit #(.RECOVERY(REC_SELECTIVE_REPLAY)) dut (.*);

  // ------------------------------------------------------------ program
  uop_t            prog   [N];
  logic            g_qual [N];
  logic [1:0]      g_cmp  [N];
  logic [N_PR-1:0] g_bsw  [N];
  int              g_p1   [N];   // producer seq of src1, -1 if none
  int              g_p2   [N];
  int              c_p1   [N];   // last older writer of src1 whatever its predicate
  int              c_p2   [N];
  int              c_pd   [N];   // last older writer of dst
  logic [N_PR-1:0] g_final;
  uop_t            body   [BODY];
  int              kind   [BODY];  // compare behaviour: 0 true, 1 alternating, 2 random, 3 mostly true

  initial begin
    logic [N_PR-1:0] pr;
    int last [N_GR];
    int clast [N_GR];
    int iter;
    void'($urandom(32'h5eed));
    for (int b = 0; b < BODY; b++) begin
      uop_t u;
      int r;
      u = '0;
      u.pc = 64'h4000 + 64'(b * 4);
      r = $urandom_range(0, 99);
      if (b == BODY - 1 || b == BODY - 2 || b == BODY - 3) begin
        u.op = OP_BSW; u.qp = 0; u.src1_v = 1; u.src1 = 7'($urandom_range(1, 15));
      end else if (r < 50) begin
        u.op  = OP_CMP;
        u.qp  = ($urandom_range(0, 3) == 0) ? 6'($urandom_range(1, 8)) : 6'd0;
        u.pd1 = 6'($urandom_range(1, 8));
        u.pd2 = 6'($urandom_range(9, 16));
        u.src1_v = 1; u.src1 = 7'($urandom_range(1, 15));
      end else begin
        u.op  = OP_ALU;
        u.qp  = ($urandom_range(0, 4) == 0) ? 6'd0 : 6'($urandom_range(1, 16));
        u.dst_we = 1; u.dst = 7'($urandom_range(1, 15));
        u.src1_v = 1; u.src1 = 7'($urandom_range(1, 15));
        u.src2_v = ($urandom_range(0, 1) == 1); u.src2 = 7'($urandom_range(1, 15));
      end
      body[b] = u;
      kind[b] = $urandom_range(0, 3);
    end
    pr = N_PR'(1);
    for (int i = 0; i < N_GR; i++) begin last[i] = -1; clast[i] = -1; end
    for (int i = 0; i < N; i++) begin
      uop_t u;
      logic c;
      iter = i / BODY;
      u = body[i % BODY];
      prog[i] = u;
      g_p1[i] = u.src1_v ? last[u.src1] : -1;
      g_p2[i] = u.src2_v ? last[u.src2] : -1;
      c_p1[i] = u.src1_v ? clast[u.src1] : -1;
      c_p2[i] = u.src2_v ? clast[u.src2] : -1;
      c_pd[i] = (u.op == OP_ALU && u.dst_we) ? clast[u.dst] : -1;
      if (u.op == OP_ALU && u.dst_we) clast[u.dst] = i;
      g_qual[i] = (u.op == OP_BSW) ? 1'b1 : pr[u.qp];
      g_cmp[i] = 2'b00;
      g_bsw[i] = '0;
      case (u.op)
        OP_CMP: begin
          case (kind[i % BODY])
            0: c = 1'b1;
            1: c = iter[0];
            2: c = 1'($urandom_range(0, 1));
            default: c = ($urandom_range(0, 9) != 0);
          endcase
          g_cmp[i] = pr[u.qp] ? {!c, c} : 2'b00;
          pr[u.pd1] = g_cmp[i][0];
          pr[u.pd2] = g_cmp[i][1];
        end
        OP_BSW: begin
          g_bsw[i] = {$urandom(), $urandom()} | N_PR'(1);
          pr = g_bsw[i];
        end
        default: if (pr[u.qp] && u.dst_we) last[u.dst] = i;
      endcase
    end
    g_final = pr;
  end

  // ------------------------------------------------------------ bookkeeping
  int checks = 0, failures = 0;
  int cycle = 0;
  int fed = 0;
  int committed = 0;
  int  n_disp    [N];
  logic [0:0] d_vec [N];
  bit  pend      [N];
  int  due       [N];
  int  cur_wb;
  int  n_mis = 0, n_sel = 0, n_ckpt = 0, n_svec = 0, n_ssync = 0, n_wrongq = 0, n_squash = 0;

  function automatic int seq_of(input logic [TAG_W-1:0] tag, input int near);
    int s;
    s = near - ((near - int'(tag)) % ROB_DEPTH + ROB_DEPTH) % ROB_DEPTH;
    return s;
  endfunction

  task automatic fail(input string what);
    failures++;
    $display("FAIL @%0d: %s", cycle, what);
  endtask

  // expected recovery tag: writer w, unless none or already committed
  task automatic chk_rec(input int s, input int w, input src_tag_t got, input string what);
    checks++;
    if (w < 0 || w < committed) begin
      if (got.inflight) fail($sformatf("seq %0d %s in flight, writer %0d committed", s, what, w));
    end else if (!got.inflight || got.tag != TAG_W'(w))
      fail($sformatf("seq %0d %s %0d/%0d, last writer %0d", s, what, got.inflight, got.tag, w));
  endtask

  task automatic chk_pred(input int s, input logic [GR_W-1:0] r, input src_tag_t got, input string what);
    int w;
    checks++;
    if (got.inflight) begin
      w = seq_of(got.tag, s);
      if (w >= s || w < 0 || prog[w].op != OP_ALU || !prog[w].dst_we || prog[w].dst != r)
        fail($sformatf("seq %0d %s tag %0d is not an older writer", s, what, got.tag));
    end
  endtask

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      if (ev_mispredict) n_mis++;
      if (ev_ckpt) n_ckpt++;
      if (ev_stall_vec) n_svec++;
      if (ev_stall_sync) n_ssync++;
      if (squash_valid) n_squash++;
      // ---------------- dispatch
      if (disp_valid) begin
        int s;
        s = seq_of(disp_tag, fed);
        n_disp[s]++;
        checks++;
        if (disp_replay) fail($sformatf("seq %0d dispatched as a rename replay", s));
        if (prog[s].op == OP_ALU && disp_qual != g_qual[s]) n_wrongq++;
        if (prog[s].op == OP_ALU) begin
          if (prog[s].src1_v) begin
            chk_rec(s, c_p1[s], disp_src1_rec, "src1 recovery tag");
            chk_pred(s, prog[s].src1, disp_src1, "src1");
          end
          if (prog[s].src2_v) begin
            chk_rec(s, c_p2[s], disp_src2_rec, "src2 recovery tag");
            chk_pred(s, prog[s].src2, disp_src2, "src2");
          end
          if (prog[s].dst_we) chk_rec(s, c_pd[s], disp_dst_rec, "dst recovery tag");
        end
        d_vec[s] = disp_vec;
        pend[s]  = 1;
        case (prog[s].op)
          OP_ALU:  due[s] = cycle + $urandom_range(1, 6);
          OP_CMP:  due[s] = cycle + $urandom_range(4, 120);
          default: due[s] = cycle + $urandom_range(20, 60);
        endcase
      end
      if (sel_replay_valid) begin
        int s0;
        n_sel++;
        s0 = seq_of(sel_replay_start, fed);
        checks++;
        if (s0 < committed || s0 >= fed)
          fail($sformatf("selective replay from seq %0d outside [%0d, %0d)", s0, committed, fed));
        // the scheduler reports every dispatched instruction of the window again
        for (int s = s0; s < fed; s++)
          if (n_disp[s] > 0 && !pend[s]) begin
            pend[s] = 1;
            due[s]  = cycle + $urandom_range(1, 12);
          end
      end
      // ---------------- commit
      if (commit_valid) begin
        int s;
        s = committed;
        checks++;
        if (commit_tag != TAG_W'(s) || commit_uop != prog[s])
          fail($sformatf("commit order: slot %0d, expected seq %0d", commit_tag, s));
        checks++;
        if (n_disp[s] != 1) fail($sformatf("seq %0d dispatched %0d times", s, n_disp[s]));
        committed = committed + 1;
      end
      if (wb_valid) pend[cur_wb] = 0;
      cur_wb = -1;
      for (int s = committed; s < fed && cur_wb < 0; s++)
        if (pend[s] && due[s] <= cycle) cur_wb = s;
      if (cur_wb >= 0) begin
        wb_valid     <= 1'b1;
        wb_tag       <= TAG_W'(cur_wb);
        wb_is_cmp    <= prog[cur_wb].op == OP_CMP;
        wb_is_bsw    <= prog[cur_wb].op == OP_BSW;
        wb_pvals     <= g_cmp[cur_wb];
        wb_vec       <= d_vec[cur_wb];
        wb_bsw_value <= g_bsw[cur_wb];
      end else wb_valid <= 1'b0;
      if (in_valid && in_ready) fed = fed + 1;
      if (fed < N) begin
        in_valid <= 1'b1;
        in_uop   <= prog[fed];
      end else in_valid <= 1'b0;
    end
  end

  task automatic need(input int n, input string what);
    checks++;
    if (n == 0) fail({"mechanism never happened: ", what});
  endtask

  initial begin
    in_valid = 0; in_uop = '0; wb_valid = 0; wb_tag = '0; wb_is_cmp = 0; wb_is_bsw = 0;
    wb_pvals = '0; wb_vec = '0; wb_bsw_value = '0; cur_wb = -1;
    for (int s = 0; s < N; s++) begin pend[s] = 0; n_disp[s] = 0; d_vec[s] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (committed == N);
    repeat (5) @(posedge clk);
    checks++;
    if (arch_pr != g_final) fail($sformatf("predicate file %h, reference %h", arch_pr, g_final));
    checks++;
    if (n_squash != 0 || n_ckpt != 0) fail("squash or checkpoint in selective-replay mode");
    need(n_mis, "predicate misprediction");
    need(n_sel, "selective replay request");
    need(n_wrongq, "instruction dispatched on a wrong predicted qualification");
    need(n_svec, "stall for a free broadside vector");
    need(n_ssync, "stall on an unwritten broadside predicate");
    $display("cycles=%0d mispredicts=%0d sel_replays=%0d wrong_qual=%0d vec_stalls=%0d sync_stalls=%0d",
             cycle, n_mis, n_sel, n_wrongq, n_svec, n_ssync);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog: committed %0d of %0d fed %0d", committed, N, fed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
