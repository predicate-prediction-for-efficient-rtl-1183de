// tb_pp_rename_unit: end-to-end test of the rename unit at its default parameters
// (rename-replay recovery).
//
// The testbench generates a loop of predicated code (compares, predicated ALU
// operations, occasional broadside predicate writes) and runs many iterations of
// it. A sequential reference model gives, for every dynamic instruction, its real
// qualification, the real values of its compares, and the producer of each
// source register. A behavioural execution side takes dispatched instructions,
// writes them back after random latencies with the reference results, and drops
// what a squash discards. Checks:
//   - instructions commit in program order, one RecQ slot after another;
//   - the last dispatch of every instruction before it commits matches the
//     reference: qualified-true instructions and compares were dispatched,
//     qualified-false ones were not, and every in-flight source tag names the
//     real producer (or the producer had committed);
//   - the architectural predicate file matches the reference at the end;
//   - no replay is dispatched sooner than RECOVERY_LAT + 1 cycles after its
//     recovery starts (the recovery latency plus the dispatch register), and
//     replays do start exactly then.
// Each mechanism (misprediction, replay, checkpoint, checkpoint stall, vector
// stall, broadside synchronisation stall, qualified-false NOP) must occur.
module tb_pp_rename_unit;
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

  pp_rename_unit dut (.*);

  // ------------------------------------------------------------ program
  uop_t            prog   [N];
  logic            g_qual [N];
  logic [1:0]      g_cmp  [N];
  logic [N_PR-1:0] g_bsw  [N];
  int              g_p1   [N];   // producer seq of src1, -1 if none
  int              g_p2   [N];
  logic [N_PR-1:0] g_final;
  uop_t            body   [BODY];
  int              kind   [BODY];  // compare behaviour: 0 true, 1 alternating, 2 random, 3 mostly true

  initial begin
    logic [N_PR-1:0] pr;
    int last [N_GR];
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
    for (int i = 0; i < N_GR; i++) last[i] = -1;
    for (int i = 0; i < N; i++) begin
      uop_t u;
      logic c;
      iter = i / BODY;
      u = body[i % BODY];
      prog[i] = u;
      g_p1[i] = u.src1_v ? last[u.src1] : -1;
      g_p2[i] = u.src2_v ? last[u.src2] : -1;
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
  int fed = 0;              // next instruction to feed
  int committed = 0;        // next instruction expected to commit
  bit  disp_ok   [N];       // latest rename dispatched it
  logic d_qual   [N];
  src_tag_t d_s1 [N], d_s2 [N];
  bit  d_s1_committed [N], d_s2_committed [N];
  logic [0:0] d_vec [N];
  bit  pend      [N];
  int  due       [N];
  int  cur_wb;
  int  n_mis = 0, n_replay = 0, n_ckpt = 0, n_sck = 0, n_svec = 0, n_ssync = 0, n_qf = 0,
       n_squash = 0, mis_cycle = -1, n_lat_ok = 0;
  bit  want_lat = 0;

  function automatic int seq_of(input logic [TAG_W-1:0] tag, input int near);
    // the dynamic instruction in RecQ slot `tag` that is closest below `near`
    int s;
    s = near - ((near - int'(tag)) % ROB_DEPTH + ROB_DEPTH) % ROB_DEPTH;
    return s;
  endfunction

  task automatic fail(input string what);
    failures++;
    $display("FAIL @%0d: %s", cycle, what);
  endtask

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      // ---------------- events
      if (ev_mispredict) n_mis++;
      if (ev_ckpt) n_ckpt++;
      if (ev_stall_ckpt) n_sck++;
      if (ev_stall_vec) n_svec++;
      if (ev_stall_sync) n_ssync++;
      if (ev_qual_false) n_qf++;
      // ---------------- dispatch
      if (disp_valid) begin
        int s;
        s = seq_of(disp_tag, fed);
        if (disp_replay) begin
          n_replay++;
          if (want_lat) begin
            checks++;
            if (cycle - mis_cycle < RLAT + 1) fail($sformatf("replay after %0d cycles", cycle - mis_cycle));
            else if (cycle - mis_cycle == RLAT + 1) n_lat_ok++;
            want_lat = 0;
          end
        end
        disp_ok[s] = 1;
        d_qual[s]  = disp_qual;
        d_s1[s]    = disp_src1;
        d_s2[s]    = disp_src2;
        d_s1_committed[s] = (g_p1[s] >= 0) && (g_p1[s] < committed);
        d_s2_committed[s] = (g_p2[s] >= 0) && (g_p2[s] < committed);
        d_vec[s]   = disp_vec;
        pend[s]    = 1;
        case (prog[s].op)
          OP_ALU:  due[s] = cycle + $urandom_range(1, 6);
          OP_CMP:  due[s] = cycle + $urandom_range(4, 120);
          default: due[s] = cycle + $urandom_range(20, 60);
        endcase
      end
      // ---------------- squash: the issue queue drops everything from start on
      if (squash_valid) begin
        int s0;
        n_squash++;
        mis_cycle = cycle;
        want_lat = 1;
        s0 = seq_of(squash_start, fed);
        for (int s = s0; s < fed; s++) begin
          pend[s] = 0;
          disp_ok[s] = 0;
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
        if ((prog[s].op != OP_ALU || g_qual[s]) != disp_ok[s])
          fail($sformatf("seq %0d dispatched=%0d, reference qualification %0d", s, disp_ok[s], g_qual[s]));
        if (disp_ok[s] && prog[s].op == OP_ALU) begin
          checks++;
          if (d_qual[s] !== 1'b1) fail($sformatf("seq %0d dispatched qualified false", s));
          if (prog[s].src1_v) begin
            checks++;
            if (g_p1[s] < 0 || d_s1_committed[s]) begin
              if (d_s1[s].inflight) fail($sformatf("seq %0d src1 in flight, producer committed", s));
            end else if (!d_s1[s].inflight || d_s1[s].tag != TAG_W'(g_p1[s]))
              fail($sformatf("seq %0d src1 tag %0d/%0d, producer %0d", s, d_s1[s].inflight, d_s1[s].tag, g_p1[s]));
          end
          if (prog[s].src2_v) begin
            checks++;
            if (g_p2[s] < 0 || d_s2_committed[s]) begin
              if (d_s2[s].inflight) fail($sformatf("seq %0d src2 in flight, producer committed", s));
            end else if (!d_s2[s].inflight || d_s2[s].tag != TAG_W'(g_p2[s]))
              fail($sformatf("seq %0d src2 tag %0d/%0d, producer %0d", s, d_s2[s].inflight, d_s2[s].tag, g_p2[s]));
          end
        end
        committed = committed + 1;
      end
      // ---------------- write-back accepted this cycle
      if (wb_valid) pend[cur_wb] = 0;
      // ---------------- choose next write-back
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
      // ---------------- feed decode
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
    for (int s = 0; s < N; s++) begin pend[s] = 0; disp_ok[s] = 0; d_vec[s] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (committed == N);
    repeat (5) @(posedge clk);
    checks++;
    if (arch_pr != g_final) fail($sformatf("predicate file %h, reference %h", arch_pr, g_final));
    need(n_mis, "predicate misprediction");
    need(n_replay, "rename-replay dispatch");
    need(n_squash, "issue-queue squash");
    need(n_lat_ok, "replay at the 7-cycle recovery latency");
    need(n_ckpt, "checkpoint at first use of a prediction");
    need(n_sck, "stall for a free checkpoint");
    need(n_svec, "stall for a free broadside vector");
    need(n_ssync, "stall on an unwritten broadside predicate");
    need(n_qf, "qualified-false instruction removed at rename");
    $display("cycles=%0d mispredicts=%0d replayed=%0d ckpts=%0d ckpt_stalls=%0d vec_stalls=%0d sync_stalls=%0d qual_false=%0d",
             cycle, n_mis, n_replay, n_ckpt, n_sck, n_svec, n_ssync, n_qf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog: committed %0d of %0d fed %0d", committed, N, fed);
    $display("  head=%0d done=%0d busy=%0d r1v=%0d go=%0d ee_stall=%0d ckok=%0d bsok=%0d pend=%0d due=%0d",
             dut.q_head, dut.q_head_done, dut.rp_busy, dut.r1_valid, dut.go, dut.ee_stall,
             dut.ps_ckpt_ok, dut.bs_alloc_ok, pend[committed], due[committed]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
