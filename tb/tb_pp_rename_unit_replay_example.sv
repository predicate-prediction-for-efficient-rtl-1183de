// tb_pp_rename_unit_replay_example: a directed rename-replay walk-through on the
// rename unit at its default parameters.
//
//   IN0        cmp p7, p6 = r1        (pd1 = p7 predicted false, so p6 true)
//   IN1  (p6)  add r33 = r33, r2
//   IN2  (p7)  sub r33 = r33, r3
//   IN3  (p6)  shl r34 = r33
//   IN4        add r35 = r33
//   IN5        add r36 = r35          (fed after the recovery)
//
// After reset the predictor says false for a new compare, so p7 is predicted
// false and p6 true: IN1 and IN3 are dispatched, IN2 is a no-op, IN3 and IN4
// read r33 from IN1. The compare then writes back p7 = 1, p6 = 0. Checks: the
// misprediction squashes from IN1 (its first user); IN0 is not replayed; the
// replay dispatches IN2 and IN4 only, IN2 reading r33 from the architectural
// file and IN4 from IN2; the first replayed dispatch comes no sooner than the
// recovery latency plus the dispatch register; IN5 then reads r35 from IN4; all
// six commit in order and the architectural p7/p6 end as 1/0.
module tb_pp_rename_unit_replay_example;
  import pp_pkg::*;
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

  int checks = 0, failures = 0, cycle = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d %s", cycle, what); end
  endtask

  uop_t prog [6];
  // dispatch log
  int n_disp = 0;
  int dl_tag [64];
  bit dl_rep [64];
  src_tag_t dl_s1 [64];
  int dl_cycle [64];
  int n_commit = 0, mis_cycle = -1, n_squash = 0, sq_start = -1;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (disp_valid && n_disp < 64) begin
      dl_tag[n_disp] = disp_tag; dl_rep[n_disp] = disp_replay; dl_s1[n_disp] = disp_src1;
      dl_cycle[n_disp] = cycle; n_disp++;
    end
    if (squash_valid) begin n_squash++; mis_cycle = cycle; sq_start = squash_start; end
    if (commit_valid) begin
      chk(commit_tag == TAG_W'(n_commit) && commit_uop == prog[n_commit], $sformatf("commit %0d in order", n_commit));
      n_commit++;
    end
  end

  function automatic uop_t alu(input int qp, input int d, input int s1, input int s2);
    uop_t u;
    u = '0; u.op = OP_ALU; u.qp = 6'(qp); u.dst_we = 1; u.dst = 7'(d);
    u.src1_v = 1; u.src1 = 7'(s1); u.src2_v = (s2 != 0); u.src2 = 7'(s2);
    return u;
  endfunction

  task automatic feed(input int i);
    in_valid <= 1; in_uop <= prog[i];
    @(negedge clk);
    while (!in_ready) @(negedge clk);
    @(posedge clk);
  endtask

  task automatic wb(input int tag, input bit is_cmp, input logic [1:0] pv);
    wb_valid <= 1; wb_tag <= TAG_W'(tag); wb_is_cmp <= is_cmp; wb_pvals <= pv;
    @(posedge clk);
    wb_valid <= 0;
  endtask

  function automatic int find(input int from, input int tag);
    for (int k = from; k < n_disp; k++) if (dl_tag[k] == tag) return k;
    return -1;
  endfunction

  initial begin
    int k, first_rep;
    prog[0] = '0; prog[0].op = OP_CMP; prog[0].pc = 64'h8000; prog[0].pd1 = 6'd7; prog[0].pd2 = 6'd6;
    prog[0].src1_v = 1; prog[0].src1 = 7'd1;
    prog[1] = alu(6, 33, 33, 2);  prog[1].pc = 64'h8004;
    prog[2] = alu(7, 33, 33, 3);  prog[2].pc = 64'h8008;
    prog[3] = alu(6, 34, 33, 0);  prog[3].pc = 64'h800c;
    prog[4] = alu(0, 35, 33, 0);  prog[4].pc = 64'h8010;
    prog[5] = alu(0, 36, 35, 0);  prog[5].pc = 64'h8014;
    in_valid = 0; in_uop = '0; wb_valid = 0; wb_tag = '0; wb_is_cmp = 0; wb_is_bsw = 0;
    wb_pvals = '0; wb_vec = '0; wb_bsw_value = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (ready);
    @(posedge clk);
    for (int i = 0; i < 5; i++) feed(i);
    in_valid <= 0;
    repeat (6) @(posedge clk);
    // first pass
    chk(n_disp == 4, $sformatf("first pass dispatches 4 (got %0d)", n_disp));
    chk(find(0, 2) < 0, "IN2 predicted qualified false: not dispatched");
    k = find(0, 3); chk(k >= 0 && dl_s1[k].inflight && dl_s1[k].tag == 1, "IN3 reads r33 from IN1");
    k = find(0, 4); chk(k >= 0 && dl_s1[k].inflight && dl_s1[k].tag == 1, "IN4 reads r33 from IN1");
    // the ALU ops complete, then the compare resolves the other way
    wb(1, 0, 2'b00); wb(3, 0, 2'b00); wb(4, 0, 2'b00);
    chk(n_commit == 0, "nothing commits before the compare");
    wb(0, 1, 2'b01);   // {p6, p7} = {0, 1}
    repeat (2) @(posedge clk);
    chk(n_squash == 1 && sq_start == 1, "squash from IN1, the first user");
    repeat (12) @(posedge clk);
    first_rep = -1;
    for (int j = 0; j < n_disp; j++) if (dl_rep[j] && first_rep < 0) first_rep = j;
    chk(first_rep >= 0, "replay dispatched");
    if (first_rep >= 0) begin
      chk(dl_cycle[first_rep] - mis_cycle >= 8, $sformatf("replay after %0d cycles", dl_cycle[first_rep] - mis_cycle));
      chk(n_disp - first_rep == 2, $sformatf("replay dispatches 2 (got %0d)", n_disp - first_rep));
      chk(find(first_rep, 0) < 0 && find(first_rep, 1) < 0 && find(first_rep, 3) < 0,
          "IN0 not replayed, IN1 and IN3 now qualified false");
      k = find(first_rep, 2); chk(k >= 0 && !dl_s1[k].inflight, "IN2 reads r33 from the architectural file");
      k = find(first_rep, 4); chk(k >= 0 && dl_s1[k].inflight && dl_s1[k].tag == 2, "IN4 reads r33 from IN2");
    end
    feed(5);
    in_valid <= 0;
    repeat (3) @(posedge clk);
    k = find(0, 5); chk(k >= 0 && dl_s1[k].inflight && dl_s1[k].tag == 4, "IN5 reads r35 from IN4");
    // replayed instructions complete again, then everything commits
    wb(2, 0, 2'b00); wb(4, 0, 2'b00); wb(5, 0, 2'b00);
    repeat (10) @(posedge clk);
    chk(n_commit == 6, $sformatf("six commits (got %0d)", n_commit));
    chk(arch_pr[7] == 1'b1 && arch_pr[6] == 1'b0, "architectural p7 = 1, p6 = 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
