// tb_selective_replay_tags: checks the recovery tags on the five-instruction
// example of multiple definitions of one register
//     mov r33 = 1; (p6) add r33 = 1, r33; (p7) sub r33 = 2, r33;
//     (p8) shl r33 = r33, 3; st [] = r33
// where every definition, whatever its predicate, must link to the previous one
// (add <- mov, sub <- add, shl <- sub, st <- shl), each destination recovery tag
// naming the previous definition. Then a random stream is checked against a
// model of "last writer of each register", with commits clearing mappings.
module tb_selective_replay_tags;
  import pp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic ren_en, dst_we, clr_en;
  logic [TAG_W-1:0] ren_tag, clr_tag;
  logic [GR_W-1:0] src_idx [2], dst;
  src_tag_t src_rec [2], dst_rec;
  logic [N_GR-1:0] map_valid;
  logic [TAG_W-1:0] map_tag [N_GR];
  selective_replay_tags dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // rename one instruction; returns the tags seen before the edge
  task automatic ren(input int tag, input int s0, input int s1, input bit we, input int d,
                     output src_tag_t r0, output src_tag_t r1, output src_tag_t rd);
    ren_en = 1; ren_tag = 8'(tag); src_idx[0] = 7'(s0); src_idx[1] = 7'(s1); dst_we = we; dst = 7'(d);
    #1; r0 = src_rec[0]; r1 = src_rec[1]; rd = dst_rec;
    @(negedge clk);
    ren_en = 0;
  endtask

  int mv [N_GR];
  initial begin
    src_tag_t a, b, c;
    ren_en = 0; dst_we = 0; clr_en = 0; ren_tag = 0; clr_tag = 0; dst = 0;
    src_idx[0] = 0; src_idx[1] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    ren(1, 0, 0, 1, 33, a, b, c);                   // mov r33 = 1
    chk(!c.inflight, "mov: no older definition");
    ren(2, 33, 0, 1, 33, a, b, c);                  // (p6) add
    chk(a.inflight && a.tag == 1 && c.inflight && c.tag == 1, "add links to mov");
    ren(3, 33, 0, 1, 33, a, b, c);                  // (p7) sub
    chk(a.inflight && a.tag == 2 && c.tag == 2, "sub links to add");
    ren(4, 33, 0, 1, 33, a, b, c);                  // (p8) shl
    chk(a.inflight && a.tag == 3 && c.tag == 3, "shl links to sub");
    ren(5, 33, 0, 0, 0, a, b, c);                   // st
    chk(a.inflight && a.tag == 4, "st links to shl");
    // commit of slot 4 (the last writer of r33) clears the mapping
    clr_en = 1; clr_tag = 4; @(negedge clk); clr_en = 0;
    src_idx[0] = 33; #1 chk(!src_rec[0].inflight, "committed writer leaves the map");
    // random stream
    for (int i = 0; i < N_GR; i++) mv[i] = -1;
    mv[33] = -1;
    for (int i = 0; i < N_GR; i++) if (i != 33 && map_valid[i]) mv[i] = map_tag[i];
    for (int it = 0; it < 2000; it++) begin
      int s0, s1, d, t;
      bit we, ce;
      s0 = $urandom_range(0, 7); s1 = $urandom_range(0, 7); d = $urandom_range(0, 7);
      we = ($urandom_range(0, 3) != 0); t = $urandom_range(0, 255);
      ce = ($urandom_range(0, 3) == 0);
      clr_en = ce; clr_tag = 8'($urandom_range(0, 255));
      ren(t, s0, s1, we, d, a, b, c);
      clr_en = 0;
      chk((mv[s0] < 0) ? !a.inflight : (a.inflight && a.tag == 8'(mv[s0])), "random src0");
      chk((mv[s1] < 0) ? !b.inflight : (b.inflight && b.tag == 8'(mv[s1])), "random src1");
      chk((mv[d] < 0) ? !c.inflight : (c.inflight && c.tag == 8'(mv[d])), "random dst");
      for (int r = 0; r < 8; r++) if (mv[r] >= 0 && ce && 8'(mv[r]) == clr_tag) mv[r] = -1;
      if (we) mv[d] = t;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
