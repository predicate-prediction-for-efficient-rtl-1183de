// tb_broadside_pred_rf: directed test of the predicate file with two broadside
// vectors. Checks allocation order and the stall when both vectors are taken,
// that a vector's predicates read as not ready until written, reads of written
// vectors and of the architectural file, p0 reading 1, compare commits into the
// architectural file, a broadside commit copying its vector and freeing it, and
// replay invalidation clearing only the vectors whose owner is in range.
module tb_broadside_pred_rf;
  import pp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic alloc_ok, alloc_en, wr_en, commit_en, inv_en, rd_is_vec, rd_value, rd_ready;
  logic [0:0] alloc_id, wr_id, commit_id, rd_vec;
  logic [TAG_W-1:0] alloc_owner, inv_start, inv_len;
  logic [N_PR-1:0] wr_value, arch_pr;
  logic cw_en [2], cw_val [2];
  logic [PR_W-1:0] cw_idx [2], rd_pnum;

  broadside_pred_rf #(.NUM_VEC(2)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic rd(input bit v, input int id, input int p);
    rd_is_vec = v; rd_vec = 1'(id); rd_pnum = 6'(p); #1;
  endtask

  logic [N_PR-1:0] va, vb;
  initial begin
    alloc_en = 0; wr_en = 0; commit_en = 0; inv_en = 0; rd_is_vec = 0;
    alloc_owner = 0; inv_start = 0; inv_len = 0; wr_value = 0; wr_id = 0; commit_id = 0;
    rd_vec = 0; rd_pnum = 0; cw_en[0] = 0; cw_en[1] = 0; cw_val[0] = 0; cw_val[1] = 0;
    cw_idx[0] = 0; cw_idx[1] = 0;
    va = {$urandom, $urandom}; vb = {$urandom, $urandom};
    repeat (2) @(negedge clk);
    rst_n = 1;
    #1 chk(arch_pr == N_PR'(1), "reset: only p0 set");
    chk(alloc_ok && alloc_id == 0, "first free vector is 0");
    alloc_en = 1; alloc_owner = 8'd10; @(negedge clk);
    chk(alloc_ok && alloc_id == 1, "then vector 1");
    alloc_owner = 8'd20; @(negedge clk);
    alloc_en = 0; #1;
    chk(!alloc_ok, "no vector free: stall");
    rd(1, 0, 5); chk(!rd_ready, "unwritten vector not ready");
    rd(1, 0, 0); chk(rd_ready && rd_value, "p0 always 1");
    wr_en = 1; wr_id = 0; wr_value = va; @(negedge clk);
    wr_id = 1; wr_value = vb; @(negedge clk);
    wr_en = 0;
    for (int p = 1; p < 64; p++) begin
      rd(1, 0, p); chk(rd_ready && rd_value == va[p], "vector 0 read");
      rd(1, 1, p); chk(rd_ready && rd_value == vb[p], "vector 1 read");
    end
    @(negedge clk);
    // replay invalidation of owners 18..21 hits vector 1 only
    inv_en = 1; inv_start = 8'd18; inv_len = 8'd4; @(negedge clk);
    inv_en = 0;
    rd(1, 0, 3); chk(rd_ready, "vector 0 kept");
    rd(1, 1, 3); chk(!rd_ready, "vector 1 invalidated");
    // compare commit writes two architectural predicates
    cw_en[0] = 1; cw_idx[0] = 6'd7; cw_val[0] = 1; cw_en[1] = 1; cw_idx[1] = 6'd9; cw_val[1] = 0;
    @(negedge clk);
    cw_en[0] = 0; cw_en[1] = 0;
    rd(0, 0, 7); chk(rd_ready && rd_value == 1, "p7 committed true");
    rd(0, 0, 9); chk(rd_ready && rd_value == 0, "p9 committed false");
    @(negedge clk);
    // broadside commit copies vector 0 and frees it
    commit_en = 1; commit_id = 0; @(negedge clk);
    commit_en = 0; #1;
    chk(arch_pr == (va | N_PR'(1)), "architectural file takes vector 0");
    chk(alloc_ok && alloc_id == 0, "vector 0 free again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
