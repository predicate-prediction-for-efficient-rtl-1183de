// tb_predicate_state: directed test of per-compare predicate state at depth 16
// with two checkpoints. Checks: a defined compare reads its predicted values as
// unresolved; a first use allocates a checkpoint and records the user; a second
// use allocates nothing; the checkpoints run out; a write-back that agrees with
// the prediction frees the checkpoint without a misprediction; a write-back that
// differs on a used output reports the first user and checkpoint; a difference
// on an unused output is not a misprediction; a write-back is bypassed to the
// read port in its own cycle; replay invalidation forgets results in range and
// uses whose first user is in range.
module tb_predicate_state;
  localparam int D = 16, C = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic def_en, rd_which, rd_value, rd_resolved, rd_used, ckpt_ok, use_en, use_which, wb_en, mis, inv_en;
  logic [3:0] def_idx, rd_idx, use_idx, use_at, wb_idx, mis_start, inv_start, inv_len, cm_idx;
  logic [1:0] def_pv, wb_value, cm_value, cm_pred;
  logic [0:0] ckpt_id, mis_ckpt;
  predicate_state #(.DEPTH(D), .NUM_CKPT(C)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic idle();
    def_en = 0; use_en = 0; wb_en = 0; inv_en = 0;
  endtask
  task automatic define(input int i, input logic [1:0] pv);
    idle(); def_en = 1; def_idx = 4'(i); def_pv = pv; @(negedge clk); idle();
  endtask
  task automatic use_(input int i, input int w, input int at);
    idle(); use_en = 1; use_idx = 4'(i); use_which = 1'(w); use_at = 4'(at); @(negedge clk); idle();
  endtask
  task automatic read(input int i, input int w);
    rd_idx = 4'(i); rd_which = 1'(w); #1;
  endtask

  initial begin
    int k0;
    idle(); def_idx = 0; def_pv = 0; rd_idx = 0; rd_which = 0; use_idx = 0; use_which = 0;
    use_at = 0; wb_idx = 0; wb_value = 0; inv_start = 0; inv_len = 0; cm_idx = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    define(2, 2'b01); define(3, 2'b10); define(4, 2'b01);
    read(2, 0); chk(rd_value == 1 && !rd_resolved && !rd_used, "predicted p1 of slot 2");
    read(2, 1); chk(rd_value == 0, "predicted p2 of slot 2");
    #1 chk(ckpt_ok, "checkpoint free");
    k0 = ckpt_id;
    use_(2, 0, 5);
    read(2, 0); chk(rd_used, "slot 2 used");
    use_(2, 0, 6);                     // second use: no new checkpoint
    #1 chk(ckpt_ok && ckpt_id != 1'(k0), "one checkpoint left");
    use_(3, 1, 7);
    #1 chk(!ckpt_ok, "checkpoints exhausted");
    // slot 3 resolves as predicted: no misprediction, checkpoint freed
    wb_en = 1; wb_idx = 3; wb_value = 2'b10; #1;
    chk(!mis, "correct prediction");
    rd_idx = 3; rd_which = 1; #1;
    chk(rd_resolved && rd_value == 1, "bypass of the write-back");
    @(negedge clk); idle(); #1;
    chk(ckpt_ok, "checkpoint released");
    // slot 2 mispredicted on the used output
    wb_en = 1; wb_idx = 2; wb_value = 2'b10; #1;
    chk(mis && mis_start == 5 && mis_ckpt == 1'(k0), "misprediction reports first user 5");
    @(negedge clk); idle();
    read(2, 0); chk(rd_resolved && rd_value == 0 && !rd_used, "slot 2 resolved");
    cm_idx = 2; #1 chk(cm_value == 2'b10 && cm_pred == 2'b01, "commit read");
    // slot 4: only output 1 used; output 0 differs -> no misprediction
    use_(4, 1, 9);
    wb_en = 1; wb_idx = 4; wb_value = 2'b00; #1;
    chk(!mis, "difference on an unused output");
    @(negedge clk); idle();
    // invalidation: slot 6 resolved, slot 7 used at 8; replay [6, 10)
    define(6, 2'b01); define(7, 2'b01);
    wb_en = 1; wb_idx = 6; wb_value = 2'b01; @(negedge clk); idle();
    use_(7, 0, 8);
    read(6, 0); chk(rd_resolved, "slot 6 resolved before replay");
    inv_en = 1; inv_start = 6; inv_len = 4; @(negedge clk); idle();
    read(6, 0); chk(!rd_resolved, "slot 6 result forgotten");
    read(7, 0); chk(!rd_used, "use at 8 forgotten");
    #1 chk(ckpt_ok && ckpt_id == 0, "its checkpoint freed");
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
