// tb_recovery_queue: random test of the RecQ against a model, at depth 8.
// Allocation, commit, the two done ports and replay invalidation are driven at
// random; head, tail, count, full/empty, head_done and the contents read at the
// head and at a random replay index are compared with the model every cycle.
// Commits happen only when the head is done, and never more than one per cycle.
module tb_recovery_queue;
  import pp_pkg::*;
  localparam int D = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic alloc_en, full, empty, done_en0, done_en1, inv_en, head_done, commit_en;
  recq_entry_t alloc_data, rd_data, head_data;
  logic [2:0] tail, done_idx0, done_idx1, inv_start, rd_idx, head;
  logic [3:0] count;

  recovery_queue #(.DEPTH(D)) dut (.*);

  int checks = 0, failures = 0;
  recq_entry_t m [D];
  bit md [D];
  int mh = 0, mt = 0, mc = 0, n_commit = 0, n_inv = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    alloc_en = 0; done_en0 = 0; done_en1 = 0; inv_en = 0; commit_en = 0;
    alloc_data = '0; done_idx0 = 0; done_idx1 = 0; inv_start = 0; rd_idx = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 4000; it++) begin
      bit da, dc;
      alloc_en = ($urandom_range(0, 2) != 0);
      alloc_data = recq_entry_t'({$urandom, $urandom, $urandom, $urandom, $urandom});
      commit_en = ($urandom_range(0, 1) == 1);
      done_en0 = ($urandom_range(0, 1) == 1); done_idx0 = 3'($urandom);
      done_en1 = ($urandom_range(0, 1) == 1); done_idx1 = 3'($urandom);
      inv_en = (mc > 1) && ($urandom_range(0, 15) == 0);
      inv_start = 3'(mh + $urandom_range(1, (mc > 1) ? mc - 1 : 1));
      rd_idx = 3'($urandom);
      #1;
      chk(head == 3'(mh) && tail == 3'(mt) && count == 4'(mc), "pointers");
      chk(full == (mc == D) && empty == (mc == 0), "full/empty");
      chk(head_done == (mc > 0 && md[mh]), "head_done");
      if (mc > 0) chk(head_data == m[mh], "head data");
      chk(rd_data == m[rd_idx] || !( (int'(rd_idx) - mh + D) % D < mc), "replay read");
      // model
      da = alloc_en && mc < D;
      dc = commit_en && mc > 0 && md[mh];
      if (da) begin m[mt] = alloc_data; md[mt] = 0; end
      if (inv_en) begin
        int len;
        n_inv++;
        len = (mt - int'(inv_start) + D) % D + int'(da);
        for (int i = 0; i < D; i++) if (((i - int'(inv_start) + D) % D) < len) md[i] = 0;
      end
      if (done_en0) md[done_idx0] = 1;
      if (done_en1) md[done_idx1] = 1;
      if (da) mt = (mt + 1) % D;
      if (dc) begin mh = (mh + 1) % D; n_commit++; end
      mc = mc + int'(da) - int'(dc);
      @(negedge clk);
    end
    chk(n_commit > 100 && n_inv > 10, "activity");
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
