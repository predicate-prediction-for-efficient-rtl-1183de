// tb_replay_controller: directed and random test of rename-replay sequencing at
// RECOVERY_LAT = 7 and depth 16. After a misprediction in cycle t the first
// replayed slot must appear in cycle t + 7, slots must follow one per
// acknowledged cycle from the first user to the tail (wrapping), a withheld
// acknowledge must hold the slot, busy must fall after the last slot, and a
// misprediction during a replay must restart from its own first user.
module tb_replay_controller;
  localparam int D = 16, LAT = 7;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic mis, busy, replay_valid, replay_ack, replay_last;
  logic [3:0] mis_start, tail, replay_idx;
  replay_controller #(.DEPTH(D), .RECOVERY_LAT(LAT)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t %s", $time, what); end
  endtask

  // run one recovery; restart_at >= 0 injects a second misprediction after that
  // many replayed slots, starting at restart_start
  task automatic run(input int start, input int tl, input int restart_at, input int restart_start);
    int exp, n, cyc;
    mis = 1; mis_start = 4'(start); tail = 4'(tl);
    @(negedge clk);
    mis = 0;
    cyc = 1;
    while (!replay_valid) begin
      chk(busy, "busy while waiting");
      @(negedge clk); cyc++;
      if (cyc > 20) break;
    end
    chk(cyc == LAT, $sformatf("first replay after %0d cycles", cyc));
    exp = start; n = 0;
    while (busy) begin
      chk(replay_valid && replay_idx == 4'(exp), $sformatf("slot %0d exp %0d", replay_idx, exp));
      chk(replay_last == (4'(exp + 1) == 4'(tl)), "last flag");
      if (restart_at >= 0 && n == restart_at) begin
        replay_ack = 0;
        mis = 1; mis_start = 4'(restart_start);
        @(negedge clk);
        mis = 0;
        cyc = 1;
        while (!replay_valid) begin @(negedge clk); cyc++; if (cyc > 20) break; end
        chk(cyc == LAT, "restart latency");
        exp = restart_start; restart_at = -1; n = 0;
        continue;
      end
      replay_ack = ($urandom_range(0, 3) != 0);
      @(negedge clk);
      if (replay_ack) begin exp = (exp + 1) % D; n++; end
      replay_ack = 1;
    end
    chk(exp == tl, "replayed up to the tail");
  endtask

  initial begin
    mis = 0; mis_start = 0; tail = 0; replay_ack = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(!busy && !replay_valid, "idle after reset");
    run(3, 9, -1, 0);
    run(12, 4, -1, 0);           // wraps
    run(5, 6, -1, 0);            // single slot
    run(2, 14, 4, 4);            // restart inside the replayed part
    for (int i = 0; i < 40; i++) begin
      int s, l;
      s = $urandom_range(0, D - 1);
      l = $urandom_range(1, D - 1);
      run(s, (s + l) % D, -1, 0);
      repeat ($urandom_range(0, 3)) @(negedge clk);
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
