// tb_rename_map: random test of the register alias table against a model, at a
// reduced size (8 registers, 4-bit tags, 2 checkpoints, 2 read and 2 write
// ports). Each cycle does a random mix of writes, a write-all, a commit clear with
// a random mask, a checkpoint save, a restore or a load; after each edge every
// read port and the whole map are compared with the model.
module tb_rename_map;
  localparam int N = 8, TW = 4, C = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [2:0] rd_idx [2];
  logic rd_valid [2];
  logic [TW-1:0] rd_tag [2];
  logic wr_en [2];
  logic [2:0] wr_idx [2];
  logic [TW-1:0] wr_tag [2];
  logic wr_all_en, clr_en, ckpt_save, ckpt_restore, load_en;
  logic [TW-1:0] wr_all_tag, clr_tag, clr_mask;
  logic [0:0] ckpt_save_id, ckpt_restore_id;
  logic [N-1:0] load_valid, map_valid;
  logic [TW-1:0] load_tag [N], map_tag [N];

  rename_map #(.N_ARCH(N), .TW(TW), .NUM_CKPT(C), .RD_PORTS(2), .WR_PORTS(2)) dut (.*);

  int checks = 0, failures = 0;
  bit mv [N]; int mt [N];
  bit cv [C][N]; int ct [C][N];

  function automatic bit hit(input int t);
    return clr_en && ((t & ~int'(clr_mask)) == (int'(clr_tag) & ~int'(clr_mask)));
  endfunction

  initial begin
    for (int i = 0; i < N; i++) begin mv[i] = 0; mt[i] = 0; end
    for (int c = 0; c < C; c++) for (int i = 0; i < N; i++) begin cv[c][i] = 0; ct[c][i] = 0; end
    for (int p = 0; p < 2; p++) begin wr_en[p] = 0; wr_idx[p] = 0; wr_tag[p] = 0; rd_idx[p] = 0; end
    wr_all_en = 0; clr_en = 0; ckpt_save = 0; ckpt_restore = 0; load_en = 0;
    wr_all_tag = 0; clr_tag = 0; clr_mask = 0; ckpt_save_id = 0; ckpt_restore_id = 0; load_valid = 0;
    for (int i = 0; i < N; i++) load_tag[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      bit nv [N]; int nt [N]; bit clv [N];
      for (int p = 0; p < 2; p++) begin
        wr_en[p] = ($urandom_range(0, 1) == 1); wr_idx[p] = 3'($urandom); wr_tag[p] = TW'($urandom);
      end
      wr_all_en = ($urandom_range(0, 19) == 0); wr_all_tag = TW'($urandom);
      clr_en = ($urandom_range(0, 2) == 0); clr_tag = TW'($urandom);
      clr_mask = ($urandom_range(0, 1) == 1) ? TW'(1) : TW'(0);
      ckpt_save = ($urandom_range(0, 4) == 0); ckpt_save_id = 1'($urandom);
      ckpt_restore = ($urandom_range(0, 9) == 0); ckpt_restore_id = 1'($urandom);
      load_en = ($urandom_range(0, 29) == 0); load_valid = N'($urandom);
      for (int i = 0; i < N; i++) load_tag[i] = TW'($urandom);
      #1;
      // model
      for (int i = 0; i < N; i++) clv[i] = mv[i] && !hit(mt[i]);
      for (int c = 0; c < C; c++) for (int i = 0; i < N; i++) if (hit(ct[c][i])) cv[c][i] = 0;
      if (ckpt_restore) begin
        for (int i = 0; i < N; i++) begin nv[i] = cv[ckpt_restore_id][i]; nt[i] = ct[ckpt_restore_id][i]; end
      end else if (load_en) begin
        for (int i = 0; i < N; i++) begin nv[i] = load_valid[i] && !hit(load_tag[i]); nt[i] = load_tag[i]; end
      end else begin
        for (int i = 0; i < N; i++) begin nv[i] = clv[i]; nt[i] = mt[i]; end
        if (wr_all_en) for (int i = 1; i < N; i++) begin nv[i] = 1; nt[i] = wr_all_tag; end
        for (int p = 0; p < 2; p++) if (wr_en[p]) begin nv[wr_idx[p]] = 1; nt[wr_idx[p]] = wr_tag[p]; end
      end
      if (ckpt_save) for (int i = 0; i < N; i++) begin cv[ckpt_save_id][i] = clv[i]; ct[ckpt_save_id][i] = mt[i]; end
      for (int i = 0; i < N; i++) begin mv[i] = nv[i]; mt[i] = nt[i]; end
      @(negedge clk);
      for (int p = 0; p < 2; p++) begin
        rd_idx[p] = 3'($urandom);
      end
      #1;
      for (int p = 0; p < 2; p++) begin
        checks++;
        if (rd_valid[p] !== mv[rd_idx[p]] || (mv[rd_idx[p]] && rd_tag[p] !== TW'(mt[rd_idx[p]]))) begin
          failures++;
          $display("FAIL it %0d port %0d reg %0d: %0d/%0d exp %0d/%0d", it, p, rd_idx[p],
                   rd_valid[p], rd_tag[p], mv[rd_idx[p]], mt[rd_idx[p]]);
        end
      end
      for (int i = 0; i < N; i++) begin
        checks++;
        if (map_valid[i] !== mv[i] || (mv[i] && map_tag[i] !== TW'(mt[i]))) failures++;
      end
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
