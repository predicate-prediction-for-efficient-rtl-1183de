// rename_map: register alias table with checkpoints.
//
// For each architectural register the map holds whether its newest definition is
// still in flight and, if so, the tag of that definition; a register that is not
// in flight is read from the architectural file. Renaming an instruction reads
// its sources (combinational read ports) and writes its destinations at the
// clock edge (write ports, and a "write all" port for an instruction that
// defines every register but number 0 at once, such as a broadside predicate
// write).
//
// Checkpoints: ckpt_save copies the map as it is before this cycle's writes into
// checkpoint ckpt_save_id; ckpt_restore replaces the map with a checkpoint at the
// edge (writes of that cycle are dropped). For predicate recovery the map is
// checkpointed at the first use of a predicate prediction. load_en replaces the
// map with load_* (used by selective-replay recovery).
//
// Commit: clr_en marks not-in-flight every entry, in the map and in every
// checkpoint, whose tag matches clr_tag in the bits where clr_mask is 0, so a tag
// that is reused later never aliases an old mapping.
// Write ports are applied in order, the higher port winning on the same register.
module rename_map #(
  parameter int unsigned N_ARCH   = 128,
  parameter int unsigned TW       = 8,
  parameter int unsigned NUM_CKPT = 8,
  parameter int unsigned RD_PORTS = 3,
  parameter int unsigned WR_PORTS = 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [$clog2(N_ARCH)-1:0] rd_idx   [RD_PORTS],
  output logic                      rd_valid [RD_PORTS],
  output logic [TW-1:0]             rd_tag   [RD_PORTS],
  input  logic                      wr_en    [WR_PORTS],
  input  logic [$clog2(N_ARCH)-1:0] wr_idx   [WR_PORTS],
  input  logic [TW-1:0]             wr_tag   [WR_PORTS],
  input  logic                      wr_all_en,
  input  logic [TW-1:0]             wr_all_tag,
  input  logic                      clr_en,
  input  logic [TW-1:0]             clr_tag,
  input  logic [TW-1:0]             clr_mask,
  input  logic                      ckpt_save,
  input  logic [$clog2(NUM_CKPT)-1:0] ckpt_save_id,
  input  logic                      ckpt_restore,
  input  logic [$clog2(NUM_CKPT)-1:0] ckpt_restore_id,
  input  logic                      load_en,
  input  logic [N_ARCH-1:0]         load_valid,
  input  logic [TW-1:0]             load_tag [N_ARCH],
  output logic [N_ARCH-1:0]         map_valid,
  output logic [TW-1:0]             map_tag  [N_ARCH]
);
  logic [N_ARCH-1:0] cv [NUM_CKPT];
  logic [TW-1:0]     ct [NUM_CKPT][N_ARCH];

  function automatic logic hit(input logic [TW-1:0] t);
    return clr_en && ((t & ~clr_mask) == (clr_tag & ~clr_mask));
  endfunction

  for (genvar p = 0; p < RD_PORTS; p++) begin : g_rd
    assign rd_valid[p] = map_valid[rd_idx[p]];
    assign rd_tag[p]   = map_tag[rd_idx[p]];
  end

  // map after this cycle's commit clear, before this cycle's writes
  logic [N_ARCH-1:0] cleared;
  always_comb
    for (int i = 0; i < N_ARCH; i++)
      cleared[i] = map_valid[i] && !hit(map_tag[i]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      map_valid <= '0;
      for (int i = 0; i < N_ARCH; i++) map_tag[i] <= '0;
      for (int c = 0; c < NUM_CKPT; c++) cv[c] <= '0;
    end else begin
      for (int c = 0; c < NUM_CKPT; c++)
        for (int i = 0; i < N_ARCH; i++)
          if (hit(ct[c][i])) cv[c][i] <= 1'b0;
      if (ckpt_save) begin
        cv[ckpt_save_id] <= cleared;
        ct[ckpt_save_id] <= map_tag;
      end
      if (ckpt_restore) begin
        for (int i = 0; i < N_ARCH; i++) begin
          map_valid[i] <= cv[ckpt_restore_id][i] && !hit(ct[ckpt_restore_id][i]);
          map_tag[i]   <= ct[ckpt_restore_id][i];
        end
      end else if (load_en) begin
        for (int i = 0; i < N_ARCH; i++) begin
          map_valid[i] <= load_valid[i] && !hit(load_tag[i]);
          map_tag[i]   <= load_tag[i];
        end
      end else begin
        map_valid <= cleared;
        if (wr_all_en)
          for (int i = 1; i < N_ARCH; i++) begin
            map_valid[i] <= 1'b1;
            map_tag[i]   <= wr_all_tag;
          end
        for (int p = 0; p < WR_PORTS; p++)
          if (wr_en[p]) begin
            map_valid[wr_idx[p]] <= 1'b1;
            map_tag[wr_idx[p]]   <= wr_tag[p];
          end
      end
    end
  end

endmodule
