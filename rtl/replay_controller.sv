// replay_controller: sequencing of rename-replay recovery.
//
// On a predicate misprediction (mis, in the write-back cycle t) the controller
// becomes busy, which stalls everything before the renamer. The register map is
// restored from the checkpoint by the caller in cycle t. After the recovery
// latency the controller walks the recovery queue from the first user of the
// mispredicted predicate (mis_start) to the tail as it stands then, presenting
// one slot per cycle on replay_idx with replay_valid; the renamer takes it with
// replay_ack (it may hold it, for instance while waiting for a checkpoint).
// The first replayed instruction is presented in cycle t + RECOVERY_LAT, the
// seven-cycle predicate recovery of the evaluated machine; busy falls after the
// last replayed slot is taken. A misprediction while busy restarts the sequence
// from its own start (the caller restores that misprediction's checkpoint).
module replay_controller #(
  parameter int unsigned DEPTH        = 256,
  parameter int unsigned RECOVERY_LAT = 7
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     mis,
  input  logic [$clog2(DEPTH)-1:0] mis_start,
  input  logic [$clog2(DEPTH)-1:0] tail,
  output logic                     busy,
  output logic                     replay_valid,
  output logic [$clog2(DEPTH)-1:0] replay_idx,
  input  logic                     replay_ack,
  output logic                     replay_last
);
  localparam int unsigned IW = $clog2(DEPTH);
  localparam int unsigned LW = $clog2(RECOVERY_LAT + 1);

  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_REPLAY} state_e;
  state_e        state;
  logic [LW-1:0] wait_cnt;
  logic [IW-1:0] end_idx;

  assign busy         = (state != S_IDLE);
  assign replay_valid = (state == S_REPLAY);
  assign replay_last  = replay_valid && (replay_idx + 1'b1 == end_idx);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      wait_cnt   <= '0;
      replay_idx <= '0;
      end_idx    <= '0;
    end else if (mis) begin
      // a misprediction (re)starts the sequence from any state
      replay_idx <= mis_start;
      end_idx    <= tail;
      if (RECOVERY_LAT <= 1) state <= S_REPLAY;
      else begin
        state    <= S_WAIT;
        wait_cnt <= LW'(RECOVERY_LAT - 1);
      end
    end else begin
      unique case (state)
        S_IDLE: ;
        S_WAIT: begin
          wait_cnt <= wait_cnt - 1'b1;
          if (wait_cnt == LW'(1)) state <= S_REPLAY;
        end
        S_REPLAY:
          if (replay_ack) begin
            replay_idx <= replay_idx + 1'b1;
            if (replay_last) state <= S_IDLE;
          end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
