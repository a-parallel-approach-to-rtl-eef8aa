// gp_tile_ctrl: control of one tile; runs one emulated clock cycle per step.
//
// Sequence for each step request (the "Control" box of the paper's chip
// drawing, with the completion and next-block rules of its text):
//   FETCH  one cycle to clear the reservation stations (frame_clr), then the map
//          of the current block is read from the instruction cache one thread
//          slot per cycle (THREADS reads, loads one cycle behind the reads);
//   START  input and output systems are started for the block;
//   RUN    wait for the output system to report completion (all output slots
//          filled);
//   NEXT   the next block is looked up in the next-state cache with {block,
//          input word 0}. On a hit the cached block is used; on a miss the block
//          number computed by the grid into output word STATE_WORD is used and
//          the cache is trained with it. The predictor is updated as well;
//   DRAIN  DRAIN_CYC optional idle cycles (0 in the tile: the stations drop the
//          old frame's instructions at the clear, so stray packets are
//          harmless); then step_done.
// The optional drain, the use of an output word as the state on a miss, and the
// statistics counters are this design's choices. Counters wrap. The low byte
// of lk_key and all of train_next are input bits passed straight on (input
// word 0 and the state word).
module gp_tile_ctrl
  import gp_pkg::*;
#(
  parameter int unsigned NUM_BLOCKS = 32,
  parameter int unsigned CTRL_W     = 8,
  parameter int unsigned DRAIN_CYC  = 0,
  localparam int unsigned BLK_W     = $clog2(NUM_BLOCKS),
  localparam int unsigned KEY_W     = BLK_W + CTRL_W
) (
  input  logic clk,
  input  logic rst_n,
  input  logic boot_we,                  // set the current block (before the first step)
  input  logic [BLK_W-1:0] boot_block,
  input  logic step,
  output logic busy,
  output logic step_done,
  output logic [BLK_W-1:0] block,
  // instruction cache and grid
  output logic [TID_W-1:0] rd_slot,
  output logic frame_clr,
  output logic load_en,
  output logic [TID_W-1:0] load_slot,
  // input / output systems
  output logic sys_start,
  input  logic complete,
  input  word_t ctrl_word,
  input  word_t state_word,
  // next-state cache
  output logic [KEY_W-1:0] lk_key,
  input  logic             lk_hit,
  input  logic [BLK_W-1:0] lk_next,
  output logic             train_en,
  output logic [BLK_W-1:0] train_next,
  // predictor
  output logic             pred_update,
  output logic [BLK_W-1:0] next_block,
  input  logic             pred_correct,
  // statistics
  output logic [31:0] stat_steps,
  output logic [31:0] stat_hits,
  output logic [31:0] stat_misses,
  output logic [31:0] stat_pred_ok,
  output logic [31:0] stat_last_cycles
);

  typedef enum logic [2:0] {S_IDLE, S_CLR, S_FETCH, S_START, S_RUN, S_DRAIN} state_e;

  state_e           state_q;
  logic [TID_W:0]   cnt_q;
  logic [7:0]       drain_q;
  logic [31:0]      cyc_q;
  logic             pred_pend_q;

  assign busy       = (state_q != S_IDLE);
  assign rd_slot    = cnt_q[TID_W-1:0];
  assign frame_clr  = (state_q == S_CLR);
  assign sys_start  = (state_q == S_START);
  assign lk_key     = {block, ctrl_word[CTRL_W-1:0]};
  assign next_block = lk_hit ? lk_next : state_word[BLK_W-1:0];
  assign train_en   = (state_q == S_RUN) && complete && !lk_hit;
  assign train_next = state_word[BLK_W-1:0];
  assign pred_update = (state_q == S_RUN) && complete;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q          <= S_IDLE;
      cnt_q            <= '0;
      drain_q          <= '0;
      cyc_q            <= '0;
      block            <= '0;
      load_en          <= 1'b0;
      load_slot        <= '0;
      step_done        <= 1'b0;
      pred_pend_q      <= 1'b0;
      stat_steps       <= '0;
      stat_hits        <= '0;
      stat_misses      <= '0;
      stat_pred_ok     <= '0;
      stat_last_cycles <= '0;
    end else begin
      step_done   <= 1'b0;
      // loads follow the synchronous reads by one cycle
      load_en     <= (state_q == S_FETCH);
      load_slot   <= cnt_q[TID_W-1:0];
      pred_pend_q <= pred_update;
      if (pred_pend_q && pred_correct) stat_pred_ok <= stat_pred_ok + 1;
      if (state_q != S_IDLE) cyc_q <= cyc_q + 1;
      unique case (state_q)
        S_IDLE: begin
          if (boot_we) block <= boot_block;
          if (step) begin
            state_q <= S_CLR;
            cyc_q   <= 32'd1;
          end
        end
        S_CLR: begin
          cnt_q   <= '0;
          state_q <= S_FETCH;
        end
        S_FETCH: begin
          if (cnt_q == (TID_W+1)'(THREADS - 1)) begin
            state_q <= S_START;
          end
          cnt_q <= cnt_q + 1'b1;
        end
        S_START: state_q <= S_RUN;
        S_RUN: begin
          if (complete) begin
            block <= next_block;
            if (lk_hit) stat_hits   <= stat_hits + 1;
            else        stat_misses <= stat_misses + 1;
            drain_q <= 8'(DRAIN_CYC);
            state_q <= S_DRAIN;
          end
        end
        S_DRAIN: begin
          if (drain_q == 8'd0) begin
            state_q          <= S_IDLE;
            step_done        <= 1'b1;
            stat_steps       <= stat_steps + 1;
            stat_last_cycles <= cyc_q;
          end else begin
            drain_q <= drain_q - 1'b1;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
