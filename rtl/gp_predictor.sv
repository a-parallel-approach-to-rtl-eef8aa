// gp_predictor: next-block predictor from recent state history.
//
// The paper suggests predicting the next block from the recent history of
// states so that its execution could start early. This unit keeps the last
// block before the current one as history and a direct-mapped table indexed by
// {previous block, current block} (folded to ENT_W bits) that remembers which
// block followed last time. pred_* is the prediction for the block now
// running (combinational); update with the actual next block when it is known,
// which also shifts the history and reports whether the prediction was right
// (was_correct, registered, valid one cycle after update). A wrong entry is
// simply overwritten, which is the paper's "resetting its entry".
// The history depth and table organisation are this design's choices. With the
// default ENTRIES = NUM_BLOCKS^2 = 1024 every history has its own entry
// (5 Kbit, inside the budget of about 100,000 transistors the paper gives
// this unit); a smaller table folds the index by XOR.
module gp_predictor
#(
  parameter int unsigned NUM_BLOCKS = 32,
  parameter int unsigned ENTRIES    = 1024,
  localparam int unsigned BLK_W     = $clog2(NUM_BLOCKS),
  localparam int unsigned ENT_W     = $clog2(ENTRIES)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic [BLK_W-1:0] cur_block,
  output logic             pred_valid,
  output logic [BLK_W-1:0] pred_block,
  input  logic             update,
  input  logic [BLK_W-1:0] actual_next,
  output logic             was_correct
);

  logic [BLK_W-1:0]   hist_q;
  logic [BLK_W-1:0]   tab_q [ENTRIES];
  logic [ENTRIES-1:0] val_q;

  function automatic logic [ENT_W-1:0] index_of(input logic [BLK_W-1:0] prev,
                                                input logic [BLK_W-1:0] cur);
    logic [2*BLK_W-1:0] k;
    logic [ENT_W-1:0]   s;
    k = {prev, cur};
    s = '0;
    for (int i = 0; i < 2 * BLK_W; i++) s[i % ENT_W] ^= k[i];
    return s;
  endfunction

  logic [ENT_W-1:0] idx;
  assign idx        = index_of(hist_q, cur_block);
  assign pred_valid = val_q[idx];
  assign pred_block = tab_q[idx];

  always_ff @(posedge clk) begin
    if (update) tab_q[idx] <= actual_next;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hist_q      <= '0;
      val_q       <= '0;
      was_correct <= 1'b0;
    end else if (update) begin
      val_q[idx]  <= 1'b1;
      hist_q      <= cur_block;
      was_correct <= pred_valid && pred_block == actual_next;
    end
  end

endmodule
