// gp_tile: one grid-processor chip of the emulator.
//
// Puts together the parts of the paper's chip drawing: the input buffer and
// input system on top, the ROWS x COLS PE mesh, the output buffer and output
// system below it, the instruction cache (map memory) wired to every PE, and
// the control with its next-state cache and next-block predictor.
//
// Use: the compiler's tables are written through `prog` (see gp_pkg::prog_t
// for the targets and address layouts); a PT_START write chooses the first
// block. Each `step` strobe then emulates one clock cycle of the mapped design:
// in_words are sampled, the threads whose sensitive inputs changed run on the
// grid, and when every output slot is filled out_words is updated and
// step_done pulses. The next block is chosen as described in gp_tile_ctrl;
// STATE_WORD names the output word the grid writes the next block number into.
//
// Programming address layouts (addr bits, LSB last):
//   PT_INSTR   {block, slot, pe}     PT_INJECT {block, thread, col, k}
//   PT_OUTMASK {block, thread}       PT_SENS   {block, thread, half}
//   PT_NSCACHE set                   PT_START  block
module gp_tile
  import gp_pkg::*;
#(
  parameter int unsigned ROWS       = 8,
  parameter int unsigned COLS       = 8,
  parameter int unsigned NUM_BLOCKS = 32,
  parameter int unsigned CTRL_W     = 8,
  parameter int unsigned NS_SETS    = 64,
  parameter int unsigned PRED_ENT   = 1024,
  parameter int unsigned STATE_WORD = NUM_OUT - 1,
  localparam int unsigned NPE       = ROWS * COLS,
  localparam int unsigned BLK_W     = $clog2(NUM_BLOCKS),
  localparam int unsigned PE_W      = $clog2(NPE),
  localparam int unsigned COL_W     = (COLS > 1) ? $clog2(COLS) : 1,
  localparam int unsigned KEY_W     = BLK_W + CTRL_W
) (
  input  logic  clk,
  input  logic  rst_n,
  input  prog_t prog,
  input  logic  step,
  output logic  busy,
  output logic  step_done,
  input  word_t [NUM_IN-1:0]  in_words,
  output word_t [NUM_OUT-1:0] out_words,
  output logic [BLK_W-1:0] block,
  output logic [31:0] stat_steps,
  output logic [31:0] stat_hits,
  output logic [31:0] stat_misses,
  output logic [31:0] stat_pred_ok,
  output logic [31:0] stat_last_cycles,
  output logic [31:0] stat_skips
);

  // ---- programming port decode
  logic we_instr, we_inj, we_mask, we_sens, we_ns, we_boot;
  assign we_instr = prog.we && prog.tgt == PT_INSTR;
  assign we_inj   = prog.we && prog.tgt == PT_INJECT;
  assign we_mask  = prog.we && prog.tgt == PT_OUTMASK;
  assign we_sens  = prog.we && prog.tgt == PT_SENS;
  assign we_ns    = prog.we && prog.tgt == PT_NSCACHE;
  assign we_boot  = prog.we && prog.tgt == PT_START;

  // ---- control
  logic [TID_W-1:0] rd_slot, load_slot;
  logic frame_clr, load_en, sys_start, complete;
  logic [KEY_W-1:0] lk_key;
  logic lk_hit, train_en, pred_update, pred_valid, pred_correct;
  logic [BLK_W-1:0] lk_next, train_next, next_block, pred_block;
  word_t ctrl_word;

  gp_tile_ctrl #(.NUM_BLOCKS(NUM_BLOCKS), .CTRL_W(CTRL_W), .DRAIN_CYC(0)) u_ctrl (
    .clk, .rst_n,
    .boot_we(we_boot), .boot_block(prog.addr[BLK_W-1:0]),
    .step, .busy, .step_done, .block,
    .rd_slot, .frame_clr, .load_en, .load_slot,
    .sys_start, .complete, .ctrl_word, .state_word(out_words[STATE_WORD]),
    .lk_key, .lk_hit, .lk_next, .train_en, .train_next,
    .pred_update, .next_block, .pred_correct,
    .stat_steps, .stat_hits, .stat_misses, .stat_pred_ok, .stat_last_cycles
  );

  gp_ns_cache #(.NUM_BLOCKS(NUM_BLOCKS), .CTRL_W(CTRL_W), .SETS(NS_SETS)) u_ns (
    .clk, .rst_n, .lk_key, .lk_hit, .lk_next,
    .train_en, .train_key(lk_key), .train_next,
    .init_we(we_ns), .init_set(prog.addr[$clog2(NS_SETS)-1:0]), .init_data(prog.data)
  );

  gp_predictor #(.NUM_BLOCKS(NUM_BLOCKS), .ENTRIES(PRED_ENT)) u_pred (
    .clk, .rst_n, .cur_block(block), .pred_valid, .pred_block,
    .update(pred_update), .actual_next(next_block), .was_correct(pred_correct)
  );

  // ---- instruction cache and grid
  instr_t [NPE-1:0] map_instr;

  gp_map_mem #(.NPE(NPE), .NUM_BLOCKS(NUM_BLOCKS)) u_map (
    .clk,
    .wr_en(we_instr),
    .wr_block(prog.addr[BLK_W+TID_W+PE_W-1 -: BLK_W]),
    .wr_slot(prog.addr[TID_W+PE_W-1 -: TID_W]),
    .wr_pe(prog.addr[PE_W-1:0]),
    .wr_instr(instr_t'(prog.data[INSTR_W-1:0])),
    .rd_block(block), .rd_slot, .rd_instr(map_instr)
  );

  pkt_t [COLS-1:0] inj_pkt, res_pkt;

  gp_grid #(.ROWS(ROWS), .COLS(COLS)) u_grid (
    .clk, .rst_n, .frame_clr, .load_en, .load_slot,
    .load_instr(map_instr), .inj_pkt, .res_pkt
  );

  // ---- input and output systems
  logic skip_valid, in_done;
  logic [TID_W-1:0] skip_tid;
  logic [NUM_OUT-1:0] out_chg;

  gp_input_system #(.COLS(COLS), .NUM_BLOCKS(NUM_BLOCKS)) u_in (
    .clk, .rst_n,
    .sens_we(we_sens), .sens_addr(prog.addr[BLK_W+TID_W:0]), .sens_data(prog.data),
    .inj_we(we_inj), .inj_addr(prog.addr[BLK_W+TID_W+COL_W+1:0]),
    .inj_data(inj_t'(prog.data[$bits(inj_t)-1:0])),
    .in_words, .regs(out_words), .reg_chg(out_chg),
    .start(sys_start), .block, .inj_pkt,
    .skip_valid, .skip_tid, .done(in_done), .ctrl_word
  );

  gp_output_system #(.COLS(COLS), .NUM_BLOCKS(NUM_BLOCKS)) u_out (
    .clk, .rst_n,
    .mask_we(we_mask), .mask_addr(prog.addr[BLK_W+TID_W-1:0]), .mask_data(prog.data),
    .start(sys_start), .block, .skip_valid, .skip_tid, .in_done,
    .res_pkt, .complete, .out_words, .out_chg
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          stat_skips <= '0;
    else if (skip_valid) stat_skips <= stat_skips + 1;
  end

endmodule
