// gp_top: the two-chip VHDL emulator.
//
// Two gp_tile instances in series, as in the paper's floorplan: the main
// input feeds tile 1, the output buffer of tile 1 is the input of tile 2, and
// the output of tile 2 is the main output. A step strobe starts tile 1; when
// it finishes, tile 2 runs the same emulated cycle on tile 1's new outputs, and
// step_done pulses when tile 2 is finished. Both tiles are programmed through
// one port; prog_tile selects which one a write goes to. Each tile has an 8 x 8
// PE grid by default (the floorplan's figure); the paper's conclusion
// speaks of 64 x 64 arrays, which this design does not follow (see README).
module gp_top
  import gp_pkg::*;
#(
  parameter int unsigned ROWS       = 8,
  parameter int unsigned COLS       = 8,
  parameter int unsigned NUM_BLOCKS = 32,
  localparam int unsigned BLK_W     = $clog2(NUM_BLOCKS)
) (
  input  logic  clk,
  input  logic  rst_n,
  input  prog_t prog,
  input  logic  prog_tile,                 // 0: tile 1, 1: tile 2
  input  logic  step,
  output logic  busy,
  output logic  step_done,
  input  word_t [NUM_IN-1:0]  main_in,
  output word_t [NUM_OUT-1:0] main_out,
  output logic [1:0][BLK_W-1:0] block,
  output logic [1:0][31:0] stat_steps,
  output logic [1:0][31:0] stat_hits,
  output logic [1:0][31:0] stat_misses,
  output logic [1:0][31:0] stat_pred_ok,
  output logic [1:0][31:0] stat_last_cycles,
  output logic [1:0][31:0] stat_skips
);

  prog_t prog1, prog2;
  always_comb begin
    prog1 = prog;  prog1.we = prog.we && !prog_tile;
    prog2 = prog;  prog2.we = prog.we &&  prog_tile;
  end

  word_t [NUM_OUT-1:0] mid;
  logic busy1, busy2, done1;

  gp_tile #(.ROWS(ROWS), .COLS(COLS), .NUM_BLOCKS(NUM_BLOCKS)) u_tile1 (
    .clk, .rst_n, .prog(prog1), .step, .busy(busy1), .step_done(done1),
    .in_words(main_in), .out_words(mid), .block(block[0]),
    .stat_steps(stat_steps[0]), .stat_hits(stat_hits[0]), .stat_misses(stat_misses[0]),
    .stat_pred_ok(stat_pred_ok[0]), .stat_last_cycles(stat_last_cycles[0]),
    .stat_skips(stat_skips[0])
  );

  gp_tile #(.ROWS(ROWS), .COLS(COLS), .NUM_BLOCKS(NUM_BLOCKS)) u_tile2 (
    .clk, .rst_n, .prog(prog2), .step(done1), .busy(busy2), .step_done,
    .in_words(mid), .out_words(main_out), .block(block[1]),
    .stat_steps(stat_steps[1]), .stat_hits(stat_hits[1]), .stat_misses(stat_misses[1]),
    .stat_pred_ok(stat_pred_ok[1]), .stat_last_cycles(stat_last_cycles[1]),
    .stat_skips(stat_skips[1])
  );

  // busy from the step strobe until tile 2 reports done
  logic pend_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         pend_q <= 1'b0;
    else if (step)      pend_q <= 1'b1;
    else if (step_done) pend_q <= 1'b0;
  end
  assign busy = pend_q || busy1 || busy2;

endmodule
