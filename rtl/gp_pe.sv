// gp_pe: one network node (processing element) of the grid.
//
// Structure as in the paper's node picture: an input router feeding a set
// of reservation stations, a control part that holds the instructions loaded
// from the instruction cache and schedules them, the functional unit (ALU), and
// an output router that sends results to the destinations the instruction
// names. Here the per-slot instruction store lives inside gp_rs_sched.
//
// Channels: in_pkt[0] from the up-left neighbour, [1] from the neighbour above
// (or the input buffer for the top row), [2] from the up-right neighbour.
// out_pkt[0] down-left, [1] down (or the output buffer for the bottom row),
// [2] down-right. The paper's text gives three inputs per cycle and an in-
// and out-degree of three; its node picture draws four input channels, and this
// design follows the text.
//
// Timing: a packet that arrives in cycle n is stored at the end of n; the
// instruction can issue in n+1 and its result is on the output links in n+2,
// so one hop costs two cycles.
module gp_pe
  import gp_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   frame_clr,
  input  logic   load_en,
  input  logic [TID_W-1:0] load_slot,
  input  instr_t load_instr,
  input  pkt_t  [2:0] in_pkt,
  output pkt_t  [2:0] out_pkt
);

  logic  [THREADS-1:0][2:0] wr_en;
  word_t [THREADS-1:0][2:0] wr_data;
  logic   issue_valid;
  logic [TID_W-1:0] issue_slot;
  instr_t issue_instr;
  word_t  a, b, c, y;

  gp_in_router #(.CH(3)) u_in (
    .clk, .in_pkt, .wr_en, .wr_data
  );

  gp_rs_sched u_rs (
    .clk, .rst_n, .frame_clr, .load_en, .load_slot, .load_instr,
    .wr_en, .wr_data,
    .issue_valid, .issue_slot, .issue_instr,
    .issue_a(a), .issue_b(b), .issue_c(c)
  );

  gp_alu u_alu (.op(issue_instr.op), .a, .b, .c, .y);

  gp_out_router u_out (
    .clk, .rst_n,
    .res_valid(issue_valid), .res_data(y), .res_dest(issue_instr.dest),
    .out_pkt
  );

endmodule
