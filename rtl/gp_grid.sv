// gp_grid: the 2-D mesh of processing elements of one tile.
//
// ROWS x COLS PEs (8 x 8 by default, the grid size of the paper's
// floorplan). Every link is a unidirectional 64-bit packet path, and each PE
// has an in-degree and out-degree of three, as the paper states: PE (r,c)
// sends to (r+1,c-1), (r+1,c) and (r+1,c+1) and receives from (r-1,c-1),
// (r-1,c) and (r-1,c+1). The diagonal pattern between adjacent rows is the one
// the paper's mesh drawing shows; the downward direction follows from the
// text (top row fed from the input pins, bottom row feeding the outputs).
// Links that would leave the grid at the left and right edges are absent.
// inj_pkt[c] feeds the middle channel of top-row PE c; the middle output of
// bottom-row PE c is res_pkt[c]. The instruction cache loads one slot of every
// PE per cycle over a dedicated bus per PE (load_instr[r*COLS+c]).
module gp_grid
  import gp_pkg::*;
#(
  parameter int unsigned ROWS = 8,
  parameter int unsigned COLS = 8
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   frame_clr,
  input  logic   load_en,
  input  logic [TID_W-1:0] load_slot,
  input  instr_t [ROWS*COLS-1:0] load_instr,
  input  pkt_t   [COLS-1:0] inj_pkt,
  output pkt_t   [COLS-1:0] res_pkt
);

  pkt_t [2:0] pin  [ROWS][COLS];
  pkt_t [2:0] pout [ROWS][COLS];

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      // channel 0: from up-left (its down-right link), 1: from above, 2: from up-right
      if (r == 0) begin : g_top
        assign pin[r][c][0] = '0;
        assign pin[r][c][1] = inj_pkt[c];
        assign pin[r][c][2] = '0;
      end else begin : g_inner
        if (c > 0) begin : g_ul
          assign pin[r][c][0] = pout[r-1][c-1][2];
        end else begin : g_ul0
          assign pin[r][c][0] = '0;
        end
        assign pin[r][c][1] = pout[r-1][c][1];
        if (c < COLS - 1) begin : g_ur
          assign pin[r][c][2] = pout[r-1][c+1][0];
        end else begin : g_ur0
          assign pin[r][c][2] = '0;
        end
      end

      gp_pe u_pe (
        .clk, .rst_n, .frame_clr, .load_en, .load_slot,
        .load_instr(load_instr[r*COLS+c]),
        .in_pkt(pin[r][c]),
        .out_pkt(pout[r][c])
      );
    end
  end

  for (genvar c = 0; c < COLS; c++) begin : g_res
    assign res_pkt[c] = pout[ROWS-1][c][1];
  end

endmodule
