// gp_out_router: output side of a PE's router.
//
// Registers the ALU result of the instruction issued this cycle and, in the
// next cycle, drives it onto each of the three output links (0 down-left,
// 1 down, 2 down-right) that the instruction's destination fields enable, with
// the destination's thread ID and slot tag attached. As in the paper, the
// destination is named by the instruction itself, and one result can go to up
// to three neighbours (fan-out of three). Links carry no back-pressure, so one
// result per cycle never waits and a one-entry buffer is enough (own sizing).
module gp_out_router
  import gp_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   res_valid,
  input  word_t  res_data,
  input  dest_t [2:0] res_dest,
  output pkt_t  [2:0] out_pkt
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_pkt <= '0;
    end else begin
      for (int d = 0; d < 3; d++) begin
        out_pkt[d].valid <= res_valid && res_dest[d].en;
        out_pkt[d].tid   <= res_dest[d].tid;
        out_pkt[d].idx   <= res_dest[d].idx;
        out_pkt[d].data  <= res_data;
      end
    end
  end

endmodule
