// gp_in_router: input side of a PE's router.
//
// Receives up to three packets per cycle, one per input channel (from the
// up-left, up and up-right neighbours), and turns each into a write into the
// reservation station: the thread ID of the packet selects the slot, the low
// two bits of its tag select the operand (0, 1 or 2). The paper gives this
// steering by thread ID; the tag encoding is this design's. Purely
// combinational; when two channels name the same slot and operand in one cycle
// (which the mapper must avoid) the higher channel number wins, and an
// assertion reports it. Tags 3 and above are not operands and are dropped.
module gp_in_router
  import gp_pkg::*;
#(
  parameter int unsigned CH = 3
) (
  input  logic          clk,
  input  pkt_t [CH-1:0] in_pkt,
  output logic [THREADS-1:0][2:0] wr_en,    // write operand [o] of slot [s]
  output word_t [THREADS-1:0][2:0] wr_data
);

  always_comb begin
    wr_en   = '0;
    wr_data = '0;
    for (int ch = 0; ch < CH; ch++) begin
      if (in_pkt[ch].valid && in_pkt[ch].idx < IDX_W'(3)) begin
        wr_en  [in_pkt[ch].tid][in_pkt[ch].idx[1:0]] = 1'b1;
        wr_data[in_pkt[ch].tid][in_pkt[ch].idx[1:0]] = in_pkt[ch].data;
      end
    end
  end

  // Two channels must not address the same operand in the same cycle.
  always_ff @(posedge clk) begin
    for (int i = 0; i < CH; i++)
      for (int j = i + 1; j < CH; j++)
        assert (!(in_pkt[i].valid && in_pkt[j].valid &&
                  in_pkt[i].tid == in_pkt[j].tid && in_pkt[i].idx == in_pkt[j].idx))
          else $error("gp_in_router: channels %0d and %0d write the same operand", i, j);
  end

endmodule
