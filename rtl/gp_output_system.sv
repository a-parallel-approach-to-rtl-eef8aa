// gp_output_system: output register, completion detection and output buffer.
//
// The output system is a set of destinations for the bottom row of the grid:
// a packet whose tag is i writes output-register slot i (0..63) and marks it
// filled. For each block the compiler lists, per thread, which slots that
// thread produces (mask_* port, 64 bits per {block, thread}). The paper
// defines completion as every output slot being filled; here the expected
// slots are the union of the block's thread masks, and the slots of threads
// the input system declared done (skip strobe) count as filled without data.
// Completion also waits for the input system to finish (in_done), so that
// every skip is known.
//
// On completion the filled slots are copied into the 64-entry output buffer,
// which drives the output pins and doubles as the register file read back by
// the input system; slots of skipped threads, and slots no thread of the block
// produces, keep their previous values, as the paper describes. out_chg
// flags which buffer words changed value in that copy. `complete` is a
// one-cycle strobe in the cycle after the copy, when out_words already holds
// the new values. start clears the slots for a new frame.
module gp_output_system
  import gp_pkg::*;
#(
  parameter int unsigned COLS       = 8,
  parameter int unsigned NUM_BLOCKS = 32,
  localparam int unsigned BLK_W     = $clog2(NUM_BLOCKS)
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  mask_we,
  input  logic [BLK_W+TID_W-1:0] mask_addr,       // {block, thread}
  input  logic [NUM_OUT-1:0] mask_data,
  input  logic  start,
  input  logic [BLK_W-1:0] block,
  input  logic  skip_valid,
  input  logic [TID_W-1:0] skip_tid,
  input  logic  in_done,
  input  pkt_t  [COLS-1:0] res_pkt,
  output logic  complete,
  output word_t [NUM_OUT-1:0] out_words,
  output logic  [NUM_OUT-1:0] out_chg
);

  logic [NUM_OUT-1:0] mask_mem [NUM_BLOCKS*THREADS];

  word_t [NUM_OUT-1:0] oreg_q;
  logic  [NUM_OUT-1:0] filled_q, skipped_q, expected;
  logic                running_q, done_now;

  always_comb begin
    expected = '0;
    for (int t = 0; t < THREADS; t++) expected |= mask_mem[{block, TID_W'(t)}];
  end

  assign done_now = running_q && in_done &&
                    (((filled_q | skipped_q) & expected) == expected);

  always_ff @(posedge clk) begin
    if (mask_we) mask_mem[mask_addr] <= mask_data;
    for (int c = 0; c < COLS; c++)
      if (res_pkt[c].valid) oreg_q[res_pkt[c].idx] <= res_pkt[c].data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      filled_q  <= '0;
      skipped_q <= '0;
      running_q <= 1'b0;
      complete  <= 1'b0;
      out_words <= '0;
      out_chg   <= '0;
    end else begin
      complete <= done_now;
      if (start) begin
        filled_q  <= '0;
        skipped_q <= '0;
        running_q <= 1'b1;
      end else begin
        for (int c = 0; c < COLS; c++)
          if (res_pkt[c].valid) filled_q[res_pkt[c].idx] <= 1'b1;
        if (skip_valid) skipped_q <= skipped_q | mask_mem[{block, skip_tid}];
        if (done_now) begin
          running_q <= 1'b0;
          for (int i = 0; i < NUM_OUT; i++) begin
            if (expected[i] && filled_q[i] && !skipped_q[i]) begin
              out_words[i] <= oreg_q[i];
              out_chg[i]   <= (oreg_q[i] != out_words[i]);
            end else begin
              out_chg[i]   <= 1'b0;
            end
          end
        end
      end
    end
  end

endmodule
