// gp_input_system: input buffer, sensitivity ROM and injection control.
//
// At the start of every emulated cycle (start strobe) the input words are
// latched into the 64-entry input buffer and each word is compared with the
// value it replaces. Then the threads of the current block are taken in
// thread-ID order. For each, the sensitivity list (one bit per source word:
// bits 0..63 are input words, 64..127 are the registered outputs held by the
// output system) is checked against the words that changed. As the paper
// describes, a thread none of whose sensitive words changed is declared done
// at once (skip_valid / skip_tid strobe), and the output system keeps its old
// results. Otherwise the thread's input vector is injected into the top row
// over the static paths the compiler chose: in three consecutive cycles k = 0,
// 1, 2 every top-row PE c receives operand k of that thread, taken from the
// source word named by injection entry (block, thread, c, k). In the first
// cycle after reset every thread runs.
//
// The sensitivity list and the injection table are written by the compiler
// (sens_* and inj_* ports); the paper calls the former a ROM. Their sizes
// give 32 blocks x 8 threads x 128 bits = 32 Kbit, the size the paper
// budgets for the sensitivity list. done is high from the end of the last
// thread until the next start. Timing per thread: one decision cycle, plus
// three injection cycles when it runs. An injected packet's tag is the operand
// number k, so the upper tag bits of inj_pkt are always zero.
module gp_input_system
  import gp_pkg::*;
#(
  parameter int unsigned COLS       = 8,
  parameter int unsigned NUM_BLOCKS = 32,
  localparam int unsigned BLK_W     = $clog2(NUM_BLOCKS),
  localparam int unsigned COL_W     = (COLS > 1) ? $clog2(COLS) : 1
) (
  input  logic  clk,
  input  logic  rst_n,
  // compiler tables
  input  logic  sens_we,
  input  logic [BLK_W+TID_W:0] sens_addr,        // {block, thread, half}
  input  word_t sens_data,
  input  logic  inj_we,
  input  logic [BLK_W+TID_W+COL_W+1:0] inj_addr, // {block, thread, col, k}
  input  inj_t  inj_data,
  // data
  input  word_t [NUM_IN-1:0]  in_words,
  input  word_t [NUM_OUT-1:0] regs,
  input  logic  [NUM_OUT-1:0] reg_chg,
  // control
  input  logic  start,
  input  logic [BLK_W-1:0] block,
  output pkt_t [COLS-1:0] inj_pkt,
  output logic  skip_valid,
  output logic [TID_W-1:0] skip_tid,
  output logic  done,
  output word_t ctrl_word                         // input buffer word 0
);

  typedef enum logic [1:0] {S_IDLE, S_DECIDE, S_INJ, S_DONE} state_e;

  logic [2*DATA_W-1:0] sens_mem [NUM_BLOCKS*THREADS];
  inj_t [COLS-1:0][2:0] inj_mem [NUM_BLOCKS*THREADS];

  word_t [NUM_IN-1:0] buf_q;
  logic  [NUM_IN-1:0] chg_q;
  logic               force_q;
  state_e             state_q;
  logic [TID_W-1:0]   tid_q;
  logic [1:0]         k_q;

  logic [2*DATA_W-1:0] sens_row;
  logic                active;
  assign sens_row = sens_mem[{block, tid_q}];
  assign active   = force_q || |(sens_row & {reg_chg, chg_q});

  // Compiler writes.
  always_ff @(posedge clk) begin
    if (sens_we) begin
      if (sens_addr[0]) sens_mem[sens_addr[BLK_W+TID_W:1]][2*DATA_W-1:DATA_W] <= sens_data;
      else              sens_mem[sens_addr[BLK_W+TID_W:1]][DATA_W-1:0]        <= sens_data;
    end
    if (inj_we)
      inj_mem[inj_addr[BLK_W+TID_W+COL_W+1:COL_W+2]][inj_addr[COL_W+1:2]][inj_addr[1:0]] <= inj_data;
  end

  // Injection packets, driven during S_INJ.
  always_comb begin
    inj_t e;
    for (int c = 0; c < COLS; c++) begin
      e = inj_mem[{block, tid_q}][c][k_q];
      inj_pkt[c].valid = (state_q == S_INJ) && e.valid;
      inj_pkt[c].tid   = tid_q;
      inj_pkt[c].idx   = IDX_W'(k_q);
      inj_pkt[c].data  = e.src[SRC_W-1] ? regs[e.src[SRC_W-2:0]] : buf_q[e.src[SRC_W-2:0]];
    end
  end

  assign skip_valid = (state_q == S_DECIDE) && !active;
  assign skip_tid   = tid_q;
  assign done       = (state_q == S_DONE);
  assign ctrl_word  = buf_q[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q   <= '0;
      chg_q   <= '0;
      force_q <= 1'b1;
      state_q <= S_IDLE;
      tid_q   <= '0;
      k_q     <= '0;
    end else begin
      unique case (state_q)
        S_IDLE, S_DONE: begin
          if (start) begin
            buf_q <= in_words;
            for (int i = 0; i < NUM_IN; i++) chg_q[i] <= (in_words[i] != buf_q[i]);
            tid_q   <= '0;
            k_q     <= '0;
            state_q <= S_DECIDE;
          end
        end
        S_DECIDE: begin
          if (active) begin
            state_q <= S_INJ;
          end else if (tid_q == TID_W'(THREADS - 1)) begin
            state_q <= S_DONE;
            force_q <= 1'b0;
          end else begin
            tid_q <= tid_q + 1'b1;
          end
        end
        S_INJ: begin
          if (k_q == 2'd2) begin
            k_q <= '0;
            if (tid_q == TID_W'(THREADS - 1)) begin
              state_q <= S_DONE;
              force_q <= 1'b0;
            end else begin
              tid_q   <= tid_q + 1'b1;
              state_q <= S_DECIDE;
            end
          end else begin
            k_q <= k_q + 1'b1;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
