// tb_gp_fig1: the two-process example used to explain how VHDL maps onto
// threads, run on one tile at its default size.
//   process A (thread 0):  A <= B;  C <= A + 8      (C from the new A, as in the
//                                                   instruction sequence MOV, ADD #8)
//   process B (thread 1):  F <= E;  B <= C + D      (C read from the register)
// A, B, C, F are registers kept in output words 0, 1, 2, 3; D and E are input
// words 1 and 2; input word 0 is the clock word both processes are sensitive
// to. Thread 0's first PE fans A out to the output column and to the adder
// PE; values pass between the two threads only through the registers, one
// emulated cycle apart. Checks every register after every emulated cycle.
module tb_gp_fig1;
  import gp_pkg::*;

  logic clk = 0, rst_n = 0;
  prog_t prog;
  logic step, busy, step_done;
  word_t [NUM_IN-1:0]  in_words;
  word_t [NUM_OUT-1:0] out_words;
  logic [4:0] block;
  logic [31:0] stat_steps, stat_hits, stat_misses, stat_pred_ok, stat_last_cycles, stat_skips;
  int checks = 0, failures = 0;

  gp_tile dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  task automatic wr(input prog_tgt_e tgt, input int addr, input word_t data);
    @(negedge clk);
    prog.we = 1; prog.tgt = tgt; prog.addr = 16'(addr); prog.data = data;
    @(negedge clk);
    prog = '0;
  endtask

  function automatic instr_t mk(input alu_op_e op, input logic [2:0] need, input int imm = 0);
    instr_t i; i = '0; i.valid = 1; i.op = op; i.need = need; i.imm = IMM_W'(imm); return i;
  endfunction

  function automatic dest_t dst(input int tid, input int idx);
    dest_t d; d.en = 1; d.tid = TID_W'(tid); d.idx = IDX_W'(idx); return d;
  endfunction

  instr_t img [THREADS][64];

  task automatic column(input int t, input int r0, input int c, input int oidx);
    for (int r = r0; r < 8; r++) begin
      img[t][r*8+c] = mk(OP_PASS, 3'b001);
      img[t][r*8+c].dest[1] = dst(t, (r == 7) ? oidx : 0);
    end
  endtask

  initial begin
    word_t A, B, C, F, nA, nB, nC, nF;
    logic [127:0] m;
    prog = '0; step = 0; in_words = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    foreach (img[t, p]) img[t][p] = '0;
    // process A: MOV A, B (fan-out), ADD C, A, #8
    img[0][0] = mk(OP_PASS, 3'b001); img[0][0].dest[1] = dst(0, 0); img[0][0].dest[2] = dst(0, 0);
    column(0, 1, 0, 0);
    img[0][1*8+1] = mk(OP_ADD, 3'b001, 8); img[0][1*8+1].dest[1] = dst(0, 0);
    column(0, 2, 1, 2);
    // process B: MOV F, E; ADD B, C, D
    img[1][3] = mk(OP_PASS, 3'b001); img[1][3].dest[1] = dst(1, 0);
    column(1, 1, 3, 3);
    img[1][4] = mk(OP_ADD, 3'b011); img[1][4].dest[1] = dst(1, 0);
    column(1, 1, 4, 1);
    for (int t = 0; t < THREADS; t++)
      for (int p = 0; p < 64; p++) wr(PT_INSTR, (t << 6) | p, word_t'(img[t][p]));
    for (int t = 0; t < THREADS; t++) begin
      for (int c = 0; c < 8; c++) for (int k = 0; k < 3; k++) wr(PT_INJECT, (t << 5) | (c << 2) | k, '0);
      wr(PT_OUTMASK, t, '0);
      wr(PT_SENS, t << 1, '0); wr(PT_SENS, (t << 1) | 1, '0);
    end
    wr(PT_INJECT, (0 << 5) | (0 << 2) | 0, word_t'({1'b1, 7'(64 + 1)}));   // B register
    wr(PT_INJECT, (1 << 5) | (3 << 2) | 0, word_t'({1'b1, 7'(2)}));        // E input
    wr(PT_INJECT, (1 << 5) | (4 << 2) | 0, word_t'({1'b1, 7'(64 + 2)}));   // C register
    wr(PT_INJECT, (1 << 5) | (4 << 2) | 1, word_t'({1'b1, 7'(1)}));        // D input
    wr(PT_OUTMASK, 0, 64'h5);
    wr(PT_OUTMASK, 1, 64'ha);
    m = '0; m[0] = 1;
    wr(PT_SENS, 0 << 1, m[63:0]);
    wr(PT_SENS, 1 << 1, m[63:0]);
    A = '0; B = '0; C = '0; F = '0;
    for (int s = 0; s < 25; s++) begin
      in_words[0] = word_t'(64'(s) % 2);
      in_words[1] = {$urandom, $urandom};
      in_words[2] = {$urandom, $urandom};
      nA = B; nC = B + 8; nF = in_words[2]; nB = C + in_words[1];
      A = nA; B = nB; C = nC; F = nF;
      @(negedge clk); step = 1;
      @(negedge clk); step = 0;
      while (!step_done) @(negedge clk);
      check(out_words[0] == A, $sformatf("cycle %0d A", s));
      check(out_words[1] == B, $sformatf("cycle %0d B", s));
      check(out_words[2] == C, $sformatf("cycle %0d C", s));
      check(out_words[3] == F, $sformatf("cycle %0d F", s));
      check(block == 0, "block");
    end
    $display("emulated cycle took %0d clock cycles", stat_last_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
