// tb_gp_top: end-to-end run of the two-tile emulator at its default size
// (two 8 x 8 grids, 32 blocks).
//
// Tile 1 emulates a small design with four processes (threads):
//   t0  out0 = in1 + in2 in block 0, in1 - in2 in block 1; out2 = ~out0
//       (the first PE fans its result out down and down-right)
//   t1  out1 = out1 + in3          (a register read back through the output buffer,
//                                    routed down the diagonal links)
//   t2  out63 = in4                 (next block, used on a next-state cache miss)
//   t3  out3 = in7 ? in6 : in5      (three operands; shares column 0 with t0)
// in0 acts as the clock word: t1 and t2 are sensitive to it, t0 to in1/in2,
// t3 to in5..in7, so t0 and t3 are skipped when their inputs stay. in4 is a
// function of (block, in0[7:0]), so cached next blocks are always right.
// Tile 2 takes tile 1's outputs: t0 out0 = in0 ^ in1, t2 out63 = 0.
// Every step is compared word by word with a model; the mechanisms the design
// has (skips, both maps, cache hits, misses with training, a compiler-set
// cache entry, correct predictions, tile chaining) are counted and each must
// occur.
module tb_gp_top;
  import gp_pkg::*;

  logic clk = 0, rst_n = 0;
  prog_t prog;
  logic prog_tile, step, busy, step_done;
  word_t [NUM_IN-1:0]  main_in;
  word_t [NUM_OUT-1:0] main_out;
  logic [1:0][4:0] block;
  logic [1:0][31:0] stat_steps, stat_hits, stat_misses, stat_pred_ok, stat_last_cycles, stat_skips;
  int checks = 0, failures = 0;

  gp_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  task automatic wr(input int tile, input prog_tgt_e tgt, input int addr, input word_t data);
    @(negedge clk);
    prog.we = 1; prog.tgt = tgt; prog.addr = 16'(addr); prog.data = data; prog_tile = 1'(tile);
    @(negedge clk);
    prog = '0;
  endtask

  function automatic instr_t mk(input alu_op_e op, input logic [2:0] need, input int imm = 0);
    instr_t i; i = '0; i.valid = 1; i.op = op; i.need = need; i.imm = IMM_W'(imm); return i;
  endfunction

  function automatic dest_t dst(input int tid, input int idx);
    dest_t d; d.en = 1; d.tid = TID_W'(tid); d.idx = IDX_W'(idx); return d;
  endfunction

  // program image for one tile: [block][slot][pe]
  instr_t img [2][THREADS][64];

  task automatic put(input int b, input int t, input int r, input int c, input instr_t i);
    img[b][t][r*8+c] = i;
  endtask

  // a straight column of PASS stages from row r0 to the bottom, ending in output tag `oidx`
  task automatic column(input int b, input int t, input int r0, input int c, input int oidx);
    instr_t i;
    for (int r = r0; r < 8; r++) begin
      i = mk(OP_PASS, 3'b001);
      i.dest[1] = dst(t, (r == 7) ? oidx : 0);
      put(b, t, r, c, i);
    end
  endtask

  task automatic load_tile(input int tile);
    for (int b = 0; b < 2; b++)
      for (int t = 0; t < THREADS; t++)
        for (int p = 0; p < 64; p++)
          wr(tile, PT_INSTR, (b << 9) | (t << 6) | p, word_t'(img[b][t][p]));
  endtask

  task automatic inj(input int tile, input int b, input int t, input int c, input int k, input int src);
    wr(tile, PT_INJECT, (b << 8) | (t << 5) | (c << 2) | k, word_t'({1'b1, 7'(src)}));
  endtask

  task automatic sens(input int tile, input int b, input int t, input logic [127:0] m);
    wr(tile, PT_SENS, (b << 4) | (t << 1) | 0, m[63:0]);
    wr(tile, PT_SENS, (b << 4) | (t << 1) | 1, m[127:64]);
  endtask

  task automatic build_tile1();
    instr_t i;
    foreach (img[b, t, p]) img[b][t][p] = '0;
    for (int b = 0; b < 2; b++) begin
      // t0: add/sub, fan-out to column 0 (out0) and column 1 (NOT, out2)
      i = mk(b == 0 ? OP_ADD : OP_SUB, 3'b011);
      i.dest[1] = dst(0, 0); i.dest[2] = dst(0, 0);
      put(b, 0, 0, 0, i);
      column(b, 0, 1, 0, 0);
      i = mk(OP_NOT, 3'b001); i.dest[1] = dst(0, 0); put(b, 0, 1, 1, i);
      column(b, 0, 2, 1, 2);
      // t3: mux in column 0, slot 3
      i = mk(OP_MUX, 3'b111); i.dest[1] = dst(3, 0); put(b, 3, 0, 0, i);
      column(b, 3, 1, 0, 3);
      // t1: accumulator, zig-zag between columns 2 and 3
      for (int r = 0; r < 8; r++) begin
        int c; c = (r % 2 == 0) ? 2 : 3;
        i = (r == 0) ? mk(OP_ADD, 3'b011) : mk(OP_PASS, 3'b001);
        if (r == 7)      i.dest[1] = dst(0, 1);
        else if (c == 2) i.dest[2] = dst(1, 0);
        else             i.dest[0] = dst(1, 0);
        put(b, 1, r, c, i);
      end
      // t2: next block in column 5
      i = mk(OP_PASS, 3'b001); i.dest[1] = dst(2, 0); put(b, 2, 0, 5, i);
      column(b, 2, 1, 5, 63);
    end
  endtask

  task automatic build_tile2();
    instr_t i;
    foreach (img[b, t, p]) img[b][t][p] = '0;
    for (int b = 0; b < 2; b++) begin
      i = mk(OP_XOR, 3'b011); i.dest[1] = dst(0, 0); put(b, 0, 0, 0, i);
      column(b, 0, 1, 0, 0);
      i = mk(OP_AND, 3'b001, 0); i.dest[1] = dst(2, 0); put(b, 2, 0, 7, i);
      column(b, 2, 1, 7, 63);
    end
  endtask

  task automatic program_all();
    logic [127:0] m;
    build_tile1(); load_tile(0);
    build_tile2(); load_tile(1);
    // clear all injection entries, output masks and sensitivity rows of blocks 0 and 1
    for (int tile = 0; tile < 2; tile++)
      for (int b = 0; b < 2; b++)
        for (int t = 0; t < THREADS; t++) begin
          for (int c = 0; c < 8; c++)
            for (int k = 0; k < 3; k++) wr(tile, PT_INJECT, (b << 8) | (t << 5) | (c << 2) | k, '0);
          wr(tile, PT_OUTMASK, (b << 3) | t, '0);
          sens(tile, b, t, '0);
        end
    for (int b = 0; b < 2; b++) begin
      // tile 1
      inj(0, b, 0, 0, 0, 1); inj(0, b, 0, 0, 1, 2);
      inj(0, b, 3, 0, 0, 5); inj(0, b, 3, 0, 1, 6); inj(0, b, 3, 0, 2, 7);
      inj(0, b, 1, 2, 0, 64 + 1); inj(0, b, 1, 2, 1, 3);
      inj(0, b, 2, 5, 0, 4);
      wr(0, PT_OUTMASK, (b << 3) | 0, 64'h5);
      wr(0, PT_OUTMASK, (b << 3) | 1, 64'h2);
      wr(0, PT_OUTMASK, (b << 3) | 2, 64'h8000_0000_0000_0000);
      wr(0, PT_OUTMASK, (b << 3) | 3, 64'h8);
      m = '0; m[1] = 1; m[2] = 1;           sens(0, b, 0, m);
      m = '0; m[0] = 1;                     sens(0, b, 1, m);
      sens(0, b, 2, m);
      m = '0; m[5] = 1; m[6] = 1; m[7] = 1; sens(0, b, 3, m);
      // tile 2
      inj(1, b, 0, 0, 0, 0); inj(1, b, 0, 0, 1, 1);
      inj(1, b, 2, 7, 0, 63);
      wr(1, PT_OUTMASK, (b << 3) | 0, 64'h1);
      wr(1, PT_OUTMASK, (b << 3) | 2, 64'h8000_0000_0000_0000);
      m = '0; m[0] = 1; m[1] = 1; sens(1, b, 0, m);
      m = '0; m[63] = 1;          sens(1, b, 2, m);
    end
    // compiler-set next-state entry in tile 1: block 0 with in0[7:0] = 8'h03 -> block 1
    begin
      logic [12:0] key; logic [5:0] set; word_t d;
      key = {5'd0, 8'h03};
      set = key[5:0] ^ key[11:6] ^ {5'b0, key[12]};
      d = '0; d[63] = 1; d[17:5] = key; d[4:0] = 5'd1;
      wr(0, PT_NSCACHE, int'(set), d);
    end
  endtask

  // the emulated design's next block, as a function of the state and the control inputs
  function automatic int next_of(input int b, input word_t in0);
    return in0[1] ? (b ^ 1) : b;
  endfunction

  initial begin
    word_t m1 [64], m2 [64];
    word_t prev_in [NUM_IN];
    int blk1, blk2;
    logic [31:0] hits_before;
    automatic int n_skip_t0 = 0, n_blk1_runs = 0, n_blk_switch = 0, n_init_hit = 0;
    automatic bit first = 1;
    prog = '0; prog_tile = 0; step = 0; main_in = '0;
    foreach (m1[i]) begin m1[i] = '0; m2[i] = '0; end
    foreach (prev_in[i]) prev_in[i] = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    program_all();
    blk1 = 0; blk2 = 0;
    for (int s = 0; s < 60; s++) begin
      bit run0, run3;
      int t0blk;
      // new inputs
      // in0 = {random bit, select, clock}; no block switch before step 3
      main_in[0] = word_t'({1'($urandom % 2), (s < 3) ? 1'b0 : 1'($urandom % 2), 1'(s % 2)});
      if (s == 3) main_in[0] = 64'h3;      // first use of key {block 0, 8'h03}: the compiler-set entry
      if (s % 3 != 2) begin main_in[1] = {$urandom, $urandom}; main_in[2] = {$urandom, $urandom}; end
      main_in[3] = {$urandom, $urandom};
      main_in[4] = word_t'(next_of(blk1, main_in[0]));
      if (s % 4 == 1) begin
        main_in[5] = {$urandom, $urandom}; main_in[6] = {$urandom, $urandom}; main_in[7] = {$urandom, $urandom};
      end
      // model, tile 1
      run0 = first || main_in[1] != prev_in[1] || main_in[2] != prev_in[2];
      run3 = first || main_in[5] != prev_in[5] || main_in[6] != prev_in[6] || main_in[7] != prev_in[7];
      if (run0) begin
        m1[0] = (blk1 == 0) ? main_in[1] + main_in[2] : main_in[1] - main_in[2];
        m1[2] = ~m1[0];
        if (blk1 == 1) n_blk1_runs++;
      end else n_skip_t0++;
      m1[1] = m1[1] + main_in[3];                 // clock word changes every step
      m1[63] = main_in[4];
      if (run3) m1[3] = (main_in[5] & ~main_in[7]) | (main_in[6] & main_in[7]);
      t0blk = blk1;
      if (s == 3) check(blk1 == 0, "test set-up: block 0 expected at step 3");
      blk1 = next_of(blk1, main_in[0]);
      if (blk1 != t0blk) n_blk_switch++;
      // model, tile 2 (inputs are tile 1's new outputs)
      m2[0] = m1[0] ^ m1[1];
      m2[63] = '0;
      for (int i = 0; i < NUM_IN; i++) prev_in[i] = main_in[i];
      first = 0;
      hits_before = stat_hits[0];
      // run one emulated cycle through both tiles
      @(negedge clk);
      step = 1;
      @(negedge clk);
      step = 0;
      while (!step_done) @(negedge clk);
      for (int i = 0; i < 64; i++) begin
        check(dut.mid[i] == m1[i], $sformatf("step %0d tile 1 word %0d: %h vs %h", s, i, dut.mid[i], m1[i]));
        check(main_out[i] == m2[i], $sformatf("step %0d tile 2 word %0d", s, i));
      end
      if (s == 3 && stat_hits[0] == hits_before + 1) n_init_hit++;
      check(block[0] == 5'(blk1), $sformatf("step %0d tile 1 block %0d vs %0d", s, block[0], blk1));
      check(block[1] == 5'(blk2), "tile 2 block");
      check(stat_steps[0] == 32'(s + 1) && stat_steps[1] == 32'(s + 1), "step counters");
    end
    $display("mechanisms: t0 skipped %0d, t0 runs in block 1 %0d, block switches %0d, ns hits %0d, ns misses %0d, compiler entry used %0d, predictions right %0d, skips tile1 %0d tile2 %0d, last step %0d+%0d cycles",
             n_skip_t0, n_blk1_runs, n_blk_switch, stat_hits[0], stat_misses[0], n_init_hit,
             stat_pred_ok[0], stat_skips[0], stat_skips[1], stat_last_cycles[0], stat_last_cycles[1]);
    check(n_skip_t0 > 0 && stat_skips[0] > 0 && stat_skips[1] > 0, "no thread skip happened");
    check(n_blk1_runs > 0, "block 1 map never ran");
    check(n_blk_switch > 0, "block never switched");
    check(stat_hits[0] > 0, "no next-state cache hit");
    check(stat_misses[0] > 0, "no next-state cache miss (training)");
    check(n_init_hit > 0, "compiler-set cache entry not used");
    check(stat_pred_ok[0] > 0, "no correct prediction");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
