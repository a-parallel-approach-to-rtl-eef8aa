// tb_gp_input_system: block 1 of a 4-block table. Thread 0 is sensitive to
// input word 1, thread 1 to register word 2, thread 2 to input word 5 and
// register word 60, the rest to nothing. Over a series of frames with chosen
// changes it checks: every thread runs in the first frame, the others are
// skipped exactly when none of their sensitive words changed, each running
// thread injects the table's source words as operands 0, 1, 2 into the right
// columns, and done comes after 1 + sum(1 + 3 * runs) cycles.
module tb_gp_input_system;
  import gp_pkg::*;

  localparam int COLS = 8, NB = 4;
  logic clk = 0, rst_n = 0;
  logic sens_we, inj_we, start, skip_valid, done;
  logic [5:0] sens_addr;
  logic [9:0] inj_addr;
  word_t sens_data, ctrl_word;
  inj_t inj_data;
  word_t [NUM_IN-1:0] in_words;
  word_t [NUM_OUT-1:0] regs;
  logic [NUM_OUT-1:0] reg_chg;
  logic [1:0] block;
  pkt_t [COLS-1:0] inj_pkt;
  logic [TID_W-1:0] skip_tid;
  int checks = 0, failures = 0;

  gp_input_system #(.COLS(COLS), .NUM_BLOCKS(NB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  logic [127:0] sens [THREADS];
  inj_t tab [THREADS][COLS][3];

  initial begin
    word_t prev_in [NUM_IN];
    bit run [THREADS];
    int exp_cycles, cycles, nruns, npkt, exp_pkt;
    sens_we = 0; inj_we = 0; start = 0; block = 2'd1;
    in_words = '0; regs = '0; reg_chg = '0; sens_addr = '0; sens_data = '0; inj_addr = '0; inj_data = '0;
    foreach (sens[t]) sens[t] = '0;
    sens[0][1] = 1; sens[1][64 + 2] = 1; sens[2][5] = 1; sens[2][64 + 60] = 1;
    repeat (2) @(posedge clk); rst_n = 1;
    // program block 1
    for (int t = 0; t < THREADS; t++) begin
      for (int h = 0; h < 2; h++) begin
        @(negedge clk);
        sens_we = 1; sens_addr = {2'd1, 3'(t), 1'(h)}; sens_data = (h != 0) ? sens[t][127:64] : sens[t][63:0];
      end
      for (int c = 0; c < COLS; c++)
        for (int k = 0; k < 3; k++) begin
          @(negedge clk);
          sens_we = 0;
          tab[t][c][k] = inj_t'($urandom);
          inj_we = 1; inj_addr = {2'd1, 3'(t), 3'(c), 2'(k)}; inj_data = tab[t][c][k];
        end
      @(negedge clk); inj_we = 0;
    end
    for (int i = 0; i < NUM_IN; i++) prev_in[i] = '0;
    for (int f = 0; f < 40; f++) begin
      @(negedge clk);
      // choose what changes in this frame
      for (int i = 0; i < NUM_IN; i++)
        if ($urandom % 3 == 0) in_words[i] = {$urandom, $urandom};
      for (int i = 0; i < NUM_OUT; i++) regs[i] = {$urandom, $urandom};
      reg_chg = {$urandom, $urandom};
      for (int t = 0; t < THREADS; t++) begin
        logic [127:0] chg;
        for (int i = 0; i < NUM_IN; i++) chg[i] = in_words[i] != prev_in[i];
        chg[127:64] = reg_chg;
        run[t] = (f == 0) || |(sens[t] & chg);
      end
      for (int i = 0; i < NUM_IN; i++) prev_in[i] = in_words[i];
      exp_cycles = 1; nruns = 0; npkt = 0; exp_pkt = 0;
      for (int t = 0; t < THREADS; t++)
        for (int c = 0; c < COLS; c++)
          for (int k = 0; k < 3; k++) if (run[t] && tab[t][c][k].valid) exp_pkt++;
      for (int t = 0; t < THREADS; t++) begin
        exp_cycles += 1 + (run[t] ? 3 : 0);
        nruns += run[t];
      end
      start = 1;
      @(negedge clk); start = 0;
      cycles = 1;
      begin

        while (!done && cycles < 200) begin
          if (skip_valid) begin
            check(!run[skip_tid], $sformatf("frame %0d thread %0d skipped but should run", f, skip_tid));
          end
          for (int c = 0; c < COLS; c++) begin
            if (inj_pkt[c].valid) begin
              inj_t e; word_t v;
              e = tab[inj_pkt[c].tid][c][inj_pkt[c].idx[1:0]];
              v = e.src[6] ? regs[e.src[5:0]] : in_words[e.src[5:0]];
              npkt++;
              check(run[inj_pkt[c].tid], "injection for a skipped thread");
              check(e.valid && inj_pkt[c].data == v, $sformatf("injected value t%0d c%0d", inj_pkt[c].tid, c));
            end
          end
          @(negedge clk);
          cycles++;
        end
      end
      check(cycles == exp_cycles, $sformatf("frame %0d took %0d cycles, expected %0d", f, cycles, exp_cycles));
      check(ctrl_word == in_words[0], "control word");
      check(npkt == exp_pkt, $sformatf("frame %0d: %0d packets, expected %0d", f, npkt, exp_pkt));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
