// tb_gp_grid: full 8 x 8 mesh. Thread 0 adds two injected words in PE (0,0)
// and passes the sum straight down column 0 to output tag 5. Thread 1 enters at
// PE (0,3) and zig-zags down the diagonal links between columns 3 and 4,
// XOR-ing a per-row immediate, leaving at column 4 with tag 9. Checks the
// values, the exit columns and the 2-cycles-per-row latency, and that the
// two threads also work when injected in the same cycles.
module tb_gp_grid;
  import gp_pkg::*;

  localparam int ROWS = 8, COLS = 8;
  logic clk = 0, rst_n = 0;
  logic frame_clr, load_en;
  logic [TID_W-1:0] load_slot;
  instr_t [ROWS*COLS-1:0] load_instr;
  pkt_t [COLS-1:0] inj_pkt, res_pkt;
  int checks = 0, failures = 0;
  int cyc = 0;

  gp_grid #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic dest_t dst(input int tid, input int idx);
    dest_t d; d.en = 1; d.tid = TID_W'(tid); d.idx = IDX_W'(idx); return d;
  endfunction

  initial begin
    instr_t [ROWS*COLS-1:0] s0, s1;
    word_t x, y, exp0, exp1;
    int t_inj, t0, t1;
    bit got0, got1;
    frame_clr = 0; load_en = 0; load_slot = '0; load_instr = '0; inj_pkt = '0;
    // thread 0 program (slot 0)
    s0 = '0;
    s0[0].valid = 1; s0[0].op = OP_ADD; s0[0].need = 3'b011; s0[0].dest[1] = dst(0, 0);
    for (int r = 1; r < ROWS; r++) begin
      s0[r*COLS].valid = 1; s0[r*COLS].op = OP_PASS; s0[r*COLS].need = 3'b001;
      s0[r*COLS].dest[1] = dst(0, (r == ROWS - 1) ? 5 : 0);
    end
    // thread 1 program (slot 1): zig-zag between columns 3 and 4
    s1 = '0;
    for (int r = 0; r < ROWS; r++) begin
      int c; c = (r % 2 == 0) ? 3 : 4;
      s1[r*COLS+c].valid = 1; s1[r*COLS+c].op = OP_XOR; s1[r*COLS+c].need = 3'b001;
      s1[r*COLS+c].imm = IMM_W'(16'h1111 * (r + 1));
      if (r == ROWS - 1) s1[r*COLS+c].dest[1] = dst(0, 9);
      else if (c == 3)   s1[r*COLS+c].dest[2] = dst(1, 0);
      else               s1[r*COLS+c].dest[0] = dst(1, 0);
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 40; n++) begin
      @(negedge clk); frame_clr = 1;
      @(negedge clk); frame_clr = 0;
      for (int s = 0; s < THREADS; s++) begin
        load_en = 1; load_slot = TID_W'(s);
        load_instr = (s == 0) ? s0 : (s == 1) ? s1 : '0;
        @(negedge clk);
      end
      load_en = 0;
      x = {$urandom, $urandom}; y = {$urandom, $urandom};
      exp0 = x + y;
      exp1 = y;
      for (int r = 0; r < ROWS; r++) exp1 ^= word_t'(signed'(IMM_W'(16'h1111 * (r + 1))));
      inj_pkt[0] = '{valid: 1, tid: 0, idx: 0, data: x};
      if (n % 2 == 1) inj_pkt[3] = '{valid: 1, tid: 1, idx: 0, data: y};
      @(negedge clk);
      inj_pkt = '0;
      inj_pkt[0] = '{valid: 1, tid: 0, idx: 1, data: y};
      t_inj = cyc;
      @(negedge clk);
      inj_pkt = '0;
      if (n % 2 == 0) begin
        inj_pkt[3] = '{valid: 1, tid: 1, idx: 0, data: y};
        @(negedge clk);
        inj_pkt = '0;
      end
      got0 = 0; got1 = 0;
      for (int k = 0; k < 4 * ROWS; k++) begin
        for (int c = 0; c < COLS; c++)
          if (res_pkt[c].valid) begin
            if (c == 0 && res_pkt[c].idx == 5) begin
              got0 = 1; t0 = cyc;
              check(res_pkt[c].data == exp0, "thread 0 value");
            end else if (c == 4 && res_pkt[c].idx == 9) begin
              got1 = 1; t1 = cyc;
              check(res_pkt[c].data == exp1, "thread 1 value");
            end else check(0, $sformatf("stray packet col %0d tag %0d", c, res_pkt[c].idx));
          end
        @(negedge clk);
      end
      check(got0 && got1, "missing result");
      check(t0 - t_inj == 2 * ROWS, $sformatf("thread 0 latency %0d", t0 - t_inj));
      check(t1 - t_inj == 2 * ROWS + (n % 2 == 0 ? 1 : -1), $sformatf("thread 1 latency %0d", t1 - t_inj));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
