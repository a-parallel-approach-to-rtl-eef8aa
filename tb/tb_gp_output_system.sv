// tb_gp_output_system: each output slot of block 2 belongs to one random
// thread (or none). Per frame some threads are skipped, the others' slots
// arrive as bottom-row packets in random order on random columns. Checks that
// completion never comes early, that filled slots are copied to the output buffer while skipped and
// unused slots keep their old values, and the changed flags. Completion is
// expected at the second clock edge after the last packet is presented.
module tb_gp_output_system;
  import gp_pkg::*;

  localparam int COLS = 8, NB = 4;
  logic clk = 0, rst_n = 0;
  logic mask_we, start, skip_valid, in_done, complete;
  logic [4:0] mask_addr;
  logic [NUM_OUT-1:0] mask_data, out_chg;
  logic [1:0] block;
  logic [TID_W-1:0] skip_tid;
  pkt_t [COLS-1:0] res_pkt;
  word_t [NUM_OUT-1:0] out_words;
  int checks = 0, failures = 0;

  gp_output_system #(.COLS(COLS), .NUM_BLOCKS(NB)) dut (.*);

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

  initial begin
    int owner [NUM_OUT];           // -1: no thread
    logic [NUM_OUT-1:0] mask [THREADS];
    word_t model [NUM_OUT];
    word_t newv [NUM_OUT];
    bit skip [THREADS];
    int pending [$];
    mask_we = 0; start = 0; skip_valid = 0; in_done = 0; block = 2'd2; res_pkt = '0;
    mask_addr = '0; mask_data = '0; skip_tid = '0;
    foreach (mask[t]) mask[t] = '0;
    for (int i = 0; i < NUM_OUT; i++) begin
      owner[i] = int'($urandom % 10) - 2;
      if (owner[i] >= 0) mask[owner[i]][i] = 1;
      model[i] = '0;
    end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < THREADS; t++) begin
      @(negedge clk); mask_we = 1; mask_addr = {2'd2, 3'(t)}; mask_data = mask[t];
    end
    @(negedge clk); mask_we = 0;
    for (int f = 0; f < 60; f++) begin
      logic [NUM_OUT-1:0] exp_chg;
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      foreach (skip[t]) skip[t] = ($urandom % 3 == 0);
      pending.delete();
      for (int i = 0; i < NUM_OUT; i++) begin
        newv[i] = ($urandom % 4 == 0) ? model[i] : {$urandom, $urandom};
        if (owner[i] >= 0 && !skip[owner[i]]) pending.push_back(i);
      end
      pending.shuffle();
      // skips first, in_done, then packets; the last packet is the last event
      for (int t = 0; t < THREADS; t++) if (skip[t]) begin
        skip_valid = 1; skip_tid = 3'(t);
        @(negedge clk);
        skip_valid = 0;
        check(!complete, "complete during skips");
      end
      in_done = 1;
      if (pending.size() == 0) begin
        @(negedge clk);
        check(complete, "complete missing with nothing to wait for");
      end else begin
        while (pending.size() > 0) begin
          int n;
          res_pkt = '0;
          n = 1 + $urandom % COLS;
          for (int c = 0; c < n && pending.size() > 0; c++) begin
            int s; s = pending.pop_front();
            res_pkt[c] = '{valid: 1, tid: 3'(owner[s]), idx: 6'(s), data: newv[s]};
          end
          @(negedge clk);
          res_pkt = '0;
          check(!complete, "complete before all slots filled");
        end
        @(negedge clk);
        check(complete, "complete missing at the second edge after the last slot");
      end
      exp_chg = '0;
      for (int i = 0; i < NUM_OUT; i++) begin
        if (owner[i] >= 0 && !skip[owner[i]]) begin
          exp_chg[i] = newv[i] != model[i];
          model[i] = newv[i];
        end
        check(out_words[i] == model[i], $sformatf("frame %0d word %0d", f, i));
      end
      check(out_chg == exp_chg, "changed flags");
      @(negedge clk);
      check(!complete, "complete longer than one cycle");
      in_done = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
