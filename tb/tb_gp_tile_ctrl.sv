// tb_gp_tile_ctrl: drives the controller with a model of the rest of the tile.
// Per step it checks the frame clear, the eight slot reads with loads one cycle
// behind, the start strobe, that nothing moves until completion, the choice of
// the next block (cache hit: cached block; miss: state word, with training),
// the drain length, step_done, the statistics counters and the step's cycle
// count (1 clear + 8 fetch + 1 start + wait + 1 + DRAIN_CYC + 1).
module tb_gp_tile_ctrl;
  import gp_pkg::*;

  localparam int DRAIN = 18;
  logic clk = 0, rst_n = 0;
  logic boot_we, step, busy, step_done, frame_clr, load_en, sys_start, complete;
  logic [4:0] boot_block, block, lk_next, train_next, next_block;
  logic [TID_W-1:0] rd_slot, load_slot;
  word_t ctrl_word, state_word;
  logic [12:0] lk_key;
  logic lk_hit, train_en, pred_update, pred_correct;
  logic [31:0] stat_steps, stat_hits, stat_misses, stat_pred_ok, stat_last_cycles;
  int checks = 0, failures = 0;

  gp_tile_ctrl #(.DRAIN_CYC(DRAIN)) dut (.*);

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
    automatic int hits = 0, misses = 0, wait_cyc, cyc, okp = 0;
    logic [4:0] exp_block;
    boot_we = 0; step = 0; complete = 0; ctrl_word = '0; state_word = '0;
    lk_hit = 0; lk_next = '0; pred_correct = 0; boot_block = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); boot_we = 1; boot_block = 5'd11;
    @(negedge clk); boot_we = 0;
    check(block == 11, "boot block");
    exp_block = 11;
    for (int s = 0; s < 30; s++) begin
      ctrl_word = {$urandom, $urandom};
      state_word = {$urandom, $urandom};
      lk_hit = 1'($urandom % 2); lk_next = 5'($urandom);
      pred_correct = 1'($urandom % 2);
      step = 1;
      @(negedge clk); step = 0; cyc = 1;
      check(frame_clr && busy, "frame clear");
      for (int i = 0; i < THREADS; i++) begin
        @(negedge clk); cyc++;
        check(!frame_clr && rd_slot == 3'(i), $sformatf("read slot %0d", i));
        if (i > 0) check(load_en && load_slot == 3'(i - 1), "load behind read");
        else       check(!load_en, "load too early");
      end
      @(negedge clk); cyc++;
      check(sys_start && load_en && load_slot == 3'(THREADS - 1), "start after the last load");
      check(lk_key == {exp_block, ctrl_word[7:0]}, "look-up key");
      wait_cyc = $urandom % 20;
      for (int w = 0; w < wait_cyc; w++) begin
        @(negedge clk); cyc++;
        check(!sys_start && !train_en && !pred_update && block == exp_block, "moved before completion");
      end
      @(negedge clk); cyc++;
      complete = 1;
      #1;
      check(next_block == (lk_hit ? lk_next : state_word[4:0]), "next block choice");
      check(train_en == !lk_hit && (lk_hit || train_next == state_word[4:0]), "training");
      check(pred_update, "predictor update");
      exp_block = lk_hit ? lk_next : state_word[4:0];
      if (lk_hit) hits++; else misses++;
      if (pred_correct) okp++;
      @(negedge clk); cyc++;
      complete = 0;
      check(block == exp_block, "block not advanced");
      for (int d = 0; d < DRAIN; d++) begin
        check(!step_done && busy, "done during drain");
        @(negedge clk); cyc++;
      end
      @(negedge clk);
      check(step_done && !busy, "step_done");
      check(stat_steps == 32'(s + 1) && stat_hits == 32'(hits) && stat_misses == 32'(misses), "counters");
      check(stat_pred_ok == 32'(okp), "prediction counter");
      check(stat_last_cycles == 32'(cyc), $sformatf("cycles %0d vs %0d", stat_last_cycles, cyc));
      check(cyc == 1 + THREADS + 1 + wait_cyc + 1 + 1 + DRAIN, "cycle formula");
      @(negedge clk);
      check(!step_done, "step_done longer than one cycle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
