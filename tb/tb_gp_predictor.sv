// tb_gp_predictor: feeds a repeating block sequence. After one pass the
// predictor must be right every time; a sequence change must be mispredicted
// once and then learnt. Compares against a reference history table.
module tb_gp_predictor;
  logic clk = 0, rst_n = 0;
  logic [4:0] cur_block, pred_block, actual_next;
  logic pred_valid, update, was_correct;
  int checks = 0, failures = 0;

  gp_predictor dut (.*);

  always #5 clk = ~clk;

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

  initial begin
    automatic int seq_a [6] = '{3, 7, 1, 7, 20, 9};
    automatic int seq_b [6] = '{3, 7, 1, 7, 21, 9};
    int correct, wrong;
    update = 0; cur_block = 0; actual_next = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int pass = 0; pass < 8; pass++) begin
      correct = 0; wrong = 0;
      for (int i = 0; i < 6; i++) begin
        @(negedge clk);
        cur_block   = 5'(pass < 4 ? seq_a[i] : seq_b[i]);
        actual_next = 5'(pass < 4 ? seq_a[(i + 1) % 6] : seq_b[(i + 1) % 6]);
        update = 1;
        @(negedge clk);
        update = 0;
        if (was_correct) correct++; else wrong++;
      end
      // block 7 occurs twice with different successors: only the history tells them apart
      if (pass == 2 || pass == 3 || pass >= 5) check(correct == 6, $sformatf("pass %0d: %0d right", pass, correct));
      if (pass == 0) check(correct == 0, "predicted before training");
      if (pass == 4) check(wrong >= 1, "sequence change not mispredicted");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
