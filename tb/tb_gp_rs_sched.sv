// tb_gp_rs_sched: loads all slots, delivers operands, and checks that each
// instruction issues exactly once, only after all its operands are present,
// with the immediate in place of operands it does not wait for; that a held-
// back operand delays its slot; that operands arriving after a clear issue
// nothing; and that the pick among ready slots varies.
module tb_gp_rs_sched;
  import gp_pkg::*;

  logic clk = 0, rst_n = 0;
  logic frame_clr, load_en;
  logic [TID_W-1:0] load_slot;
  instr_t load_instr;
  logic  [THREADS-1:0][2:0] wr_en;
  word_t [THREADS-1:0][2:0] wr_data;
  logic issue_valid;
  logic [TID_W-1:0] issue_slot;
  instr_t issue_instr;
  word_t issue_a, issue_b, issue_c;
  int checks = 0, failures = 0;

  gp_rs_sched dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  initial begin
    instr_t ins [THREADS];
    word_t  op  [THREADS][3];
    int     seen [THREADS];
    int     first_pick [THREADS];
    int     distinct;
    frame_clr = 0; load_en = 0; load_slot = '0; load_instr = '0; wr_en = '0; wr_data = '0;
    foreach (first_pick[i]) first_pick[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 60; trial++) begin
      @(negedge clk); frame_clr = 1;
      @(negedge clk); frame_clr = 0;
      for (int s = 0; s < THREADS; s++) begin
        ins[s] = instr_t'({$urandom, $urandom});
        ins[s].valid = 1;
        ins[s].op = OP_PASS;
        if (ins[s].need == 0) ins[s].need = 3'b001;
        if (s == 7) ins[s].need = 3'b111;
        for (int o = 0; o < 3; o++) op[s][o] = {$urandom, $urandom};
        load_en = 1; load_slot = TID_W'(s); load_instr = ins[s];
        @(negedge clk);
        check(!issue_valid, "issue before operands");
      end
      load_en = 0;
      // all operands except slot 7 operand 2
      for (int s = 0; s < THREADS; s++)
        for (int o = 0; o < 3; o++) begin
          wr_en[s][o]   = ins[s].need[o] && !(s == 7 && o == 2);
          wr_data[s][o] = op[s][o];
        end
      @(negedge clk);
      wr_en = '0;
      foreach (seen[i]) seen[i] = 0;
      for (int cyc = 0; cyc < 10; cyc++) begin
        if (cyc == 0) check(issue_valid, "nothing ready after operands");
        if (cyc == 0 && issue_valid) first_pick[issue_slot]++;
        if (issue_valid) begin
          word_t e [3];
          for (int o = 0; o < 3; o++)
            e[o] = ins[issue_slot].need[o] ? op[issue_slot][o]
                                           : word_t'(signed'(ins[issue_slot].imm));
          seen[issue_slot]++;
          check(issue_slot != 7, "slot 7 issued with an operand missing");
          check(issue_instr == ins[issue_slot], "wrong instruction issued");
          check(issue_a == e[0] && issue_b == e[1] && issue_c == e[2], "wrong operands");
        end
        @(negedge clk);
      end
      for (int s = 0; s < 7; s++) check(seen[s] == 1, $sformatf("slot %0d issued %0d times", s, seen[s]));
      // deliver the held-back operand
      wr_en[7][2] = 1; wr_data[7][2] = op[7][2];
      @(negedge clk);
      wr_en = '0;
      check(issue_valid && issue_slot == 7 && issue_c == op[7][2], "slot 7 did not issue after last operand");
      @(negedge clk);
      check(!issue_valid, "slot 7 issued twice");
      // after a clear, the old frame's instructions are gone: late operands
      // (stray packets) must not make anything issue before a reload
      @(negedge clk); frame_clr = 1;
      @(negedge clk); frame_clr = 0;
      for (int s = 0; s < THREADS; s++)
        for (int o = 0; o < 3; o++) begin
          wr_en[s][o] = 1'b1; wr_data[s][o] = op[s][o];
        end
      @(negedge clk);
      wr_en = '0;
      for (int cyc = 0; cyc < 3; cyc++) begin
        check(!issue_valid, "old instruction issued after the clear");
        @(negedge clk);
      end
    end
    distinct = 0;
    foreach (first_pick[i]) if (first_pick[i] > 0) distinct++;
    check(distinct >= 3, "pick among ready slots does not vary");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
