// tb_gp_pe: one PE running two threads. Thread 2 adds two operands arriving on
// different channels and fans the sum out on the down and down-right links;
// thread 5 waits for three operands arriving on one channel over three cycles
// and sends an AOI21 down-left. Checks values, tags and the two-cycle hop
// latency (packet in cycle n, result on the link in cycle n+2).
module tb_gp_pe;
  import gp_pkg::*;

  logic clk = 0, rst_n = 0;
  logic frame_clr, load_en;
  logic [TID_W-1:0] load_slot;
  instr_t load_instr;
  pkt_t [2:0] in_pkt, out_pkt;
  int checks = 0, failures = 0;

  gp_pe dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic pkt_t mk(input int tid, input int idx, input word_t d);
    pkt_t p; p.valid = 1; p.tid = TID_W'(tid); p.idx = IDX_W'(idx); p.data = d; return p;
  endfunction

  initial begin
    instr_t i2, i5;
    word_t x, y, z;
    frame_clr = 0; load_en = 0; load_slot = '0; load_instr = '0; in_pkt = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 50; n++) begin
      i2 = '0; i2.valid = 1; i2.op = OP_ADD; i2.need = 3'b011;
      i2.dest[1] = '{en: 1, tid: 3'd1, idx: 6'd2};
      i2.dest[2] = '{en: 1, tid: 3'd4, idx: 6'd0};
      i5 = '0; i5.valid = 1; i5.op = OP_AOI21; i5.need = 3'b111;
      i5.dest[0] = '{en: 1, tid: 3'd6, idx: 6'd40};
      @(negedge clk); frame_clr = 1;
      @(negedge clk); frame_clr = 0;
      load_en = 1; load_slot = 3'd2; load_instr = i2;
      @(negedge clk); load_slot = 3'd5; load_instr = i5;
      @(negedge clk); load_en = 0;
      x = {$urandom, $urandom}; y = {$urandom, $urandom}; z = {$urandom, $urandom};
      // thread 2: both operands in one cycle, on channels 0 and 2
      in_pkt[0] = mk(2, 1, y); in_pkt[2] = mk(2, 0, x);
      @(negedge clk); in_pkt = '0;
      check(out_pkt == '0, "output one cycle after input");
      @(negedge clk);
      check(out_pkt[1].valid && out_pkt[1].data == x + y && out_pkt[1].tid == 1 && out_pkt[1].idx == 2,
            "down link of thread 2");
      check(out_pkt[2].valid && out_pkt[2].data == x + y && out_pkt[2].tid == 4 && out_pkt[2].idx == 0,
            "down-right link of thread 2");
      check(!out_pkt[0].valid, "unexpected down-left packet");
      // thread 5: three operands over three cycles on channel 1
      in_pkt[1] = mk(5, 0, x); @(negedge clk);
      in_pkt[1] = mk(5, 1, y); @(negedge clk);
      check(out_pkt == '0, "thread 5 fired early / thread 2 fired twice");
      in_pkt[1] = mk(5, 2, z); @(negedge clk);
      in_pkt = '0;
      @(negedge clk);
      check(out_pkt[0].valid && out_pkt[0].data == ~((x & y) | z) &&
            out_pkt[0].tid == 6 && out_pkt[0].idx == 40, "thread 5 result");
      check(!out_pkt[1].valid && !out_pkt[2].valid, "thread 5 wrong links");
      @(negedge clk);
      check(out_pkt == '0, "repeat output");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
