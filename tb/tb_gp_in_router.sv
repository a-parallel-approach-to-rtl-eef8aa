// tb_gp_in_router: random packets on three channels; checks that each lands
// on the slot named by its thread ID and the operand named by its tag, and that
// tags above 2 are dropped.
module tb_gp_in_router;
  import gp_pkg::*;

  logic clk = 0;
  pkt_t [2:0] in_pkt;
  logic  [THREADS-1:0][2:0] wr_en;
  word_t [THREADS-1:0][2:0] wr_data;
  int checks = 0, failures = 0;

  gp_in_router #(.CH(3)) dut (.clk, .in_pkt, .wr_en, .wr_data);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic  [THREADS-1:0][2:0] exp_en;
    word_t [THREADS-1:0][2:0] exp_d;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      // three distinct (tid, operand) targets, or a dropped tag
      for (int ch = 0; ch < 3; ch++) begin
        in_pkt[ch].valid = ($urandom % 4) != 0;
        in_pkt[ch].tid   = TID_W'(ch * 2 + ($urandom % 2));   // disjoint per channel
        in_pkt[ch].idx   = ($urandom % 8 == 0) ? IDX_W'(3 + $urandom % 60) : IDX_W'($urandom % 3);
        in_pkt[ch].data  = {$urandom, $urandom};
      end
      exp_en = '0; exp_d = '0;
      for (int ch = 0; ch < 3; ch++)
        if (in_pkt[ch].valid && in_pkt[ch].idx < 3) begin
          exp_en[in_pkt[ch].tid][in_pkt[ch].idx[1:0]] = 1'b1;
          exp_d [in_pkt[ch].tid][in_pkt[ch].idx[1:0]] = in_pkt[ch].data;
        end
      #1;
      checks++;
      if (wr_en !== exp_en) begin
        failures++;
        $display("FAIL en %h exp %h", wr_en, exp_en);
      end
      for (int s = 0; s < THREADS; s++)
        for (int o = 0; o < 3; o++)
          if (exp_en[s][o]) begin
            checks++;
            if (wr_data[s][o] !== exp_d[s][o]) begin
              failures++;
              $display("FAIL data slot %0d op %0d", s, o);
            end
          end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
