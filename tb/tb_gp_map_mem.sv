// tb_gp_map_mem: writes random instructions to every (block, slot, pe) of a
// reduced memory, then reads each (block, slot) row back; data must appear one
// cycle after the address.
module tb_gp_map_mem;
  import gp_pkg::*;

  localparam int NPE = 16, NB = 4;
  logic clk = 0;
  logic wr_en;
  logic [1:0] wr_block, rd_block;
  logic [TID_W-1:0] wr_slot, rd_slot;
  logic [3:0] wr_pe;
  instr_t wr_instr;
  instr_t [NPE-1:0] rd_instr;
  instr_t model [NB][THREADS][NPE];
  int checks = 0, failures = 0;

  gp_map_mem #(.NPE(NPE), .NUM_BLOCKS(NB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; rd_block = 0; rd_slot = 0;
    for (int b = 0; b < NB; b++)
      for (int s = 0; s < THREADS; s++)
        for (int p = 0; p < NPE; p++) begin
          @(negedge clk);
          wr_en = 1; wr_block = 2'(b); wr_slot = 3'(s); wr_pe = 4'(p);
          wr_instr = instr_t'({$urandom, $urandom});
          model[b][s][p] = wr_instr;
        end
    @(negedge clk); wr_en = 0;
    for (int n = 0; n < 200; n++) begin
      int b, s;
      b = $urandom % NB; s = $urandom % THREADS;
      rd_block = 2'(b); rd_slot = 3'(s);
      @(negedge clk);
      for (int p = 0; p < NPE; p++) begin
        checks++;
        if (rd_instr[p] !== model[b][s][p]) begin
          failures++;
          if (failures < 10) $display("FAIL b%0d s%0d p%0d", b, s, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
