// tb_gp_out_router: a result with random destination fields must appear on the
// enabled links one cycle later, with the destination's tid and tag.
module tb_gp_out_router;
  import gp_pkg::*;

  logic clk = 0, rst_n = 0;
  logic res_valid;
  word_t res_data;
  dest_t [2:0] res_dest;
  pkt_t [2:0] out_pkt;
  int checks = 0, failures = 0;

  gp_out_router dut (.clk, .rst_n, .res_valid, .res_data, .res_dest, .out_pkt);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic v; word_t d; dest_t [2:0] ds;
    res_valid = 0; res_data = '0; res_dest = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      res_valid = 1'($urandom % 2);
      res_data  = {$urandom, $urandom};
      for (int d2 = 0; d2 < 3; d2++) res_dest[d2] = dest_t'($urandom);
      v = res_valid; d = res_data; ds = res_dest;
      @(negedge clk);
      res_valid = 0;
      for (int k = 0; k < 3; k++) begin
        checks++;
        if (out_pkt[k].valid !== (v && ds[k].en) ||
            (out_pkt[k].valid && (out_pkt[k].data !== d || out_pkt[k].tid !== ds[k].tid ||
                                  out_pkt[k].idx !== ds[k].idx))) begin
          failures++;
          $display("FAIL link %0d", k);
        end
      end
      @(negedge clk);
      checks++;
      if (out_pkt[0].valid || out_pkt[1].valid || out_pkt[2].valid) begin
        failures++;
        $display("FAIL packet repeated");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
