// tb_gp_ns_cache: empty after reset; compiler-initialised entries hit; misses
// are trained and then hit; a different key that maps to the same set must not
// hit (full-key tag); an init write with valid clear removes an entry.
module tb_gp_ns_cache;
  import gp_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [12:0] lk_key, train_key;
  logic lk_hit, train_en, init_we;
  logic [4:0] lk_next, train_next;
  logic [5:0] init_set;
  word_t init_data;
  int checks = 0, failures = 0;

  gp_ns_cache dut (.*);

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

  function automatic logic [5:0] set_of(input logic [12:0] k);
    return k[5:0] ^ k[11:6] ^ {5'b0, k[12]};
  endfunction

  initial begin
    logic [4:0] ref_next [logic [12:0]];
    logic [12:0] k, k2;
    train_en = 0; init_we = 0; lk_key = '0; train_key = '0; train_next = '0; init_set = '0; init_data = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 20; n++) begin
      lk_key = 13'($urandom); #1; check(!lk_hit, "hit after reset");
    end
    // compiler initialisation
    @(negedge clk);
    k = 13'h0A53;
    init_we = 1; init_set = set_of(k); init_data = '0;
    init_data[63] = 1; init_data[17:5] = k; init_data[4:0] = 5'd17;
    @(negedge clk); init_we = 0;
    lk_key = k; #1; check(lk_hit && lk_next == 17, "initialised entry");
    // training
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      k = 13'($urandom);
      lk_key = k; #1;
      if (ref_next.exists(k)) check(lk_hit && lk_next == ref_next[k], "trained entry");
      if (!lk_hit) begin
        train_en = 1; train_key = k; train_next = 5'($urandom);
        // evict any other key with the same set from the reference
        foreach (ref_next[kk]) if (set_of(kk) == set_of(k)) ref_next.delete(kk);
        ref_next[k] = train_next;
        @(negedge clk); train_en = 0;
        lk_key = k; #1; check(lk_hit && lk_next == ref_next[k], "hit after training");
      end
      // aliasing key: same set, different key
      k2 = k ^ 13'h0041;   // flips bit 0 and bit 6: same fold
      lk_key = k2; #1;
      if (!ref_next.exists(k2)) check(!lk_hit, "false hit on aliasing key");
    end
    // invalidate
    @(negedge clk);
    init_we = 1; init_set = set_of(k); init_data = '0;
    @(negedge clk); init_we = 0;
    lk_key = k; #1; check(!lk_hit, "entry still valid after invalidation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
