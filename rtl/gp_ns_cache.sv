// gp_ns_cache: cache of next-block (next-state) look-ups.
//
// The emulated design runs as a switch over its states: when a block finishes,
// the next block is found by looking up the current block and the inputs. As
// the paper proposes, this look-up is kept in a cache that the compiler can
// initialise and that is trained while the emulation runs. Here the key is
// {current block, low CTRL_W bits of input word 0} (the compiler places the
// inputs that steer the state machine there: own choice). The cache is direct
// mapped with SETS entries; the whole key is stored as the tag so that a hit is
// never wrong. Look-up is combinational; init_* (compiler) and train_* (miss
// resolved by the grid) write one entry per cycle, train_* taking precedence.
// Reset invalidates all entries.
// init_data layout: bit 63 valid, then the key, then the next block in the
// low BLK_W bits.
module gp_ns_cache
  import gp_pkg::*;
#(
  parameter int unsigned NUM_BLOCKS = 32,
  parameter int unsigned CTRL_W     = 8,
  parameter int unsigned SETS       = 64,
  localparam int unsigned BLK_W     = $clog2(NUM_BLOCKS),
  localparam int unsigned KEY_W     = BLK_W + CTRL_W,
  localparam int unsigned SET_W     = $clog2(SETS)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic [KEY_W-1:0] lk_key,
  output logic             lk_hit,
  output logic [BLK_W-1:0] lk_next,
  input  logic             train_en,
  input  logic [KEY_W-1:0] train_key,
  input  logic [BLK_W-1:0] train_next,
  input  logic             init_we,
  input  logic [SET_W-1:0] init_set,
  input  word_t            init_data
);

  typedef struct packed {
    logic [KEY_W-1:0] key;
    logic [BLK_W-1:0] next;
  } entry_t;

  entry_t            ent_q [SETS];
  logic [SETS-1:0]   val_q;

  // Set index: the key folded onto SET_W bits by XOR.
  function automatic logic [SET_W-1:0] set_of(input logic [KEY_W-1:0] key);
    logic [SET_W-1:0] s;
    s = '0;
    for (int i = 0; i < KEY_W; i++) s[i % SET_W] ^= key[i];
    return s;
  endfunction

  logic [SET_W-1:0] lk_set;
  assign lk_set  = set_of(lk_key);
  assign lk_hit  = val_q[lk_set] && ent_q[lk_set].key == lk_key;
  assign lk_next = ent_q[lk_set].next;

  always_ff @(posedge clk) begin
    if (train_en)
      ent_q[set_of(train_key)] <= '{key: train_key, next: train_next};
    else if (init_we)
      ent_q[init_set] <= '{key: init_data[BLK_W +: KEY_W], next: init_data[BLK_W-1:0]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        val_q <= '0;
    else if (train_en) val_q[set_of(train_key)] <= 1'b1;
    else if (init_we)  val_q[init_set] <= init_data[DATA_W-1];
  end

endmodule
