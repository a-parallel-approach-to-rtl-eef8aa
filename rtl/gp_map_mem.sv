// gp_map_mem: instruction cache holding the compiler's maps.
//
// A map is the set of instructions that runs one block (one state of the
// emulated machine): for every PE and every thread slot, one instruction. The
// memory is organised so that one read returns slot `rd_slot` of block
// `rd_block` for all NPE PEs at once, matching the paper's instruction
// cache that is wired directly to every element. Reads are synchronous (data
// one cycle after the address). The compiler writes one instruction at a time
// through wr_* (address {block, slot, pe}).
//
// Size: NUM_BLOCKS x THREADS x NPE instructions of INSTR_W bits; with the
// defaults 32 x 8 x 64 x 55 bits = 0.9 Mbit, inside the 2 Mbit L2 cache the
// paper budgets per chip. The number of blocks is this design's choice.
module gp_map_mem
  import gp_pkg::*;
#(
  parameter int unsigned NPE        = 64,
  parameter int unsigned NUM_BLOCKS = 32,
  localparam int unsigned BLK_W     = $clog2(NUM_BLOCKS),
  localparam int unsigned PE_W      = $clog2(NPE)
) (
  input  logic   clk,
  input  logic   wr_en,
  input  logic [BLK_W-1:0] wr_block,
  input  logic [TID_W-1:0] wr_slot,
  input  logic [PE_W-1:0]  wr_pe,
  input  instr_t wr_instr,
  input  logic [BLK_W-1:0] rd_block,
  input  logic [TID_W-1:0] rd_slot,
  output instr_t [NPE-1:0] rd_instr
);

  instr_t [NPE-1:0] mem [NUM_BLOCKS*THREADS];

  always_ff @(posedge clk) begin
    if (wr_en) mem[{wr_block, wr_slot}][wr_pe] <= wr_instr;
    rd_instr <= mem[{rd_block, rd_slot}];
  end

endmodule
