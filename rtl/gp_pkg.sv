// gp_pkg: types and constants shared by the grid-processor VHDL emulator.
//
// The emulator runs one emulated clock cycle as one "frame": a block (map) of
// instructions is loaded into every processing element (PE), the input vector
// is injected into the top row of the grid, data flows down the mesh from PE to
// PE, and the bottom row delivers results to the output system.
//
// Following the paper: 64-bit data links, thread IDs (TID) carried with every
// packet, up to three operands per ALU instruction, up to three destinations.
// Own choices: 8 thread slots per PE (TID_W = 3), a 6-bit slot tag that names an
// operand (in a PE) or an output word (in the output system), a 16-bit sign-
// extended immediate, and the instruction encoding below.
package gp_pkg;

  localparam int unsigned DATA_W  = 64;          // link and word width
  localparam int unsigned TID_W   = 3;           // thread ID width
  localparam int unsigned THREADS = 1 << TID_W;  // reservation-station slots per PE
  localparam int unsigned IDX_W   = 6;           // slot tag: operand 0..2 or output word 0..63
  localparam int unsigned IMM_W   = 16;          // immediate field width
  localparam int unsigned NUM_IN  = 64;          // input buffer entries (words)
  localparam int unsigned NUM_OUT = 64;          // output buffer entries (words)
  localparam int unsigned SRC_W   = 7;           // injection source: 0..63 input, 64..127 register

  typedef logic [DATA_W-1:0] word_t;

  // One packet on a unidirectional mesh link. There is no ready signal: the
  // receiver always accepts (non-blocking receive, no request/response).
  typedef struct packed {
    logic             valid;
    logic [TID_W-1:0] tid;
    logic [IDX_W-1:0] idx;
    word_t            data;
  } pkt_t;

  // ALU operations: bitwise standard-cell style functions plus add/subtract.
  typedef enum logic [4:0] {
    OP_PASS  = 5'd0,   // forward operand a
    OP_ADD   = 5'd1,
    OP_SUB   = 5'd2,
    OP_AND   = 5'd3,
    OP_OR    = 5'd4,
    OP_XOR   = 5'd5,
    OP_NAND  = 5'd6,
    OP_NOR   = 5'd7,
    OP_XNOR  = 5'd8,
    OP_NOT   = 5'd9,
    OP_AND3  = 5'd10,
    OP_OR3   = 5'd11,
    OP_XOR3  = 5'd12,
    OP_AOI21 = 5'd13,  // ~((a & b) | c)
    OP_OAI21 = 5'd14,  // ~((a | b) & c)
    OP_MUX   = 5'd15,  // c ? b : a, bit by bit
    OP_ADD3  = 5'd16   // a + b + c
  } alu_op_e;

  // One destination of an instruction's result: the output link it leaves on
  // is the position in the instruction's dest array (0 down-left, 1 down,
  // 2 down-right).
  typedef struct packed {
    logic             en;
    logic [TID_W-1:0] tid;
    logic [IDX_W-1:0] idx;
  } dest_t;

  // One instruction held in a reservation-station slot. Operands whose bit in
  // `need` is clear are not waited for and take the sign-extended immediate.
  typedef struct packed {
    logic             valid;
    alu_op_e          op;
    logic [2:0]       need;
    logic [IMM_W-1:0] imm;
    dest_t [2:0]      dest;
  } instr_t;

  localparam int unsigned INSTR_W = $bits(instr_t);

  // Injection-table entry: which word the input system sends to a top-row PE.
  typedef struct packed {
    logic             valid;
    logic [SRC_W-1:0] src;
  } inj_t;

  // Targets of the programming port through which the compiler's tables are loaded.
  typedef enum logic [2:0] {
    PT_INSTR   = 3'd0,  // addr = {block, slot, pe},           data = instr_t
    PT_INJECT  = 3'd1,  // addr = {block, thread, col, k},     data = inj_t
    PT_OUTMASK = 3'd2,  // addr = {block, thread},             data = 64-bit output mask
    PT_SENS    = 3'd3,  // addr = {block, thread, half},       data = 64 bits of sensitivity
    PT_NSCACHE = 3'd4,  // addr = set,                         data = {valid, tag, next}
    PT_START   = 3'd5   // addr = first block after reset
  } prog_tgt_e;

  typedef struct packed {
    logic      we;
    prog_tgt_e tgt;
    logic [15:0] addr;
    word_t     data;
  } prog_t;

endpackage
