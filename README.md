# Grid-processor VHDL emulator

This is SystemVerilog RTL for a hardware emulator that runs a VHDL design on a
grid of very small dataflow processors instead of on an FPGA. The architecture
comes from the paper *A Parallel Approach to Faster VHDL Emulation Using Grid
Processors*. The RTL follows its architecture, and it fills in the many details
the paper leaves open. Those choices are marked below.

The idea:

- A compiler turns each VHDL process into a *thread*. It turns the process's
  register-transfer operations into *instructions* and places one instruction
  on each processing element (PE) of a 2-D mesh.
- Data flows down the mesh from PE to PE. Each PE fires its instruction as soon
  as all its operands have arrived.
- Each emulated clock cycle runs as one *frame*. The threads of one *block* (a
  map of instructions for one state of the emulated machine) run side by side,
  each in its own thread slot of every PE.
- Words are 64 bits wide everywhere, so wide datapaths cost no more than narrow
  ones.

## Contents

| file | part |
|------|------|
| `rtl/gp_pkg.sv` | shared types: packet, instruction, ALU operations, programming port |
| `rtl/gp_top.sv` | two tiles in series, the full two-chip emulator |
| `rtl/gp_tile.sv` | one chip: mesh, input/output systems, instruction cache, control |
| `rtl/gp_tile_ctrl.sv` | sequencing of one emulated cycle, next-block choice |
| `rtl/gp_grid.sv` | the ROWS x COLS mesh of PEs |
| `rtl/gp_pe.sv` | one PE (network node) |
| `rtl/gp_in_router.sv`, `rtl/gp_rs_sched.sv`, `rtl/gp_alu.sv`, `rtl/gp_out_router.sv` | the four parts of a PE |
| `rtl/gp_map_mem.sv` | instruction cache holding the maps of all blocks |
| `rtl/gp_input_system.sv` | input buffer, sensitivity lists, operand injection |
| `rtl/gp_output_system.sv` | output slots, completion detection, output buffer |
| `rtl/gp_ns_cache.sv` | next-state (next-block) cache |
| `rtl/gp_predictor.sv` | next-block predictor |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_gp_fig1.sv` |

## One emulated clock cycle

A `step` strobe on a tile starts one frame. `gp_tile_ctrl` then runs these
phases:

1. **Clear and fetch.** For one cycle, every reservation station of every PE is
   cleared. Then the map of the current block is read from `gp_map_mem`, one
   thread slot per cycle. Each read returns that slot's instruction for all 64
   PEs at once. This takes 8 read cycles, and each load lands one cycle after
   its read.
2. **Input.** The input system latches the 64 input words into its input buffer
   and notes which words changed. Then it takes the eight threads in thread-ID
   order:
   - A thread whose *sensitivity list* contains no changed word is declared
     done at once. This mirrors a VHDL process whose sensitivity list did not
     fire. The output system is told, and that thread's outputs keep their old
     values.
   - A thread that must run gets its operands injected into the top row. Over
     three cycles (operand 0, 1, 2), each top-row column receives the word that
     the compiler's *injection table* names.
   - A source word is an input word (0..63) or a register (64..127). Registers
     are the output buffer's current contents, which is how register state and
     values between processes reach the next cycle.
   - Every thread runs in the first frame after reset.
3. **Flow.** Packets move down the mesh. Each PE issues one ready instruction
   per cycle and sends the result to as many as three neighbours below it. The
   bottom row delivers results to the output system. There, a packet's tag
   names an output word (0..63).
4. **Completion.** The compiler gives, for each block and thread, a mask of the
   output words that thread produces. The frame is complete when three things
   hold:
   - every word in the union of the masks has been filled;
   - the words of skipped threads count as filled;
   - the input system has finished.

   The filled words are then copied into the output buffer. That buffer drives
   the pins and also serves as the register file for the next cycle.
5. **Next block.** See the section "Choosing the next block" below.
6. **Done.** The tile pulses `step_done`. No drain is needed. Packets whose
   results nobody waits for may still be moving through the grid. The next
   clear drops every loaded instruction along with its operands, so such a
   packet only lands in a dead slot. Reloading that slot wipes it.

With the example programs in the testbenches, one emulated cycle takes about
36 to 44 clock cycles at the default size. That is 1 clear, 8 fetch, 1 start,
the input and injection cycles (three per running thread), 16 cycles down the
8 rows, and a few cycles of completion. The controller keeps an optional
`DRAIN_CYC` idle period after completion. The tile sets it to 0.

In `gp_top`, tile 2 starts when tile 1 finishes. Tile 2 reads tile 1's output
buffer as its input words, so one `step` runs the cycle through both chips.

## The mesh and the processing element

Each mesh link is a unidirectional 64-bit packet path with no ready signal. A
receiver always accepts, there is no request/response, and so the mesh cannot
deadlock. PE (r,c) has three input channels, from (r-1,c-1), (r-1,c) and
(r-1,c+1), and three output links, to (r+1,c-1), (r+1,c) and (r+1,c+1).
In-degree and out-degree are therefore three, as the paper specifies. PEs on
the left and right edges simply lack the links that would leave the grid. The
top row's middle channel comes from the input system. The bottom row's middle
link goes to the output system.

A packet (`pkt_t`, 74 bits) carries these fields:

| field | bits | use |
|-------|------|-----|
| `valid` | 1 | marks a packet on the link |
| `tid` | 3 | thread ID: selects the reservation-station slot in the receiving PE |
| `idx` | 6 | operand number 0..2 in a PE, or output word 0..63 at the output system |
| `data` | 64 | the value |

Inside a PE (`gp_pe`):

- **`gp_in_router`** turns up to three packets per cycle into operand writes,
  by `tid` and `idx`. An assertion catches two packets aimed at the same
  operand in one cycle.
- **`gp_rs_sched`** has one slot per thread. Each slot holds the loaded
  instruction, three operand registers with presence bits, and a fired bit. A
  slot is ready when every operand its `need` mask asks for is present. Among
  the ready slots, one is picked "at random": a 16-bit LFSR chooses where a
  round-robin search starts. Each instruction fires once per frame.
- **`gp_alu`** is combinational and takes up to three operands. It offers PASS
  (forward), ADD, SUB, AND, OR, XOR, NAND, NOR, XNOR, NOT, AND3, OR3, XOR3,
  AOI21, OAI21, MUX (c ? b : a, bit by bit) and ADD3.
- **`gp_out_router`** registers the result and puts it on each link that the
  instruction's destination fields enable.

Timing: a packet that arrives in cycle n is stored at the end of n. The
instruction can issue in n+1, and its result is on the output links in n+2. So
each row costs two cycles.

### Instruction format (`instr_t`, 55 bits, MSB first)

| field | bits | meaning |
|-------|------|---------|
| `valid` | 1 | slot holds an instruction |
| `op` | 5 | `alu_op_e` |
| `need` | 3 | operands to wait for. An operand not waited for takes the immediate. |
| `imm` | 16 | immediate, sign-extended to 64 bits |
| `dest[2]` | 10 | down-right link: `{en, tid[2:0], idx[5:0]}` |
| `dest[1]` | 10 | down link |
| `dest[0]` | 10 | down-left link |

A routing step with no computation is a PASS with `need = 3'b001`. A PE with
`valid = 0` in a slot does nothing for that thread. Instructions with
`need = 0` would fire during the fetch, before the frame starts, so they must
not be used.

## Compiler tables and the programming port

Every table is written through one port, `prog` (`prog_t`: `we`, `tgt`,
16-bit `addr`, 64-bit `data`). `gp_top` adds `prog_tile` to choose the chip.
The memories are not reset, so a loader must write every entry of every block
it runs.

| target | address | data | size per tile |
|--------|---------|------|---------------|
| `PT_INSTR` | `{block[4:0], slot[2:0], pe[5:0]}`, pe = row*8+col | `instr_t` in bits 54:0 | 32 x 8 x 64 x 55 bits |
| `PT_INJECT` | `{block, thread, col[2:0], k[1:0]}` | `{valid, src[6:0]}` | 32 x 8 x 8 x 3 x 8 bits |
| `PT_OUTMASK` | `{block, thread}` | 64-bit mask of output words | 32 x 8 x 64 bits |
| `PT_SENS` | `{block, thread, half}` | half 0: input words 63..0, half 1: registers 63..0 | 32 x 8 x 128 bits (32 Kbit) |
| `PT_NSCACHE` | set[5:0] | bit 63 valid, bits 17:5 key, bits 4:0 next block | 64 entries |
| `PT_START` | block in bits 4:0 | - | first block after reset |

The set of a next-state cache key is the key's 13 bits XOR-folded onto 6 bits:
set bit `i` is the XOR of key bits `i`, `i+6` and `i+12`.

## Choosing the next block

The emulated design's control flow is a switch over its states, and each state
has its own block (map). After completion, `gp_tile_ctrl` looks up
`{current block, low 8 bits of input word 0}` in `gp_ns_cache`:

- On a **hit**, the cached block is next.
- On a **miss**, the next block is the value the grid computed into output word
  63 (`STATE_WORD`), and the cache is trained with it.

The compiler may pre-load entries. It must keep them consistent with what the
grid would compute: a cached entry is trusted. The cache is direct-mapped and
stores the whole key, so a hit is never a different key's entry.

`gp_predictor` remembers, for each pair (previous block, current block), which
block came next. Its prediction is compared with the actual next block and
counted (`stat_pred_ok`). The paper suggests starting the predicted block
speculatively. That needs state IDs in every packet and a way to cancel a
wrong frame, which the paper does not specify, and it is **not built**: the
prediction is only measured.

## Sizes

| parameter | default | where |
|-----------|---------|-------|
| PE grid per tile | 8 x 8 | `ROWS`, `COLS` in `gp_top`, `gp_tile`, `gp_grid` |
| tiles | 2 | `gp_top` |
| word / link width | 64 | `gp_pkg::DATA_W` |
| thread slots per PE | 8 | `gp_pkg::TID_W` = 3 |
| input / output words | 64 / 64 | `gp_pkg::NUM_IN`, `NUM_OUT` |
| blocks (maps) | 32 | `NUM_BLOCKS` |
| next-state cache | 64 sets | `NS_SETS` |
| predictor | 1024 entries | `PRED_ENT` |

The grid size follows the paper's floorplan, which shows an 8 x 8 PE grid per
chip. Its area estimate also counts 64 PEs per chip. One sentence in its
conclusion speaks of 64 x 64 arrays instead; this RTL uses 8 x 8, and
`ROWS`/`COLS` can be raised. The 64-entry buffers, the 32 Kbit sensitivity
store, and the maps fitting in 2 Mbit all match the paper's area table. The
thread count, block count, tag and immediate widths, and cache sizes are this
design's own choices. At the defaults, one tile has about 51k flip-flop bits
and 1.1 Mbit of memory.

## Departures and what is not built

- **Data cache and shared data memory.** They are not built. The paper names a
  memory beside the grid for inter-thread values when registers run out, but
  gives no instruction or port for reaching it. In this RTL, a value
  reaches another thread in two ways. It can go through the output-buffer
  registers, one emulated cycle later. Or, within a frame, it can go as a
  packet whose destination thread ID names the other thread.
- **Per-PE data cache.** It is not built, for the same reason.
- **Frame number in packets.** It is omitted. Only one frame is live at a
  time. Stray packets of the previous frame die in invalidated slots, so the
  thread ID and tag are enough.
- **Four input channels.** The paper's node drawing shows four channels, but
  its text says three inputs per cycle and in-degree three. The RTL has three.
- **AOI32.** The paper names AOI32, which needs five inputs, while an
  instruction has at most three operands. AOI21 and OAI21 are provided
  instead.
- **Router buffers.** The paper's area table lists router input and output
  buffers of several Kbit. With one dedicated register per (thread, operand)
  and one result per cycle, no FIFO is needed. The RTL has none beyond a
  one-entry output register.
- **Speculative execution.** The predictor is not used to start a block early
  (see above).
- **Timing.** The invalidate-on-clear rule, the two-cycle hop, the three-cycle injection per
  thread and the use of output word 63 as the state are this design's choices.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/gp_pkg.sv tb/tb_gp_top.sv --top-module tb_gp_top -o sim
./obj_dir/sim
```

| testbench | what it shows |
|-----------|---------------|
| `tb_gp_top` | both tiles at full size. Tile 1 runs four processes over 60 emulated cycles: add/sub that depends on the block, an accumulator register, a 3-operand mux, and the next-state output. Tile 2 combines tile 1's outputs. All 128 words and both blocks are checked every cycle. It also requires that each of these happens at least once: skips, block switches, cache hits, misses, the compiler-set cache entry, and right predictions. |
| `tb_gp_tile` | the same on one tile. A fifth process runs down column 7. Only block 1 waits for its result, so in block 0 its packets are still in the mesh when the step ends. Block 1's run of the same process must then be unaffected by those strays. |
| `tb_gp_fig1` | the paper's two-process example (`A=B; C=A+8` / `F=E; B=C+D`) as registers over 25 cycles |
| `tb_gp_grid` | 8 x 8 mesh: straight and zig-zag diagonal paths, 2 cycles per row |
| `tb_gp_pe` | fan-out, three operands over one channel, two threads, hop latency |
| `tb_gp_rs_sched`, `tb_gp_in_router`, `tb_gp_out_router`, `tb_gp_alu` | PE parts, against reference models. `tb_gp_rs_sched` also checks that operands arriving after a clear fire nothing. |
| `tb_gp_input_system`, `tb_gp_output_system`, `tb_gp_map_mem`, `tb_gp_ns_cache`, `tb_gp_predictor`, `tb_gp_tile_ctrl` | each unit with exact cycle counts where it has a fixed timing |

The testbenches draw random values with `$urandom`. They initialise everything
they read, so they also run on two-state simulators.
