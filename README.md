# MCMG logic block: a LUT with a configuration cache and multiple contexts

Conventional FPGAs reconfigure slowly and waste table bits: a 6-input LUT that
implements a 2-input function leaves most of its 64 bits idle, and loading a
new circuit means shifting in a whole new bitstream. This logic block attacks
both problems at the level of a single cell:

* the 6-input, 3-output look-up table can be **split** (three 2-LUTs, two
  3-LUTs) or used whole (one 6-LUT), so small functions do not occupy a full
  table;
* the same 64 table bits can hold **several planes** of a smaller LUT (8 planes
  of a 3-LUT, 4 of a 4-LUT, 2 of a 5-LUT), switched by a context-select input
  with no clock, so mutually exclusive pieces of logic (the branches of a
  `case` or an `if`) share one cell;
* a small **configuration data cache (CDC)** next to the LUT holds 16 complete
  contexts. It has its own write port, so the next configuration can be
  written while the LUT works, and any cached context is swapped in with one
  clock edge.

The RTL is the logic block itself. The routing channels around it are not
part of it: its inputs and outputs are plain ports.

## Block structure

```
            cdc_wr_*                         ctx_sel (plane switch)
               |                                   |
           +---v---+  context   +----------+  bits,mode  +----------+  3  +--------------+
           |  cdc  |----------->| cfg_ctrl |------------>| mcmg_lut |---->| lb_out_stage |--> lb_out[2:0]
           | 16 x  |<-----------| (active  |             | 6 in     |     | FF + bypass  |
           | 70 b  |  rd_addr   | context) |--use_ff---------------------->| per output   |
           +-------+            +----------+             +----^-----+     +--------------+
                                     ^                        |
                       ctx_load, ctx_load_addr            lut_in[5:0]
```

| File | Module | Role |
|---|---|---|
| `rtl/mcmg_pkg.sv` | package | sizes, mode codes, `context_t` |
| `rtl/mcmg_lut.sv` | `mcmg_lut` | the six-mode LUT (combinational) |
| `rtl/cdc.sv` | `cdc` | context memory, 1 write port, 1 asynchronous read port |
| `rtl/cfg_ctrl.sv` | `cfg_ctrl` | active-context register and load control |
| `rtl/lb_out_stage.sv` | `lb_out_stage` | one flip-flop and bypass selector per output |
| `rtl/rc_logic_block.sv` | `rc_logic_block` | top: the four parts wired together |

## A context

A context is everything the LUT needs to become a circuit
(`mcmg_pkg::context_t`, 70 bits):

| Bits | Field | Meaning |
|---|---|---|
| 69:67 | `use_ff` | per output, 1 = drive the flip-flop, 0 = drive the LUT output directly |
| 66:64 | `mode` | one of the six modes below |
| 63:0 | `bits` | the truth-table plane |

## The six LUT modes and how they address the table

The single most important thing to understand is how the 64 table bits are
indexed. In every mode the output is the table bit whose index is the
concatenation `{plane, inputs}`:

| Code | Mode | Inputs used | Table bits | Output |
|---|---|---|---|---|
| 0 | (a) three 2-LUTs | LUT j: `lut_in[2j+1:2j]` | `bits[4j +: 4]` | `lut_out[j]`, j = 0..2 |
| 1 | (b) two 3-LUTs | LUT j: `lut_in[3j+2:3j]` | `bits[8j +: 8]` | `lut_out[j]`, j = 0..1 |
| 2 | (c) one 6-LUT | `lut_in[5:0]` | `bits[lut_in]` | `lut_out[0]` |
| 3 | (d) 3-LUT x 8 planes | `lut_in[2:0]`, plane `ctx_sel[2:0]` | `bits[{ctx_sel, lut_in[2:0]}]` | `lut_out[0]` |
| 4 | (e) 4-LUT x 4 planes | `lut_in[3:0]`, plane `ctx_sel[1:0]` | `bits[{ctx_sel[1:0], lut_in[3:0]}]` | `lut_out[0]` |
| 5 | (f) 5-LUT x 2 planes | `lut_in[4:0]`, plane `ctx_sel[0]` | `bits[{ctx_sel[0], lut_in[4:0]}]` | `lut_out[0]` |
| 6, 7 | reserved | – | – | all 0 |

Outputs a mode does not use are 0. Input pins a mode does not use are ignored.

Because the addressing is uniform, a mode (d) table and a mode (e) table
describing the same eight functions are bit-for-bit identical: in mode (e) the
lowest select bit simply arrives as the fourth LUT input instead of through
`ctx_sel`. The ALU testbench uses exactly this.

**Planes versus cached contexts.** There are two levels of "context":

* *planes* live inside the active 64 bits (modes (d)-(f)) and are chosen by
  `ctx_sel` combinationally, so they can change every cycle, driven by ordinary
  logic such as an opcode;
* *cached contexts* live in the CDC and replace the whole active context
  (table, mode and output selects) on a clock edge.

## Timing

All state changes on the rising edge of `clk`; `rst` is synchronous and
active high.

* **Cache write:** with `cdc_wr_en` high, `cdc_wr_data` lands in slot
  `cdc_wr_addr` at the edge. Writes are allowed in any cycle, also while the
  LUT is in use and in the same cycle as a load.
* **Context load:** with `ctx_load` high, slot `ctx_load_addr` becomes the
  active context at the edge: the LUT computes the new function from the
  next cycle on. `ctx_loaded` is high for the cycle after each load and
  `active_slot`/`active_mode` report the active context. If the same slot is
  written and loaded in one cycle, the load takes the *old* contents.
* **Plane switch:** `ctx_sel` acts immediately (combinational path through the
  LUT).
* **Outputs:** a bypassed output (`use_ff = 0`) follows the LUT in the same
  cycle; a registered one shows the LUT value of the previous cycle.
* **Reset** clears the active context to all zeros (mode (a), empty table,
  all outputs bypassed), so `lb_out` is 0 until a context is loaded, and
  clears the flip-flops. The cache itself is not reset; write a slot before
  loading it.
* **Assertions** in `cdc` and `cfg_ctrl` flag a write or load of a slot beyond
  `CDC_DEPTH` (possible only when the depth is not a power of two) and check
  that `ctx_loaded` follows every load.

## Parameters

| Parameter | Default | Where | Meaning |
|---|---|---|---|
| `CDC_DEPTH` | 16 | `rc_logic_block` | contexts in the cache |
| `DEPTH` | 16 | `cdc`, `cfg_ctrl` | same, per module |
| `K`, `NOUT`, `LUT_BITS` | 6, 3, 64 | `mcmg_pkg` | LUT shape (fixed by the mode definitions) |

16 contexts of 64 table bits make a 1,024-bit cache, the size at which the
architecture study found the block both denser and faster than a
conventional 4-LUT cell (about 2.5x implementation density). With the mode
and output-select bits the cache actually stores 16 x 70 = 1,120 bits. Any
`CDC_DEPTH` of 1 or more works; the address ports are `$clog2(CDC_DEPTH)` wide.

## What follows the architecture and what is this design's own

Taken from the architecture: the 6-input, 3-output LUT; the six modes and
their sizes (three 2-LUTs, two 3-LUTs, one 6-LUT, 3-LUT x 8, 4-LUT x 4,
5-LUT x 2); three mode bits per context; a cache holding several contexts
with mode bits that can be rewritten through its own data line while the LUT
operates; a context switch that is separate from the logic inputs; a flip-flop
with a bypass on each output; and the 1,024-bit cache size.

Chosen here, because the architecture leaves it open:

* the numeric mode codes and the pin/bit assignment of every sub-LUT;
* the load protocol: a one-cycle parallel copy from the cache into the
  active-context register, with an asynchronous cache read;
* storing the output-register selects in each context;
* zero on unused outputs and reserved modes; the reset behaviour;
* a single clock for everything.

Not built: the routing channels and connection blocks. Only their area
(W = a*K + b tracks per channel, 18 tracks for a 6-input LUT with a = 1 and
b = 12) and delay are characterised; no switch pattern is defined, so the
logic block's pins are left as ports.

## Testbenches

Each is self-checking and prints `TB_RESULT checks=N failures=M`.

| Testbench | What it does |
|---|---|
| `tb/tb_mcmg_lut.sv` | all 8 mode codes x random tables x all 64 inputs x all 8 plane selects against a reference model; a per-plane readout of mode (d) |
| `tb/tb_cdc.sv` | fills the cache, random writes with and without `wr_en`, read-before-write on the written slot |
| `tb/tb_cfg_ctrl.sv` | reset over load, random loads from every slot, hold without load, `loaded` pulse, reset mid-run |
| `tb/tb_lb_out_stage.sv` | random data and selects, one-cycle delay on registered outputs |
| `tb/tb_rc_logic_block.sv` | end-to-end at the default size: 40,000 cycles of random cache writes, loads, inputs and plane switches against a cycle model; fails unless every mode, plane switching, writes during operation, a write and load of the same slot, and both output kinds all occurred |
| `tb/tb_alu16_mcmg.sv` | the 16-bit, 8-operation ALU below, on 32 logic blocks |

`tb/mcmg_ref_pkg.sv` holds the reference LUT model the testbenches share.

### ALU16 on multi-context LUTs

The workload used to judge modes (d) and (e) is a 16-bit ALU with registered
operands A, B, an operation register C and a result register Q, offering OR,
AND, XOR, NOT, addition, not-equal, greater-than and shift. Each operation is
mutually exclusive with the others, so each goes into its own plane and C
becomes the plane select. `tb_alu16_mcmg` maps it onto two rows of 16 logic
blocks:

* a **chain row**, unregistered: block i sees `a_i, b_i` and the previous
  block's chain bit, and computes the carry (ADD), the running not-equal
  (NE), the running greater-than from the LSB up (GT), or passes `a_i` (SHIFT);
* a **result row**, registered (this is Q): block i sees `a_i, b_i` and chain
  bit i-1 and produces the result bit; block 0 takes chain bit 15 instead, so
  NE and GT land in Q[0].

Operation codes 0..7 are OR, AND, XOR, NOT A, ADD, NE, GT, A<<1; NOT acting
on A, SHIFT being a left shift by one and the comparison result in bit 0 are
this testbench's readings of the operation names. The test runs 3,000 random
vectors in mode (d), writes mode (e) contexts into cache slot 1 of all 32 blocks
while those vectors are still running, swaps them in with one load, and runs
3,000 more. Every result is compared with a behavioural ALU one clock after
the operands.

## Simulating

Any testbench builds with plain Verilator 5, packages first:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/mcmg_pkg.sv tb/mcmg_ref_pkg.sv \
  rtl/mcmg_lut.sv rtl/cdc.sv rtl/cfg_ctrl.sv rtl/lb_out_stage.sv rtl/rc_logic_block.sv \
  tb/tb_rc_logic_block.sv --top-module tb_rc_logic_block -Mdir obj
./obj/Vtb_rc_logic_block
```

Replace the last testbench file and top name for another test
(`tb_alu16_mcmg` does not need `mcmg_ref_pkg.sv`). Every test finishes in well
under a second. To lint the RTL alone:
`verilator --lint-only -Wall -Irtl rtl/mcmg_pkg.sv rtl/rc_logic_block.sv`.

## Changing the design

* **Cache size:** set `CDC_DEPTH`. Nothing else depends on it.
* **Context format:** `context_t` in `mcmg_pkg` is the single definition; the
  cache width follows it.
* **Mode assignment:** all pin and bit choices are in the `case` of
  `mcmg_lut`; the reference model in `tb/mcmg_ref_pkg.sv` computes the same
  thing from base address and local index and must be changed with it.
