# DUCK: shadow-register reconfiguration for an embedded FPGA and a DART cluster

A dynamically reconfigurable accelerator only helps if switching from one
function to the next is faster than the time budget of a function. Shifting a
whole bitstream through a scan chain takes thousands of cycles, and the
accelerator cannot compute while that happens. Keeping several full contexts
next to every configuration bit (a classical multi-context FPGA) fixes the
time but multiplies the configuration storage.

This design uses a middle path. Every configuration register of the fabric
gets exactly one shadow register, called a **DUCK** (Dynamic Unifier and
reConfiguration blocK). The DUCKs form a word-wide scan path that is
separate from the computing logic:

1. While the fabric computes with the context in its configuration registers,
   the next context is shifted into the DUCKs.
2. A **swap** exchanges DUCK contents and configuration registers. After it the
   fabric runs the new context, and the old one now sits in the DUCKs.
3. The next shift pushes the old context out of the far end of the scan path.
   Saving those words gives **preemption** for free: the interrupted context
   can be brought back later, with its registers' contents.

The scan path is cut into several **reconfiguration domains**. Each domain has
its own configuration memory and controller, so the domains load in parallel.
The computing array stays one piece across domain borders. A domain can also
be reconfigured alone (partial reconfiguration).

Two fabrics use the scheme. They sit side by side in the top module
`duck_top`:

| fabric | grain | size | configuration path | domains | context |
|---|---|---|---|---|---|
| `efpga` | LUT4 logic cells | 8 × 620 = 4960 cells | 6 bits | 8 | 3100 words per domain |
| `dart_cluster` | 16-bit datapaths (DPRs) | 6 DPRs + cluster crossbar | 8 bits | 3 | 22 / 22 / 27 words, 568 bits in total |

## The DUCK and the swap

`duck_reg` is the generic bank. It holds NBITS shadow bits on a W-bit scan
path. When `shift_en` is high, words move one position and the word at the top
leaves on `scan_out`. When `swap_en` is high, the bank loads `swap_d`, which is
the unit's configuration register. In the same cycle the unit's
configuration register loads the bank. Shift and swap in the same cycle are
forbidden, and an assertion checks this. On DART every configuration register
is exchanged this way, all in one cycle.

The e-FPGA logic cell is different. Its 20 configuration bits are already a
serial chain inside the cell (LUT bits and mode bits). The tile DUCK
(`tile_duck`) therefore swaps it with a **counter**. For 20 cycles, one DUCK
bit enters the cell chain per cycle, and the bit leaving the chain is stored
back into the DUCK. After 20 cycles the contents have been exchanged. The
tile's DyRIBox (10 bits) is swapped in parallel in the first cycle. So the
whole e-FPGA is reconfigured in 20 cycles, whatever its size. While the cell
chain is moving, the cell output holds the value from before the swap. This
keeps a half-loaded LUT from driving the mesh.

## Configuration controller and command protocol

`config_ctrl` runs one domain. It reads `config_memory`, which stores
CONTEXTS × WORDS words and has two ports:

- a host port (`h_*`) to load and read back contexts;
- a controller port to stream words and to write back preempted words.

Both ports read synchronously with one cycle of latency. If both write the
same address in the same cycle, the controller's write wins.

A command is accepted when `cmd_valid` and `cmd_ready` are both high.
`done` pulses when the command ends.

| `cmd` | action | `done` after acceptance |
|---|---|---|
| 0 NOP | nothing | — |
| 1 PROPAGATE | Shifts context `cmd_ctx` into the path, one word per cycle. If `cmd_save` is set, the words that fall out are written to context `cmd_save_ctx`. | WORDS + 2 cycles |
| 2 SWAP | Pulses `conf_en`, then waits while the fabric reports `busy`. With `cmd_ff_init` set it then pulses `ff_init`, so every cell output register takes its INIT bit. | 22 cycles (e-FPGA), 3 cycles (DART) |

Memory addresses are `context * WORDS + word`. Word 0 is the first word
shifted in, so it ends at the far end of the path.

The fabric keeps computing during PROPAGATE. Only the swap touches the
computing path. A typical slot is "PROPAGATE(next, save into spare) while
computing, then SWAP". Doing that on a subset of domains is partial
reconfiguration.

## Embedded FPGA

### Tile

Each tile (`efpga_tile`) has three parts:

- a logic cell;
- a 5-input, 5-output DyRIBox;
- the 30-bit tile DUCK, which is 5 words of 6 bits.

The DyRIBox inputs are 0 = west, 1 = north, 2 = east, 3 = south (the
neighbours' route outputs) and 4 = the tile's own cell output. Outputs 0–3
drive the cell's LUT inputs i0–i3. Output 4 is the tile's route output, which
all four neighbours see.

A DyRIBox output can reach P of the N inputs, with a ⌈log2 P⌉-bit select.
Output j reaches inputs `(floor(j*N/M) + s) mod N` for select values
s = 0..P−1. A select value at or above P drives 0. With N = M = 5 and P = 4
this gives 5 × 2 = 10 bits per box. That, plus the 20 logic-cell bits, is the
30 bits per tile.

A tile context is `{drb[9:0], lc[19:0]}`. Scan word k of the tile is bits
`[29-6k -: 6]`.

### Logic cell

| bits | meaning |
|---|---|
| [15:0] | LUT4 truth table |
| 16 | carry select: the carry input replaces i0 |
| 17 | INIT value, loaded into the output register on `ff_init` |
| 18 | SEQ: the output comes from the register, not directly from the LUT |
| 19 | RAM mode: `ram_we` writes `ram_din` into the LUT bit addressed by i |

`carry_out = i1&i2 | a0&(i1^i2)`, where a0 is i0 or the carry input.

While reset is asserted, the cell output is forced low. Configuration
registers power up with arbitrary contents. Without this, a random LUT in a
routed ring could oscillate before reset has cleared the registers.

### Domain and array

An `efpga_domain` is a ROWS × COLS mesh of tiles. The tile DUCKs are chained
in row-major order into one 6-bit path. The carry chain runs west to east
along each row. The domain's `busy` output is the OR of its tiles'
serial-swap counters.

`efpga` places DR × DC domains and stitches their edges into one
40 × 124 tile array at the default size. Each domain has its own
memory/controller pair and its own command port.

The host reaches every configuration memory through one port. `h_dom`
selects the domain, and read data comes back one cycle later.

**Combinational loops.** Route outputs are combinational. A configuration
can close a loop through neighbouring tiles, just as on any FPGA, so
Verilator reports `UNOPTFLAT` on the mesh. The tile logic itself has no
loop. The serial swap cannot create a transient loop, because of the hold
described above.

## DART cluster

### DPR

A DPR (`dart_dpr`) contains:

- four address generators, each with a 64-word data memory;
- two registers;
- two add/sub FUs and two multiplier FUs;
- a multi-bus with 18 sources and 10 destinations.

Each AG steps +1 per cycle when enabled and restarts at 0 on every swap.

The 18 bus sources are, in order:

- 0–3: memory read data
- 4–5: reg1, reg2
- 6–9: FU outputs
- 10–17: the eight cluster lanes

The 10 bus destinations are the two register inputs and the eight FU
operands.

The 88-bit DPR context is made of:

- 38 unit bits:
  - 4 AG enable bits
  - 6 register bits
  - 2 × 3 add/sub bits
  - 2 × 11 multiplier bits
- 50 multi-bus bits (10 selects of 5 bits)

This is 11 eight-bit words.

Memories are filled from the host (`dm_*`). Memory reads are synchronous.

`dart_fu_addsub` uses 3 bits: op[1:0] = ADD, SUB, ABS, AND, and bit 2 = two
8-bit SIMD lanes.

`dart_fu_mul` uses 11 bits:

| bits | field |
|---|---|
| [3:0] | input shift |
| [5:4] | MUL, MAC, ADD, SUB |
| [6] | SIMD |
| [10:7] | output shift |

The multiplier is signed. MAC adds the product to the FU's own registered output, which the DPR feeds back.

### Cluster crossbar and domains

Each DPR offers 10 sources (4 memories, 2 registers, 4 FUs), so the cluster
has 60. The cluster crossbar is a DyRIBox with N = 60, M = 8 lanes, P = 30,
which gives 8 × 5 = 40 bits. The lanes go into every DPR and out on
`da_lanes`.

The 568-bit cluster context is split into three domains:

| domain | contents | words |
|---|---|---|
| 0 | DPR0–1 | 22 |
| 1 | DPR2–3 | 22 |
| 2 | DPR4–5 and the crossbar | 27 |

Commanding all three domains together swaps the whole cluster in one cycle.

## Top level

`duck_top` has only `clk` and `rst_n` in common. The e-FPGA ports are
prefixed `fp_` and the DART ports `da_`. Commands are 2-bit values with the
encoding above. The e-FPGA exposes its four mesh edges, row carries,
per-domain RAM write strobes and the host configuration port. The DART
cluster exposes its host configuration port, the data-memory fill port and
the crossbar lanes.

## Sizes and timing

- **e-FPGA:** 8 domains × 620 cells = 4960 cells. This holds the largest
  WCDMA function considered (a searcher of 4953 cells). An 8-domain
  context is 8 × 3100 six-bit words, and each domain loads its 3100 words in
  parallel with the others (3102 cycles). At a 300 MHz configuration rate
  that is 10.3 µs, well under a 22.2 µs function slot. The swap takes 20
  cycles.
- **DART:** 568 bits per context, 71 words. The longest domain is 27 words.
  The shortest function slot considered is 8 cycles at 93 MHz (86 ns).
  27 words at 300 MHz is 90 ns. Three domains is the split that brings a
  full context close to that slot.

## Departures and limits

- **One clock.** Configuration and computing share `clk`. Loading at a
  faster configuration clock would need a clock-domain crossing around the
  memories and the scan path, which is not built. In cycles, a full e-FPGA
  domain load (3102) is therefore longer than a 1024-cycle function.
- **Swap of an identical context.** Swapping in a context identical to the
  running one should not disturb computation. That holds for the DyRIBox
  and for DART. On a logic cell, however, the output is frozen at its last
  value during the 20-cycle serial exchange, so a combinational cell
  produces stale outputs for those cycles.
- **Bit count.** The cluster context is 568 bits. One published derivation
  of the DART propagation time uses 580 bits. The design keeps 568, which is
  the sum of its parts.
- **Own choices.** Not specified by the source design and chosen here:
  - the exact bit layout of the logic cell and FUs;
  - the FU operation sets;
  - the DyRIBox reach rule;
  - the tile routing (a single route output per tile);
  - the word order;
  - the controller's command interface and latencies;
  - the number of stored contexts (4 for the e-FPGA, 8 for DART);
  - the AG behaviour;
  - the 16-bit DART data width and 64-word memories.
- **Not built:**
  - the static memory used for data exchange between functions on the
    e-FPGA;
  - the DART cluster controller, DMA, dedicated core and cluster data
    memory;
  - any WCDMA function bitstream.

  Data enters through the edge ports and host ports instead.

## Simulating

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. `tb_duck_top` runs the
whole design at its default size. It counts each mechanism and fails if one
never happens. The mechanisms are:

- parallel propagation and the 20-cycle exchange;
- computing during propagation;
- preemption and restore;
- partial reconfiguration;
- `ff_init`;
- RAM mode;
- the DART propagate, one-cycle swap and preemption.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Irtl rtl/duck_pkg.sv rtl/dart_pkg.sv \
    tb/tb_efpga.sv --top-module tb_efpga -Mdir obj_tb_efpga
./obj_tb_efpga/Vtb_efpga
```

The smaller testbenches (`tb_efpga`, `tb_efpga_domain`) override the array
size, for example 2 × 2 domains of 2 × 3 tiles. Change those parameters to
try other sizes. The full-size run builds all 4960 tiles and takes several
minutes.
