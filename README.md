# GREEN: an approximate SIMD/MIMD coarse-grained reconfigurable array

GREEN is a small, homogeneous CGRA for edge devices that process bio-signals and
images. Most of the energy of such kernels goes into multiplication and
division, and most of their operations do not need 16 bits. Every processing
element (PE) of GREEN therefore holds one compact ALU with three properties:

* Multiplication and division share one **approximate logarithmic datapath**:
  Mitchell's method plus a small table of correction coefficients.
* The ALU can **split its 16-bit operands into 4- and 8-bit lanes**. One
  instruction can then do four 4-bit multiplies, two 8-bit divides, or a mix
  such as "one 8-bit add, one 8-bit multiply and one 4-bit divide" (MIMD inside
  one PE).
* Addition stays **exact**. It costs little, and errors in additions hurt the
  quality of results the most.

The array is 8 x 8 PEs on a mesh with diagonal links. Beside it are a context
memory that holds the configuration of each step, and a shared 12 KiB data
memory in four dual-ported banks that can be powered on, off or held in
retention. A controller plays one configuration step per clock cycle, and
stalls the whole array while the data memory serves the columns' loads and
stores.

The RTL is SystemVerilog-2017, synthesizable except for the testbenches, and
needs no vendor primitives.

## Block overview

| File | Block |
|---|---|
| `rtl/green_pkg.sv` | opcodes, slice decode table, context-word layout, source/target codes, correction tables, memory types |
| `rtl/green_lod4.sv`, `rtl/green_lod.sv` | leading-one detector built from 4-bit detectors |
| `rtl/green_coef_rom.sv` | multi-ported correction-coefficient ROM (32 x 16 multiply, 64 x 16 divide) |
| `rtl/green_muldiv.sv` | W-bit approximate multiplier-divider lane |
| `rtl/green_add_slice.sv` | 8-bit adder slice with carry in/out |
| `rtl/green_alu.sv` | the SISD/SIMD/MIMD ALU: four slices, the lane set, the shared ROM |
| `rtl/green_regfile.sv` | 4-entry PE register file with two read ports |
| `rtl/green_pe.sv` | PE: context register, two operand multiplexers, ALU, register file, registered outputs |
| `rtl/green_pe_array.sv` | ROWS x COLS PE mesh with diagonal links |
| `rtl/green_ctx_mem.sv` | context memory, one whole step per read |
| `rtl/green_controller.sv` | step sequencer with prefetch and stall counting |
| `rtl/green_col_port.sv` | per-column load/store port |
| `rtl/green_xbar.sv`, `rtl/green_arbiter.sv` | data crossbar with one round-robin arbiter per bank |
| `rtl/green_data_bank.sv` | one dual-ported bank with on / retention / off |
| `rtl/green_cgra.sv` | top level |

Top-level parameters and their defaults:

| Parameter | Default | Meaning |
|---|---|---|
| `ROWS`, `COLS` | 8, 8 | array size; 8 x 8 is enough for the largest sub-kernels of the target applications |
| `CTX_DEPTH` | 16 | configuration steps held in the context memory (my choice) |
| `NBANKS`, `BANK_WORDS` | 4, 1536 | data memory: 4 x 1536 x 16 bit = 12 KiB |
| `VARIANT` | `VAR_MIMD` | `VAR_SISD` (3 opcodes), `VAR_SIMD` (10) or `VAR_MIMD` (all 16) |

12 KiB holds, for example, a 30-second batch of 16-bit ECG samples taken at
200 Hz (30 x 200 x 2 B = 12,000 B).

## The ALU: slices, lanes and opcodes

This is the part that takes the most care to read.

### Slices

The two 16-bit operands `a` and `b` are cut into four 4-bit **slices**.
Slice 3 holds bits 15:12 and slice 0 holds bits 3:0. Each slice owns two
things:

* 4 bits of each operand, which is the unit of the multiplier-divider.
* One 8-bit adder slice (`green_add_slice`).

Because of this, the lane widths differ by function:

* An n-bit **add** uses n/8 slices.
* An n-bit **multiply or divide** uses n/4 slices.

Every sub-operation writes a result twice as wide as its operands: an 8-bit add
on one slice gives 8 bits, a 16-bit multiply on four slices gives 32 bits.
Slice `i` writes byte `i` of the 32-bit result, `y[8i+7:8i]`, so a group of `s`
slices returns `8s` bits.

### The 16 opcodes

An opcode's name lists its sub-operations from slice 3 downward, and
`green_pkg::decode_op` places them in that order:

| Code | Opcode | Slices 3..0 | Result bytes 3..0 |
|---|---|---|---|
| 0 | ADD32 | add over 3:0 | 32-bit sum of the sign-extended 16-bit operands |
| 1 | MUL16 | mul 3:0 | 32-bit product |
| 2 | DIV16 | div 3:0 | 16.16 quotient |
| 3 | ADD16_ADD16 | add 3:2, add 1:0 | two 16-bit sums of sign-extended bytes |
| 4 | ADD16_ADD8_ADD8 | add 3:2, add 1, add 0 | 16 + 8 + 8 |
| 5 | ADD8x4 | add 3, 2, 1, 0 | four 8-bit sums of sign-extended nibbles |
| 6 | MUL8_MUL8 | mul 3:2, mul 1:0 | two 16-bit products |
| 7 | MUL4x4 | mul 3, 2, 1, 0 | four 8-bit products |
| 8 | DIV8_DIV8 | div 3:2, div 1:0 | two 8.8 quotients |
| 9 | DIV4x4 | div 3, 2, 1, 0 | four 4.4 quotients |
| 10 | ADD8_MUL4_MUL4_MUL4 | add 3, mul 2, 1, 0 | |
| 11 | ADD8_ADD8_DIV8 | add 3, add 2, div 1:0 | |
| 12 | ADD8_MUL8_DIV4 | add 3, mul 2:1, div 0 | an 8-bit multiply on slices 2:1 |
| 13 | ADD8_MUL4_DIV8 | add 3, mul 2, div 1:0 | |
| 14 | MUL8_DIV4_DIV4 | mul 3:2, div 1, div 0 | |
| 15 | ADD16_MUL8 | add 3:2, mul 1:0 | |

Opcodes 0-2 are the SISD set, 3-9 the SIMD set and 10-15 the MIMD set. An ALU
built as a smaller variant returns 0 for opcodes it lacks, and the PE raises
`illegal`.

### Adds

Adds are exact and signed:

* The group's operand field (4, 8 or 16 bits) is sign-extended to the group's
  result width and added on the group's 8-bit adder slices.
* Each slice's carry input is multiplexed: it is 0 at the lowest slice of a
  group and the carry out of the slice below everywhere else.
* So ADD32 is one 32-bit ripple adder, and ADD8x4 is four independent adders.

### Multiplies and divides

Multiplies and divides are unsigned. Partitioning one 16-bit log-domain datapath
would need complicated shifters, so the ALU holds a fixed set of lanes:

* one 16-bit lane;
* three 8-bit lanes, with their lowest slice at 0, 1 and 2 (so that
  ADD8_MUL8_DIV4 can multiply on slices 2:1);
* four 4-bit lanes, one per slice.

All eight lanes read one eight-port coefficient ROM. A lane whose slices are not
assigned to it sees zero operands, so it does not toggle. Only the lane of the
current opcode produces the bytes it owns. The results are what a partitioned
datapath would give.

## Approximate multiply and divide (Mitchell with correction)

`green_muldiv` works on W-bit unsigned operands, where W is 4, 8 or 16.

1. **Logarithm.** A leading-one detector gives `k`, the position of the highest
   set bit. It is built from 4-bit detectors and a priority choice over the
   nibbles. A barrel shift moves the bits below the leading one to the top of a
   `W-1`-bit fraction `x`. Then `log2(a) ≈ k + x`.
2. **Add or subtract.**
   * For a multiply, `L = (ka + kb) + xa + xb + c`.
   * For a divide, `L = (ka + W - kb) + xa - xb - c`. The `+W` scales the
     quotient to W fraction bits.
   * All terms are fixed point with `W-1` fraction bits.
3. **Anti-logarithm.** Split `L` into an integer part `K` and a fraction `f`.
   The result is `(1.f) << K`, truncated to an integer. A second barrel shift
   does this.

Result formats and special cases:

* A product is a 2W-bit integer.
* A quotient is a 2W-bit fixed-point number with W fraction bits.
* A zero operand gives 0.
* `a / 0` gives all ones.
* A negative `L` in a divide gives 0.

**The correction term `c`** comes from the top three bits of each fraction
(`ia`, `ib`, 0..7), which form an 8 x 8 grid. Each coefficient is the average
over its grid cell of the exact error of Mitchell's approximation, stored as an
unsigned Q0.16 fraction:

* Multiply, added:
  * `c = x1·x2` if `(1+x1)(1+x2) < 2`;
  * `c = (1−x1)(1−x2)/2` otherwise.
* Divide, subtracted, with `r = (1+x1)/(1+x2)`:
  * `c = (x1−x2) − (r−1)` if `r ≥ 1`;
  * `c = (1+x1−x2) − (2r−1)` otherwise.

The multiply error is symmetric in the two operands, so only 32 entries are
stored, at address `{max(ia,ib), min(ia,ib)[2:1]}`. Each entry averages the one
or two cells it covers. The divide table has 64 entries at address `{ia, ib}`.

A lane uses the top `W-1` bits of the 16-bit coefficient.

The tables are constants in `green_pkg`. `tb_green_coef_rom` integrates the
formulas above numerically and checks every entry to within 2 LSB.

**Accuracy.** These figures are measured over all operand pairs, except that
16-bit is sampled:

| Case | Relative error |
|---|---|
| 8-bit multiply, maximum | 11.1 % |
| 8-bit divide, maximum | 4.4 % |
| 16-bit multiply, mean | 1.1 % |

The worst cases of the multiply are small operands, where truncating the
product to an integer dominates.

## PE and context word

Each PE has three parts:

* A 32-bit context register.
* Two operand multiplexers. They double as the two read ports of a 4-entry,
  32-bit register file.
* The ALU, followed by a write demultiplexer with registered outputs: one
  towards each of the eight neighbours, and one towards the column bus.

| Bits | Field |
|---|---|
| 31:28 | opcode |
| 27:24 | write target: 0-7 the output towards N, NE, E, SE, S, SW, W, NW; 8 the bus output; 12-15 register entry 0-3; 9-11 nothing |
| 23:20 | operand A source |
| 19:16 | operand B source |
| 15:0 | immediate |

Source codes:

| Code | Source |
|---|---|
| 0 | the immediate, zero-extended |
| 1-8 | the neighbour in direction N … NW (the neighbour's output register that points at this PE) |
| 9 | the column bus |
| 10-13 | register entries 0-3 |
| 14-15 | 0 |

Links are 32 bits wide, but the ALU takes the low 16 bits of each operand. Row 0
is the north edge. A link from outside the array reads 0.

Outputs are registers that keep their value until they are written again. A
value sent east in step `n` can therefore be read by the eastern neighbour in
step `n+1`, or in any later step.

## Steps, memory operations and timing

A **step** is one context word per PE plus one memory-operation word per
column. The memory-operation word (`col_mop_t`) has these fields:

| Bits | Field |
|---|---|
| 31:30 | kind: 0 none, 1 load, 2 store |
| 29:27 | row |
| 12:0 | word address |

* A **load** reads one 16-bit word onto the column bus. Every PE of the column
  can read it as source 9.
* A **store** writes the low 16 bits of the bus output of the PE in `row`.

In the context memory, slot `r*COLS+c` of a step is PE (r,c), and slot
`ROWS*COLS+c` is column c's memory operation.

### Controller states

After `start`, the controller runs steps 0 … `num_steps-1`:

```
cycle  state  context memory          PEs / columns
0      IDLE   read step 0  (start)
1      PRIME  read step 1             load step 0
2..    RUN    read step n+2 on exec   execute step n; on exec load step n+1
```

### When a step ends

A step ends (`exec`) in the first cycle in which every column reports ready:

* A column with no memory operation is ready at once.
* A store is ready in the cycle its request is granted. The word is written at
  that clock edge.
* A load is ready in the cycle its data returns, which is one cycle after the
  grant.

At `exec`, every PE writes its result and the next step is loaded. A step with
no memory operation therefore takes one cycle. A step with a load takes at
least two. Each extra cycle of a bank conflict adds one more. Each cycle of a
step that does not end is counted in `stalls`. `cycles` counts the whole run:

    cycles = num_steps + 2 + stalls

### Why the results do not depend on stalls

* PEs change state only at `exec`.
* Returned load data is parked in the column port and copied onto the column
  bus at `exec`. Loaded data is thus visible from the next step on, whether
  the step stalled for one cycle or for five.
* A store writes the value that the PE's bus output held at the start of the
  step.

Together these make a kernel's results independent of how the banks
arbitrated. The only exception: two columns that access the same word in the
same step see an order that depends on arbitration. A program should not do
that.

### After the run

`done` pulses for one cycle after the last step. The PEs keep the last step's
context. So `illegal` shows the opcodes that step held.

## Data memory

* **Banks.** Four banks of 1536 words each. The bank of an address is
  `address / 1536` and the word within it is `address mod 1536`, so each bank
  holds one contiguous quarter.
* **Ports.** Each bank is dual-ported, with registered read data.
* **Crossbar and arbiters.** The crossbar gives each bank a round-robin arbiter
  over the nine requesters (eight columns and the host). Each arbiter grants at
  most two requests per cycle, one per port.
* **Held requests.** A requester keeps its request up until it is granted. A
  read's data returns with `rvalid` one cycle after the grant.
* **Out-of-range addresses.** An address at or above 6144 is granted at once
  and reads 0. It also sets the sticky `mem_err`.

**Host port.** The host reaches the memory through `hreq`, `hgnt`, `hrvalid`
and `hrdata`, using the same protocol as a column. An assertion checks that the
host holds its request until `hgnt`. The host writes context words one per
cycle with `ctx_we`, `ctx_wstep`, `ctx_wslot` and `ctx_wdata`.

**Power.** Each bank has its own `bank_pwr` input:

| State | Effect |
|---|---|
| `PWR_ON` | normal access |
| `PWR_RET` | contents kept; accesses are ignored and reads return 0 |
| `PWR_OFF` | accesses are ignored and the contents are lost |

Losing the contents is modelled with one valid bit per word. While the bank is
off, all valid bits are cleared, and a word reads 0 until it is written again.
Reset also clears the valid bits, so the memory reads as zeros after reset.

## Departures and limits

* **Two-hop links.** The original architecture also has two-hop links between
  the first and third rows. The PE has no documented multiplexer input for
  them, so they are not built. `green_pe_array` therefore has only the mesh and
  the diagonals.
* **Context crossbar.** The context memory reads a whole step at once and
  drives every PE and column port directly. This plays the part of the
  crossbar between the context memory and the PEs.
* **My own choices.** The following are not taken from the original
  description:
  * the memory-operation word per column and the step/stall timing above;
  * the host interface;
  * the source and target codes;
  * the placement of mixed opcodes on slices;
  * signed adds with double-width results;
  * the product and quotient formats;
  * the context-memory depth (16 steps);
  * the values of the correction coefficients.
* **Register reads.** In the original PE only operand multiplexer B reads the
  register file. Here both multiplexers can, so the register file serves as
  their two read ports. Programs written for the original still run.
* **Immediate width.** The immediate is 16 bits. About 10 bits would cover the
  filter coefficients of the target applications.
* **Loading into registers.** Loaded data arrives on the column bus. A PE puts
  it into its register file with a move, for example `ADD32` of the bus and an
  immediate 0 into a register entry. That move sign-extends the 16-bit word.
* **Not built.** A DMA engine, and anything to do with measuring power, area
  or reconfiguration cost.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`, and each has a watchdog.

`tb/green_ref_pkg.sv` is an independent integer model of the multiply-divide
lanes and of the whole ALU. It shares only the coefficient tables with the RTL.

| Testbench | What it covers |
|---|---|
| `tb_green_lod`, `tb_green_add_slice` | exhaustive |
| `tb_green_coef_rom` | all entries against numerical integration |
| `tb_green_muldiv` | exhaustive at 4 and 8 bits, random at 16 bits, all against the model |
| `tb_green_alu` | all opcodes with random and corner operands, plus the SISD/SIMD variants |
| `tb_green_regfile`, `tb_green_pe`, `tb_green_pe_array` | register file, PE and array (the array at a reduced 5 x 7 size to test the edges) |
| `tb_green_ctx_mem`, `tb_green_data_bank`, `tb_green_arbiter`, `tb_green_xbar`, `tb_green_controller` | one per memory and control block |
| `tb_green_cgra` | end to end at the default size |
| `tb_green_cgra_full` | a shorter end-to-end run of the design with every parameter at its default |
| `tb_green_fir_workload` | a real kernel (below) |

`tb_green_fir_workload` maps a real kernel onto the default array: a 4-tap FIR
filter over a synthetic ECG-like trace, producing one output per column per
eight-step run. The test checks:

* every output against the reference model, bit for bit;
* that every load step stalls on the conflicts of eight columns reading one
  bank;
* the mean error against the exact filter, which is about −0.6 %.

The `tb_green_xbar` testbench also checks bank conflicts and the
out-of-range path. `tb_green_controller` checks step order, stall and cycle
counts, and a run of zero steps.

### The end-to-end test

`tb_green_cgra` writes random 16-step kernels into the context memory. Every PE
gets a random opcode, sources, target and immediate. Every column gets a random
load, store or nothing, with the addresses crowded so that banks collide. Each
kernel runs against a step-level model, and the test then compares three things:

* every PE output;
* every column bus;
* the data memory, read back over the host port.

It also:

* checks the cycle and stall counts;
* runs retention and off on a bank;
* makes an out-of-range access;
* runs a 2 x 2 SISD-variant instance, to show an illegal opcode.

It counts each mechanism and fails any that never happened: stalls, bank
conflicts, loads, stores, SISD/SIMD/MIMD opcodes, diagonal reads, register
reads and writes, host accesses, power states, memory errors and illegal
opcodes.

### Running with plain Verilator

The end-to-end test takes about 40 s to run:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/green_pkg.sv tb/green_ref_pkg.sv $(ls rtl/*.sv | grep -v green_pkg) \
  tb/tb_green_cgra.sv --top-module tb_green_cgra
./obj_dir/Vtb_green_cgra
```

Any other testbench builds the same way, with its own file and top module.

## Changing the design

* **Array size.** `ROWS` and `COLS` are free, but column memory operations
  address at most 8 rows.
* **Memory size.** `NBANKS` x `BANK_WORDS` must fit the 13-bit word address.
* **Opcodes.** To add or re-place an opcode, edit `decode_op` in `green_pkg`.
  The adders and lanes follow the per-slice table. An opcode that needs an
  8-bit multiply-divide lane at a new position also needs a new lane in
  `green_alu`.
* **Coefficients.** New coefficient tables only need the two constants in
  `green_pkg` replaced. `tb_green_coef_rom` then shows how far they are from
  the cell averages above.
