# GPCIM: a compute-in-memory processor that is also a vector CPU

A compute-in-memory (CIM) DNN accelerator keeps activations in an SRAM array and multiplies them by
weights inside the bitcells, so the expensive part of a neural network never leaves the memory.
The rest of an AI application (pre-processing, pooling, normalisation, feature extraction, control)
normally runs on a separate CPU, and the data shuttles between the two. GPCIM removes that split:
the same two bitcell arrays and the same adder trees that do the multiply-accumulates in **DNN
mode** are reused as the register file, data cache and ALUs of a four-lane, 32-bit **vector CPU**.
A program runs in CPU mode, configures the DNN layer with a few instructions, hands the arrays to
the DNN sequencer with `SWITCH`, and continues at a saved address when the layer is done. The
activations it prepared and the results it post-processes never move.

This repository is a synthesizable SystemVerilog model of a four-core GPCIM chip as published for
a 65 nm test chip (four cores, 245 MHz, 9 KB of CIM arrays, 41 KB of SRAM in total), together with
self-checking testbenches for every block and for the whole chip. Where the publication stops
(instruction encoding values, DNN dataflow, host interface, memory sizes) this design makes its
own choices; they are listed in [Departures and own choices](#departures-and-own-choices).

## The chip

```
             scan_in/out, scan_en, scan_update
                        |
                    scan_io  (57-bit command frames)
                        |
                   top_control  (core select, broadcast, chip status)
           +--------+---+----+--------+
        core 0   core 1   core 2   core 3     all clocked by the DCO or ext_clk
```

`gpcim_chip` holds four independent `gpcim_core`s. There is no bus between cores and no external
memory: everything is loaded and read back over the serial scan port, which is how the test chip
was driven from an FPGA. `top_control` decodes the command address, can broadcast a write to all
cores (one program, one start command), and answers status reads (`{running[3:0], halted[3:0]}`).
`all_done` rises when every core has halted. The core clock is the behavioural DCO when `dco_en` is
high, otherwise `ext_clk`.

Each core:

| part | size | role |
|---|---|---|
| `icache` | 1024 x 32 bit | program memory, loaded over scan |
| `weight_sram` | 128 x 256 bit | one entry = 32 signed 8-bit weights (one per DAMEM row) |
| `bot_cim_ctrl` | | CPU-mode controller: PC, fetch, decode, CSRs, mode switch |
| `top_cim_ctrl` | | DNN-mode sequencer |
| `gpcim_macro` | DAMEM 32 x 64, DOMEM 128 x 128 | the two arrays, operand latches, four CCUs, pulse generator |

## The macro: two arrays, four compute units

**DAMEM** (`damem`) is two 32 x 32 banks of 9T cells. Each cell adds a small NAND-based product
circuit to a 6T cell and drives its own DOUT line, so in DNN mode all 2048 cells deliver
`stored_bit AND weight_bit_of_its_row` at once. In CPU mode DAMEM is a 16-entry vector register
file: register `v` occupies rows `2v` and `2v+1`, lanes 0/1 in row `2v` (bank 0/bank 1) and lanes
2/3 in row `2v+1`. It has one read port.

**DOMEM** (`domem`) is 128 rows of 128-bit 8T cells with two read ports and one write port per
cycle. In CPU mode each row is a four-lane vector register (128 registers); in DNN mode it holds
the output activations and partial sums.

**Latches** (`latch_buffer`) catch the sensed operands R0 (`A`), R1 (`B`) and a third value `M`
(the VMERGE mask, or the DNN partial sum) and hold them while a multi-cycle instruction runs.

**CCUs** (`ccu`, four `ccu_unit`s) sit between the arrays, one per 32-bit lane. Unit `k` sees
columns `8k..8k+7` of the selected DAMEM bank in all 32 rows: one 8-bit activation per row.

### One cycle in time

The silicon divides each clock cycle into phases with a tunable delay chain: write-back of the
previous cycle's result, bitline precharge, bitline discharge on both arrays, latch update, and
execution in the CCUs. The synthesizable RTL keeps the order but ties it to clock edges:

* rising edge: the result of the previous cycle is written into DAMEM or DOMEM (write-back);
* high half: the arrays are read combinationally (precharge/discharge);
* falling edge: the operand latches capture (latch update);
* low half: the CCUs compute; the result is written at the next rising edge.

Because the write lands before the reads of the next cycle, an instruction sees the result of the
one before it without any forwarding logic. `pulse_generator` is a behavioural model of the delay
chain that produces the phase signals (`wb_en`, `prc_en`, `wl_a`, `wl_b`, `sense_clk`, `latch`)
from a delay code, for observation only; nothing in the datapath depends on it.

## The CCU: one adder tree, three jobs

This is the part worth reading slowly (`rtl/ccu_unit.sv`). Each unit has a single 32-input,
40-bit adder tree and uses it for three different things.

**DNN multiply-accumulate.** Weights are applied bit-serially, most significant bit plane first.
In each of eight cycles the top controller puts one bit of every row's weight on that row's word
line; DAMEM returns, for each row, the 8-bit activation or zero; the tree sums the 32 values
(sign-extended); the accumulator does

    acc = (first ? 0 : acc << 1) + (sign_plane ? -tree : tree)

so after the eighth plane `acc` is the signed dot product of 32 int8 activations with 32 int8
weights. The output written to DOMEM is

    out = relu_en ? max(0, s) : s,   s = (acc_en ? partial_sum : 0) + (acc >>> shift)

where the partial sum is read from the same DOMEM row through port A in the write-back cycle.
The four units produce four output lanes from the same weights and the four 8-bit slices of the
activation words, so the four lanes are four pixels (or batch items) of the same output channel.

**32-bit multiply.** VMUL/VMULH take four cycles. In step `s` the tree adds the eight partial
products `R0 << i` for the set bits `i` of byte `3-s` of R1, and a 64-bit accumulator does
`acc = (acc << 8) + tree`. After step 3 the low word is the VMUL result; VMULH corrects the
unsigned high word to the signed high word.

**ALU.** Add, subtract and compares use a 32-bit ripple adder (`ripple_adder`) built from a full
adder with active-low pins (`full_adder`), a logic model of the low-power full adder cell. Logic,
shift, min/max, extend, merge and move are small separate functions.

## Instruction set

All instructions are 32 bits:

| bits | 31 | 30 | 29 | 28:24 | 23:16 | 15:8 | 7:0 |
|---|---|---|---|---|---|---|---|
| field | loc R0 | loc R1 | loc RD | opcode | R0 / imm | R1 | RD / imm |

A location bit selects DAMEM (0) or DOMEM (1). The R0 field has three forms: bit 7 set is a 7-bit
signed immediate in bits 6:0; `01xxxxxx` is a **scalar**: lane 0 of register `xxxxxx`, broadcast
to all four lanes; `00xxxxxx` is a vector register (so R0 reaches DOMEM rows 0..63 only; R1 and RD
reach all 128). Every operation is `RD = R1 op R0` lane by lane.

| op | name | cycles | function |
|---|---|---|---|
| 0-5 | VAND VOR VXOR VNAND VNOR VXNOR | 1 | bitwise |
| 6 / 7 / 8 | VADD / VSUB / VRSUB | 1 | R1+R0, R1-R0, R0-R1 |
| 9-12 | VMIN VMINU VMAX VMAXU | 1 | signed / unsigned min, max |
| 13 | VEXT | 1 | extend R1: R0[0] = signed, R0[1] = from 16 bits (else 8) |
| 14 / 15 | VMUL / VMULH | 4 | low / signed high word of R1*R0 |
| 16 | VMERGE | 2 | lane mask ? R0 : R1; mask = bit 0 of each lane of DOMEM row 0 |
| 17-19 | VSLL VSRL VSRA | 1 | shift R1 by R0[4:0] |
| 20 / 21 | VMV / VMVI | 1 | RD = R0 / RD = sign-extended 16-bit `{R0,R1}` field |
| 22-24 | VCGT VCLT VCEQ | 1 | RD = 1 or 0 per lane (signed) |
| 25 | JMP | 1 | PC = lane 0 of R0 |
| 26-28 | BGT BLT BEQ | 1 | if lane 0 of (R1 op R0): PC += signed RD |
| 29 | MVCSR | 1 | CSR[RD] = lane 0 of R0 |
| 30 | SWITCH | 2 | hand the macro to the DNN sequencer |
| 31 | PCS | 1 | resume address = own PC + signed R0; also written to lane 0 of RD |

A branch or jump to its own address ends the program: the core halts.

### Pipeline and timing

Two stages: fetch (PC, instruction cache, decode) and execute (the macro cycle above). The cycle
count of a program is exactly

    1 (first fetch) + sum of instruction cycles
      + 1 per instruction with both R0 and R1 in DAMEM (one read port: R1 is read a cycle early)
      + 1 per taken branch or jump (the word fetched behind it is dropped)
      + per SWITCH: 9 * NOUT + 3 more (the layer, the hand-over both ways, the refetch)

While a multi-cycle instruction runs, fetch holds. There is no hazard logic because the write-back
phase makes every result visible to the next instruction.

## DNN mode and the switch

The DNN layer is described by eight CSRs, written with MVCSR:

| CSR | name | meaning |
|---|---|---|
| 0 | WBASE | first weight SRAM entry |
| 1 | NOUT | number of output channels |
| 2 | BANK | DAMEM bank holding the activations |
| 3 | OBASE | first DOMEM output row |
| 4 | ACT | bit 0: ReLU |
| 5 | SCALE | arithmetic right shift of the accumulator |
| 6 | TACC | bit 0: add the partial sum already in the output row |
| 7 | TEN | lane enable mask (reset value 0xF) |

A typical hand-over is `MVCSR` x 8, `PCS`, `SWITCH`. After `SWITCH` the top controller takes
output channel `n = 0 .. NOUT-1` in turn: it reads weight entry `WBASE+n`, drives its eight bit
planes on the DAMEM word lines in eight cycles, and in a ninth cycle writes the four lanes to
DOMEM row `OBASE+n` (only the lanes enabled in TEN). So a layer of `NOUT` channels takes
`9*NOUT` cycles of work; with the hand-over the core is in DNN mode for `9*NOUT + 2` cycles. It
then returns to CPU mode at the PCS address (or after the SWITCH without a PCS). The results are already in DOMEM, where the CPU code reads them as vector
registers: pooling, scaling or the next layer's data preparation follow with no copy.

In assembly-like form (R0 immediates are 7-bit signed, so a CSR value above 63 comes from a
register), one layer of 16 channels whose weights start at entry 0, activations in bank 0 and
results to DOMEM rows 64-79, with ReLU and a shift of 4, reads:

    MVCSR  csr0, #0          ; WBASE
    MVCSR  csr1, #16         ; NOUT
    MVCSR  csr2, #0          ; BANK
    MVCSR  csr3, s(O5)       ; OBASE = lane 0 of DOMEM register 5, holding 64
    MVCSR  csr4, #1          ; ACT = ReLU
    MVCSR  csr5, #4          ; SCALE
    MVCSR  csr6, #0          ; TACC off
    MVCSR  csr7, #15         ; all four lanes
    PCS    O6, #2            ; resume two words after the PCS, i.e. after the SWITCH
    SWITCH
    ...                      ; CPU code continues here with the results in O64..O79

Deeper layers than 32 inputs are built by running several SWITCHes with TACC set, each adding
the next 32-input slice onto the partial sums in DOMEM.

## Host access

A scan command is a 57-bit frame `{we, addr[23:0], wdata[31:0]}` shifted in MSB first while
`scan_en` is high and executed by a one-cycle `scan_update`. The read data of that command is then
shifted out MSB first during the next frame.

    addr = {core[23:22], broadcast[21], target[20:18], unused[17:16], index[15:0]}

| target | index |
|---|---|
| 0 instruction cache | word address |
| 1 weight SRAM | `{entry, word[2:0]}` (32 bits of the 256-bit entry) |
| 2 DAMEM | `{register, lane[1:0]}` |
| 3 DOMEM | `{register, lane[1:0]}` |
| 4 core control | write 0: start at PC 0; read 0: `{dnn_mode, running, halted}`; read 1: PC |
| 7 chip status | `{running[3:0], halted[3:0]}` |

A core's memories are reachable from the scan port only while it is not running.

## Departures and own choices

Compared with the published chip:

* **DNN throughput.** The published efficiency (14.8 TOPS/W macro at 8.4 mW, 200 MHz) implies
  roughly 120 GOPS for four cores. This design's bit-serial schedule gives 128 MACs per 9 cycles
  per core, 22.8 GOPS at 200 MHz. The publication does not give the MAC dataflow, and this is the
  simplest one the described hardware supports. CPU-mode throughput matches: 3.92 GOPS for vector
  add and 0.98 GOPS for multiply at 245 MHz.
* **Mode switch latency.** The published sequence takes 15-20 cycles; here eight 1-cycle MVCSRs,
  a PCS and a 2-cycle SWITCH take 11.
* **Instruction encoding.** The field layout follows the publication; opcode values, the R0
  forms, the branch offset, the halt convention and the VMERGE mask register are this design's.
  The published list has 34 names for a 5-bit opcode: VZEXT and VSEXT are merged into VEXT, and
  VOP, whose function is not described, is left out.
* **CNN/FCN parameter.** The publication names a CNN/FCN layer-type parameter but not what it
  changes; there is no such CSR.
* **Memory sizes.** Only the 41 KB total is published. With 9 KB of CIM arrays, the remaining
  32 KB is split into 4 KB of instructions and 4 KB of weights per core.
* **Clock gating** of the unused half of the CCU and of idle arrays is not modelled.
* **Behavioural parts.** The DCO and the pulse generator are behavioural models with delays;
  synthesis drops the delays (the DCO then appears as a combinational loop and the pulse outputs
  as constants). Sense amplifiers and the transistor-level bitcells are not modelled separately:
  their logical effect is in the array and latch models.
* **Chip clocking.** The `ext_clk` input and its mux are additions for test.

## Verification

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

* leaf blocks (`full_adder`, `ripple_adder`, `adder_tree`, arrays, latch, memories) against
  exhaustive or random reference values;
* `tb_ccu_unit` / `tb_ccu`: every ALU operation, the four-step multiply, and the bit-serial DNN
  accumulation with partial sum, scaling and ReLU, against arithmetic in the testbench;
* `tb_top_cim_ctrl` / `tb_bot_cim_ctrl`: cycle-by-cycle control (bit plane order, the 9-cycle
  channel, the 4-cycle multiply, the 2-cycle VMERGE and SWITCH, the DAMEM double read, the branch
  bubble, PCS resumption, halt);
* `tb_gpcim_core`: a program of about 55 words that exercises every instruction class, a counted loop, a
  full DNN hand-over and post-processing, compared word for word and cycle for cycle with an
  instruction-level reference model (`tb/gpcim_ref_pkg.sv`);
* `tb_workload_semg`: the CPU side of a hand-gesture recognition demo on one core: mean,
  variance, slope-sign-change count and a four-bin histogram of six EMG channels over a 32-sample
  window, as 454 words of straight-line vector code (834 cycles per four channels), checked
  against features computed directly from the samples;
* `tb_gpcim_chip`: the whole chip at its default size, driven only through the scan port: broadcast
  program and weights, per-core random data, run on the DCO clock, read-back of every data word
  of every core, run time against the model, and a count of every mechanism (both mode switches,
  multiply, merge, double read, taken branch, PCS, scalar and immediate operands, partial-sum
  accumulation, ReLU clipping, lane gating, CSR writes, halt, DCO clock) with a failure for any
  that never happened. It runs in a few seconds.

To run a testbench with Verilator (5.x):

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv -Irtl \
        rtl/gpcim_pkg.sv tb/gpcim_ref_pkg.sv tb/tb_gpcim_chip.sv --top-module tb_gpcim_chip
    ./obj_dir/Vtb_gpcim_chip +verilator+rand+reset+2

Replace the last file and the top module name for another testbench. The reference package is
needed only by `tb_gpcim_core` and `tb_gpcim_chip`; the testbenches initialise every state they
read, so they run the same with random initial values.

## Files

`rtl/gpcim_pkg.sv` holds the shared constants, the instruction and control-bundle structs, the
opcode and CSR numbers and an `enc()` helper that assembles an instruction word. Every other
`rtl/` file is one module named after the file; each opens with a comment giving its interface,
timing and which parts follow the publication. `tb/` holds one testbench per module plus the
reference model package.
