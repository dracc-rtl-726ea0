# DrAcc: ternary-weight CNN inference inside DRAM subarrays

DrAcc runs convolutional layers inside the cell arrays of a DRAM. Its weights
are *ternary* (−1, 0, +1), so a dot product needs no multiplier: each input
row is either added to an accumulator (+1), subtracted from it (−1) or
skipped (0). The additions happen inside a DRAM subarray, a whole 512-bit
row at a time. A few reserved rows open together and, by charge sharing,
resolve to the bitwise majority of their contents, which gives AND and OR.
A dual-contact row stores complements (NOT). Two small enhancements make a
carry look-ahead adder possible in the array:

* a row wired one bit line over (SHF), which shifts carries into place;
* a pass-transistor path driven by the propagate bits, which lets the sense
  amplifiers ripple carries along the row.

The one multiplication left, scaling by the filter's factor α, is done as
shifts in a logic layer beside the DRAM and summed back in memory.

This repository holds synthesizable SystemVerilog for one DrAcc unit:

* one compute subarray, modelled at bit level;
* the controller that turns PIM instructions into DRAM command sequences;
* the instruction (flag) buffer;
* the logic-layer shifter, ReLU and max-pooling selection;
* a self-checking testbench for each block, and an end-to-end testbench that
  runs a ternary conv → ReLU → max-pool → α-scaling layer at full size.

## A row is a vector of words

A subarray row has `COLS` = 512 bit lines, and each column holds one bit of a
word. A row therefore carries `COLS/WORD_W` = 32 independent 16-bit
two's-complement words, called lanes. Every operation acts on all lanes at
once: carries and shifts stop at word boundaries. Data must be laid out so
that all lanes of a row need the same operation. For a convolution, row
*j* holds, for 32 different output positions, the input that meets kernel
tap *j*. This is the "same weight in the same row" reordering.

## Reserved rows and compute addresses

Besides its `DATA_ROWS` = 512 data rows, the subarray has reserved rows. A
*reserved address* opens one, two or three of them together:

| address | rows opened | address | rows opened |
|---|---|---|---|
| B0 | R0 | B9  | R1, R4 |
| B1 | R1 | B10 | R5, R6, R8 |
| B2 | R2, R7 | B11 | R0, R1, R2 |
| B3 | R3 | B12 | R3, R4, R5 |
| B4 | R4 | B13 | R1, R6, NOT |
| B5 | R5 | B14 | R0, R1, R7 |
| B6 | R6 | B15 | R3, R4, R8 |
| B7 | NOT | B16 | SHF |
| B8 | R0, R3 | B17 | R1, R9, NOT |
| E0 | constant 0 row | E1 | constant 1 row |
| BR9 | R9 alone (added in this design) | | |

The rows behave as follows:

* **Three rows opened together** sense the bitwise majority of the three.
  That majority is also written back into all three rows, so the operation
  destroys its operands. With a zero row as the third input it is AND; with a
  ones row it is OR.
* **NOT row:** whatever is written into it is stored complemented. Reading
  it returns what it stores.
* **SHF row:** a write into it through `AAP(x, B16)` does not store x.
  Instead it runs the carry chain (see below). Reading the SHF row returns
  its content moved one column towards the MSB of each word, with 0 entering
  bit 0.

Two kinds of command drive the subarray:

* `AAP src,dst`: activate, activate, precharge. It copies the value sensed
  from `src` into every row of `dst`.
* `AP src`: activate, precharge. It resolves and restores a triple.

`CMD_RD` and `CMD_WR` move a row to and from the logic layer.

## The in-DRAM addition (the part to read twice)

`S = A + D` for all 32 lanes takes 13 commands. R9 must hold ones beforehand,
and S is left in the NOT row afterwards.

| # | command | effect |
|---|---|---|
| 1 | AAP(A, B8) | R0 = R3 = A |
| 2 | AAP(D, B9) | R1 = R4 = D |
| 3 | AAP(E0, B2) | R2 = R7 = 0 |
| 4 | AAP(E1, B10) | R5 = R6 = R8 = 1 |
| 5 | AP(B11) | R0 = R1 = R2 = maj(A, D, 0) = **G** = A & D |
| 6 | AAP(B12, B7) | maj(A, D, 1) = A \| D; NOT = **M0** = ~(A \| D) |
| 7 | AAP(B13, B7) | maj(G, 1, M0) = A xnor D; NOT = **P** = A ^ D |
| 8 | AAP(B0, B16) | carry chain with G from R0 and P from NOT; SHF = carry out of each bit |
| 9 | AAP(B16, B9) | R1 = R4 = **C** (SHF read back shifted: carry *into* each bit) |
| 10 | AAP(B7, B8) | R0 = R3 = P |
| 11 | AP(B14) | R0 = R1 = R7 = maj(P, C, 0) = **M1** = P & C |
| 12 | AAP(B15, B7) | maj(P, C, 1) = P \| C; NOT = **M2** = ~(P \| C) |
| 13 | AAP(B17, B7) | maj(M1, 1, M2) = P xnor C; NOT = **S** = P ^ C |

In the circuit, step 8 works as follows. The sense amplifiers of columns
where G = 1 stay driven. The propagate bits held in the NOT row switch pass
transistors between neighbouring columns, so a 1 spreads upward through every
run of propagating bits. Logically, the carry out of bit *i* is
`cout[i] = G[i] | (P[i] & cout[i−1])`, with `cout[−1] = 0`. The
`carry_propagate` module implements exactly this.

Step 13 overwrites R9, so the controller rewrites it before each addition.
The published 13-step sequence does not do this; it is one added command. The
controller also adds one command to copy S out. An `ADD` instruction
therefore takes 15 commands.

**Subtraction** uses `a − b = ~(~a + b)`. The NOT row receives ~a, the same
13 steps run with the NOT row as first operand, and the sum is complemented
through R0 and the NOT row. It takes 18 commands.

## A layer, step by step

| step | where | instruction(s) |
|---|---|---|
| pre-conv | subarray | `COPY`/`ADD`/`SUB` per non-zero weight. Zero weights cost nothing. |
| activation | row path | `RELU`: a lane becomes 0 if its sign bit is 1 |
| max pooling | subarray + row path | `MAX`: in-DRAM `a − b`, then each lane takes a if the difference is ≥ 0, else b |
| post-conv | logic layer | `SHIFT` by each power-of-two term of α, then `ADD` the shifted copies. This ADD is the start of the next layer's pre-conv. |

Scaling by α is linear, so it is applied after pooling. That way it acts on
4× fewer values.

## Instructions and timing

The flag buffer holds 128 instructions of 40 bits each, 5 Kb in all. An
instruction has these fields: `op[2:0]`, `dst`, `a`, `b` (10-bit row
addresses: a special flag and a 9-bit index), `shamt` (signed, 5 bits) and
2 spare bits.

| op | meaning | subarray commands | clocks incl. fetch |
|---|---|---|---|
| HALT | end of program | – | 2 |
| ADD | dst = a + b | 15 | 17 |
| SUB | dst = a − b | 18 | 20 |
| COPY | dst = a | 1 | 3 |
| SHIFT | dst = a·2^shamt (shamt < 0: arithmetic right shift, rounding down) | 3 | 5 |
| RELU | dst = max(a, 0) | 3 | 5 |
| MAX | dst = max(a, b) | 22 | 24 |

The model issues one command per clock. Real DRAM timing (tRAS, tRP) is not
modelled: multiply the command counts by the AAP/AP latency of the target
device. Results wrap at 16 bits. `MAX` is correct only while a − b fits in a
word, and ADD/SUB overflow is not detected.

## Top-level interface (`dracc_top`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset of the controller |
| `fb_we`, `fb_waddr[6:0]`, `fb_wdata` | in | write one instruction into the flag buffer (only while idle; an assertion checks this) |
| `start` | in | one-clock pulse while idle: run the program from entry 0 until HALT |
| `busy`, `done` | out | busy while the program runs; done pulses one clock after HALT |
| `host_req`, `host_wdata[511:0]` | in | `CMD_WR`/`CMD_RD` on any row while idle; ignored while busy |
| `host_rdata[511:0]` | out | row read, valid one clock after `CMD_RD` |

A typical run looks like this:

1. Write the input rows with `CMD_WR`.
2. Write the program into the flag buffer.
3. Pulse `start` and wait for `done`.
4. Read the result rows with `CMD_RD`.

The subarray has no reset, like a DRAM. Rows read before they are written
hold arbitrary values.

## Modules

| file | role |
|---|---|
| `rtl/dracc_pkg.sv` | row address, command and instruction types; reserved address codes |
| `rtl/carry_propagate.sv` | the bit-line carry chain, cut at word boundaries |
| `rtl/pim_subarray.sv` | bit-level subarray: data rows, R0..R9, NOT, SHF, E0/E1; AAP/AP/RD/WR |
| `rtl/flag_buffer.sv` | 128 × 40-bit synchronous instruction RAM |
| `rtl/pim_controller.sv` | fetch/decode; expands each instruction into its command sequence |
| `rtl/shifter.sv` | per-lane signed-amount shifter (default 5120 lanes; the top uses 32) |
| `rtl/relu_unit.sv` | per-lane ReLU |
| `rtl/max_select.sv` | per-lane selection by the sign of a − b |
| `rtl/dracc_top.sv` | the unit: buffer, controller, subarray, logic-layer registers L0..L2 and units |

## Simulating

Each block has a testbench `tb/<module>_tb.sv`. The testbench prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. For
example:

```
verilator --binary --timing --assert rtl/dracc_pkg.sv -y rtl tb/dracc_top_tb.sv \
          --top-module dracc_top_tb -o sim && ./obj_dir/sim
```

Here is what the testbenches check:

* `pim_subarray_tb` runs the 13-step addition on random rows. It checks G,
  M0, P, the carry row and the sum against integer arithmetic, plus the
  4-bit worked example 0111 + 1101 = 10100.
* `carry_propagate_tb` includes the 16-bit propagation case G = 0x0002,
  P = 0xFFFC → C = 0xFFFE.
* `pim_controller_tb` compares the issued command stream, entry by entry,
  with the addition table above.
* `dracc_top_tb` runs four random layers at the default 512 × 512 size (about
  20 s). It checks every intermediate row and the clock count of each
  program. It also counts that each mechanism occurred: ADD, SUB, COPY,
  skipped zero weight, ReLU zeroing and passing, max picking either side,
  left and right shift, carries rippling more than 8 bits, and host access
  refused while busy.

`lenet_conv1_tb` runs the complete first layer of a LeNet-5-class MNIST
network on one full-size unit, with a random image and random ternary
filters:

* the layer is a 28 × 28 image, six 5 × 5 filters, ReLU, a 2 × 2 max pool
  and α scaling;
* it runs as 30 programs of up to 111 instructions, 40 250 clocks in all;
* the testbench checks all 864 pooled outputs (about 50 s of simulation).

To change the geometry, override `DATA_ROWS`, `COLS`, `WORD_W` and
`FB_DEPTH` on `dracc_top`. `COLS` must be a multiple of `WORD_W`. Row indices
are 9 bits, so `DATA_ROWS` ≤ 512.

## How far this follows the source design

These parts follow the source design:

* the reserved-row address table;
* the 13-command addition;
* majority/NOT/SHF semantics and the carry equation;
* the pre-conv/ReLU/max/post-conv split between DRAM and logic layer;
* the 512 × 512 subarray, the 16-bit words, the 5 Kb instruction buffer and
  the 5K shifters.

These are choices made here:

* **Extra commands around the addition:** the R9 restore and the copy-out.
  Without the restore, step 13 cannot give P xor C a second time.
* **Instruction set:** SUB as ~(~a + b), the fixed command sequences, the
  instruction encoding, fetch timing and host interface.
* **ReLU and max selection:** done as row-wide gates on the path to the
  logic layer. The source places them in the DRAM layer without giving a
  circuit.
* **Shifter:** a plain barrel shifter; its circuit is not specified.
* **One subarray:** the unit models a single subarray. The full device
  (Wide IO2, 8 channels × 32 banks, 8 Gb) runs many units in parallel. The
  choice of how a layer is split over them is made when programs and data are
  laid out: split along Y, split over the XZ plane, or replicate inputs per
  weight group, for throughput, single-frame latency or low power.
* **Analog behaviour is not modelled:** charge sharing margins, sense
  amplifier enables and pass-transistor delays are reduced to their logical
  effect.

Whole networks (MNIST/LeNet, AlexNet, VGG16/19) do not fit one unit. They run
as a sequence of host-loaded programs over slices of each layer. AlexNet
alone has about 61 M weights, while one unit has 256 Kb of rows and
128 instruction slots.
