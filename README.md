# SYSCORE: a systolic coarse-grained reconfigurable array for low-power biosignal processing

SYSCORE is an accelerator that sits beside a small host processor in a
wearable EEG seizure detector. The host runs the irregular, decision-heavy
parts of the detection algorithm: the classifier and the post-processing. The
array takes the regular, loop-heavy feature-extraction kernels: filters,
correlations, squared sums, matrix products and wavelets. The main idea is
to save energy by reading each data word from RAM only once. Data is pumped
through a grid of small fixed-point processing elements, and every element
hands its operands to its neighbours in the same cycle as it computes. The
elements are reconfigured per operation, not per bit as in an FPGA, so the
configuration logic stays small.

This repository holds synthesizable SystemVerilog for the whole accelerator:
the processing element, the interconnect element, the 8x4 array block, the
8x8 array, the DMA engines that feed and drain it, and the mode controller.
The host processor is not included. Its control and data ports are the
ports of `syscore_top`.

## Array organisation

```
              North input DMA (10 lanes per block)
         |  |    |  |    ^^ vv    |  |    |  |
West  -> CFU -> CFU -> RAI -> CFU -> CFU ->  ...  -> East (output DMA)
input        |      |      ^v      |      |
DMA   -> CFU -> CFU -> RAI -> CFU -> CFU ->  ...
             ...  (8 rows)
```

* A **block** is 8 rows x 4 CFU columns. A column of **RAI** (RoundAbout
  Interconnect) elements sits between the second and third CFU columns.
  `syscore_top` places `BLOCKS = 2` blocks side by side to form the 8x8
  array. Along a row the physical order is
  `CFU CFU RAI CFU CFU CFU CFU RAI CFU CFU`: 10 registers from the West edge
  to the East edge.
* Links are nearest-neighbour only. Out0 and Out1 of a CFU feed In0 and In1
  of its East neighbour. Out1 and Out2 feed In2 and In3 of the CFU below.
  The RAI elements of a column are linked upward and downward, so data can
  change rows without a dense crossbar.
* Every CFU and RAI output comes from a register. No combinational path
  crosses an element, so every hop costs exactly one clock cycle. This is
  what makes the timing of a mapping a matter of counting hops.
* The only global wires are the mode controls: `Config_en`, `Flush_en` and
  `Coeff_sel` for the whole array, and `Global_en` per row.

## Configurable Function Unit (`rtl/cfu.sv`)

Each CFU holds the following registers, all 22 bits wide (`DATA_W`):

* two general purpose registers: GPR0 loads from In0 or In1, GPR1 from In2
  or In3;
* two coefficient registers, CER0 and CER1;
* the compute-unit result register, CU_reg;
* a 32-bit configuration register, of which 22 bits are defined.

Each cycle, the compute unit (CU) reads three operands A, B and C and
computes one of the following, in two's complement with wrap-around:

| code | op  | result    |
|------|-----|-----------|
| 0    | ADD | A + B     |
| 1    | SUB | A - B     |
| 2    | MUL | A * B     |
| 3    | MAD | A * B + C |
| 4    | MSU | C - A * B |
| 7    | NOP | CU_reg holds |

Products are arithmetically shifted right by `FRAC_W` bits before the add.
The default, 0, gives integer arithmetic; set `FRAC_W` for Q-format
coefficients. Choosing C = CU_reg turns MAD into a multiply-accumulate, and
this feedback is how the accumulating kernels run.

Configuration word (`cfu_cfg_t` in `rtl/syscore_pkg.sv`):

| bits  | field    | codes |
|-------|----------|-------|
| 2:0   | OP       | see above |
| 5:3   | ALU0 (A) | 0-3 In0-In3, 4 GPR0, 5 GPR1, 6-7 zero |
| 8:6   | ALU1 (B) | 0-3 In0-In3, 4 CER0, 5 CER1, 6 GPR0, 7 GPR1 |
| 11:9  | ALU2 (C) | 0-3 In0-In3, 4 CER0, 5 GPR0, 6 GPR1, 7 CU_reg |
| 13:12 | REG0_sel | 0 In0, 1 In1, 2-3 hold |
| 15:14 | REG1_sel | 0 In2, 1 In3, 2-3 hold |
| 17:16 | OP0_sel  | Out0: 0 CU_reg, 1 GPR0, 2 GPR1, 3 zero |
| 19:18 | OP1_sel  | Out1, same codes |
| 21:20 | OP2_sel  | Out2, same codes |
| 31:22 | -        | reserved |

The field positions and the choices in each field follow the source
architecture. The numeric codes are this implementation's. The C field can
name only eight sources, so CER1 is available as operand B but not as
operand C.

## RoundAbout Interconnect (`rtl/rai.sv`)

An RAI element has six inputs and six outputs:

| port   | connects to                | may carry     |
|--------|----------------------------|---------------|
| I2, I3 | West CFU Out0, Out1        |               |
| I4, I5 | RAI above, its O0, O1      |               |
| I0, I1 | RAI below, its O2, O3      |               |
| O0, O1 | RAI below (down)           | any of I2-I5  |
| O2, O3 | RAI above (up)             | any of I0-I3  |
| O4, O5 | East CFU In0, In1          | any of I0-I5  |

A 16-bit configuration register holds one selector per output: 2 bits each
for O0-O3 and 3 bits each for O4 and O5, with codes 6 and 7 giving zero (see
`rai_cfg_t`). A value can travel down the column through O0 and I4, or up
through O2 and I0, and leave East in any row. This is how butterflies and
other non-neighbour patterns are routed. Within one element a value can also
change lanes, for example O4 <- I3. Each hop through an RAI
element costs one cycle.

## Operating modes and how configuration reaches the array

| mode          | Config_en | Flush_en | Global_en | what the registers do |
|---------------|-----------|----------|-----------|-----------------------|
| configuration | 1 | 0 | 1 | shift configuration words and coefficients in |
| execution     | 0 | 0 | 1 | compute as configured |
| flush         | 0 | 1 | 1 | shift accumulated results out East |
| power off     | x | x | 0 | per row: all registers hold, outputs are zero |

There is no configuration bus, so configuration travels through the data
paths as shift registers. This is the least obvious part of the design.

* **Configuration words go down the columns.** In configuration mode a CFU
  loads its configuration register from In2 and shows the old content on
  Out1, which feeds the In2 of the CFU below. An RAI element loads from I4
  and shows its configuration on O0. So each CFU column and each RAI column
  is a shift register, fed from the North DMA. After `n` shift cycles, the
  word sent `k`-th from last rests in row `k`. Send the bottom row's word
  first.
* **Coefficients go along the rows.** In the same cycles, a CFU loads
  `CER[Coeff_sel]` from In0 and shows it on Out0, and RAI elements pass I2 to
  O4. A row is therefore a 10-stage shift register fed from the West DMA.
  The first word sent ends in the easternmost CFU. The words that land in
  the two RAI slots are discarded. Loading both CER0 and CER1 takes two
  passes, one for each value of `Coeff_sel`.
* A configuration pass clears GPR0, GPR1 and CU_reg, so accumulations start
  from zero.
* Because a row chain is 10 stages and a column chain 8, one pass of the
  8x8 array takes 10 shift cycles. The first two column words fall out of
  the bottom.
* **Flush**: CU_reg loads from In0, Out0 shows CU_reg, and RAI elements
  forward I2 to O4. Each row becomes a shift register that drains its
  accumulators East into the output DMA, easternmost first. The West edge
  shifts in zeros. A full flush takes 10 cycles; the two RAI slots yield
  whatever those elements last held.

## DMA engines and control (`input_dma`, `output_dma`, `mode_ctrl`)

* `input_dma` holds `DEPTH` beats (default 256). A beat is one word per
  lane, and every lane has its own memory. The host writes the buffer one
  word at a time. A stream command plays beats `base .. base+len-1` onto
  the lanes, one beat per cycle. Idle lanes carry zero. The West instance
  has 16 lanes (In0 and In1 of every row, lane `2r+k`). The North instance
  has 20: for block `b`, lane `10b+2c+k` is In(2+k) of CFU column `c`, and
  lanes `10b+8` and `10b+9` are I4 and I5 of the top RAI.
* `output_dma` captures the 16 East lanes (Out0 and Out1 of every row) into
  its buffer for `len` cycles. The host reads it back through a port with
  one cycle of latency.
* `mode_ctrl` takes a command {mode, cycles, Coeff_sel} and holds that mode
  for exactly `cycles` clock edges. A row mask chooses which rows are
  powered. Between commands every row's Global_en is low, so the array
  freezes and keeps its state.

**Timing rule.** Start a mode command and a DMA in the same cycle. The
array's first active edge then sees zeros. Input beat `k` is sampled at
active edge `k+2`, and the output DMA's capture `i` holds what the East
edge showed after active edge `i`. The testbenches use only this rule and
hop counting.

## Mapping examples (all simulated)

* **Matrix product, output stationary** (`tb_syscore_top`,
  `tb_syscore_block`). Each CFU runs `MAD A=In0 B=In3 C=CU_reg`. Rows of A
  flow East through GPR0 and Out0, and columns of B flow South through GPR1
  and Out2. Both are skewed at the DMA by row index and by the number of
  registers in front of each column. The 8x8 product takes 28 beats of
  execution (K + ROWS + 12) plus a 10-cycle flush. The A stream crosses each RAI column
  by a cross route (CFU Out1, then RAI I3, then O4).
* **FIR filter, transposed form** (`tb_fir_workloads`). Every top-row CFU
  runs `MAD A=In3 B=CER0 C=In0`. The sample stream enters all top-row
  columns from the North DMA. Lanes past an RAI element are delayed one
  beat per element, to match the extra register in the partial-sum path.
  Tap `k` sits in column `7-k`. One output leaves per cycle: 200 samples
  take 206 execution cycles. One row holds up to 8 taps.
* **db2 wavelet stage.** The second row receives the same samples one
  cycle later through GPR1 and Out2 of the row above. It runs the
  high-pass filter while the top row runs the low-pass one.
* **8-point DFT by correlation** (`tb_dft_workload`). The cosine and sine
  matrices multiply eight 8-sample blocks, one block per CFU column, with
  the matrix-product mapping above. With integer arithmetic the 22-bit
  accumulator bounds the coefficient scale: an 8-term sum of 12-bit samples
  fits only if the coefficients are scaled by at most 2^7
  (8 x 2047 x 128 < 2^21). Larger scales need `FRAC_W` > 0 or narrower
  samples.
* **Radix-2 butterfly stages through the RAI column**
  (`tb_butterfly_workload`). Each row carries one element of a vector
  stream, one vector per cycle. Block 0 computes butterflies between rows at
  distance 1, `y[p] = x[p] + w*x[q]` and `y[q] = x[p] - w*x[q]`. Block 1 then
  does the same at distance 2. The weight `w` sits in CER0 of the lower row's
  first CFU. The upper row's value goes down the column and the lower row's
  product goes up, so each row sees its partner one cycle (distance 1) or two
  cycles (distance 2) after its own value. GPR0 of the CFU after the column
  absorbs one cycle. At distance 2, the CFU before the column also sends two
  copies of its value: an early one on Out0 for the partner, and one a cycle
  later (`CU_reg = 0 + GPR0`) on Out1 for its own row. Distance 2 uses both
  down lanes and both up lanes of the middle column segment. A distance-4
  stage would need four lanes each way, so it does not fit in one pass.
  Latency is 14 cycles.
* **Coefficient cascade** (`tb_syscore_top`). Every CFU runs
  `MUL A=In0 B=CER0`, with coefficients loaded through the row chains.
  Row 7's partial product also climbs the RAI column to the North output.
* **Aggregation kernels** (`tb_cfu`): square-and-accumulate,
  cross-correlation, multiply-add with a constant, and multiply by a
  constant, each in one CFU.

## What follows the source architecture and what is this implementation's

These follow the source architecture:

* the 8x4 block, the 8x8 array of two blocks, and an RAI column after every
  second CFU column;
* the CFU's four inputs and three outputs, and its register complement;
* the operation set, the configuration field map and the 22-bit width;
* the RAI port count, its output-source table and its 16-bit configuration;
* the four modes and the row-level power-off;
* West and North injection and East collection by DMA.

These are this implementation's own choices:

* the numeric codes within each field;
* the operand roles (for example, MSU is C - A*B);
* wrap-around integer arithmetic (no saturation, `FRAC_W = 0`);
* the shift-chain configuration and flush mechanisms;
* clearing on configuration;
* registered RAI outputs;
* which output feeds which neighbour input;
* the DMA buffers and command interfaces;
* the cycle-counted mode controller;
* no extra RAI column at the joint between the two blocks.

Limits worth knowing:

* a filter longer than 8 taps does not run on the array alone in the FIR
  mapping above;
* there is no complete FFT mapping. Real-weight butterfly stages at row
  distances 1 and 2 run, but complex twiddle factors (four products per
  butterfly) and the distance-4 stage of an 8-point FFT are not mapped;
* the DMA buffers hold 256 beats, so a full multi-channel epoch must be
  streamed in parts.

## Files

| file | contents |
|------|----------|
| `rtl/syscore_pkg.sv` | widths, configuration word structs, mode enum |
| `rtl/cfu.sv` | processing element |
| `rtl/rai.sv` | interconnect element |
| `rtl/syscore_block.sv` | ROWS x 4 block |
| `rtl/input_dma.sv`, `rtl/output_dma.sv` | DMA engines |
| `rtl/mode_ctrl.sv` | mode sequencing |
| `rtl/syscore_top.sv` | 8x8 array with DMAs and controller |
| `tb/tb_*.sv` | one self-checking testbench per module, plus the workload testbenches `tb_fir_workloads`, `tb_dft_workload` and `tb_butterfly_workload` |

Default size after generic synthesis: about 6.5k word-level cells, 11.7k
flip-flop bits and 293k memory bits, almost all of them DMA buffers.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself
with a watchdog. With Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/syscore_pkg.sv \
    rtl/syscore_top.sv tb/tb_syscore_top.sv --top-module tb_syscore_top
./obj_dir/Vtb_syscore_top
```

Replace the top file and testbench for the other modules, for example
`rtl/cfu.sv tb/tb_cfu.sv --top-module tb_cfu`. `tb_syscore_top`,
`tb_fir_workloads`, `tb_dft_workload` and `tb_butterfly_workload` run the
full 8x8 array at its default parameters.
`tb_syscore_top` counts each mechanism it exercises and fails if any never
happened: configuration shifts, coefficient loads, execution, flush, row
power-off, RAI cross and vertical routes, and DMA captures. Verilator's
simulation has only two states, so every register that is read is reset.
