# A medium-grain reconfigurable array and DSP kernels mapped onto it

Field-programmable gate arrays work one bit at a time, so every word-wide
multiplier or adder needs many cells and long wires. Coarse-grain arrays work
on whole 16- or 32-bit words and lose flexibility. This design sits between
the two. Its basic unit is a **4-bit cell**. A cell is either a small
arithmetic unit or a small RAM. Word-wide modules such as adders,
multipliers, shifters and memories are built from blocks of these cells.

Two networks join the cells. A **latched local mesh** links every cell to
its eight neighbours. A **global H-tree** carries words between modules,
and its latency depends only on how far apart two cells sit in the tree.
Everything is pipelined, so each mapped module accepts a new operation every
clock cycle. The target clock is 720 MHz in 90 nm CMOS.

The RTL has two halves:

1. **The fabric itself**: the cell, the crossbar of one cell, the H-tree and
   a 32×32 array that joins them (`mg_cell`, `mg_local_xbar`, `mg_htree`,
   `mg_fabric`).
2. **The benchmark modules**, as they behave when mapped onto the fabric:
   - a 32-bit digit-serial adder;
   - a 16-bit multiplier and a 16-bit logarithmic shifter;
   - a floating-point adder and multiplier;
   - a 12-tap FIR filter;
   - a 16-stage CORDIC;
   - a 256-point radix-4 FFT.

   Each module has the same interface and cycle latency as its mapping onto
   the array. The adder is built from real `mg_cell` instances. The others
   are written at word level; their internal register stages are padded to
   the mapped latency.

`mg_dsp_top` places all of these side by side, each with its own ports, the
way separate configurations would share one device.

## The cell

`mg_cell` has two modes.

- **Mathematics mode** computes `y = a*b + c + d` from four 4-bit operands.
  The result is 8 bits and has no overflow: 15·15 + 15 + 15 = 255. This one
  function covers the common cases:
  - with `b = 1` and `d` = carry-in, it is a 4-bit adder, and `y[4]` is the
    carry-out;
  - with `c` as a partial sum, it is a multiplier digit;
  - with a constant, it is a constant adder.

  The result is registered, so a cell computation takes one cycle.
- **Memory mode** is a 128×4-bit RAM. Its write port is `we`, `wa`, `wi`; its
  read port is `ra`, `ro`. Both use 7-bit addresses. The read is
  synchronous, and reading an address in the cycle it is written returns the
  old data.

The operand function of the mathematics mode is this design's choice: the
elements inside the cell can be programmed, but their contents are not
given. Cells work on unsigned digits. Two's complement is handled at word
level by the modules, for example `mg_fx_mult` has an `is_signed` input.

## Local mesh and crossbar

Each cell has one crossbar, `mg_local_xbar`.

- **Inputs.** Each of the cell's four operands (a, b, c, d) is chosen from
  one of these sources, with the `src_e` encoding in `mg_pkg`:
  - the eight incoming neighbour busses (N, NE, E, SE, S, SW, W, NW);
  - the digit arriving from the global tree;
  - a configured constant;
  - zero.
- **Outputs.** Each of the eight outgoing busses carries the cell's low
  result digit, its high digit, or nothing (`out_e`).
- **Latches.** The outgoing busses are latched. A value computed in cycle t
  is therefore on the neighbour's input in cycle t+1 and in the neighbour's
  result in cycle t+2.

This two-cycle step is the basic rhythm of every mapped module. It is also
why the 32-bit adder emits one sum digit every two cycles.

## The global H-tree

`mg_htree` treats the 2^LEVELS cells as the leaves of a binary tree.

- **Bus width.** A bus at level k is 4·2^k bits wide. Each bus can carry
  every digit of the subtree below it, so routes never contend for a bus.
- **Latency.** A pipeline latch sits on every second bus, so the latency
  between two cells is half the number of busses between them. Two leaves
  whose numbers first differ in bit k meet at the switch of level k+1. The
  route climbs k+1 busses and descends k+1, so it takes **k+1 cycles**:
  - 1 cycle between sibling cells;
  - 4 cycles across a 16-cell subtree;
  - 10 cycles across the 32×32 device.
- **Implementation.** Because nothing contends, the network is written as
  its timing rule rather than as individual switches. It keeps a short
  history of every leaf's digit. Each destination reads the digit of its
  configured source from `level` cycles ago. The switch-level structure is
  not modelled (each level has four input and four output busses). An
  option to cap the bus width to save area is not built either.

In `mg_fabric`, leaf numbers interleave the row and column bits, so the tree
alternately splits columns and rows, as an H-tree does. Each cell sends its
low or high result digit into the tree and can take the digit it receives as
an operand.

## The array

`mg_fabric` is ROWS×COLS (default 32×32) cells with their crossbars on the
mesh, and every cell is a leaf of one H-tree. Configuration is static:
`cfg_*` ports carry one entry per cell. The array has these edges:

- The west bus of column 0 is fed from `ext_in[r]`.
- The east bus of the last column is `ext_out[r]`.
- All other busses that would leave the array read zero.
- All cell results are visible on `cell_y`.

Limits of the array:

- The cells run in mathematics mode only. The source does not say how a
  memory-mode cell receives its address and data through the mesh. Memory
  mode is therefore available in `mg_cell` itself, and the FFT memory uses
  it at word level.
- There is no configuration storage or loading logic. Configuration is an
  input.

## Mapped arithmetic modules

| Module | What it does | Latency |
|---|---|---|
| `mg_fx_adder` | 32-bit adder from 8 cells. The carry goes cell to cell through the mesh latch. Operand digit k enters in cycle 2k; sum digit k leaves in cycle 2k+1. | digit k at 2k+1 |
| `mg_fx_mult` | 16×16 → 32-bit multiplier, signed or unsigned, one product per cycle | 13 |
| `mg_log_shifter` | 16-bit left shifter in three rows: 0–3 bits, then optionally 4, then optionally 8. Zeros enter from the right. | 14 |
| `mg_fp_adder` | Floating-point adder (format below) | 57 |
| `mg_fp_mult` | Floating-point multiplier | 74 |

### The floating-point format

The floating-point modules use a cheap format that suits 4-bit cells:

- a **28-bit two's-complement significand**, read here as a fraction in
  [-1, 1);
- a **10-bit two's-complement exponent** whose two low bits are always zero;
- value = `sig / 2^27 · 2^exp`.

Because the exponent moves in steps of 4, every alignment shift is a whole
number of 4-bit digits, which maps cleanly onto cells. The significand is
not normalised.

- **Adder.**
  1. Compare the exponents and exchange the operands so the larger one comes
     first.
  2. Shift the smaller operand's significand right arithmetically by the
     exponent difference. A difference of 28 or more leaves only sign bits.
  3. Add the significands and keep the larger exponent.

  The adder does not realign the result. Realignment is left to the end of
  a chain of operations, for example a following multiplier. The significand
  sum wraps on overflow.
- **Multiplier.**
  1. Multiply the significands to a 56-bit product and add the exponents.
  2. An encoder counts how many leading digits of the product carry only the
     sign (at most 6).
  3. Shift the product left by that many digits, keep 28 bits, and subtract
     4 per digit from the exponent.

  −1 × −1 wraps.

Both modules have `in_valid`/`out_valid` and assert that input exponents
have zero low bits.

## 12-tap FIR filter (`mg_fir12`)

The filter is in transposed form.

- **Structure.** Each sample is broadcast to twelve multipliers at once. The
  products run down a chain of 20-bit adders with a register after each
  one. Tap 11 starts the chain and tap 0 delivers y.
- **Number formats.** Samples are 16-bit two's complement. Coefficients are
  Q15 fractions in [-1, 1). Each product is kept as `(x·b) >>> 11`, so the
  20-bit adders carry 4 extra fraction bits against rounding.
- **Timing.** Output y[n] appears 61 cycles after x[n]. A 256-sample stream
  takes 61 + 255 = 316 cycles from the first input to the last output,
  which is 0.44 µs at 720 MHz.
- **Gaps.** The chain advances only on valid samples, so the input may have
  gaps.

## CORDIC (`mg_cordic_stage`, `mg_cordic16`)

One stage works in vectoring mode. The sign of y chooses the direction:

- x' = x ∓ (y >>> i)
- y' = y ± (x >>> i)
- z' = z ± atan(2^-i)

The two angle constants of each stage are built in (`CORDIC_ATAN` in
`mg_pkg`). Angles are binary: 2^23 stands for π.

Data is 24 bits wide although samples are 16 bits. The cascade scales its
16-bit inputs by 64 on entry. A stage takes 17 cycles.

`mg_cordic16` chains 16 stages and adds the global-network delay at the
output, for 313 cycles in total (0.43 µs). It accepts one sample per cycle.
The outputs are:

- `mag`: the magnitude times the CORDIC gain (≈1.6468), which is not
  compensated;
- `angle`: atan2(y, x) in the binary angle unit.

## 256-point radix-4 FFT (`mg_fft256`)

This is the most involved part of the design. It has three pieces:

- a **dragonfly kernel**, i.e. a radix-4 butterfly
  (`mg_fft_dragonfly`);
- three **twiddle tables** (`mg_twiddle_lut`);
- a **memory unit** (`mg_fft_mem`) that serves four reads and four writes in
  every cycle.

### Memory organisation

On the array, the memory unit is a 4×4 block of memory-mode cells for each
4-bit slice of a sample.

- **Banks.** Every cell splits its 128 words into a read bank and a write
  bank of 64 words each. The banks swap roles after every stage.
- **Reads.** Column j of the block is the read memory of kernel input j.
  Every column holds a full copy of the data, so the four reads of a group
  are free to address anything.
- **Writes.** Row q is the write memory of kernel output q. A write from
  output q goes to all cells of row q, so every column sees it.
- **Addressing.** A sample index i is stored in row `i[7:6]` at entry
  `i[5:0]`.

`mg_fft_mem` stores whole 32-bit samples, with the eight 4-bit slices
merged. It keeps the full [4 columns][4 rows][2 banks][64] storage, so it
has the same capacity and the same port rules.

### Ordering of the stages

The ordering makes sure the four writes of a group never collide:

1. The input is loaded in base-4 digit-reversed order. The `load_*` port
   takes natural indices and reverses them itself.
2. In stage s (0..3), group g (0..63) reads samples `4g .. 4g+3`.
3. It multiplies input m by W^(m·t), where `t = (g >> (6−2s)) << (6−2s)`.
   Each of the three tables supplies one of the twiddles W^t, W^2t, W^3t.
4. It writes output q to sample `g + 64q`, which is always row q.

This is a constant-geometry decimation-in-time FFT: every stage uses the
same read and write pattern, and only the twiddles change. After stage 3,
the memory holds X[k]/256 in natural order, readable with `rd_idx`.

### Kernel

1. The three twiddle products are formed with Q15 twiddles and rescaled into
   24-bit sums.
2. The first butterfly layer forms b0 ± b2 and b1 ± b3.
3. The second layer combines these, multiplying by −j where needed:
   - Y0 = r0 + r2
   - Y2 = r0 − r2
   - Y1 = r1 − j·r3
   - Y3 = r1 + j·r3
4. Each output is divided by 4 and cut back to 16 bits, so values cannot
   overflow from stage to stage.

### Timing

- The kernel takes 66 cycles. With one cycle for the memory read and one for
  the write, it is 68 cycles from memory to memory.
- A group is issued every cycle, so a stage takes 63 + 68 = 131 cycles.
- The whole transform takes 4 · 131 = **524 cycles** from `start` to `done`,
  which is 0.73 µs at 720 MHz.
- `busy` is high for those 524 cycles, and `done` is high in the last of
  them.
- Loading and reading are ignored while the transform is busy.

## Clocking, reset and interfaces

- **Clock.** All logic uses one clock, `clk`.
- **Reset.** Reset is synchronous and active low (`rst_n`). It clears
  pipeline registers and valid bits. It does not clear RAM contents.
- **Package.** Shared types and tables are in `mg_pkg`:
  - `digit_t` (4-bit);
  - `cplx16_t` (16-bit real and imaginary parts);
  - `hfp_t` (the floating-point format);
  - the crossbar encodings;
  - the CORDIC constants and the quarter-wave sine table.
- **Delays.** `mg_delay` is the generic pipeline used to reach each mapped
  latency.

## Where this RTL departs from the mapped design

- **Word-level modules.** Apart from the 32-bit adder, the mapped modules
  are written at word level, not as configurations of `mg_fabric`. Their
  cycle latencies and throughputs match the mapped versions. Their cell
  counts are not modelled:
  - FP adder: 52 cells;
  - FP multiplier: 104 cells;
  - FIR filter: four 8×8 blocks;
  - CORDIC: a 16×32 block;
  - FFT kernel: 32×16 cells.
- **Parallel ports.** The multiplier and shifter have word-parallel ports.
  The mapped versions take one operand digit-serially and produce the
  product digit by digit over 13 cycles.
- **FIR grouping.** The FIR filter is one chain of 12 taps, not four
  three-tap modules.
- **Shifter first row.** The first row of the shifter covers 0–3 bits.
  Together with the optional 4 and 8 this gives every shift from 0 to 15.
- **Memory mode in the array.** The array does not route memory mode
  through the mesh, and it has no configuration loading.
- **Own choices.** The following are choices of this design:
  - rounding and scaling, such as Q15 coefficients and twiddles and the
    1/4 scaling per FFT stage;
  - the CORDIC angle unit;
  - the FFT load and read ports.

## Simulating

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. Each testbench also has a watchdog that
ends it if the design hangs. They check:

- values computed independently in the testbench;
- every latency listed above, including the 316-cycle FIR stream, the
  313-cycle CORDIC cascade and the 524-cycle FFT.

`tb_mg_dsp_top` is the end-to-end test. It runs the top at its default
sizes, including the full 32×32 array. It drives every module, checks the
results, and counts each mechanism at least once:

- mesh transfers;
- tree routes;
- adder carries;
- signed multiplication;
- shifts;
- floating-point alignment and realignment;
- an FIR run;
- a CORDIC run;
- a full FFT with a peak-bin check.

With Verilator 5:

```sh
verilator --binary --timing --assert -Wno-fatal --top-module tb_mg_fft256 \
  -y rtl -y tb +libext+.sv rtl/mg_pkg.sv tb/tb_mg_fft256.sv
./obj_dir/Vtb_mg_fft256
```

Replace `tb_mg_fft256` with any other testbench name. The block testbenches
finish in seconds. The top-level test takes about a minute and a half to
build and run.
