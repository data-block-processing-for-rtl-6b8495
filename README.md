# Block-processing FIR core for a single-multiplier DSP

A direct-form FIR filter on a DSP with one multiply-accumulate unit normally
computes one output at a time: for every product it fetches a fresh sample and
a fresh coefficient. Both multiplier inputs change on every cycle, and both
memory buses (data and address) switch on every cycle. All of that costs power.

This core computes the outputs in **blocks of L**. It fetches one coefficient
and multiplies it by L samples held in a small register file. Each of the L
products goes to its own accumulator. For the next coefficient, only one new
sample is fetched. It overwrites the oldest sample in the register file, and
the registers are then read in rotated order. The result:

* the multiplier's coefficient input changes once every L products instead of
  on every product;
* per output, the core reads N/L coefficients and 1 + (N-1)/L samples instead
  of N of each (N is the number of taps);
* the multiplier does the same number of products, N per output, at one
  product per clock.

The arithmetic is ordinary full-precision FIR filtering. The block order only
changes the order of the products and where they are accumulated, so every
output is exact.

## One block, step by step

Let the block produce outputs y(m) … y(m+L-1), where
y(n) = Σ h(k)·x(n−k) for k = 0 … N−1. Accumulator ACC_j collects y(m+j). The
coefficients are applied from h(N−1) down to h(0). For coefficient h(k),
ACC_j needs sample x(m+j−k). So the L samples in use always form a window of
consecutive samples. From one coefficient to the next, that window moves
forward by exactly one sample.

1. **Preload.** Fetch x(m−N+1) … x(m−N+L) into R_0 … R_{L−1}, and fetch h(N−1).
2. **Products.** For j = 0 … L−1, add h(k)·R_{(p+j) mod L} into ACC_j, where p
   is the register holding the oldest sample of the window (p = 0 at first).
3. **Slide.** On the last product of h(k), fetch h(k−1) and the one new sample
   x(m−N+1+L+i), where i counts the coefficient steps done so far. Write the
   new sample into R_p, the register that held the oldest sample, and advance
   p by one (mod L).
4. Repeat 2–3 down to h(0). ACC_0 … ACC_{L−1} then hold y(m) … y(m+L−1). They
   are sent out in that order, m advances by L, and the next block starts.

Example with N = 6 and L = 3, for the block y(m), y(m+1), y(m+2):

| coefficient | R_0      | R_1      | R_2      | p | ACC_0 += h·       | ACC_1 += h·       | ACC_2 += h·       |
|-------------|----------|----------|----------|---|-------------------|-------------------|-------------------|
| h(5)        | x(m−5)   | x(m−4)   | x(m−3)   | 0 | R_0 = x(m−5)      | R_1 = x(m−4)      | R_2 = x(m−3)      |
| h(4)        | *x(m−2)* | x(m−4)   | x(m−3)   | 1 | R_1 = x(m−4)      | R_2 = x(m−3)      | R_0 = x(m−2)      |
| h(3)        | x(m−2)   | *x(m−1)* | x(m−3)   | 2 | R_2 = x(m−3)      | R_0 = x(m−2)      | R_1 = x(m−1)      |
| h(2)        | x(m−2)   | x(m−1)   | *x(m)*   | 0 | R_0 = x(m−2)      | R_1 = x(m−1)      | R_2 = x(m)        |
| h(1)        | *x(m+1)* | x(m−1)   | x(m)     | 1 | R_1 = x(m−1)      | R_2 = x(m)        | R_0 = x(m+1)      |
| h(0)        | x(m+1)   | *x(m+2)* | x(m)     | 2 | R_2 = x(m)        | R_0 = x(m+1)      | R_1 = x(m+2)      |

The sample in italics is the one fetched for that coefficient. The block
reads 3 + 5 = 8 samples and 6 coefficients to make 18 products. Done one
output at a time, the same 18 products would need 18 reads of each memory.

The whole block is built from samples up to x(m+L−1). So a block can start
only once all L of its own input samples have arrived. Samples before the
first input (negative n) read as zero, because the sample memory is cleared
after reset.

## Datapath

```
 in stream ──> input_unit ──> data_memory ──(1 sample / coefficient)──> data_register_file R_0..R_{L-1}
                                                                               │ R_{(p+j) mod L}
 host ──> coef_memory ──(1 coefficient / L products)──────────────────┐        │
                                                                      v        v
                                                  mac_unit: coefficient reg, data reg
                                                            array_multiplier (gate level)
                                                            accumulator_bank ACC_0..ACC_{L-1}
                                                                      │
 out stream <── output_unit <─────────────────────────────────────────┘
            block_controller drives every address, enable and index
```

| module | role |
|---|---|
| `block_fir_dsp` | top level; wires the blocks below together |
| `block_controller` | finite-state machine with states IDLE, PRELOAD, MAC, DRAIN and OUT; produces the memory addresses, the register rotation, and the accumulator index for each product |
| `data_register_file` | the L data registers; one write port, one read port, and a write-to-read bypass |
| `mac_unit` | multiplier operand registers, multiplier and accumulators; the coefficient operand register is loaded only on the first product of each coefficient |
| `array_multiplier` | two's complement W×W array multiplier built only from AND, OR and XOR gates: a Baugh-Wooley partial-product array, a carry-save array of `full_adder` cells, and a ripple-carry final row |
| `accumulator_bank` | ACC_0 … ACC_{L−1}; clear, add at an index, combinational read |
| `data_memory` | circular sample buffer (sample s is at address s mod DEPTH); synchronous read |
| `coef_memory` | h(k) at address k; synchronous read whose output holds until the next read |
| `input_unit` | valid/ready sample input; clears the data memory after reset; back-pressure |
| `output_unit` | reads ACC_0 … ACC_{L−1} into a valid/ready output stream |
| `block_fir_pkg` | controller state type |

### Pipeline and timing

Both memories return data one cycle after the read. The multiplier has
registered operands, and its product is added into the accumulator on the
next edge. This gives the following schedule:

* In the last MAC cycle of coefficient h(k), the controller reads h(k−1) and
  the next sample. Both arrive at the start of the next coefficient's group.
  The new sample is written into the register file at the end of that first
  cycle. It is first needed in the group's last cycle, j = L−1. When L = 1,
  that is the same cycle, and the register-file bypass forwards the sample.
* The coefficient memory's output does not change during the L cycles of a
  group. The coefficient operand register is loaded once per group.
* Cycles per block, with the input ahead and the output ready:
  1 (IDLE) + L (PRELOAD) + N·L (MAC) + 2 (DRAIN) + L + 1 (output) =
  **N·L + 2L + 4**. The multiplier is busy N·L of those cycles. For
  N = 32, L = 16 this is 548 cycles per 16 outputs (93 % multiplier use). For
  N = 32, L = 2 it is 72 cycles per 2 outputs (89 %).
* Blocks do not overlap. The next block's preload waits until the output unit
  has sent the current block, because the accumulators are reused.

### Input buffering and back-pressure

The input unit counts accepted samples (`wr_count`). It writes sample s to
address s mod DMEM_DEPTH. The controller reports `keep_from` =
m − (MAX_TAPS − 1), the oldest sample any block starting at m could need. The
input unit accepts a sample only while fewer than DMEM_DEPTH samples from
`keep_from` onward are held. With the defaults, this lets the input run up to
129 samples ahead of the block being computed. The sample memory must be at
least MAX_TAPS − 1 + MAX_BLOCK words deep; an elaboration-time assertion
checks this.

## Interface of `block_fir_dsp`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `num_taps` | in | clog2(MAX_TAPS+1) | N, 1 … MAX_TAPS |
| `block_len` | in | clog2(MAX_BLOCK+1) | L, 1 … MAX_BLOCK |
| `coef_we`, `coef_waddr`, `coef_wdata` | in | 1, clog2(MAX_TAPS), DATA_W | write h(k) at address k |
| `in_valid`, `in_data`, `in_ready` | in/in/out | 1, DATA_W, 1 | input samples, two's complement; a sample is taken when valid and ready are both high |
| `out_valid`, `out_data`, `out_last`, `out_ready` | out/out/out/in | 1, ACC_W, 1, 1 | outputs y(0), y(1), … in order; full precision; `out_last` marks the end of each block |
| `init_done` | out | 1 | high once the sample memory has been cleared (DMEM_DEPTH cycles after reset) |

Use it as follows:

1. Hold reset.
2. Set `num_taps` and `block_len`.
3. Write the coefficients. The coefficient memory has no reset and can be
   written during reset.
4. Release reset.
5. Stream samples in. Samples offered before `init_done` are simply not
   accepted.

N and L are read at the start of every block. Change them only between runs
(reset in between). Outputs are not rounded or saturated. `out_data` is the
exact sum, ACC_W = 2·DATA_W + clog2(MAX_TAPS) bits wide.

Parameters (defaults): `DATA_W` = 16, `MAX_BLOCK` = 16, `MAX_TAPS` = 128,
`DMEM_DEPTH` = 256 (a power of two), `ACC_W` derived. `MAX_BLOCK` must be at
least 2.

## What it achieves

These figures were measured on the RTL by `tb_block_fir_dsp`. It uses a 32-tap
Hamming-windowed lowpass filter, 1000 uniformly distributed random 16-bit
samples, and counts of the memory read strobes and of the operand-register
bit toggles:

| L | sample reads per output | fewer than 1 per product | coefficient reads per output | fewer | coefficient-operand switching, fewer than L=1 | data-operand switching, fewer than L=1 |
|---|---|---|---|---|---|---|
| 2  | 16.5  | 48.44 % | 16 | 50 %    | 50 %    | ≈ 48 % |
| 4  | 8.75  | 72.66 % | 8  | 75 %    | 75 %    | ≈ 0 %  |
| 8  | 4.875 | 84.77 % | 4  | 87.5 %  | 87.5 %  | ≈ 0 %  |
| 16 | 2.94  | 90.82 % | 2  | 93.75 % | 93.75 % | ≈ 0 %  |

At L = 2, consecutive products share a sample, so the data operand also
switches about half as often. For larger L, consecutive products use
different samples.

The same runs also count two more kinds of switching against L = 1:

* every net inside the gate-level multiplier: partial-product bits, and the
  sum and carry of every full adder. The count uses zero-delay values sampled
  once per cycle, with every net weighted equally;
* the bits of the two memory address buses, counted between successive reads.

| L | multiplier nets, 8-bit | 16-bit | 24-bit | address buses (16-bit run) |
|---|---|---|---|---|
| 2  | 25.7 % | 21.3 % | 18.7 % | 49.2 % |
| 4  | 20.1 % | 11.9 % | 13.5 % | 73.9 % |
| 8  | 22.4 % | 13.5 % | 15.7 % | 86.2 % |
| 16 | 25.1 % | 14.7 % | 17.6 % | 92.4 % |

The multiplier saves most at L = 2, least at L = 4, and more again as L
grows. Narrower multipliers save more. This is the pattern expected of the
scheme. The absolute power also depends on glitches and on each net's
capacitance, neither of which is modelled here, so these counts give only
the shape of the saving, not a power figure. The 8-bit and 24-bit columns
come from `tb_block_fir_widths`, which uses a 32-tap lowpass of its own.

## Verification

Every module has a self-checking testbench in `tb/`, named `tb_<module>.sv`.
Each prints `TB_RESULT checks=… failures=…`.

* `tb_array_multiplier`: all 65 536 operand pairs at 8 bits, plus corner and
  random pairs at 16 and 24 bits.
* `tb_block_controller`: the controller against a behavioural model of the
  rest of the datapath. It checks outputs, reads per block (N and N−1+L),
  products, coefficient loads and cycle counts. It covers N = 6/L = 3,
  N = 32 with L = 2…16, N = 89, N = 128, L = 1 and N < L.
* `tb_block_fir_dsp`: the whole core at its default parameters. It covers:
  * the 6-tap, L = 3 example;
  * N = 32 with L = 1, 2, 4, 8, 16;
  * N = 89 with stalls on both streams;
  * L = 1 (bypass);
  * N = 128.

  It compares every output with the convolution sum and checks the block
  period N·L + 2L + 4. It checks the read counts per block, and the
  switching reductions described above. It also counts the memory clear,
  input and output back-pressure, bypass use, and configuration changes;
  each of these must happen at least once.
* `tb_block_fir_widths` (with the helper `fir_width_harness`): builds the core
  with 8-bit and with 24-bit data. It runs N = 32 (1000 samples, L = 1 … 16)
  and N = 89, and measures the multiplier's switching.

To simulate with Verilator (5.x), from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_block_fir_dsp \
          rtl/block_fir_pkg.sv tb/tb_block_fir_dsp.sv -o sim
./obj_dir/sim
```

Other modules are found through `-Irtl`/`-Itb`. The full-core testbench runs
in under a second once built.

## Where this design makes its own choices

The block schedule and its per-output read counts follow the scheme exactly:
register rotation, oldest sample replaced, one coefficient fetch per L
products, 1 + (N−1)/L sample reads and N/L coefficient reads per output. So
does the use of a gate-level two's complement array multiplier. The
following are choices of this implementation:

* **Output order.** ACC_j holds y(m+j), so the outputs of a block come out in
  time order, and the oldest sample of the window sits in R_0 at the start.
  One statement of the scheme lists the block in the reverse order, y(n),
  y(n−1), …. The worked example of the scheme uses the ascending order, and
  that is what is built.
* **Where the coefficient lives.** The current coefficient is held in the
  coefficient memory's output register and in the multiplier's coefficient
  operand register. It is not copied into a register-file entry next to the
  samples; the effect on the multiplier input is the same.
* **Runtime N and L.** N and L are inputs, not fixed parameters, so one build
  covers block sizes 2…16 and filter lengths up to 128.
* **Word sizes.** The default data width is 16 bits; the scheme was evaluated
  at 8, 16 and 24. The accumulators are full precision.
* **Memories and interfaces.** The memory depths, the synchronous-read
  memories, the valid/ready streams, the memory clear, the back-pressure rule
  and the host port for loading coefficients are all choices of this design.
  The scheme itself only names input/output units and data and coefficient
  memories.
* **Pipeline.** The two-stage MAC pipeline, the register-file bypass, and the
  non-overlapped preload, drain and output phases are also this design's
  choices. Overlapping the next block's preload with the current block's
  output would remove up to 2L + 4 idle multiplier cycles per block.
* **Multiplier structure.** The Baugh-Wooley partial-product array with a
  ripple-carry final adder is one possible array arrangement.
* **Sample counter.** The 32-bit `wr_count`/`m` counters wrap after 2^32
  samples. All comparisons are modular, so wrapping is harmless.
