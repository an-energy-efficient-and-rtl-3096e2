# Stochastic-computing LSTM layer

This is a hidden layer of a long short-term memory (LSTM) recurrent network in
which almost all arithmetic is done on random bit streams instead of binary
words. A value in [-1, +1] is a stream whose fraction of '1' bits is
(v + 1) / 2 (the *bipolar* stochastic representation). With that encoding:

* a multiplication is one XNOR gate per bit,
* a weighted sum is a parallel counter of the '1's of all product streams,
* sigmoid and tanh become small clamp-linear units and saturating up-down
  counters.

This keeps the datapath tiny, and a flipped bit costs only 1/n of a value.
Long streams would be expensive to store, so every value that must survive
from one time step to the next (the cell state, the block output) is
converted back to an M-bit binary number. Values are converted back into
streams by comparators against random numbers. The design is therefore a
hybrid: stochastic arithmetic, binary storage.

The RTL follows a published architecture for an energy-efficient,
noise-tolerant SC-LSTM. It fills in the parts that the architecture leaves
open (number widths, timing, state counts, control). These choices are marked
below and in the opening comment of each file.

## The computation

For memory block *k* with cells *v*, at time step *t* and with input vector
*u* (external inputs, the outputs of all blocks at *t-1*, and a bias +1):

```
y_in, y_fg, y_out = sigmoid(w_in . u), sigmoid(w_fg . u), sigmoid(w_out . u)
S_v(t) = y_fg * S_v(t-1) + y_in * g(w_cell,v . u)          g(x) = 2 tanh(x/2)
O_k(t) = y_out * sum_v h(S_v(t))                           h(x) = tanh(x/2)
```

g has the range [-2, 2], which no stream can carry. The state update is
therefore written as three terms, each in [-1, 1]:

```
S(t) = y_fg*S(t-1)  +  y_in*tanh(net/2)  +  y_in*tanh(net/2)
         x                 z                     z'
```

z and z' carry the same value but are produced by two independent stream
generators and activation units, so that they are not the same bits.

## Number format between blocks

Every binary value is an unsigned M-bit *bipolar code*
`c = floor((v + 1) / 2 * 2^M)`, saturated at 2^M - 1 (M = 8 by default).
Code 128 is 0, code 255 is about +1 and code 0 is -1. A stochastic number
generator (SNG) turns c into bits with P('1') = c / 2^M, which is exactly the
bipolar stream of v. The probability estimators and the state processing
unit produce codes in the same format, so every binary register can feed an
SNG directly. Weights and inputs enter the layer in this format too.

## One time step: two stream windows

A stream window is L = SEQ_LEN / ALPHA clock cycles. ALPHA is the number of
parallel lanes (see below). A time step is two windows, each closed by one
latch cycle; `step_ctrl` sequences them:

| phase  | cycles | what runs |
|--------|--------|-----------|
| window A | L | input gate and forget gate, both cell-input Btanh chains of every cell, the cell kernels, a probability estimator on every cell's h(S) stream |
| done_a | 1 | cell states S(t) latch from the state processing unit; q = clamp(sum of the cells' h(S) codes) latches; counters and Btanh states clear |
| window B | L | output gate; SNG(q) multiplied by the output-gate stream gives O(t); a probability estimator counts it |
| done_b | 1 | the block output code O(t) latches; it becomes an input of every block at t+1 |

The step latency is 2L + 2 cycles: 258 cycles at the defaults (128-bit
streams, one lane). The split into two windows is this design's choice. The
output gate and q must meet in one window, and q is known only at the end of
window A. The architecture itself keeps q in a binary register and converts
it back to a stream, and window B is where that happens.

## The cell kernel and the state processing unit

The cell kernel (`cell_kernel`) holds S(t-1) as a code. During window A:

1. an SNG turns S(t-1) into ALPHA streams, which are XNOR-multiplied by the
   forget gate stream to give x;
2. a parallel counter counts the '1's among x, z and z' in each cycle
   (3·ALPHA bits);
3. the state processing unit (`spu`) adds these counts up over the window;
4. a Btanh up-down counter, driven by the same bits, streams h(S(t))
   directly as `c_out`.

The `spu` computes the new state without a multiplier or a divider. Let
NA = n·α = SEQ_LEN be the bits per signal and D = 3 the number of signals.
If Σ is the accumulated count, then the bipolar sum is
S = (2Σ - NA·D) / NA, and

```
T  = 2Σ + NA
T' = T - NA·D                 ( = NA·(S + 1) )
S_B = 0                        if T' <= 0        (S <= -1)
    = 2^M - 1                  if T' >= 2·NA     (S >= +1)
    = floor(2^(M-1) · T' / NA) otherwise
```

S is thus clamped to [-1, +1] and scaled to M bits. NA is a power of two, so
all scaling is done with shifts: a left shift by M-1-log2(NA), which becomes
a right shift when that number is negative. `lo` and `hi` flag the two
clamping cases. Clamping is harmless, because only tanh(S/2), which saturates
anyway, leaves the cell.

## Btanh: tanh from an up-down counter

The stochastic tanh is a chain of N states. Each '1' moves one state up and
each '0' one state down; the chain saturates at both ends, and the output is
'1' in the upper half. `btanh_fsm` generalizes this to counted inputs. A
cycle whose K input bits contain c ones moves the state by 2c - K. With
ALPHA lanes, the lane counts are applied one after the other within the
cycle, and each lane gets its own output bit. The machine therefore behaves
exactly like the one-lane machine run ALPHA times faster. The architecture
does not give the number of states; they were chosen by simulating the state
machine:

* **cell-input Btanh** (`btanh`, D = N_U inputs): `2*ceil(D/4)` states.
  For a handful of inputs (6 in the unit test), the curve comes within
  about 0.1 of tanh(net/2), also for inputs of mixed sign. With many inputs
  it departs further; the workload test uses its exact expected value.
* **cell-kernel Btanh** (3 inputs): 2 states, so the output is the majority
  of x, z, z' from the previous cycle. Its mean is `(a+b+c)/2 - abc/2`. This
  is close to tanh(S/2) when the three terms agree in sign, but it is off by
  up to about 0.4 when the forget term and the input terms have opposite
  signs. More states give a curve that is too steep for the 3-input case.

## Gate units (A-SCAU)

`ascau` counts the '1's of its D·ALPHA product streams in the cycle. The
linear approximation unit `lau` then maps that count x, read as the bipolar
sum of the inputs, to

```
psi(x) = min(1, max(p, x/r + s))
```

A comparator against a random number turns psi into a stream, one
comparator per lane. The sigmoid is `{p = 0, r = 4, s = 1/2}`
(`scrnn_pkg::LAU_SIGMOID`) and ReLU is `{p = 0, r = 1, s = 0}`. r must be a
power of two; p and s are signed with 8 fraction bits. The gate value is
emitted as a *bipolar* stream (P('1') = (psi + 1) / 2), so that it can be
multiplied with XNOR gates like every other signal. psi is applied to each
cycle's count. It is not applied to the window average. When many inputs
feed a gate, the count varies widely from cycle to cycle, so the effective
gate function is a smoothed version of the clamp-linear sigmoid. That is
closer to a true sigmoid, but it is not exactly psi.

## Parallel lanes and the approximate counter

`ALPHA` splits each stream into ALPHA synchronized lanes, each from its own
random number generator. For example, a 256-bit stream becomes 8 × 32 bits.
A window then takes SEQ_LEN / ALPHA cycles. SEQ_LEN and ALPHA must be powers
of two.

`APPROX = 1` replaces the exact parallel counters with approximate ones:
every full group of nine inputs goes through `approx_apc9`, and the rest is
counted exactly. `approx_apc9` reduces eight inputs in pairs with four gates,
AND, OR, AND, OR, each output worth 2. Two half adders, a third half adder
and a full adder then add them; the ninth input is the 2^0 bit. For
independent streams AND + OR of two disjoint pairs has the expected value of
their exact sum. The adder structure is the published one; the gate types are
this design's choice. With the default ALPHA = 1 the cell kernel has only 3
counter inputs, so no nine-input group forms there.

## Files

All RTL is in `rtl/`, one unit per file; each file starts with a description
of its interface and timing.

| file | role |
|------|------|
| `scrnn_pkg.sv` | code width, `lau_cfg_t`, sigmoid/ReLU presets, seed and log2 helpers |
| `lstm_layer.sv` | **top**: N_BLOCKS memory blocks, recurrent input vector, `step_ctrl` |
| `step_ctrl.sv` | IDLE → window A → done_a → window B → done_b |
| `memory_block.sv` | gates, per-cell Btanh chains, cell kernels, estimators, q adder, output multiplier |
| `cell_kernel.sv` | state update (SNG, XNOR, counter, `spu`) and h(S) stream (Btanh) |
| `spu.sv` | accumulator and clamp/scale of the new state |
| `btanh.sv`, `btanh_fsm.sv` | Btanh: per-lane counters + saturating up-down counter |
| `ascau.sv`, `lau.sv` | gate unit: counter, clamp-linear function, comparators |
| `apc.sv`, `approx_apc9.sv` | exact / approximate parallel counters |
| `sc_product_bank.sv` | SNGs for N_U inputs and weights, XNOR products |
| `sng.sv`, `lfsr_rng.sv` | comparator SNG with ALPHA lanes; 16-bit Galois LFSR |
| `sc_mult.sv` | XNOR multiplier |
| `pe.sv` | probability estimator (counter + shift) |

Each random number generator gets a distinct seed from
`scrnn_pkg::seed_of(index)`. Blocks and product banks reserve index ranges
(see `memory_block`), so no two generators in a layer share a seed.

## Using the layer

Parameters of `lstm_layer` (defaults = the 4-block, 1-cell symbol-prediction
network with 128-bit streams):

| parameter | default | meaning |
|-----------|---------|---------|
| N_IN | 7 | external inputs (one per grammar symbol) |
| N_BLOCKS | 4 | memory blocks |
| N_CELLS | 1 | cells per block |
| ALPHA | 1 | parallel lanes per stream |
| SEQ_LEN | 128 | stream length in bits per signal and window (n·α) |
| M | 8 | binary code width |
| APPROX | 0 | approximate parallel counters |

Each gate and cell has N_U = N_IN + N_BLOCKS + 1 weights, in the order
`[x_0 .. x_{N_IN-1}, O_0(t-1) .. O_{N_BLOCKS-1}(t-1), bias]`.

Protocol:

1. Drive `gate_cfg = scrnn_pkg::LAU_SIGMOID` and all weight codes, and hold
   them stable.
2. While `busy` is low, pulse `seq_start` for one cycle. This sets all
   states S to 0, all block outputs O to 0 and q to 0.
3. For each element of the sequence, set `x` and pulse `start` while `busy`
   is low. `busy` is then high for 2L + 2 cycles, and `step_done` marks the
   last of them. After it, `o_code`, `q_code` and `s_code` hold the results
   of the step.
4. `clamp_lo` / `clamp_hi` are valid while `latch_a` is high.

An assertion in `step_ctrl` flags a `start` while busy.

Simulation with plain Verilator (the package first; `-y` finds the rest):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    rtl/scrnn_pkg.sv tb/tb_lstm_full.sv --top-module tb_lstm_full
./obj_dir/Vtb_lstm_full
```

Any other testbench runs the same way: replace both names. `-Wno-fatal`
keeps the width warnings of the testbench arithmetic from stopping the
build. Each run takes seconds to a few minutes. `tb_workloads`, the largest,
takes about half a minute to compile. Seeds come from `$urandom`; a
different seed is chosen with `+verilator+seed+N`.

Every testbench ends with a `TB_RESULT checks=N failures=F` line and has a
watchdog.

## Testbenches and how far to trust the results

* **Unit tests** (`tb_sc_mult`, `tb_apc`, `tb_approx_apc9`, `tb_sng`,
  `tb_pe`, `tb_lau`, `tb_btanh_fsm`, `tb_spu`, `tb_step_ctrl`) are exact.
  They compare against bit counts, against real-arithmetic evaluations of
  psi and of the clamp/scale formula, and against cycle-by-cycle models of
  the state machines. The SNG test runs a full LFSR period, where the number
  of '1's must be exactly 256·x − 1.
* **Stochastic blocks** (`tb_btanh`, `tb_ascau`, `tb_cell_kernel`,
  `tb_memory_block`) combine exact checks with statistical checks against
  the real-valued equations:
  * Btanh within 0.1 of tanh(x/2);
  * gate output counts within 5σ of the per-cycle expectation, both in
    total and separately for each input count, which traces psi point by
    point;
  * new cell state equal to the formula applied to the counted bits, and
    within 0.25 of the ideal update;
  * q exactly the clamped sum of the h codes.
* **End to end**: `tb_lstm_layer` runs two layers of 3 inputs and 2 blocks
  × 2 cells with 256-bit streams. One has one lane and exact counters; the
  other has 4 lanes and approximate counters. The test runs two sequences of
  6 steps. Each step is checked against the LSTM equations in real
  arithmetic, starting from the layer's own previous state:
  * states within 0.45, outputs within 0.4;
  * exact step latency;
  * that seq_start clears.
  It also counts window A, window B, restarts, clamps low and high, unclamped
  states and approximate-counter steps; each must occur.
* **Full size**: `tb_lstm_full` runs the default layer on three random
  strings of the symbol grammar (B, T/P branches, …, E). The strings are fed
  one-hot, one symbol per step, with random weights. It checks the 258-cycle
  latency, states within 0.6 and outputs within 0.4. At 128 bits a state,
  being a sum of three estimates, has a standard deviation of about 0.15.
* **Other network sizes**: `tb_workloads` uses a shared harness,
  `lstm_seq_run`, to run two configurations:
  * the grammar network with 3 blocks × 2 cells at 128 bits;
  * a 12-input, 8-block slice of the speech-feature network at 256 bits,
    with 4 lanes and approximate counters, fed random frames.

  Here the reference is not the ideal equations but the *expected value of
  the stochastic datapath* for independent streams:
  * gates = E[psi(per-cycle sum)], taken over the exact distribution of the
    count;
  * cell input = the expected output of the Btanh counter, walked through
    the window state by state.

  The mean absolute state error is about 0.14 at 128 bits and 0.15 at
  256 bits with 4 approximate lanes (0.12 with exact counters). Against the
  ideal clamp-linear LSTM, single state errors reach 0.7. The gap comes from
  a systematic difference, not noise: psi applied to each cycle's sum is a
  smoothed sigmoid once many inputs feed a gate, and the Btanh curve is not
  exactly tanh. Weights trained for this hardware would absorb the
  difference, but weights trained on a floating-point model would see it.

No trained weights are available, so classification accuracy on any dataset
is not reproduced. Noise tolerance is not reproduced either: those
experiments flip bits in the computation at a given signal-to-noise ratio,
and no fault-injection hooks are built into the RTL. Nor has the RTL been
timed against a clock target; the architecture was evaluated at 200 MHz. The tests show two things. The datapath computes what its
stochastic model predicts, within stream noise. And it tracks the LSTM
equations within the bounds given above.

## Departures and open choices

* **Two windows per step, binary O(t)**: see above. Gate inputs are the
  external inputs, block outputs and a bias. There are no peephole
  connections from the cell to its gates.
* **q is clamped to [-1, +1]** before it is turned into a stream.
* **Widths and state counts**: M = 8, 16-bit LFSRs, the Btanh state counts
  above, and p/s with 8 fraction bits are all this design's choices.
* **Random number generators** are not shared. Each SNG lane and each gate
  comparator has its own LFSR. The architecture notes that the gate inputs
  could share generators, because the gate unit only sums its inputs.
  Elsewhere it asks for the copies of an input that feed different gates
  to be generated separately, to reduce correlation. This design follows
  the second statement, so that saving is not taken here.
* **Parallel Btanh** walks the lanes in sequence within a cycle. With one
  lane, the cell kernel's Btanh reuses the state unit's counter. With
  ALPHA > 1 lanes, each lane gets its own small 3-input counter over the
  same bits, because the Btanh needs the lane counts separately.
* **Not included**: the output layer of a classifier, the external weight
  and data memory, layer stacking, and any time-multiplexing for large
  layers (120 to 500 units). A single `lstm_layer` can be parameterized to
  such a size, but it is fully parallel. Each block holds
  (3 + 2·N_CELLS)·N_U input/weight SNG pairs, so large layers are large.
