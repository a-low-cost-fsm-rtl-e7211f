# FSM-based low-discrepancy bit-stream generation for stochastic computing

Stochastic computing (SC) represents a number in [0, 1] as a stream of bits
whose fraction of ones is the value. Arithmetic then becomes very cheap. For
example, ANDing two *independent* streams multiplies their values. The price is
converting binary numbers into streams. For accurate, short computations the
streams should be *low-discrepancy* (LD): their ones are spread as evenly as
possible, the way the points of a Sobol sequence are. The usual LD converter
compares the binary input with a Sobol number every cycle. That needs a Sobol
number generator and an N-bit comparator for every stream, and the Sobol
generator is expensive.

This RTL replaces both with a small finite state machine and a multiplexer.
For N-bit data X = x_(N-1)…x_0, an LD stream of 2^N bits contains bit x_i
exactly 2^i times. So the stream can be produced by *picking input bits*: in
each cycle an FSM points an (N+1)-to-1 MUX at one bit of X, or at a constant 0.
The order of the picks is computed once, offline, from a Sobol sequence. It
becomes a fixed state-to-select table, so no Sobol generator is left in
hardware. A different Sobol sequence gives a different, statistically
independent pattern with the same hardware shape. That is what a multiplier
with several inputs needs.

The repository holds the generator and the structures built around it:

* a full-precision multiplier for I inputs that uses the *rotation* trick;
* an M-times parallel generator;
* a fault-tolerant version with N-modular redundancy;
* a convolution engine in which many inputs share one FSM through a one-hot
  encoder and per-input AND-OR circuits.

## From a Sobol sequence to a bit-selection order

Take the first 2^N points S_0 … S_(2^N−1) of a Sobol sequence. They are
exactly the N-bit fractions 0, 1/2^N, …, 1 − 1/2^N, in some order. FSM state k
selects according to where S_k falls:

| S_k lies in | selected input |
|---|---|
| [0, 1/2) | x_(N−1) |
| [1/2, 3/4) | x_(N−2) |
| … [1 − 2^−(m−1), 1 − 2^−m) | x_(N−m) |
| 1 − 2^−N (the single largest point) | constant 0 |

The interval for x_(N−m) holds 2^(N−m) of the points, so x_i is picked 2^i
times and the stream holds exactly X ones. In terms of the N-bit fraction of
S_k, the rule is simple: count its leading ones c; select x_(N−1−c), or the
constant 0 when all N bits are ones. `ld_pkg` implements this rule.

For N = 4 and the first two Sobol sequences the orders are as follows
(`–` marks the constant 0). `tb_ld_fsm` checks both rows literally.

| k | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 | 10 | 11 | 12 | 13 | 14 | 15 |
|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|
| Sobol 1 ×16 | 0 | 8 | 4 | 12 | 2 | 10 | 6 | 14 | 1 | 9 | 5 | 13 | 3 | 11 | 7 | 15 |
| select | x3 | x2 | x3 | x1 | x3 | x2 | x3 | x0 | x3 | x2 | x3 | x1 | x3 | x2 | x3 | – |
| Sobol 2 ×16 | 0 | 8 | 12 | 4 | 10 | 2 | 6 | 14 | 15 | 7 | 3 | 11 | 5 | 13 | 9 | 1 |
| select | x3 | x2 | x1 | x3 | x2 | x3 | x3 | x0 | – | x3 | x3 | x2 | x3 | x1 | x2 | x3 |

The points are generated in natural order: S_k is the XOR of the direction
numbers v_j for every bit j set in k. The sequences are:

* Sobol 1 is the bit-reversed counter.
* Sobol 2 uses the polynomial x + 1.
* Sobol 3 to 10 use the Joe–Kuo direction numbers, selected with the `DIM`
  parameter (1…10). Both rows of the N = 4 table are reproduced exactly.
  Dimensions 3 to 10 are valid Sobol sequences, but nothing guarantees that they
  match the tables of another tool.

The table is computed at elaboration by constant functions (`ld_sel_rom`). In
hardware it is only the output decode logic of a Moore FSM whose state is an
N-bit counter. It is built in chunks of 2^10 entries, so that 2^16-state FSMs
still elaborate quickly.

## The generator: `ld_fsm` + `ld_mux` = `ld_bsg`

* `ld_fsm #(N, DIM, L)` has an L-bit state register (L = N by default), an
  asynchronous active-low reset `rst_n`, a synchronous `clear` and an `en`
  input. `sel` is combinational from the state. Code i < N selects x_i and code
  N selects the constant 0.
* `ld_mux #(N)` is the (N+1)-to-1 MUX. Input N is tied to 0.
* `ld_bsg` connects the two. Stream bit k appears on `bit_o` in the cycle in
  which `idx == k`. One bit is produced per clock, and 2^N cycles make one
  period with exactly `x` ones. `x` feeds the MUX directly, so hold it stable
  during a stream. With `en = 0` the stream stalls and repeats the current bit.

With L > N the FSM has 2^L states. It applies the same N intervals to the first
2^L Sobol points, and x_i then appears 2^(L−N+i) times. Two such streams with
different `DIM` and L = 2N multiply exactly after 2^(2N) cycles. This is the
direct full-precision design. Its FSM grows as 2^(I·N), which is why the
rotation scheme below exists.

## Multiplying I inputs at full precision: rotation (`sc_mult_rot`)

Two independent LD streams of 2^N bits ANDed together give an N-bit-precision
product. An exact product of I N-bit inputs needs a 2^(I·N)-bit output stream
in which every bit position of every input stream meets every combination of
the others exactly once.

`sc_mult_rot` does this with I ordinary 2^N-state generators, where generator k
uses Sobol pattern k + 1:

* Generator 0 runs freely with period 2^N.
* Generator k ≥ 1 *stalls* for one cycle every 2^(k·N) cycles. Its state is held
  in the cycle whose count has its low k·N bits all ones.

In cycle t, generator k therefore stands at position (t − ⌊t / 2^(kN)⌋) mod 2^N.
Write t = a + b·2^N + c·2^(2N) + …. Then the positions are (a, a − b, a − c, …)
mod 2^N, which is a one-to-one map. Over 2^(I·N) cycles every combination of
positions occurs once, and the number of ones in the AND stream is exactly
x_0·x_1·…·x_(I−1).

A shared I·N-bit cycle counter produces the stalls. `start` (one cycle) clears
the counter and all FSMs. After that, `valid` is high for 2^(I·N) cycles,
`prod_bit` carries the product stream, `last` marks its final bit, and `stall[k]`
shows when generator k holds (`stall[0]` is always 0).

`ROTATE = 0` builds the limited-precision multiplier instead. It has no stall
logic and runs for 2^N cycles, and its result has N-bit precision.

How good the product is before the full length is reached was measured on 200
random 8-bit pairs (`tb_wl_mult_accuracy`). The table gives the mean absolute
error of ones/cycles against a·b/2^16:

| cycles | 2^5 | 2^6 | 2^7 | 2^8 | 2^9 | 2^10 | 2^12 | 2^14 | 2^16 |
|---|---|---|---|---|---|---|---|---|---|
| MAE % | 1.25 | 0.79 | 0.35 | 0.15 | 0.080 | 0.036 | 0.0073 | 0.0012 | 0 |

Two 2^16-state FSMs (`ld_bsg`, L = 16, patterns 1 and 2) give the same numbers
for every prefix. Two facts explain this:

* For pattern 1 the longer FSM simply repeats its 2^8-state pattern.
* For pattern 2 it produces the rotated order.

## Parallel generation (`ld_fsm_par`, `ld_bsg_par`)

The M-times parallel FSM folds M consecutive states into one. It has 2^N/M
states, and state s outputs the M select codes of stream positions s·M …
s·M + M − 1. Each code drives its own (N+1)-to-1 MUX on the shared input.
`bits[j]` is stream bit idx·M + j, and a stream takes 2^N/M cycles. Read in
order, the bits are identical to the serial stream. The default is N = 8, M = 8,
which gives 32 states and 8 bits per cycle.

## Soft-error tolerance (`ld_bsg_nmr`)

A bit flip in the FSM's state register does not cost a single bit: it moves the
whole rest of the stream. `ld_bsg_nmr` keeps NR copies (odd, default 5) of the
state register, decode logic and MUX, and votes at two points:

1. **State.** The NR states are voted bitwise, and every copy loads the
   successor of the voted state. A corrupted copy is repaired at the next edge.
2. **Output.** The NR output bits are voted, so a copy that is wrong during the
   current cycle is outvoted.

`flip_state` (an XOR mask into each copy's next state) and `flip_out` (a flip of
each copy's output bit) exist to inject faults. Tie them to 0 in use. With
NR = 1 the module is a plain, unprotected generator.

`tb_wl_fault_tolerance` runs random 4-, 8- and 12-bit inputs (2^4-, 2^8- and
2^12-bit streams; 1000, 300 and 200 streams per rate). In every cycle, with
probability r, each copy gets a random single-bit state flip, and
independently an output flip. The MAE (%) of the stream value is:

| n | copies | 1 % | 2 % | 5 % | 10 % | 20 % | 30 % |
|---|---|---|---|---|---|---|---|
| 4 | 1 | 1.1 | 2.2 | 4.6 | 7.5 | 12.4 | 16.8 |
| 4 | 3 | 0.013 | 0.18 | 1.1 | 3.3 | 7.7 | 13.7 |
| 4 | 5 | 0.000 | 0.019 | 0.20 | 1.3 | 5.2 | 10.2 |
| 8 | 1 | 0.68 | 1.2 | 2.7 | 4.9 | 10.5 | 14.8 |
| 8 | 3 | 0.049 | 0.12 | 0.58 | 1.7 | 5.5 | 10.7 |
| 8 | 5 | 0.000 | 0.014 | 0.13 | 0.65 | 3.3 | 8.0 |
| 12 | 1 | 0.52 | 1.0 | 2.6 | 5.0 | 10.0 | 15.3 |
| 12 | 3 | 0.022 | 0.073 | 0.38 | 1.4 | 5.2 | 11.0 |
| 12 | 5 | 0.001 | 0.009 | 0.071 | 0.45 | 2.9 | 8.3 |

The numbers depend on the fault model, which is this design's own. Treat them
as a relative comparison.

## Many inputs, few patterns: one-hot encoder + PCC, and convolution

When many inputs may share one LD pattern, `ld_shared_conv` uses a single FSM
for all of them.

* In the default form (`USE_PCC = 1`), a shared `onehot_enc` turns the select
  code into N lines, and each input needs only a `pcc`: the OR over i of
  (x_i AND line_i). The constant-0 code raises no line.
* With `USE_PCC = 0`, each input gets its own `ld_mux` instead.

Both forms produce identical streams.

`sc_conv #(N = 8, K = 3)` is a K×K stochastic convolution:

* All activations use pattern 1 and all weights use pattern 2, so only two FSMs
  and two encoders exist.
* Each product is an AND gate.
* The products are accumulated in binary: each cycle the ones among the K²
  product bits are counted and added.

Because the sum is formed in binary, the K² products need not be independent
of each other, and that is what allows sharing. `start` begins a run, `busy`
lasts 2^N cycles, `done` pulses once, and `result` ≈ Σ a_j·w_j / 2^N holds
until the next start. Each term carries the error of one 2^N-bit LD
multiplication. The 3×3 test saw at most 2.2 units of 2^−8 in total.

## Top level (`ld_sc_top`)

The four uses of the generator sit side by side and share only `clk` and
`rst_n`. Their ports are prefixed as follows:

| prefix | unit | default size |
|---|---|---|
| `conv_*` | `sc_conv` | 3×3, 8-bit |
| `mul_*` | `sc_mult_rot` | 2 inputs, 8-bit, rotation |
| `par_*` | `ld_bsg_par` | 8-bit, 8× |
| `nmr_*` | `ld_bsg_nmr` | 8-bit, 5 copies |

Hierarchy:

```
ld_sc_top
├─ sc_conv ── 2 × ld_shared_conv ── ld_fsm (ld_sel_rom), onehot_enc, pcc × K²  (or ld_mux × K²)
├─ sc_mult_rot ── I × ld_bsg ── ld_fsm (ld_sel_rom), ld_mux
├─ ld_bsg_par ── ld_fsm_par (ld_sel_rom), ld_mux × M
└─ ld_bsg_nmr ── NR × (state register, ld_sel_rom, ld_mux), majority voters
ld_pkg: Sobol direction numbers, interval select rule, majority function
```

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=… failures=…` and includes a watchdog. The reference model,
`tb/tb_ref_pkg.sv`, is written separately from the RTL package:

* it computes Sobol points with the direction-vector form of the recurrence;
* it applies the interval rule by direct comparison instead of counting leading
  ones.

What is covered:

* Exact select sequences for N = 4 (both rows above).
* All ten patterns at N = 8, and exact pick counts (x_i picked 2^i times).
* 12-bit generators (patterns 3 and 10, 4096-bit streams) bit by bit.
* Bit-exact streams, with ones = x, for the serial, parallel, shared, MUX and
  PCC forms.
* Exact products:
  * 2 × 8 bits over 2^16 cycles, 3 × 4 bits over 2^12 cycles and 4 × 4 bits
    over 2^16 cycles, with the stall counts of every generator;
  * the limited-precision mode;
  * the L > N long streams.
* The redundant generator staying exact under any fault pattern that hits fewer
  than half of the copies.
* Convolution results for K = 3, 5, 7, 9 and 11, in both generation forms.

`tb_ld_sc_top` runs the whole top at its default sizes:

* three convolutions;
* one complete 2^16-cycle multiplication;
* 20 parallel streams;
* 8 redundant streams under fault injection.

It counts every mechanism it exercises (rotation stalls, constant-0 states,
parallel groups, masked faults, completed runs) and fails if any count is zero.

To simulate with Verilator 5 from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/ld_pkg.sv tb/tb_ref_pkg.sv tb/tb_ld_sc_top.sv --top-module tb_ld_sc_top
./obj_dir/Vtb_ld_sc_top
```

Replace the testbench name to run any other test. The two workload benches,
`tb_wl_mult_accuracy` and `tb_wl_fault_tolerance`, print the tables above. The
simulator is two-state, so every register that is read has a reset.

## Choices made here, and limits

* **Control.** Reset, `clear`/`en`, `start`/`valid`/`last`/`busy`/`done` and
  the binary state encoding are design choices. Inputs are not registered; they
  must be held stable for a stream, exactly as if the MUX were wired to the
  data source.
* **Sobol patterns 3–10.** They come from the Joe–Kuo table, not from any
  published generator table for this design. Only patterns 1 and 2 are pinned
  down by the worked example.
* **Rotation.** A stall is one held cycle per 2^(kN) cycles, taken at the end of
  each block.
* **Redundancy.** Both the state and the output are voted. The fault-injection
  ports are an addition for testing.
* **PCC.** A flat AND-OR network.
* **Convolution.** Runs for one FSM period (2^N cycles) on unsigned data, with
  an accumulator of N + ⌈log2(K²+1)⌉ bits. Signed data and wider accumulation
  are not provided.
* **Not built.** The conventional comparator-based generators and earlier FSM
  designs are only comparison points and are not included.
* **Not verified.** Area, delay and power were not measured. Exhaustive
  multiplication over all 2^16 operand pairs was not simulated; 200 random
  pairs were.
* **Size limits.** L is limited to 16 (`ld_pkg::MAX_N`), NR to 15, and M must
  be a power of two below min(2^L, 2^10).
