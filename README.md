# Stochastic-computing tanh and sigmoid units (SC-PWL)

Neural-network hardware needs non-linear activation functions, and a full
binary multiplier per function is costly. This design evaluates `tanh(x)` and
`sigmoid(x)` for `x` in [-1, 1) by combining two ideas:

* **Piecewise-linear approximation.** [0, 1) is cut into eight equal
  segments. On segment `i`, `f(x) ~= a_i*x + b_i`, with slopes and offsets
  quantised to 8 bits (units of 2^-8) and chosen to minimise the worst-case
  error. The segment number is simply the three most significant bits of `|x|`.
* **Stochastic multiplication.** The product `a_i*|x|` is formed by turning
  both factors into random bit streams whose density of 1s equals the value,
  and AND-ing them bit by bit. A counter turns the product stream back into
  binary. The offset `b_i` is then added in ordinary binary arithmetic, so
  the offset table can be tuned to trim the error without touching the
  stochastic part.

Negative operands are handled by symmetry: `tanh(-x) = -tanh(x)` and
`sigmoid(-x) = 1 - sigmoid(x)`.

One evaluation takes one pass of a 256-bit stream, i.e. 257 clock cycles from
`start` to `done`. Over all 512 input codes the simulated mean absolute error
is 0.0018 for tanh and 0.0014 for sigmoid. The published figures for this
method are 0.0029 and 0.0024.

## Number format

Operands and results use `sc_pwl_pkg::sm_t`: a sign bit and an 8-bit
magnitude `mag`, value `(sign ? -1 : 1) * mag / 256`. So `|x|` ranges over
0 .. 255/256. Results saturate at 255/256. `tanh` results carry the sign of
`x`. `sigmoid` results are always positive: their sign bit is 0.

## Coefficient tables (ROM-A, ROM-B)

| segment (`|x|[7:5]`) | tanh a_i | tanh b_i | sigmoid a_i | sigmoid b_i |
|---|---|---|---|---|
| 0 | 255 | 0  | 64 | 128 |
| 1 | 247 | 2  | 64 | 128 |
| 2 | 232 | 5  | 63 | 128 |
| 3 | 213 | 12 | 63 | 128 |
| 4 | 189 | 24 | 57 | 131 |
| 5 | 165 | 39 | 57 | 131 |
| 6 | 141 | 57 | 52 | 135 |
| 7 | 117 | 78 | 50 | 137 |

All values are in units of 2^-8. They live in the functions
`coef_a`/`coef_b` of `rtl/sc_pwl_pkg.sv`; `rom_a` and `rom_b` index them.
The tables were optimised offline by exhaustive search: every candidate pair
`(a, b)` of each segment was tried, and the pair with the smallest maximum
error was kept. The search is not part of the hardware. Evaluated exactly
on the 256 magnitude codes, the tables alone are off by at most 0.0041
(tanh) and 0.00069 (sigmoid). The rest of the measured error comes from the
stochastic multiply.

The offsets are the accuracy knob: they are added after the stochastic
part, so shifting `b_i` moves the whole segment. `rom_b` and `sc_pwl_act`
take the offset table as a parameter, `B_TABLE` (a packed
`sc_pwl_pkg::coef_tab_t`, entry `i` = segment `i`). Its default is the table
above, so an instance can be re-tuned without editing the package.

## The stochastic number generator

This is the least obvious part of the design (`lfsr`, `sng_weights`, `sng`).

An 8-bit maximal-length LFSR (`x^8+x^6+x^5+x^4+1`) steps through all 255
non-zero states. A chain of AND gates (`sng_weights`) marks, in each state,
the highest set bit `k` of the state:

    W[k] = L[k] & ~L[k+1] & ... & ~L[7]

At most one `W` is 1 per cycle. Over one LFSR period `W[k]` is 1 in exactly
`2^k` states. So `W[7]` has weight 1/2, `W[6]` 1/4, ... and `W[0]` 1/256. The
stream bit for a binary value `v` is `|(v & W)`. In any 255 consecutive cycles
it holds **exactly** `v` ones. This generator has no random error in a single
stream. The only error comes from how the two streams of a product correlate.

The unit uses two generators, one for `a_i` and one for `|x|`. They share the
polynomial but start from different seeds (`SEED_A = 8'h5A`,
`SEED_X = 8'hC1`). The two streams are therefore shifted copies of the same
sequence, far enough apart to be nearly independent. The seeds matter: equal
seeds make the streams identical, and the AND then computes `min` rather than
a product. Other seed pairs give somewhat different error. With the defaults,
the measured error is the one quoted above.

`sng` is generic in `WIDTH`. The testbench also runs a 10-bit instance
(`x^10+x^7+1`, seed `10'b1100000111`), which has the ten weighted streams
W0..W9, weights 1/2 .. 1/1024.

## One evaluation, cycle by cycle (`sc_pwl_act`)

```
 edge 0        : start && !busy -> x captured, both LFSRs reloaded with their
                 seeds, product counter cleared, busy = 1
 edges 1..255  : each cycle one bit of each stream; counter += sa & sx
 edge 256      : last bit; count + this bit, scaled to 2^-8 units, goes
                 through pwl_out_adder (adds b_i, saturates, applies the sign)
                 and is registered into y; busy = 0, done = 1
 edge 257      : done = 0; y holds. A start held high during the done cycle
                 is taken at this edge, so evaluations can run back to back,
                 one every 257 cycles.
```

`start` is ignored while `busy` is high. Reloading both LFSRs at every start
makes a result depend only on `x`. The same input always gives the same
output, which is what the bit-exact testbenches rely on.

`STREAM_LEN` may be any power of two from 2 to 256. The count is shifted
left to stay in 2^-8 units. Shorter streams are faster but less accurate.
256 is the intended size.

## Module hierarchy

```
sc_act_top                 tanh and sigmoid units side by side, one handshake
 +- sc_pwl_act (FUNC_TANH) / sc_pwl_act (FUNC_SIGMOID)
     +- rom_a, rom_b       8 x 8-bit coefficient tables, combinational read
     +- sng (x2)           stochastic number generators for a_i and |x|
     |   +- lfsr
     |   +- sng_weights
     +- sc_mul_counter     AND-gate multiplier + 9-bit up-counter
     +- pwl_out_adder      b_i addition, saturation, negative-x symmetry
sc_pwl_pkg                 sm_t, func_e, coefficient tables
```

The two function units of `sc_act_top` are independent circuits: separate
ROMs, generators and counters. They share only the input and the start
strobe, so one evaluation yields both results. A concurrent assertion checks
that they stay in step.

### Top-level ports (`sc_act_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | asynchronous active-low reset; aborts an evaluation |
| `start` | in | 1 | begin an evaluation of `x`; taken when `busy` is low |
| `x` | in | 9 (`sm_t`) | operand |
| `busy` | out | 1 | evaluation in progress |
| `done` | out | 1 | one-cycle pulse; results valid |
| `y_tanh`, `y_sigmoid` | out | 9 (`sm_t`) | results, held until the next `done` |

Parameters: `STREAM_LEN` (256), `SEED_X` (8'hC1), `SEED_A` (8'h5A). The
LFSR polynomial is the `TAPS` parameter of `sc_pwl_act` (8'hB8).

## Where the design departs from the published method, or fills gaps

* The source text writes the approximation once as `-a_i*x + b_i`. Its
  segment definition and coefficient table only make sense as `a_i*x + b_i`,
  which is what is built.
* The extension from [0, 1) to [-1, 1) is stated but not detailed. The
  symmetries above are this design's choice.
* The stochastic-to-binary counter, the start/busy/done handshake, the
  reseeding at each start, the sign-magnitude format, the LFSR polynomial and
  the seeds are all this design's choices. The method specifies the 8-bit
  LFSRs, the AND-gate weight network, the two generators, the AND-gate
  multiplier, the binary addition of `b_i`, the 3-MSB segment select and the
  256-bit stream.
* A maximal-length 8-bit LFSR has 255 states, not 256. A 256-bit window
  therefore sees one state twice, which adds at most one extra count.
* The offsets are fixed at elaboration through `B_TABLE`. There is no
  run-time write port to ROM-B.
* The published area, delay and power figures (90 nm) were not reproduced.
  The method was also applied to `ln(1+x)` and `e^-x`, but no coefficient
  tables are available for those functions, so only tanh and sigmoid are
  built.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends with a
`TB_RESULT checks=N failures=M` line. The expected values come from
`tb/tb_ref_pkg.sv`, a separate behavioural model of the LFSR, the generator,
the counter, the coefficient tables and the output stage.

* `tb_lfsr`: full period of 255 distinct states, load and enable.
* `tb_sng_weights`: all 256 states; one-hot outputs; weights 2^k/255.
* `tb_sng`: bit-exact streams; exactly `v` ones per 255 bits, also from an
  arbitrary starting point; the 10-bit variant.
* `tb_rom_a`, `tb_rom_b`: every table entry.
* `tb_sc_mul_counter`: random streams, clear, enable, full count of 256.
* `tb_pwl_out_adder`: sums, saturation and both signs, for both functions.
* `tb_sc_pwl_act`: all 512 operands, bit-exact against the model.
  Also checked: the 257-cycle latency, starts ignored while busy, and a MAE
  bound of 0.004.
* `tb_sc_pwl_act_short`: both functions with `STREAM_LEN = 64`, all 512
  operands, bit-exact, 65-cycle latency.
* `tb_sc_act_top`: end to end at the default parameters, all 512 operands in
  random order. It also exercises back-to-back starts in the `done` cycle,
  ignored starts, a reset in the middle of an evaluation, and every segment
  with both signs, and it counts each of these.

Simulate with Verilator 5, for example:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
  rtl/sc_pwl_pkg.sv tb/tb_ref_pkg.sv tb/tb_sc_act_top.sv \
  --top-module tb_sc_act_top -o sim && ./obj_dir/sim
```

For another testbench, change the last file and `--top-module`. The two
packages must be named first; `-y` finds the modules by file name. The full
end-to-end run takes well under a second.
