# Stochastic piecewise-linear function units

Six elementary functions that neural-network-style calibration and
linearisation logic needs — ln(1+x), tanh(x), sigmoid(x), sin(x), cos(x)
and e^-x on x in [0, 1) — computed by a very small circuit. The circuit
combines two ideas:

* **Piecewise-linear (PWL) approximation.** [0, 1) is cut into 8 equal
  segments. In segment i the function is replaced by a straight line
  f(x) ≈ a_i·x + b_i. The three most significant bits of the 8-bit input x
  are the segment number, so finding the segment costs nothing. The sixteen
  coefficients of each function are 8-bit fractions (N·2^-8). They were
  optimised offline for the smallest worst-case error per segment.
* **Stochastic multiplication.** The only costly operation left is the
  product a_i·x. Both operands become pseudo-random bit-streams whose
  density of ones equals the value. A single AND gate multiplies two
  independent streams, and a counter turns the product stream back into
  binary. The offset b_i is then added in ordinary binary arithmetic,
  because adding in the stochastic domain would lose accuracy.

Per function the hardware is: two 8-bit LFSRs with comparators, an 8-entry
ROM for a_i, an 8-entry ROM for b_i, one gate, an 8-bit counter and an
8-bit adder (a subtractor for e^-x). This is 53 flip-flops per function,
including the control added here.

## Datapath of one unit (`sc_pwl_unit`)

```
 x[7:0] ──┬──────────────────────────► SNG_x (LFSR x^8+x+1, r<x) ──┐
          │ x[7:5]                                                 AND/NAND ─► counter(8b) ─► ± ─► f[7:0]
          ├──► ROM-A + 8:1 mux ─ a_i ─► SNG_a (LFSR x^8+x^2+1, r<a)┘                          ▲
          └──► ROM-B + 8:1 mux ─ b_i ─────────────────────────────────────────────────────────┘
```

Three variants exist. The `FUNC` parameter (`sc_func_e`) selects both the
ROM contents and the variant:

| function | ROM-A holds | ROM-B holds | gate | combine | result |
|---|---|---|---|---|---|
| ln(1+x), tanh, sigmoid, sin | a_i | b_i | AND | add | b_i + a_i·x |
| cos | \|a_i\| | b_i − 1.0 | NAND | add | (1 − \|a_i\|·x) + (b_i − 1) |
| e^-x | \|a_i\| | b_i | AND | subtract | b_i − \|a_i\|·x |

cos needs this form because its slopes are negative and its offsets lie in
[1, 2], which 8 bits cannot hold. A NAND of the two streams has density
1 − |a|·x, so the "1" comes free and ROM-B only stores the fractional part.
For e^-x the slopes are negative but the offsets fit, so ROM-A stores
magnitudes and the adder becomes a subtractor.

Submodules:

* `sc_lfsr`: loadable Fibonacci LFSR. `POLY` is the tap mask, with bit
  k−1 standing for x^k.
* `sc_sng`: an LFSR plus the comparator `state < v`.
* `pwl_coef_rom`: the constant table plus the segment mux. It is used
  twice per unit.
* `sc_mult`: AND gate, or NAND gate when `INVERT=1`.
* `sc_counter`: ones counter. It has clear and enable, and it holds at
  its maximum instead of wrapping.
* `pwl_addsub`: add or subtract, clipped to [0, 255].
* `sc_pwl_pkg`: the function enum, both coefficient tables and the
  default polynomials and seeds.

## Number format and coefficient tables

The input x and all outputs are unsigned 8-bit fractions: value·2^-8. The
output therefore covers [0, 255/256]. A result of exactly 1.0 (cos(0),
e^-0) saturates to 255. The tables in `sc_pwl_pkg` are the published
optimised coefficients, with two exceptions that are choices of this
design:

* **e^-x, segment 0.** b_0 = 1.0 does not fit in 8 bits, so it is stored
  as 255. This costs at most 2^-8 in that segment.
* **sigmoid, segment 6.** b_6 = 135·2^-8. Only this value keeps the
  segment within the worst-case error of 7.1·10^-4 quoted for the sigmoid
  table.

The linear tables alone, without any stream noise, stay within about 0.002
of the exact functions. Two segments are exceptions, both at 0.004: tanh
segment 1, and e^-x segment 0 because of the clipped b_0.

## Streams, LFSRs and where the error comes from

This is the least obvious part of the design, and it sets the accuracy.

**The stream window.** Each evaluation runs both SNGs for a window of
`STREAM_LEN` = 255 cycles and counts the ones of the product stream.
255 is the period of a maximal 8-bit LFSR. It is also the largest count
an 8-bit counter holds, so the cos NAND stream (nearly all ones at x≈0)
cannot overflow. Both LFSRs are reloaded with fixed seeds at every start,
which makes a result a deterministic function of x. Identical inputs give
identical outputs, and the testbenches can check every output bit-exactly.

**The polynomials.** The two LFSRs use x^8+x+1 (for x) and x^8+x^2+1 (for
a_i), as the method prescribes; using two different polynomials is what
decorrelates the streams. Neither polynomial is primitive, so the
registers do not visit all 255 nonzero states:

* x^8+x+1 repeats after 63 states.
* x^8+x^2+1 repeats after 30 states.
* A few seeds give cycles of only 3 or 15.

Inside a 255-cycle window the comparators therefore see a coarse,
repeating subset of values. The seeds 33 and 176 (`SEED_X`, `SEED_A`)
were chosen by trying all seed pairs for the lowest mean error over the
six functions. Poor seeds make the error many times worse (up to 0.2).

**Accuracy achieved.** Over all 256 inputs, the mean absolute error
(MAE) against the exact function is:

| | ln(1+x) | tanh | sigmoid | sin | cos | e^-x |
|---|---|---|---|---|---|---|
| this RTL, defaults | 0.0116 | 0.0116 | 0.0070 | 0.0151 | 0.0112 | 0.0078 |
| figure published for the method | 0.0026 | 0.0029 | 0.0024 | 0.0026 | 0.0035 | 0.0027 |

The gap is not a bug. The RTL is checked bit-exactly against an
independent model, and that model gives the same numbers. The gap is what
a 255-bit stream product from these two short-period registers gives. How
the published figures were obtained (stream length, generator, test
points) is not known. Swapping in primitive polynomials through `POLY_X`
and `POLY_A` does not close the gap either: with x^8+x^6+x^5+x^4+1 and
x^8+x^6+x^5+x^3+1 (seed 1) the MAE is 0.008–0.017. The limit is the
correlation and length of the two streams, not the period alone. If
better accuracy is needed, the knobs are `STREAM_LEN`, the polynomials,
the seeds and the counter width. Note that `STREAM_LEN` must stay at or
below 255 while the counter is 8 bits.

## Control and timing

The method specifies only the datapath; the sequencer here is this
design's own. It has three states: IDLE, RUN and FINISH.

* `start` is accepted whenever the unit is not in RUN. On acceptance the
  unit samples `x`, reloads both LFSRs and clears the counter. A `start`
  during RUN is ignored.
* RUN lasts exactly `STREAM_LEN` cycles, with `busy` high. Each cycle
  makes one stream bit.
* In FINISH, b_i ± count is registered into `f`. `done` is high for the
  following cycle.
* **Latency.** If `start` is sampled at clock edge 0, `done` and the new
  `f` appear after edge `STREAM_LEN`+1, which is 256 with the defaults.
* **Throughput.** A `start` given in the FINISH cycle (the first cycle
  with `busy` low) begins the next window at once. One result per
  function then follows every 256 cycles.
* `f` holds until the next result. `sat` reports that a result was
  clipped.
* Reset (`rst_n`) is asynchronous and active-low.

`sc_pwl_top` puts the six units side by side. They share `x`, `start` and
the LFSR settings, run in lock step, and give one `done` with six results
(`f_ln1p`, `f_tanh`, `f_sigmoid`, `f_sin`, `f_cos`, `f_expneg`) and a
6-bit `sat`. Each function keeps its own SNGs and ROMs, as in the method,
where every function is a separate circuit. If only some functions are
needed, instantiate `sc_pwl_unit` directly.

## What is not here

The target application is a background calibration loop for a two-channel
time-interleaved ADC. The two ADCs feed a correction block and an
estimator, and the estimator would use these function units, for example
inside a small neural network. Those surrounding blocks are not part of
this RTL. The ADCs are analog. The correction and estimation algorithms
are not specified, and no interface between them and the function units
is defined. The offline optimisation that produced the coefficient tables
is software and is not included either; its results are the constants in
`sc_pwl_pkg`.

## Verification

Every testbench is self-checking and ends with one
`TB_RESULT checks=N failures=M` line. All of them pass.
`tb/tb_sc_ref_pkg.sv` is the shared reference model. It keeps the
coefficient tables in their signed form (for example cos a_0 = −13,
b_0 = 256) and derives each ROM's contents from them. It also
re-implements the LFSRs and the stream arithmetic cycle by cycle.

| testbench | what it checks |
|---|---|
| `tb_sc_pwl_top` | all six functions at default parameters, all 256 inputs back to back: bit-exact outputs, 255-cycle windows, MAE per function printed next to the published figure, restarts while busy ignored, every segment and every datapath variant exercised |
| `tb_sc_pwl_unit` | AND/adder units (ln, tanh, sigmoid, sin): all inputs bit-exact, latency 256, busy length, ignored restart, MAE |
| `tb_sc_pwl_cos`, `tb_sc_pwl_expneg` | the same for the NAND and subtractor variants |
| `tb_sc_lfsr` | state sequences, cycle lengths 63 / 30 / 255 (a primitive polynomial), hold and reload |
| `tb_sc_sng` | ones per 255-cycle window for every value |
| `tb_pwl_coef_rom` | every ROM word of all twelve ROMs |
| `tb_sc_mult`, `tb_sc_counter`, `tb_pwl_addsub` | truth tables, counting with enable/clear/saturation, all operand pairs |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/sc_pwl_pkg.sv tb/tb_sc_ref_pkg.sv tb/tb_sc_pwl_top.sv --top-module tb_sc_pwl_top
./obj_dir/Vtb_sc_pwl_top
```

Replace `tb_sc_pwl_top` with any other testbench name. Each run takes
well under a second.

## Changing the design

* **Another function.** Add an enum value and its two ROM tables to
  `sc_pwl_pkg`, and pick its variant in `comb_of`.
* **Another segment count or width.** `SEGBITS` and `W` in the package
  set both. The tables must be regenerated to match.
* **The streams.** Polynomials, seeds and window length are parameters of
  `sc_pwl_unit` and `sc_pwl_top`. The reference model in
  `tb_sc_ref_pkg` assumes the defaults, so update it to match.
