# Low-power CDMA RAKE receiver bank with three-multiplier complex products

A CDMA base station needs one RAKE receiver per active user. Each receiver has
one *finger* per resolved propagation path, and every finger ends in a complex
multiplier that weights its despread symbol by the conjugate channel estimate
of that path. With 30 to 50 users and 3 to 5 paths per user, a base station
carries 90 to 250 such multipliers, and they dominate the receiver's power.

This design builds every one of those multipliers with **three real
multipliers and five adders instead of four multipliers and two adders**
(a strength reduction of the complex product). A multiplier switches far more
nodes than an adder, so trading one multiplier for three adders lowers both
switching power and area. The price is a longer combinational path, which the
design removes again with a pipeline register inside the multiplier.

The default configuration is a bank of 50 users × 5 fingers, i.e. 250 fingers
built from 750 real multipliers where the direct form would need 1000.

## The three-multiplier complex product (`cmult_sr`)

For C = A·B with A = A_R + jA_I and B = B_R + jB_I, the direct form is

    C_R = A_R·B_R − A_I·B_I
    C_I = A_R·B_I + A_I·B_R          (4 multipliers, 2 adders)

Adding and subtracting the shared term A_R·B_I gives

    C_R = (A_R − A_I)·B_I + A_R·(B_R − B_I)
    C_I = (A_R − A_I)·B_I + A_I·(B_R + B_I)    (3 multipliers, 5 adders)

The datapath therefore has three layers:

    pre-adders      B_R − B_I      B_R + B_I      A_R − A_I
    multipliers     A_R·(B_R−B_I)  A_I·(B_R+B_I)  (A_R−A_I)·B_I
    [pipeline register, PIPELINE = 1]
    post-adders     C_R = p_c + p_r               C_I = p_c + p_i
    output register

In a finger, A is the channel weight α* and B is the correlator output. The
weight changes slowly, so `A_R − A_I` could be precomputed once per weight
update; here it is formed by its own adder in every multiplier, which keeps
the count at five adders.

**Critical path.** Unpipelined, the path runs through a pre-adder, a
multiplier and a post-adder (2·T_add + T_mult, against T_add + T_mult for the
direct form). With `PIPELINE = 1`, the default, a register sits between the
multipliers and the post-adders, so the longest stage is again
T_add + T_mult. The latency is `1 + PIPELINE` cycles and the multiplier
accepts one operand pair per cycle.

**Word lengths.** All arithmetic is exact two's complement. The products are
`WA + WB + 1` bits wide; the post-adders are the same width, which is enough
because their result is the true complex product, whose magnitude per
component is at most 2^(WA+WB−1). Nothing is rounded or saturated.

**What it saves.** If one multiplication costs M times the switching activity
of one addition, the direct form costs 4M + 2 and this one 3M + 5, a
reduction of (M − 3)/(4M + 2). That tends to 25 % for large M; for a 16-bit
tree multiplier, whose activity is about 34 times that of a 16-bit
carry-lookahead adder, it is about 22 %. If a multiplier takes at least ten
times the gates of an adder, the area saving of the product is over 16 %.
These figures are estimates of the method, not measurements of this RTL.

## Receiver structure

    rake_bank (K_USERS receivers, shared rx input)
      └─ rake_receiver (one user)
           ├─ input register (chip strobe, code, symbol end, finger taps)
           ├─ delay_line     (MAX_DELAY samples, one tap multiplexer per finger)
           ├─ rake_finger × L_FINGERS
           │    ├─ correlator  (integrate and dump with the ±1 code)
           │    └─ cmult_sr    (× α_k*)
           └─ rake_combiner  (sum of the L weighted finger outputs)

* **`correlator`** adds `+r` or `−r` (code bit 0 or 1) into a complex
  accumulator for each valid chip. On the chip marked `chip_last` it outputs
  the sum including that chip and restarts at zero. Its width,
  `W + clog2(SF) + 1` bits, covers SF chips of full-scale input.
* **`rake_finger`** is a correlator followed by `cmult_sr`, in that order: the
  multiplication runs once per symbol, on the correlation, not once per chip.
* **`rake_combiner`** adds the finger outputs. Because each finger output is
  already weighted by the conjugate of its own channel estimate, the plain sum
  is the maximum-ratio combination. It grows by `clog2(L_FINGERS)` bits.
* **`delay_line`** holds the last `MAX_DELAY` received samples. Tap `d` reads
  the sample taken `d` valid chips before the newest one; a tap beyond the
  line reads zero.

### How the fingers are aligned

This is the part of the design that needs the most care from a user.

Path k of a user arrives τ_k chips after the transmitted signal. A finger
must correlate path k with the code in step with that path. Instead of
giving every finger its own shifted copy of the code, which would make the
fingers dump at different times and require a de-skew buffer before the
combiner, the receiver delays the *signal*:

* `code` and `sym_last` are driven in step with the **latest** path that is to
  be combined (delay τ_max).
* Finger k reads the delay line at tap `delay[k] = τ_max − τ_k`.

Every finger then sees the same code chip in the same cycle, all fingers dump
together, and one adder combines them. The taps may take any values; the
fingers need not be evenly spaced, and two fingers may even share a tap.
`MAX_DELAY` bounds the delay spread that can be combined (τ_max − τ_min <
`MAX_DELAY` chips). The search for the path delays and the generation of the
code are outside this design.

### Timing

All state changes on the rising edge of `clk`; `rst_n` is a synchronous,
active-low reset that clears the delay lines, accumulators and valid flags.
The chip rate can be lower than the clock: when `chip_valid` is low nothing
moves.

| event | cycle |
|---|---|
| chip with `sym_last` sampled (with its `rx`, `code`, `delay`) | edge 0 |
| chip in delay line, strobes registered | edge 0 |
| correlators take the last chip | edge 1 |
| correlation presented; multipliers sample it **and α\*** | edge 2 |
| product available (`PIPELINE = 1` adds one edge) | edge 3 (+1) |
| `sym_valid` high, `sym_re`/`sym_im` valid | 4 + PIPELINE cycles after edge 0 |

The weights α\* are therefore read once per symbol, two edges after the
symbol's last chip; change them anywhere else in the symbol. The finger taps
are registered with each chip, so a tap change takes effect from the chip on
which it is presented.

## Top-level interface (`rake_bank`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, synchronous active-low reset |
| `chip_valid` | in | 1 | a received chip is present (common to all users) |
| `rx_re`, `rx_im` | in | `W_SAMPLE` | received complex baseband sample, two's complement |
| `code[u]` | in | `K_USERS` | user u's code chip, 0 = +1, 1 = −1 |
| `sym_last[u]` | in | `K_USERS` | user u's last chip of a symbol |
| `delay[u][k]` | in | `K_USERS × L_FINGERS × clog2(MAX_DELAY)` | tap of finger k of user u |
| `alpha_re[u][k]`, `alpha_im[u][k]` | in | `K_USERS × L_FINGERS × W_ALPHA` | conjugate channel estimate α\* of that finger |
| `sym_valid[u]` | out | `K_USERS` | user u's combined symbol is valid (one-cycle pulse) |
| `sym_re[u]`, `sym_im[u]` | out | `K_USERS × WO` | combined statistic for a decision device, held until the next symbol |

`WO = W_ALPHA + W_SAMPLE + clog2(SF) + 2 + clog2(L_FINGERS)`, 23 bits at the
defaults. Users need not be symbol-synchronous: each has its own `sym_last`.
A finger that is not in use is switched off by giving it a zero weight.

## Parameters

Defaults live in `rake_pkg` and every module takes them as typed parameters.

| parameter | default | origin |
|---|---|---|
| `K_USERS` | 50 | upper end of the typical 30–50 users per base station |
| `L_FINGERS` | 5 | upper end of the typical 3–5 resolved paths |
| `W_SAMPLE` | 6 | upper end of the 4–6 bits that suffice for CDMA baseband samples |
| `W_ALPHA` | 6 | design choice, same as the samples |
| `SF` | 64 | design choice; only sizes the correlator accumulator, the symbol length itself follows `sym_last` (at most SF chips without wrap-around) |
| `MAX_DELAY` | 32 | design choice: delay spread in chips, at least 2 |
| `PIPELINE` | 1 | design choice: register inside the complex multiplier |

After coarse synthesis the default bank is about 8,400 word-level cells and
42,000 flip-flops, of which 19,200 are the 50 delay lines.

## What is not included, and where the design goes its own way

* **Outside the receiver:** the decision device, the channel estimator that
  supplies α\*, the multipath searcher that finds the delays, and the code
  generator. Their signals are ports of the top.
* **The direct four-multiplier product** is only a point of comparison; it
  exists here only as the reference model in the testbenches.
* **Pipelining:** look-ahead and relaxed look-ahead pipelining apply to
  recursive loops; the complex product has none, so a single plain register
  stage is used. `PIPELINE = 0` gives the unpipelined structure.
* **Per-finger codes:** a textbook RAKE drawing feeds each finger's correlator
  a code shifted to that finger's path. This design delays the signal
  instead (see *How the fingers are aligned*), which is equivalent up to a
  common latency of τ_max chips.
* **One delay line per user:** each receiver has its own line, as each user
  is drawn as a self-contained receiver. All users see the same samples, so a
  single shared line with K·L taps would save about 19,000 flip-flops at the
  defaults; that change is confined to `rake_bank` and `rake_receiver`.
* **Code format, reset, handshakes and all widths other than the sample
  width** are this design's own choices, as listed in the module headers.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

| testbench | what it checks |
|---|---|
| `tb_cmult_sr` | 2000 random and extreme operand pairs, with and without the pipeline register, against the direct four-multiplier product; latency 1 and 2 |
| `tb_cmult_sr_16bit` | the same at 16-bit operands, the width of the cost comparison above |
| `tb_correlator` | 400 symbols of 1 to SF chips with idle cycles and full-scale chips; 1-cycle latency |
| `tb_delay_line` | every tap in every cycle against a model of the history, including taps past the end of a 20-sample line |
| `tb_rake_combiner` | random and full-scale finger values; 1-cycle latency |
| `tb_rake_finger` | 300 symbols, weights changed each symbol, both pipeline settings; latency 2 + PIPELINE |
| `tb_rake_receiver` | 3 fingers, taps redrawn every 8 symbols with uneven spacing, idle cycles, `PIPELINE = 0`; latency 4 |
| `tb_rake_bank` | the default 50 × 5 bank, unchanged parameters: asynchronous users, uneven taps, weight updates, stalls; latency 5 |
| `tb_rake_bank_k30_l3` | the same with 30 users, 3 fingers and 4-bit samples |

The receiver and bank tests use `tb/rake_ref_pkg.sv`, a reference model that
correlates each finger with plain integer arithmetic and combines with the
direct complex product, so it shares no structure with the RTL. The bank
tests also count how often each mechanism occurred (symbol dumps, idle
cycles, tap changes, unevenly spaced tap sets, weight changes, cycles in
which only some users dump) and fail if one never did.

To run one with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/rake_pkg.sv tb/rake_ref_pkg.sv tb/tb_rake_bank.sv \
        --top-module tb_rake_bank -o sim
    ./obj_dir/sim

The packages are listed first; Verilator finds the modules by name through
the `-I` search paths. For the unit tests, `tb/rake_ref_pkg.sv` is needed
only by the finger, receiver and bank testbenches.

The full-size bank test runs in a few seconds. Power and area savings are not
measured by any test; they follow from the operator counts above.
