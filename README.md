# Verified-by-construction datapath families: Horner reduction, partial pipelining, log-depth window monitor

This RTL holds three small datapath families. In each, an obvious
circuit has been rewritten into a cheaper or faster one that computes the
same thing. The rewrites are algebraic laws about how blocks compose:

* **Horner's Rule.** A reduction whose side inputs pass through a triangle of
  identical blocks equals a column where that block sits on the running
  value. With the block "multiply by x", this turns term-by-term polynomial
  evaluation, with n(n+1)/2 multiplications, into Horner's form, with n. With
  the block "delay by one cycle", it turns a combinational reduction into a
  pipelined one.
* **Log-depth window monitor.** For an associative operator S, the
  combination of the last 2^n samples of a stream is built from n operators
  with doubling delays. The direct form needs 2^n - 1 operators along a delay
  line.

Each family is parametric: one parameter changes the size or the pipelining.
The RTL keeps the same structure, so every instance is an instance of the
same verified rewrite.

| module | what it is |
|---|---|
| `horner_poly` | polynomial evaluation in Horner form, a chain of `mac` blocks (default degree 3) |
| `rdr_pipe` | right reduction of N XOR blocks cut into K pipeline clusters (default N = K = 128) |
| `avionics_monitor` | sliding-window operator over 2^N samples with N operators (default N = 8, 32-bit multiply) |
| `mac` | multiply-accumulate, `addend + fac_a * fac_b` |
| `int32Mult`, `int32Add` | 32-bit word primitives (results wrap modulo 2^32) |
| `delay_chain` | D^k: k register stages |
| `covoh_pkg` | word type, operator enum and its identity element |
| `covoh_top` | the three datapaths side by side; they share only clock and reset |

## Partial pipelining of a reduction (`rdr_pipe`)

This is the block with the most subtle timing.

**Function.** With elements `a[0..N-1]` and a seed `b`, the block computes

    y = a[0] ^ (a[1] ^ ( ... ^ (a[N-1] ^ b)))

The seed enters at the top of a column of N two-input blocks, together with
`a[N-1]`. `a[0]` is combined last, at the bottom.

**Clusters.** The column is cut into K clusters of N/K consecutive blocks,
and a register follows every cluster. The running value therefore reaches
cluster c (counted from 0 at the top) c cycles after the operands were
applied. To meet it there, every element of cluster c first passes through
a c-stage `delay_chain`. These input delays form a triangle: 0 for the top
cluster and K-1 for the bottom one.

This is Horner's Rule with a delay as the side block. Moving one delay from
every side input onto the running value changes nothing at the output, so
each K gives the same function:

| K | structure | latency | registers (1-bit elements) |
|---|---|---|---|
| 1 | one combinational chain of N XORs, one output register | 1 | 1 |
| N/2 … 2 | N/K XORs per stage | K | K + (N/K)·K(K-1)/2 |
| N | fully pipelined, one XOR per stage | N | N + N(N-1)/2 (8256 at N = 128) |

**Use.** Apply all N elements and the seed in the same cycle. The result
appears on `y` K rising edges later. A new reduction can start every cycle.

**OUT_CHAIN.** With `OUT_CHAIN = 1`, N-K more delays are appended at the
output. Every K then has latency N, so variants with different K can be
swapped cycle for cycle. The default (0) leaves the chain out to get the
lowest latency.

`K` must divide `N`; a bad value fails an elaboration-time assertion. The
default `K = 128` (full pipelining) is this implementation's choice. The
design family was characterised over every power of two from 1 to 128: more
clusters raise the clock rate and the register count together.

## Log-depth sliding-window monitor (`avionics_monitor`)

This is a runtime monitor for a safety-critical signal stream. Each cycle it
outputs S applied over the last 2^N samples:

    y(t) = x(t) S x(t-1) S ... S x(t - 2^N + 1)

It uses the doubling recurrence

    y_0 = x,    y_{i+1}(t) = y_i(t) S y_i(t - 2^i),    y = y_N

At level i the signal splits in two. One branch passes through a 2^i-cycle
`delay_chain`, and one operator joins the two branches. The levels have 1,
2, 4, … delay stages, 2^N - 1 word registers in total, and N operators in
place of 2^N - 1. The rewrite relies only on S being associative.

* `S_OP = S_MUL` (default) uses the 32-bit unsigned multiplier. Products
  keep the low word.
* `S_OP = S_ADD` uses the 32-bit adder, which gives a running window sum.

**Timing.** The operators are combinational, so `y` responds to `x` in the
same cycle through N operators in series. Only the delay chains hold state.
Register the output outside if that path is too long.

**After reset.** Every delay register holds the identity of S: 1 for
multiply, 0 for add. While the window fills, `y` combines only the samples
seen so far. Because the identity satisfies e S e = e, the log-depth
structure and the direct delay-line form agree during the fill as well. This
reset value is this implementation's choice.

## Horner polynomial evaluator (`horner_poly`, `mac`)

This block computes `a[0] + a[1]x + … + a[N]x^N` in nested form. The seed is
the leading coefficient `a[N]`, and each of the N stages is one `mac`:

    acc_i = a[i] + x * acc_{i+1}

`mac` is the composition "multiply the second input pair, then add". It is
built from one `int32Mult` and one `int32Add`. The evaluator is purely
combinational. All arithmetic is 32-bit and wraps; the word width is this
implementation's choice.

## Conventions

* Clocks: rising edge. Reset: `rst_n`, asynchronous, active low. Neither is
  fixed by the underlying method; both are choices of this implementation.
* Packed arrays carry the vectors: `a[i]` is element i.
* Which parts follow the method and which are local choices:

| follows the method | local choice |
|---|---|
| reduction structure, cluster skew, optional output chain | XOR element width `W`, default K = 128, reset values |
| doubling recurrence, N, 32-bit multiplier S | operator identity as reset value, adder option as a second S |
| Horner nesting, mac = multiply then add, degree 3 | 32-bit wrapping words for the polynomial |

**Not included.** The unoptimized reference circuits are left out: the
term-by-term polynomial triangle and the 2^n - 1 operator delay-line
monitor. The testbenches compute those forms in their reference models
instead. Power and FPGA resource figures are outside the RTL.

## Simulation

Each testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=<n> failures=<n>`. Build and run one with Verilator 5.
The package must come first:

    verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl \
        --top-module tb_covoh_top rtl/covoh_pkg.sv tb/tb_covoh_top.sv
    ./obj_dir/Vtb_covoh_top

| testbench | covers |
|---|---|
| `tb_covoh_top` | whole top at default sizes, 1200 cycles. Counts Horner evaluations, pipelined reduction results and monitor outputs over partial and full windows, and fails if any kind never occurred. |
| `tb_rdr_pipe` | N = 128 at K = 1, 2, 4, …, 128; N = 8 at K = 1, 2, 4, 8, also with the output chain; a 4-bit-element instance. Checks function and exact latency every cycle. |
| `tb_avionics_monitor` | multiplier windows 2 … 256 and adder windows 8 and 256, against a direct product or sum over the sample history, including the fill after reset |
| `tb_horner_poly` | degree 3 and 6 against the power form |
| `tb_mac`, `tb_int32Mult`, `tb_int32Add`, `tb_delay_chain` | primitives, corner cases and random operands |

All testbenches draw random stimulus with `$urandom` and need no data files.

## Changing the design

* **Reduction with another operator.** Replace the `^` in the cluster loop
  of `rdr_pipe`. Any two-input block whose output type equals its second
  input's type works.
* **Monitor with another associative operator.** Add an enum value to
  `covoh_pkg::s_op_e`, give its identity in `s_identity`, and instantiate the
  operator in the generate branch of `avionics_monitor`.
* **Word width.** It is set by `covoh_pkg::WORD_W`. The primitives are named
  after 32 bits, so rename them if you change it.
