# Bit-skewed QDI matrix-vector multiplier for the 4-point DCT

This design computes the core product of a 4-point discrete cosine transform,
Y = M · X. It is built in the quasi-delay-insensitive (QDI) style. Every
signal is dual-rail encoded. Every transfer is a four-phase handshake. The
datapath is made of small cells, most of them one bit wide, and each cell runs
its own handshake with its neighbours. No cell waits for a whole word to be
complete. The low bits of a sum therefore run ahead of the high bits, the
carries travel diagonally, and new words start at bit 0 while older words are
still rippling through the top bits. This is called a *bit-skewed* datapath.

The accumulation over the four input elements is fully *loop-unrolled*. Each
output element goes down a straight chain of three adder/subtractors instead
of a feedback loop, so no slack buffers are needed in a loop and no loop can
stall the pipeline.

The RTL is synthesizable SystemVerilog. It is a clock-driven model of the
self-timed circuit (see "How the asynchronous circuit is emulated"). It keeps
every handshake, every cell boundary that matters and the order of tokens.
Gate delays are not modelled.

## The arithmetic

```
      | y0 |   | a   a   a   a |   | x0 |
      | y1 | = | c   f  -f  -c | · | x1 |
      | y2 |   | a  -a  -a   a |   | x2 |
      | y3 |   | f  -c   c  -f |   | x3 |

a = 2^-2 + 2^-4 + 2^-5 + 2^-7 + 2^-9   = 5792 / 2^14  ≈ 0.35352  (1/(2√2)      = 0.35355)
c = 2^-1 - 2^-5 - 2^-7 + 2^-10         = 7568 / 2^14  ≈ 0.46191  (cos(π/8)/√2  = 0.46194)
f = 2^-3 + 2^-4 + 2^-8 - 2^-14         = 3135 / 2^14  ≈ 0.19135  (cos(3π/8)/√2 = 0.19134)
```

The multiplier works iteratively. The elements x0, x1, x2 and x3 of one input
vector arrive one after another on a single channel. Each element is multiplied
by all three coefficients. After the fourth element, the four results leave
together on the output channel.

The coefficients are signed sums of powers of two, so each multiplication is
a hard-wired sum of shifted copies of x, some of them subtracted. The shifts
and signs are listed in `dr_pkg.sv`. They approximate the scaled DCT cosines
to within 4·10^-5.

Number formats:

* **x:** `X_W` = 8 bits, two's complement, read as an integer.
* **y[k]:** `W` = 22 bits, two's complement, with 14 fraction bits. The value is
  y = y[k] / 2^14, with no rounding.

All arithmetic wraps modulo 2^22. A result is exact while |y| < 128. Inputs of
magnitude up to about 90 always meet that bound. Full-scale 8-bit vectors can
overflow the 22-bit word on rows 0 and 1. Two examples are x = (127, 127, 127,
127) for row 0 and (127, 127, -128, -128) for row 1. Widen `W` to 23 if full-range
inputs must be exact; every module takes the width as a parameter.

## Dual-rail channels and the PCHB cell

A dual-rail bit (`dr_pkg::dr_t`) is a pair of wires `{t, f}`:

| `{t, f}` | meaning |
|---|---|
| `{1,0}` | a token carrying 1 |
| `{0,1}` | a token carrying 0 |
| `{0,0}` | neutral: no token |
| `{1,1}` | illegal |

A channel is a group of such bits plus an *enable* that goes back to the
sender. The enable is an active-high, inverted acknowledge. One transfer has
four phases:

1. While the enable is 1, the sender drives a token.
2. The receiver takes the token and drops the enable.
3. The sender returns the rails to neutral.
4. The receiver raises the enable again.

The receiver sees that data is present from the rails alone. No request wire
and no timing assumption is needed.

Every storage element in the design is a **pre-charged half buffer (PCHB)**,
`qdi_pchb`. Its rules are:

* **Evaluate.** The cell computes its outputs from its inputs when three things
  hold: its own enable `le` is 1, all its receivers are enabled (`re_hi`), and
  all its inputs are valid (`lv`).
* **Precharge.** The cell returns its outputs to neutral when `le` is 0 and all
  receivers have dropped their enables (`re_lo`).
* **Enable.** `le` falls when inputs and outputs are both valid. It rises when
  both are neutral. This is a C-element on left and right completion.

Joins and forks follow from these rules:

* **Join.** A cell with several input channels forms `lv` and `ln` over all of
  them.
* **Fork.** A cell with several receivers evaluates when the AND of their
  enables is 1. It precharges when the NOR of their enables is 1. This is the
  C-element a fork needs.

A "half buffer" holds at most one token per pair of adjacent cells. A chain of
n cells therefore stores about n/2 tokens.

The parent module computes the cell's function F combinationally and hands it
to `qdi_pchb` on port `f`. `qdi_pchb` holds the output register and the
handshake, so every block is written as "function + `qdi_pchb`". Assertions in
`qdi_pchb` check two things: no output drives both rails, and a token is only
ever replaced by neutral.

### How the asynchronous circuit is emulated

A real QDI circuit has no clock. Here every cell evaluates its rules once per
`clk` edge, from registered state. The consequences:

* A token crosses one cell per clock.
* A lone cell completes a four-phase cycle in about four clocks.
* Waiting on a slow neighbour works as it does in the self-timed circuit.

Because QDI logic is correct for any delays, this fixed one-clock delay is just
one legal timing. Results and token order are those of the self-timed
circuit. Cycle times and energy are not.

`rst_n` is an asynchronous active-low reset. It makes every rail neutral,
every enable 1 and every split counter 0.

## The datapath

```
x ─► CSA(a) ─► B ─► MA ─► a·x ─┬──────────────► ACC y0 (+ + + +) ─► B ─► y[0]
 │                             └──────────────► ACC y2 (+ - - +) ─► B ─► y[2]
 ├─► CSA(c) ─► B ─► MA ─► c·x ─┬──────────────► ACC y1 (c f f c; + + - -) ─► B ─► y[1]
 └─► CSA(f) ─► B ─► MA ─► f·x ─┴──────────────► ACC y3 (f c c f; + - + -) ─► B ─► y[3]
```

(c·x and f·x both feed ACC y1 and ACC y3.)

**CSA multipliers (`qdi_csa_mult`), not skewed.** Each multiplier is a
carry-save array of one-bit full-adder cells, arranged in rows with no
sideways carry:

* Row 0 adds three shifted copies of x.
* Each further row folds in one more copy.
* A subtracted copy enters complemented, which on dual-rail wires is just a
  rail swap. The +1 that completes the negation is a constant 1 placed in the
  free least significant bit of one row's shifted carry vector.
* The multiplier for a has five terms and three rows. The multipliers for c
  and f have four terms and two rows.
* The output is a redundant pair: a sum vector and a carry vector.

Cell (g, i) sends its sum to cell (g+1, i) and its carry to cell (g+1, i+1).
Nothing travels within a row, so a row is one pipeline stage for all its bits.

A term bit is one of three things: an x bit, the sign bit of x for positions
above the input, or a constant for positions below the shift. A row-0 cell
whose three term bits are all constants still waits for x[0]. That way it
emits exactly one token per input.

One-bit copy cells carry x down from row to row, so a later row can add its
term without holding the input channel. Each input bit of x is therefore
forked to many cells. Each multiplier combines the enables of all those
readers in a C-element. The top level combines the three multipliers'
enables in one more C-element to form `x_le`.

**Entry slack buffers (`qdi_skew_buf`, ENTRY = 1).** The merging adder below
will take bit i about i stages after bit 0. Bit i of the carry-save pair is
therefore held in floor(i/2) one-bit buffer cells. Half as many buffers as
skewed stages suffice because a buffer cell cycles faster than a logic cell (10
against 14 gate delays in the original transistor design).

**Merging adders (`qdi_addsub`, SUB = 0).** These add the sum and carry vectors
into a binary product. Each bit is one cell with three inputs: a[i], b[i], and
the carry from cell i-1. Each cell has two outputs: the sum, sent downstream,
and the carry, sent to cell i+1. This is the bit-skewed ripple-carry adder:

* Cell i cannot fire before cell i-1.
* Cell 0 is free again as soon as cell 1 has taken its carry.
* Several words are therefore in the adder at once, on a diagonal.

**Loop-unrolled accumulators (`qdi_acc_unroll`).** There is one per output
element. In each, a per-bit split (`qdi_split4`) routes the product of
iteration j to position j:

* Position 0 goes through one buffer into input a of Add/Sub 1.
* Positions 1, 2 and 3 feed input b of Add/Sub 1, 2 and 3, which are chained.

Each Add/Sub is a `qdi_addsub` with a fixed operation, taken from the signs of
the accumulator's row. Subtraction adds the complemented operand with a
carry-in of 1. Complementing a dual-rail bit only swaps its rails.

Rows 1 and 3 use c and f in the orders c,f,f,c and f,c,c,f. Their splits read
both products on every token and forward the right one, so no conditional
read is needed.

The split's iteration counter (the select sequence 0,1,2,3) is kept as a
2-bit counter in every bit cell. The counter advances when the cell
precharges. All bits thus follow the same sequence without a separate select
channel.

**Exit slack buffers (`qdi_skew_buf`, ENTRY = 0).** The output leaves skewed,
bit 0 first. Bit i is held in floor((W-1-i)/2) buffers so that the word
reaches the non-skewed receiver nearly aligned. All 4·22 output bits share the
receiver's single enable `y_en`. The receiver sees a complete Y when every
output bit is valid.

## Interface and timing of the top, `qdi_dct_mvm`

| port | dir | width | use |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | emulation clock, asynchronous active-low reset |
| `x` | in | `X_W` × `dr_t` | one element x_j per token |
| `x_le` | out | 1 | 1: drive the next token; 0: return `x` to neutral |
| `y` | out | 4 × `W` × `dr_t` | output vector; complete when every bit is valid |
| `y_en` | in | 1 | receiver's enable: drop it after taking Y, raise it after `y` is neutral |

With a receiver that answers at once, the measured timings are:

* **Throughput.** One element every 9 clocks, so one vector every 36 clocks.
  The limit is the word-wide input handshake, which must collect the enables
  of every cell that reads x. The bit-level part of the pipeline could go
  faster.
* **Latency.** About 28 clocks from the handshake of x3 to a complete Y.

A receiver that stalls is absorbed by the buffers and adders. In the test,
random stalls of up to 20 clocks left the total run time unchanged.

## Files

| file | contents |
|---|---|
| `rtl/dr_pkg.sv` | dual-rail type and helpers, default widths, coefficient shifts |
| `rtl/qdi_pchb.sv` | PCHB cell: output register, handshake, assertions |
| `rtl/qdi_csa_mult.sv` | constant multiplier, carry-save array of one-bit cells |
| `rtl/qdi_skew_buf.sv` | entry / exit slack-buffer chains |
| `rtl/qdi_addsub.sv` | bit-skewed ripple adder / subtractor |
| `rtl/qdi_split4.sv` | four-way split with per-bit select counter |
| `rtl/qdi_acc_unroll.sv` | split, buffer and three chained Add/Sub |
| `rtl/qdi_dct_mvm.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_dr_src.sv`, `tb/tb_dr_snk.sv` | per-bit four-phase sender and receiver with random jitter |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog turns a deadlock into a failure. The end-to-end test runs the top at
its default sizes:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/dr_pkg.sv tb/tb_qdi_dct_mvm.sv --top-module tb_qdi_dct_mvm -o sim
./obj_dir/sim
```

Replace the testbench name to run another one.

The end-to-end test sends 60 vectors: four corner vectors (all zero, all
+127, all -128, and alternating +127/-128), then a mix of small and full-range
random vectors. It compares each of the four outputs of every vector with an
integer model taken modulo 2^22. It also checks that these events happened:

* elements overlapping in flight;
* the receiver stalling the pipeline;
* skew, meaning a product's low bits present before its top bit;
* the split visiting all four positions.

The block tests check the rest:

* every 8-bit input through all three multipliers;
* add and subtract on random words;
* that bit 21 of a sum leaves at least 21 clocks after bit 0;
* that the buffer chains have exactly floor(i/2) and floor((21-i)/2) stages;
* the split's routing;
* all four accumulator configurations;
* the PCHB enable rules, on a cell with a join and a fork.

## Where this model departs from the original design

* **Clocked emulation.** The original design is a transistor-level,
  self-timed circuit. Its reported figures (cycle times around 1.7 ns and
  energy per operation) are not reproduced here. Only the logic is.
* **Choices made here.** The following were not specified by the source and
  were chosen for this model:
  * the 8-bit input width;
  * placing the +1 of each subtracted multiplier term in a carry vector's free
    bit;
  * dropping the carry out of each adder's top bit, which makes results
    modulo 2^22;
  * the way products are routed to the y1 and y3 accumulators;
  * the split's local select counters;
  * the shared output enable;
  * the reset values.
* **Not built.** The source also describes these variants:
  * an accumulator with a feedback loop;
  * block-skewed variants with 8-bit Brent-Kung quad-rail adders;
  * a bundled-data (single-rail, delay-line-timed) implementation of the same
    product.

  They are compared against this configuration and are not part of it.
