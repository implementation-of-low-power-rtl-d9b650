# Coefficient-partitioned FIR channel filter

A software radio receiver separates narrow channels out of a wideband signal with
very long FIR filters (hundreds to over a thousand taps) running at the full input
sample rate. In such a filter almost all the hardware is in the constant
multipliers, and a constant multiplier is a handful of adders. Its cost and delay
come from how many adders it has and from how wide each one is: a ripple-carry
adder of n bits costs n full adders and n full-adder delays.

This RTL builds such a filter. Each coefficient multiplier is encoded during
elaboration so that its adders are as narrow as possible. Three ideas are
combined:

1. **Canonic signed digits (CSD).** Each coefficient is recoded into digits
   {-1, 0, +1} with no two adjacent digits non-zero. This keeps the number of
   operands low.
2. **Common subexpressions.** The digit patterns `1 0 1` and `1 0 -1`, and their
   negations, are formed once for the whole filter:
   `x2 = x1 + x1>>2` and `x3 = x1 - x1>>2`. Every coefficient reuses them.
3. **Pseudo floating point and coefficient partitioning.** A coefficient is
   written as a shift (the position of its leading digit) times a span (the
   digits from there down). The span is cut into an MSB half and an LSB half.
   The LSB half is renormalised to its own leading digit. Each half is then summed
   on its own short scale, so its adders cover only that half's bits. One final
   adder aligns and joins the two halves. Every shift is wiring.

All arithmetic is exact. The output equals the mathematical sum of products, with
`WC` fractional bits.

## Worked example: one tap

Take the coefficient h = 0.0000101001010101 (binary, 16 fraction bits), which is
the integer 2645 = 2^11 + 2^9 + 2^6 + 2^4 + 2^2 + 2^0. The input x1 is 8 bits.

| step | result |
|---|---|
| CSD digits | +1 at bits 11, 9, 6, 4, 2, 0 |
| subexpressions | three `1 0 1` pairs: x2 at weights 2^9, 2^4, 2^0 |
| PFP | shift = 11 (leading digit); the pair tops sit 0, 5 and 9 digits below it, so span M = 9 |
| partition | a term whose relative shift s satisfies 2s <= M goes to the MSB half. MSB half = {x2 at s = 0}; LSB half = {x2 at s = 5, x2 at s = 9} |
| LSB half, renormalised | x2·2^4 + x2 : one 16-bit adder |
| final adder | (MSB half aligned 9 bits up) + LSB half : one 21-bit adder |

The shared `x2 = 4·x1 + x1` adder is 11 bits wide. A direct shift-and-add
multiplier with all six operands would need far wider adders. The partitioned
tap has the same three-adder depth as a plain subexpression design, but its
adders are narrower. The final adder is 21 bits; a looser hand count (a carry bit
added at every level) gives 22.

## How the filter is put together

```
             +--------------+  x2 = 5*x1
 x_in ------>| cs_generator |-----------+----------+-- ... --+
   |         +--------------+  x3 = 3*x1|          |         |
   |                                    v          v         v
   +---------------------------->[cpm_multiplier] [ ... ]  [cpm_multiplier]
                                  COEF = c_0                COEF = c_{N-1}
                                        | p_0                    | p_{N-1}
                                        v                        v
 y_out <--[reg]<--(+)<--[reg]<--(+)<-- ... <--[reg]<-------------+
                                        tap_delay_line
```

* `cs_generator` forms the two shared subexpressions. In integer form,
  `x1>>2` scaled by 4 becomes `x2 = 4·x1 + x1` and `x3 = 4·x1 − x1`. Both are
  `WX+3` bits wide.
* `cpm_multiplier` (one per tap, parameter `COEF`) is a generate network built
  from `cpm_pkg::plan(COEF)`. Each term is x1, x2 or x3, shifted within its half,
  and added or subtracted in a chain. Each chain stage is exactly as wide as its
  operands need (`cpm_pkg::stage_width`). One final adder joins the halves
  (`cpm_pkg::comb_width`). The result is shifted to the coefficient's weight.
  The product `p` is `x1·COEF` in `WX+WC+1` bits.
* `tap_delay_line` is the transposed-form delay line:
  `r[k] <= p[k] + r[k+1]`, `r[N-1] <= p[N-1]`, `y = r[0]`. Its registers are
  `WX+WC+1+ceil(log2 N)` bits wide, so no sum can overflow.
* `cpm_channel_filter` is the top. It computes one coefficient per tap at
  elaboration and wires the three blocks together.

### The encoding in `cpm_pkg`

`plan(c)` returns a packed `plan_t`:

* `t[i]` holds the terms, most significant first. Each term has a source
  (`op_e`: `OP_X1`, `OP_X2` or `OP_X3`), a `neg` flag, the weight of its lowest
  digit (`lsb`), its top digit (`top`) and its half (`lsb_grp`).
* `n` is the number of terms. The first `n_msb` terms form the MSB half.
* `shift` and `span` are the pseudo-floating-point fields.
* `l_msb` and `l_lsb` are the lowest weights of the two halves. The chains are
  summed relative to these weights.

Pairing is greedy from the most significant digit. A non-zero digit at position
p whose digit at p−2 is also non-zero forms x2 (same signs) or x3 (opposite
signs), with the sign of the upper digit. Because of the CSD property, the
position p−1 is always zero. A digit without a partner stays an x1 term.

The package also holds the default coefficient set. `lowpass_coef` is a
Hamming-windowed sinc, scaled for unity gain at DC and rounded to `WC` bits. Its
sine and cosine are Taylor series, so every tool can evaluate them during
elaboration.

## Interface and timing (`cpm_channel_filter`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | synchronous, active-low reset; clears the delay line |
| `in_valid` | in | 1 | `x_in` carries a new sample; the delay line advances only then |
| `x_in` | in | `WX` | signed input sample |
| `y_out` | out | `ACC_W` | signed output, `WC` fractional bits, exact |
| `y_valid` | out | 1 | `in_valid` delayed by one clock |

A sample presented with `in_valid` appears in `y_out` one clock later. The filter
takes one sample per enabled clock. The multiplier block is combinational. The
longest path is one shared subexpression adder, the longer chain of one tap, its
final adder, and one delay-line adder.

| parameter | default | meaning |
|---|---|---|
| `N_TAPS` | 1180 | filter length (the longest D-AMPS channel filter) |
| `WX` | 8 | input width |
| `WC` | 16 | coefficient wordlength (fraction bits); 24 also works |
| `FC` | 30.25 kHz / 34.02 MHz | lowpass cutoff in cycles per sample |
| `PW` | `WX+WC+1` | product width |
| `ACC_W` | `PW+$clog2(N_TAPS)` | output and register width |

## Filter sizes it targets

The method was evaluated on D-AMPS channel filters (34.02 MHz sampling rate,
30 kHz pass-band edge, 30.5 kHz stop-band edge; 260, 610, 940 and 1180 taps). It
was also evaluated on PDC channel filters (25.6 MHz sampling rate, 25 kHz
channel spacing; 240, 590, 880 and 1000 taps). Both 16-bit and 24-bit
coefficients were used. `N_TAPS` and `WC` cover every one of these sizes.
`tb_cpm_filter_workloads` builds and checks all sixteen combinations.

## Where this design makes its own choices

* **Coefficients.** The optimised filters behind the evaluated sizes are not
  available. The windowed sinc is a stand-in with the right length and cutoff;
  it does not meet the stop-band specifications of those standards. For PDC the
  cutoff is taken as half the channel spacing, 12.5 kHz. Any other coefficient
  set can be used by replacing `lowpass_coef`. The multiplier structure does not
  depend on it.
* **Splitting an odd span.** The rule 2s <= M decides which half gets the extra
  digit.
* **Number format.** Data and coefficients are two's complement. A term whose
  sign is negative and that opens a half is negated, which costs one adder.
* **Chain order.** Within a half, terms are added from most to least
  significant, as in the worked example. The adder tree that the full-adder
  count formulas of the method assume is not reproduced.
* **Handshake, reset and output register.** The `in_valid`/`y_valid` enable,
  the synchronous reset and the one-clock latency are this design's choices.
* **Adder widths.** Each adder is exactly one bit wider than its wider aligned
  operand. In the worked example that is one bit less than the looser hand
  count.
* **Not included.** The design has no coefficient or sample memory, because
  coefficients are hardwired. It also has no channelizer around the filter (no
  mixer and no decimation).

## Verification

Each testbench checks its results itself. It prints
`TB_RESULT checks=N failures=M` and stops with `$finish`.

| testbench | what it checks |
|---|---|
| `tb_cpm_pkg` | the worked example: digits, terms, shift, span, split and widths 11/16/21. Also 3000 random coefficients: CSD is canonic and exact, the terms sum back to the coefficient, and the split rule holds. Also symmetry and DC gain of the lowpass set |
| `tb_cs_generator` | x2 = 5·x1 and x3 = 3·x1 for every 8-bit input |
| `tb_cpm_multiplier` | 14 coefficients (both signs, zero, ±(2^16−1), long spans) × every 8-bit input against a plain multiply. Also the adder widths of the worked example |
| `tb_tap_delay_line` | random products and random idle cycles against a history-based reference, plus the latency of `y_valid` |
| `tb_cpm_channel_filter` | the top at its default size (1180 taps): an impulse, a full-scale step and random data with idle cycles, all against a multiply-accumulate reference. It also counts that x1, x2 and x3 terms, subtracted terms, partitioned taps and idle cycles all occur |
| `tb_cpm_filter_workloads` | all eight filter lengths at 16-bit and at 24-bit coefficients (through `tb_filter_runner`) |

To run one with Verilator, list the package first:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_cpm_channel_filter \
  rtl/cpm_pkg.sv rtl/cs_generator.sv rtl/cpm_multiplier.sv rtl/tap_delay_line.sv \
  rtl/cpm_channel_filter.sv tb/tb_cpm_channel_filter.sv
./obj_dir/Vtb_cpm_channel_filter
```

The full-size top builds in under a minute and runs in well under a second. The
workload testbench also needs `tb/tb_filter_runner.sv`. Building all sixteen
filters takes about one and a half minutes.

Lint reports unused inputs on some multipliers. These are expected: a
coefficient that needs no x3 term, for example, leaves its `x3` input unused.
