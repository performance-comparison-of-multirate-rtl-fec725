# Multiplier-less CIC compressor and expander, recursive and polyphase

A cascaded integrator-comb (CIC) filter changes a sample rate with nothing
but adders and registers. Its response is N cascaded moving sums of length
R·M:

    H(z) = [ (1 - z^-RM) / (1 - z^-1) ]^N

R is the rate change factor, M the differential delay and N the number of
stages. This RTL builds that filter for both directions of rate change:

* a **compressor** (decimator) that takes R input samples for every output
  sample, R = 8 by default;
* an **expander** (interpolator) that produces R output samples for every
  input sample, R = 3 by default;

and builds each one in **two structures** that compute the same numbers in
different ways:

| | recursive (Hogenauer) | polyphase |
|---|---|---|
| compressor | `cic_decimator`: N integrators at the input rate, keep 1 of R, N combs at the output rate | `polyphase_cic_decimator`: log2(R) decimate-by-2 FIR stages, no integrators |
| expander | `cic_interpolator`: N combs at the input rate, insert R−1 zeros, N integrators at the output rate | `polyphase_cic_interpolator`: R low-rate sub-filters and a commutator |

The pairs are bit-exact: for the same input stream, both compressors give
the same output words, and both expanders give the same words in the same
clock cycles. The structures differ only in where the additions happen and
at which rate. The design follows the published comparison *Performance
Comparison of Multirate Compressor and Expander in VLSI Platform*. That
comparison evaluates N = 1, 2, 3 stages, with compression by 8, expansion by
3 and differential delay 1. The defaults here are N = 3, R = 8 / 3 and M = 1.
The section "Where this RTL departs from the source" lists what was added or
chosen here.

## Building blocks

* `cic_integrator`: y[n] = y[n−1] + x[n]. The output is taken at the adder
  and a register closes the feedback loop. The register advances only when
  `en` is high, so one clock can serve several sample rates.
* `cic_comb`: y[n] = x[n] − x[n−D]. Its delay line is D registers deep and
  advances only on `en`. When the comb runs at the low rate, as it does in
  both recursive filters, D = M registers suffice where a high-rate comb
  would need R·M.
* `rate_counter`: the rate change switch, a modulo-R counter of enabled
  samples. `last` marks the sample a decimator keeps, and `count` is the
  output phase of an interpolator.
* `shift_add_mult`: multiplies by a constant as a sum of shifted copies of
  the input, one copy per set bit of the constant. The polyphase filters use
  it for their fixed taps, so no block contains a multiplier.
* `cic_pkg`: default parameters and elaboration-time functions. These give
  the output width, the CIC impulse response (by repeated convolution with a
  box of length R·M) and the binomial coefficients.

## Word width and why wrap-around is harmless

The DC gain of the filter is (R·M)^N, so the compressor output needs

    OUT_W = IN_W + N · log2(R·M)          (25 bits for 16 in, N = 3, R = 8)

For the expander the gain is (R·M)^N / R, which is smaller. The same formula
is used there too, with log2 rounded up: 2 bits per stage for R = 3, giving
22 bits. Every internal register of the recursive filters is OUT_W bits wide,
and the integrators are allowed to overflow. In two's complement the
overflow cancels in the combs, so the final word is exact whenever it fits in
OUT_W, which the formula guarantees. The polyphase compressor never
overflows: its word grows by exactly N bits per decimate-by-2 stage.

## The polyphase compressor

With M = 1 and R = 2^J, the moving sum of length R factors into J pieces:

    (1 + z^-1 + ... + z^-(R-1))^N = Π_{i=0}^{J-1} (1 + z^-(2^i))^N

By the noble identities, the factor (1 + z^−2^i)^N placed after i halvings
becomes a plain (1 + z^−1)^N filter. So the compressor is J identical stages,
each filtering with (1 + z^−1)^N and halving the rate (`polyphase_dec2_stage`).
Each stage is built in polyphase form:

* the taps C(N, k) of (1 + z^−1)^N are split into the even taps (branch H0)
  and the odd taps (branch H1);
* H0 is applied to the odd-numbered input samples and H1 to the
  even-numbered ones (the z^−1 path), and the two sums are added;
* both branches only work when an output is due, at half the input rate.

For N = 3 the taps are 1 3 3 1, so H0 = 1 + 3z^−1 and H1 = 3 + z^−1. Every
factor of 3 is one shift and one add. The stage outputs
y[n] = Σ_j h[2j]·x[2n+1−2j] + Σ_j h[2j+1]·x[2n−2j] on each odd input sample.
Cascading three such stages keeps input index 8m + 7, which is the same
sample the recursive decimator keeps, so both produce the same words.

The structure needs M = 1 and a power-of-two R. The parameters enforce this
with an elaboration-time assertion.

## The polyphase expander

The CIC response h of length L = N(R·M − 1) + 1 is split into R sub-filters:

    H_p(z) = Σ_j h[jR + p] z^-j,   p = 0 .. R-1,   H(z) = Σ_p z^-p H_p(z^R)

Zero-stuffing followed by H(z) is the same as running every H_p on the
un-stuffed input and interleaving the results. Each H_p therefore runs at
the input rate on the last ceil(L/R) input samples. A commutator emits
sub-filter p in output phase p: y[kR + p] = Σ_j h[jR + p]·x[k − j]. For the
default N = 3, R = 3 the response is 1 3 6 7 6 3 1, giving the sub-filters
H0 = 1 + 7z^−1 + z^−2, H1 = 3 + 6z^−1 and H2 = 6 + 3z^−1. The taps are
computed at elaboration time from N, R and M, so any rate works, R = 2
included.

## Interfaces and timing

All blocks use one clock (`clk`) and an asynchronous active-low reset
(`rst_n`). Reset clears all state, which is the same as an all-zero input
history. Samples are signed two's complement.

**Compressors** (`in_valid`, `in_data`, `out_valid`, `out_data`). One
sample is taken on every clock with `in_valid` high, and gaps are allowed.
Output m is the response at input index m·R + R − 1, i.e. the sum over the
block of R inputs that ends at that sample. In the recursive decimator, the
clock edge that takes that last sample also registers the output, so
`out_valid` is high for one cycle right after it. The polyphase decimator
registers each stage, so its output comes J − 1 edges later: 2 for R = 8.
`out_data` holds its value between pulses. In the recursive decimator the
integrator chain and the comb chain are combinational in front of the one
output register.

**Expanders** (`in_valid`, `in_ready`, `in_data`, `out_valid`, `out_data`).
The filter makes at most one output step per clock. `in_ready` is high in
phase 0. An input is taken when `in_valid` and `in_ready` are both high.
That step and the next R − 1 clocks produce the R outputs of that input,
each registered by the edge of its step. If no input is offered in phase 0,
the expander stalls and produces no output. There is no output
back-pressure. Both expanders have identical timing.

**Top** (`multirate_cic_top`). The two compressors share
`dec_in_valid`/`dec_in_data`, and the two expanders share
`int_in_valid`/`int_in_data`. Each filter has its own output ports. The two
expanders stay in lock-step, so only one `int_in_ready` is exported. An
assertion checks that the second expander's ready agrees. Parameters are
`IN_W` (16), `N` (3), `DEC_R` (8), `INT_R` (3) and `M` (1). `M` must stay 1
while the polyphase compressor is part of the top.

## Verification

Every testbench checks itself and ends with a `TB_RESULT checks=… failures=…`
line. The reference model is written apart from the filter structures. It
applies N cascaded moving sums of length R·M to the input stream, keeping
every R-th value for compression and using the zero-stuffed input for
expansion. The testbenches check every output word, the output counts and
the cycle timing described above.

| testbench | covers |
|---|---|
| `tb_cic_integrator`, `tb_cic_comb`, `tb_rate_counter` | building blocks against software models; random enables; integrator wrap-around; comb delays 1 and 2; counters modulo 8, 3, 2 |
| `tb_shift_add_mult` | constant multipliers 1, 3, 6, 7, 10, 341 against ordinary multiplication, including full-scale inputs |
| `tb_cic_decimator` | R = 8 with (N, M) = (1,1), (2,1), (3,1), (2,2); full-scale runs; random input gaps |
| `tb_polyphase_dec2_stage` | N = 1 … 4 |
| `tb_polyphase_cic_decimator` | R = 8, N = 1, 2, 3 |
| `tb_cic_interpolator`, `tb_polyphase_cic_interpolator` | R = 3 with (N, M) = (1,1), (2,1), (3,1), (2,2); stalls; valid while not ready |
| `tb_polyphase_cic_interpolator_r2` | R = 2, N = 1, 2, 3 |
| `tb_multirate_cic_top` | the whole top at its default parameters: 1024 compressor samples and 256 expander samples; both structures of each pair checked against the model and against each other; counts of input gaps, expander stalls, refused offers and bit growth beyond the input range, each required to occur |

To simulate with Verilator 5, run for example:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/cic_pkg.sv tb/tb_multirate_cic_top.sv --top-module tb_multirate_cic_top
    ./obj_dir/Vtb_multirate_cic_top

Every testbench runs in seconds. To change a configuration, override the
parameters of `multirate_cic_top` or of the individual filters. The widths
follow automatically.

## Where this RTL departs from the source

* **Input width.** The source gives no input width. 16 bits matches its
  pin counts: 39/42/45 pins for the N = 1/2/3 compressors equals 16 input
  bits, 16 + 3N output bits, and clock, reset, input valid and output valid.
* **Handshakes, reset, output phase and register placement** are not
  described in the source. The valid/ready scheme, the asynchronous reset,
  the choice to keep the last sample of each block, and pipeline registers
  only at filter outputs and polyphase stage boundaries are this design's
  own choices.
* **Comb position in the compressor.** One passage of the source says the
  combs come first, but its block diagrams and its description of the rate
  change switch put the integrators first. This RTL follows the diagrams:
  integrators, switch, combs.
* **Notation.** The source uses M both for the rate change factor and for
  the differential delay. Here R is always the rate and M the differential
  delay.
* **Polyphase expander for R = 3.** The source draws the polyphase
  structure only for a factor of 2. The R-branch version here follows from
  the same decomposition.
* **The polyphase compressor** is restricted to M = 1 and power-of-two R,
  where the factorisation holds. The recursive filters accept any M and R.
* **Expander output width** uses the compressor formula with the logarithm
  rounded up. This is wider than the expander's gain needs, and it matches
  the two-pins-per-stage step in the source's table.
* **Not reproduced.** The source's area, power and delay figures come from
  FPGA synthesis of its own implementation. The filter delay it reports grows
  with N, which fits unpipelined integrator and comb chains like the ones
  used here. Its "direct" single-rate CIC and the compensation filters it
  mentions as future work are not part of this RTL.
