# Scalable B-spline discrete wavelet transform (9/7, 6/10, 10/18)

This is a one-dimensional forward discrete wavelet transform (DWT). It can
switch between three biorthogonal filter banks while running: the CDF 9/7
bank used by JPEG2000, the 6/10 bank and the 10/18 bank. It needs only six
multipliers for all three. The saving comes from the *B-spline
factorisation* of each analysis filter:

    H(z) = z^dH · ((1+z^-1)/2)^gH · Q(z)        (low-pass)
    G(z) = z^dG · ((1-z^-1)/2)^gG · R(z)        (high-pass)

- The **B-spline terms** hold all the zeros at z = -1 and z = +1. They are
  cascades of "add two neighbours and halve" stages, so they need no
  multipliers.
- The **distributed parts** Q and R are short symmetric polynomials. They
  are the only part that needs multiplications.

All three banks come from one family of maximally flat filters. Their
distributed parts are therefore products of only two kinds of small filter:

    L_r(z)  = alpha0 + alpha1 (z + z^-1)                     one real root r
    W_ab(z) = beta0 + beta1 (z + z^-1) + beta2 (z^2 + z^-2)  one complex pair (a = |c|^2, b = 2 Re c)

The coefficients follow from r, a and b. Written as a fixed matrix times
the vector of "folded" input sums, they need fewer multipliers:

    p0 = x[n],  p1 = x[n-1] + x[n+1],  p2 = x[n-2] + x[n+2]
    L_r:  y = p0 - (1/r) (p0/2 - p1/4)
    W_ab: y = p0 - (b/a) (p0/2 - p1/4) + (1/a) (3p0/8 - p1/4 + p2/16)

The weights 1/2, 1/4, 3/8 and 1/16 are shifts. So L_r needs one real
multiplier and W_ab needs two, where the direct form needs two and three.
The mirrored filter L_r(-z) or W_ab(-z), used in a high-pass branch, only
flips the sign of the p1 terms.

| bank  | (gH, gG) | Q (low-pass)   | R (high-pass)                | coefficients used (real values)                                  |
|-------|----------|----------------|------------------------------|------------------------------------------------------------------|
| 9/7   | (4, 4)   | W_ab(z)        | L_r(-z)                      | b/a = -1.0793, 1/a = 6.8477, 1/r = -2.9207                       |
| 6/10  | (3, 5)   | L_r(z)         | W_ab(-z)                     | same r, a, b as 9/7                                              |
| 10/18 | (5, 9)   | W_a1b1(z)      | W_a0b0(-z) · W_a2b2(-z)      | b1/a1 = -2.6040, 1/a1 = 10.4457; b0/a0 = -6.4572, 1/a0 = 12.1147; b2/a2 = 2.0612, 1/a2 = 7.3016 |

With these constants, Q(z) and R(z) already include the overall filter
gains (Q has DC gain 1), so there are no separate gain multipliers.

## Datapath

```
            +-- (1+z^-1)/2 x5, taps 3|4|5 --+   swap    +-- window regs --> W_ab (upper) -----------------> y_hg
 u --split--+                               +-- column -+
 (pairs)    +-- (1-z^-1)/2 x9, taps 4|5|9 --+           +-- window regs --> LW (L_r or W_ab) --+-----------> y_gh
                                                                                |  x~ (10/18) |        ^
                                                                                +-> 5 regs -> W_ab (always hp)
```

- **Input split (`poly_split`).** Samples arrive one per clock. Every two
  samples form a polyphase pair (u[2m], u[2m-1]). The B-spline stages
  advance once per pair.
- **B-spline chains (`bs_chain`, `bs_stage`).** Each stage maps the pair
  (v[2m], v[2m-1]) to (w[2m], w[2m-1]), where w = (1 ± z^-1)/2 · v:

      w[2m]   = (v[2m]   ± v[2m-1]) / 2
      w[2m-1] = (v[2m-1] ± v[2m-2]) / 2

  It uses two adders and one register that holds v[2m-2] from the previous
  pair. The low-pass chain has five stages and the high-pass chain nine. A
  multiplexer per chain picks the tap for the selected bank.
- **Swap column.** The upper W_ab gets the low-pass chain for 9/7 and 10/18.
  For 6/10 it gets the high-pass chain, because the 6/10 high-pass part is
  the W_ab filter. LW always gets the other chain. Correspondingly, the
  upper W runs low-pass for 9/7 and 10/18 and high-pass for 6/10, and LW
  runs the opposite way.
- **Distributed filters (`wab_filter`, `lw_filter`).** LW is the W_ab
  datapath with two coefficient multiplexers. In W mode they pass b/a and
  1/a. In L mode they pass 1/r and 0, which turns it into L_r.
- **Cascade for 10/18.** R is a product of two W filters. LW computes the
  first one, W_a0b0(-z), giving the intermediate signal x~. A five-register
  tap line (`tap_line`) and a second W_ab (always high-pass) compute
  W_a2b2(-z) on x~. An output multiplexer selects LW or the second W.
- **Control and coefficient table (`filter_config`).** Decodes `filter_sel`
  into the routing, lp/hp and LW controls. It also gives the quantised
  coefficients. These are the real constants of `bs_dwt_pkg`, rounded at
  elaboration time.

## From polyphase pairs to filter windows (the subtle part)

The B-spline part produces pairs at half the input rate. The distributed
filters, in contrast, are ordinary non-polyphase FIR filters that need five
consecutive samples x[n-2..n+2]. `phase_window` bridges the two:

- The even sample of each pair goes into a chain of three registers. The
  odd sample goes into a chain of two.
- After pair m, the registers hold v[2m], v[2m-1], v[2m-2], v[2m-3] and
  v[2m-4]. That is exactly the window centred on the even sample 2m-2.
- Each filter evaluated on this window gives one **decimated** output per
  pair: the low-pass or high-pass band sample at 2m-2. No extra
  down-sampler is needed.

The 10/18 high-pass path is harder. Its second filter needs x~ at **every**
sample, odd ones included, but the window above is always centred on an
even sample. This implementation solves it as follows:

- The LW window gets one more odd-sample register, so it also holds v[2m-5].
  From the same registers it can then present the window centred on the
  odd sample 2m-3.
- Two input samples arrive per pair, so LW works twice per pair. On the odd
  input sample it computes x~[2m-3] from the odd-centred window. On the
  following even sample it computes x~[2m-2] from the even-centred window;
  the window registers update on that same clock edge.
- Both values enter the tap line in order. The second W_ab then sees
  consecutive x~ samples and again produces one decimated output per pair.

The multiplier count stays at six. The cost is one register and five
2:1 multiplexers.

## Interface and timing

Top module `bs_dwt_scalable`:

| port          | dir | width  | meaning |
|---------------|-----|--------|---------|
| `clk`, `rst_n`| in  | 1      | clock; asynchronous active-low reset (clears all state) |
| `filter_sel`  | in  | 2      | `bs_dwt_pkg::filter_e`: 0 = 9/7, 1 = 6/10, 2 = 10/18 |
| `in_valid`    | in  | 1      | `u` carries a sample; gaps are allowed |
| `u`           | in  | DATA_W | input sample, two's complement |
| `out_valid`   | out | 1      | one pulse per two input samples |
| `y_hg`        | out | DATA_W | upper W output: low-pass (9/7, 10/18), high-pass (6/10) |
| `y_gh`        | out | DATA_W | lower path output: high-pass (9/7, 10/18), low-pass (6/10) |
| `y_hg_is_low` | out | 1      | 1 when `y_hg` is the low-pass sample |

- **Sample numbering.** The first valid sample after reset is u[0]. Earlier
  samples count as zero.
- **When outputs appear.** The outputs are registered on every odd-indexed
  sample u[2m+1]. `out_valid` is high in the following cycle, so the
  latency from u[2m+1] is one clock.
- **Which band sample each output is.** Let v_H and v_G be the causal
  B-spline-filtered inputs. Then output pair m is:
  - Q applied to v_H, centred on sample 2m-2 (the low-pass output).
  - R applied to v_G, centred on 2m-2 (the high-pass output), for 9/7 and
    6/10.
  - For 10/18, the high-pass output is centred on 2m-6 instead, because of
    the cascade.

  Adding the B-spline group delay gives the filter delays z^dH and z^dG.
- **Throughput.** One output pair per two input samples, i.e. a critically
  sampled two-band split at full input rate.
- **Switching banks.** `filter_sel` may change at any time and acts
  immediately. Nothing is flushed: the B-spline chains always run all
  stages, so their state is valid for every bank. The window and tap
  registers need a few pairs to refill, and the testbench skips 8 output
  pairs after each switch.

## Number formats and accuracy

| parameter   | default | meaning |
|-------------|---------|---------|
| `DATA_W`    | 16      | width of samples, B-spline stages and outputs |
| `COEF_W`    | 9       | width of the coefficients 1/r, b/a, 1/a |
| `COEF_FRAC` | 4       | fractional bits of the coefficients (k) |

- **Coefficient widths.** The defaults are the low-cost quantised
  configuration: 9-bit coefficients with k = 4. The published design uses
  16-by-9 multipliers; here the data operand is wider (see below).
  The 10/18 constant 1/a0 = 12.11 needs five integer bits including sign,
  which bounds k for a given `COEF_W`. With `COEF_W=16`, k can be at most
  11, the high-precision configuration. The 9/7 and 6/10 constants alone
  would allow k = 12 at 16 bits.
- **Halving stages.** Each stage computes the sum one bit wider and shifts
  it right arithmetically, i.e. truncates to 16 bits.
- **Multiplier inputs.** The pre-adder network (p0, p1, p2 and the shift
  weights) is computed exactly at 16 times the data scale. The multiplier
  operands are therefore (DATA_W+5) × COEF_W bits.
- **Multiplier outputs.** Each product is rounded (half up) back to the data
  scale.
- **Filter outputs.** Every filter output, including x~, saturates to
  `DATA_W` bits.

The accuracy limit comes from the truncating halving stages, not from the
coefficients. The floor in the last high-pass stage leaves a bias of up to
half an LSB. The distributed high-pass filter then amplifies it by its DC
gain:

- about 3.9 for 9/7
- about 120 for the 10/18 cascade (19.6 × 6.2)

Against a floating-point model of the same quantised filters, the
end-to-end test therefore measures errors of about:

- 4–7 LSB on the low-pass outputs
- 3–7 LSB on the 9/7 and 6/10 high-pass outputs
- about 70 LSB on the 10/18 high-pass output, mostly a constant offset

For 10/18 in particular, feed the input with headroom and fractional
guard bits, e.g. 8-bit pixels shifted left by 6. Another option is to widen
`DATA_W`; every width in the design follows it.

## Files

- `rtl/bs_dwt_pkg.sv`: `filter_e`, the real distributed-part constants, and
  `quant()`.
- `rtl/poly_split.sv`: input pairing, pair and output strobes.
- `rtl/bs_stage.sv`, `rtl/bs_chain.sv`: polyphase B-spline stage and tapped
  chains.
- `rtl/phase_window.sv`, `rtl/tap_line.sv`: window registers in front of the
  distributed filters.
- `rtl/wab_filter.sv`, `rtl/lw_filter.sv`: W_ab and flexible L_r/W_ab
  filters (combinational).
- `rtl/filter_config.sv`: per-bank control and coefficient table.
- `rtl/bs_dwt_scalable.sv`: the top.
- `tb/tb_<block>.sv`: a self-checking testbench per block.
- `tb/dwt_e2e_check.sv`: the end-to-end checker. It is used by
  `tb_bs_dwt_scalable` (default parameters) and `tb_bs_dwt_scalable_k11`
  (16-bit coefficients, k = 11).

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog ends a hung run. For example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/bs_dwt_pkg.sv \
    tb/tb_bs_dwt_scalable.sv --top-module tb_bs_dwt_scalable -o sim
./obj_dir/sim
```

The end-to-end test covers the following:

- Input: 3600 samples of a sine plus noise, with random `in_valid` gaps.
- Banks: it switches 9/7 → 6/10 → 10/18 → 9/7 → 10/18 → 6/10 while running.
- Reference: each settled output is compared with a floating-point
  evaluation of the binomial B-spline sums and the L/W polynomials.
- Timing: it checks the one-cycle `out_valid` timing and the `y_hg_is_low`
  flag.
- Coverage: it fails unless every bank, the swapped routing, both LW modes,
  the cascade, the switches and the input gaps all occurred.

The block testbenches check the following:

- B-spline stages and chains: against the binomial definition.
- Window and tap registers: the exact sample indices.
- W_ab and LW filters: against their polynomial forms, over random
  coefficients, both signs and saturation.
- Coefficient table: against the constants rounded by hand.

## Departures and limits

- **Timing choices.** The timing, the handshake, the reset, all rounding
  and saturation rules, and the 21-bit multiplier operands are choices of
  this implementation. The published structure specifies only 16-bit data
  with rounded multiplier outputs.
- **LW lp/hp.** LW is driven with the opposite lp/hp of the upper W. That
  follows from which branch each filter serves.
- **The 10/18 cascade.** The two-evaluations-per-pair scheme of LW and its
  extra register are this design's own solution. A one-output-per-pair LW
  cannot feed the full-rate tap line of the second stage.
- **Order of the 10/18 R factors.** W_a0b0 runs first and W_a2b2 second.
  Both orders give the same R(z).
- **Output registers and unused coefficients.** The output registers and
  the zeroing of unused coefficients are additions.
- **Fixed single-bank designs.** The fixed 9/7, 6/10 and 10/18 designs are
  not provided separately. Tying `filter_sel` to a constant lets synthesis
  trim the scalable design to one bank: stages past the used tap, the
  unused filters and the multiplexers become dead logic.
- **No 2-D transform.** A 2-D, multi-level transform needs line or
  transposition memory and scheduling. That is outside this core, which
  filters one stream (a row or a column) at a time.
