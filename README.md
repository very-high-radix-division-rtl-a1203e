# Very-high-radix divider with prescaling and digit selection by rounding

This is synthesizable SystemVerilog for a fractional divider that retires **b = 9 quotient bits per
cycle** (radix r = 2^9 = 512). A 54-bit quotient takes **10 cycles**. It implements the scheme
published by M. D. Ercegovac, T. Lang and P. Montuschi in "Very High Radix Division with Selection by
Rounding and Prescaling". Details the published description leaves open are filled in here, and each
such choice is marked below.

At high radices, a digit-recurrence divider is usually limited by quotient-digit selection. The
selection table grows with the radix. This design makes selection trivial instead:

1. **Prescale.** Multiply divisor and dividend by M ≈ 1/d, so the scaled divisor z = M·d lies within
   1 ± (r−2)/(4r(r−1)). That is roughly ±1/(4r), or about ±4.9·10⁻⁴ for r = 512.
2. **Select by rounding.** With z this close to 1, the next digit is simply the shifted residual
   r·w[j], truncated to two fractional bits and rounded to the nearest integer. There is no table
   and no comparison with multiples of the divisor.
3. **Iterate in carry-save.** The recurrence w[j+1] = r·w[j] − q[j+1]·z, with w[0] = M·x, never
   assimilates the residual. Each step costs one half-adder row (selection), a recoder, and one
   carry-save multiply-accumulate.

Because z is not exactly 1, the recurrence still divides by z and not by 1. Since z = M·d and
w[0] = M·x, the digits converge to x/d.

## Operation, cycle by cycle

For B = 9 and N = 54 (`ceil(N/B) + 4` cycles in general):

| cycle | state    | what happens |
|-------|----------|--------------|
| 1     | IDLE+start | `gamma_table` and `scale_mult` form M from d; M goes into the M register (carry-save). d goes into the multiplicand register. |
| 2     | MD       | The multiplier-accumulator forms M·d into the residual register W. x goes into the multiplicand register. |
| 3     | MX       | M·x goes into W and becomes w[0]. The adder assimilates the previous W (M·d) into z, which goes into the multiplicand register. The quotient forms are cleared. |
| 4–9   | ITER     | One digit per cycle. `digit_select` rounds the top of W. The 2:1 mux feeds the digit into the recoder, and W ← r·W − q·z. `otf_convert` appends the digit. |
| 10    | POST     | The adder gives the sign of the last residual. The quotient register takes the corrected, rounded quotient. |

Two operands share one path at different times: the recoder and the multiplier serve M during
scaling and q during the iterations. The multiplicand register holds d, then x, then z. The adder
assimilates z in cycle 3 and gives the residual sign in cycle 10.

## Number formats

| quantity | format | bits (B=9, N=54) |
|---|---|---|
| x, d | unsigned, N fractional bits, 1/2 ≤ x ≤ d < 1 | 54 |
| d_τ (table index) | d bits 2⁻²…2⁻⁽ᴮᐟ²⁺²⁾ (the 2⁻¹ bit is always 1) | 5 |
| d_h | d bits 2⁻¹…2⁻⁽ᴮ⁺⁶⁾ | 15 |
| γ1, γ2 | unsigned; 2 integer bits + B+3 (γ1) or B+4 (γ2) fractional bits | 14, 15 |
| M | carry-save, 2 words of RECW bits, FM = B+4 fractional bits | 2 × 16 |
| z, M·x, residual w | FW = N+B+4 fractional bits (M·d is exact at this width) | 67 fractional |
| residual words | two's complement modulo 2^(RECW−B), i.e. FW + RECW − B bits | 2 × 74 |
| digit q | carry-save, 2 words of RECW bits plus 1 extra bit | 2 × 16 + 1 |
| quotient | 1 integer bit + N−1 fractional bits | 54 |

The multiplier never shifts anything. The multiplicand register holds a plain integer: d·2^N, x·2^N
or z·2^FW. M carries FM fractional bits, and FM + N = FW. So M·d, M·x and q·z all come out in units
of 2^−FW.

## Digit selection by rounding (`digit_select`)

The two residual words are shifted by b (wiring only). Each word is truncated to two fractional bits:
sum word `…s.ab` and carry word `…c.cd`. The digit is round(y) = ⌊S + C + ½⌋. A row of half adders
combines the two integer parts, which leaves the least significant bit of the carry vector empty.
The carry out of the fraction fills it:

* e = a OR c goes into that empty bit.
* f = b·d·NOT(a XOR c) is passed on as an extra bit of weight 1.

Together, e + f = ⌊(2a + 2c + b + d + 2)/4⌋. The digit stays in carry-save form:
q = qs + qc + qf. Its delay is one half adder.

Selection by rounding guarantees −½ ≤ r·w − q < ½ + 2⁻². Given the range of z, this keeps
|w[j+1]| < z and |q| ≤ r − 1 in every step except the first (see below).

## Recoding a carry-save operand to radix 4 (`radix4_recoder`)

This is the least obvious block. The multiplier wants Booth-style digits in {−2,…,2}, but its
operand (M, or the digit q) is a carry-save pair. The recoder works without assimilating the pair.
It takes each two-bit group of both words, a,b from the sum word and c,d from the carry word:

* **Step 1.** The group value 2(a+c) + b + d lies in 0…6. Send 4·(a OR c) up to the next group. What
  is left is b + d + h − 2k ∈ {−2…3}, where k = a XOR c and h = (a OR c) of the group below. Group 0
  uses the extra bit f as its h.
* **Step 2.** A full adder sums b + d + h into (carry, sum). The digit is held as the two's
  complement pair (carry XOR k, sum) ∈ {−2…1}. A transfer t = carry AND NOT k goes up, which turns
  +2 and +3 into 4−2 and 4−1. Adding the transfer from below gives the final 3-bit digit:
  * bit0 = sum XOR t_in
  * bit1 = m XOR (sum AND t_in)
  * bit2 = m AND NAND(sum, t_in), where m = carry XOR k

No signal crosses more than one group boundary, so the delay is about two full adders, whatever the
width.

**Width rule (this design's choice).** The transfers out of the top group are dropped, so the digits
equal the operand modulo 2^RECW. The digits span ±(2/3)·2^RECW, so they give the exact value whenever
the operand's magnitude is below 2^RECW/3. RECW = B+7, rounded up to an even number (16 for B = 9),
meets that for both operands:

* M < 2.01 · 2^FM
* |q| ≤ r

The widths also follow from this rule. The residual words carry RECW − B integer bits, so the integer
part of r·w is exactly RECW bits modulo 2^RECW. The M words carry RECW − FM integer bits. The
published datapath has narrower registers: 2(b+1) for the digit, 2(b+6) for M and 2(n+b+5) for W.
This design widens them so the modular recoding stays exact.

## Prescaling (`gamma_table`, `scale_mult`)

M = γ2 − γ1·d_h is a linear interpolation of 1/d.

* **Coefficients.** They depend on d_τ, the B/2+1 divisor bits after the leading one: 32 intervals
  for B = 9. The published scheme gives only the interface: floor(b/2)+1 inputs, and coefficients of
  b+5 and b+6 bits. The coefficient values are this design's own. Each pair is the chord of 1/d over
  interval A (d ∈ [A, A+1)/2^τ), scaled to centre the error:

      γ1 = 8·2^(2τ) / (8A(A+1)+1),   γ2 = 8·2^τ·(2A+1) / (8A(A+1)+1),   τ = floor(B/2)+2

  Both are rounded and computed at elaboration time. The worst |z − 1| from interpolation and
  coefficient rounding is 1.4·10⁻⁴, against the 4.9·10⁻⁴ allowed.
* **Multiplier-adder.** `scale_mult` forms −γ1·d_h as one partial product per bit of d_h, using
  ~γ1 plus one row equal to d_h. It adds γ2 and reduces everything with a 3:2 carry-save tree
  (2B+12 bits). It then truncates both words to FM fractional bits, without assimilating them.
* **Result.** Truncating d to d_h, and truncating M, add at most about 2.4·10⁻⁴. A testbench runs
  every d_h through the table and the multiplier. At both ends of each d_h interval, the worst
  |z − 1| is 2.7·10⁻⁴.

## Multiplier-accumulator (`mult_acc`, `csa_tree`)

It forms out_s + out_c = acc_s + acc_c ∓ Σ dig[i]·4^i·y, modulo the residual width:

* **Partial products.** There are 8 of them (0, ±y, ±2y). A negative one is the complement of y, with
  a 1 in a shared correction row.
* **Accumulator rows.** During iterations, the two residual words shifted by b are added as two more
  rows. During scaling, those rows are zero.
* **Reduction.** `csa_tree` reduces the 11 rows in 3:2 levels and returns a carry-save pair.

## On-the-fly conversion, correction and rounding (`otf_convert`)

The signed digits become a binary quotient without carry propagation:

* **Partial quotient.** Three forms are kept: Q, Q−1 and Q+1. The digit is assimilated by a short
  RECW-bit adder, and appending it is a b-bit concatenation onto whichever form absorbs the borrow or
  carry. This also handles a first digit of value r.
* **Last digit.** Two rounded forms are also built: Q + 2^(L−N) and Q − 1 + 2^(L−N), with
  L = ceil(N/B)·B digit bits.
* **Post cycle.** The sign of the last residual picks one of them, because a negative residual means
  the digits overshoot by one unit. Dropping L−N+1 bits gives the result.

The result is

    quotient = floor(x/d · 2^(N−1) + 1/2)

that is, round to nearest with ties away from zero, at N−1 = 53 fractional bits, plus an integer bit
for results of 1.0.

## Interface and timing (`prescale_divider`)

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst_n | in | 1 | clock; asynchronous active-low reset |
| start | in | 1 | one-cycle pulse. Ignored while busy. |
| d | in | N | divisor, 1/2 ≤ d < 1. Read only in the start cycle. |
| x | in | N | dividend, 1/2 ≤ x ≤ d. Read only in the cycle **after** start. |
| quotient | out | N | held until the next result |
| done | out | 1 | one-cycle pulse when quotient is new |
| busy | out | 1 | high from the cycle after start until done |

`done` is seen ceil(N/B)+4 cycles after the start cycle: 10 for B = 9. Operations do not overlap.
The dividend is read one cycle after the divisor. While the dividend is still on its way, the scale
factor is already being computed from the divisor.
Three assertions watch the arithmetic in simulation:
* z is within 1 ± 1/(4r) when the first digit is selected.
* Every residual satisfies |w| ≤ z.
* Every digit lies in −(r−1)…r.

Parameters: `B` (radix exponent, default 9) and `N` (quotient bits, default 54). All other widths
are derived from them in `div_pkg`. B = 11, 14 and 18 are tested, with 9, 8 and 7 cycles.

## Where this departs from, or adds to, the published design

* **First digit.** The first digit may equal r. The published digit set is |q| ≤ r−1, with
  w[0] = M·x and x ≤ d allowed. When x is close to d, round(r·M·x) reaches r. This design keeps
  w[0] = M·x and lets q1 = r. The residual then becomes r·M·(x−d) ≤ 0 and stays bounded, at no extra
  cycle.
* **Widths.** The registers are widened for exact modular recoding (see the recoder section).
* **Interpolation coefficients.** Their values are derived here (see the prescaling section).
* **Rounding.** The position (N−1 fractional bits) and mode (nearest, ties away) are this design's
  choice. The published design specifies only a sign detection and a quotient update inside the
  conversion.
* **Not modelled.** The delay and area figures in full-adder units, and the standard-cell γ modules,
  have no counterpart in RTL.
* **Not built.** Two options the published text mentions are not built: keeping the scaled divisor
  for a run of divisions by the same d, and a two-stage pipeline. Both need registers the published
  datapath does not have. Taking d one cycle before x, the simplest form of computing M in advance,
  is built.

## Files

* `rtl/div_pkg.sv`: defaults, width functions, digit type, FSM and multiplier-mode enums
* `rtl/prescale_divider.sv`: top level, with registers, muxes and the z-range assertion
* `rtl/div_control.sv`: cycle sequencer
* `rtl/gamma_table.sv`, `rtl/scale_mult.sv`: scaling unit
* `rtl/digit_select.sv`, `rtl/radix4_recoder.sv`, `rtl/mult_acc.sv`, `rtl/csa_tree.sv`, `rtl/cpa.sv`:
  recurrence datapath
* `rtl/otf_convert.sv`: quotient conversion, correction and rounding
* `tb/tb_<block>.sv`: a self-checking testbench per block
* `tb/tb_prescale_divider.sv`: end-to-end test at the default size
* `tb/tb_radix_sweep.sv` with `tb/div_sweep_unit.sv`: radices 2^11, 2^14 and 2^18

## Verification

Every testbench compares against values it computes independently, with wide-integer or real
arithmetic. Each prints `TB_RESULT checks=… failures=…`.

* **End to end.** `tb_prescale_divider` runs about 3100 divisions at the default size: corner cases,
  every coefficient interval at both ends, x = d, x just below d, and random operands. It checks each
  quotient against floor((X·2^N + D)/(2D)) and the 10-cycle latency. It also counts the mechanisms
  the design relies on, and fails if any never occurred:
  * a first digit equal to r
  * negative digits
  * a negative last residual (post-correction)
  * a result of 1.0
  * a start ignored while busy
* **Other radices.** `tb_radix_sweep` checks 1000 divisions each at B = 11, 14 and 18, including
  latency.
* **Blocks.** The block testbenches check:
  * the table against the z bound
  * the scaling product against exact arithmetic
  * rounding against ⌊y+½⌋
  * recoding for digit range, the modular value and the exact value
  * the multiplier-accumulator in both modes
  * the adder
  * conversion with random digit strings
  * the controller's state sequence

Simulate with Verilator 5, for example:

    verilator --binary --timing --assert -Irtl -Itb rtl/div_pkg.sv tb/tb_prescale_divider.sv \
              --top-module tb_prescale_divider -o sim && ./obj_dir/sim

Each testbench builds and runs in well under a minute.
