# Decimal32 BID floating-point multiplier

This design multiplies two IEEE 754-2008 decimal32 numbers stored in the
binary-integer-decimal (BID) encoding. In BID the 7-digit decimal coefficient
is a plain binary integer, so the coefficients can be multiplied with an
ordinary binary multiplier. The hard part is rounding. The exact product has
up to 14 digits and must be cut back to 7, which means dividing a binary
number by a power of ten.

The main idea is to do that division with the same binary multiplier. The
product is multiplied by a stored, scaled reciprocal of 10^d. The quotient
and the round/sticky information come out of fixed bit fields of the
result. One radix-8 Booth multiplier with a Wallace (or Dadda) reduction
tree does the coefficient product first and then four more passes for the
reciprocal multiplication. A small look-up table decides beforehand how
many digits d must be dropped. It works from the positions of the
operands' leading ones, so no digit count of the product is needed.

The RTL is synthesizable SystemVerilog-2017. It has one clocked controller.
The arithmetic is built from explicit adder, compressor and tree modules, so
the six structural variants (two trees times three final adders) can be
compared.

## Number format

A decimal32 value is (-1)^s x C x 10^(E-101). C is an integer below 10^7 and
E is the biased exponent, 0..191. The 32-bit BID word has two layouts:

| bits 30:29 | sign | exponent      | coefficient                          |
|------------|------|---------------|--------------------------------------|
| not `11`   | 31   | 30:23 (8 bits) | 22:0 (23 bits)                      |
| `11`       | 31   | 28:21 (8 bits) | `100` followed by bits 20:0 (24 bits) |

The second layout holds coefficients of 2^23 and above. A coefficient field of
10^7 or more is non-canonical and reads as zero. A word whose bits 30:27
are `1111` is not a number: bit 26 = 0 is infinity and bit 26 = 1 is NaN.
`bid_decoder` unpacks a word into the struct `bid_fields_t` (sign, exponent,
24-bit coefficient, class). `bid_encoder` packs one back and uses the 11-form
whenever the coefficient needs 24 bits.

## Datapath

```
 a ─ bid_decoder ─┐                                   ┌─ bid_encoder ─ z
 b ─ bid_decoder ─┤                                   │
                  └──────────── mul_rounder ──────────┘
   sign:     s_a XOR s_b
   exponent: E_a + E_b - 101   (+ d, + 1 after re-scaling)
   coefficient:
     booth_multiplier (24x24, carry-save out, with a carry-save feedback input)
       booth_radix8_ppgen ─ wallace_tree | dadda_tree ─ compressor_4to2
     split_cpa       IP = PS + PC (25-bit adder + compound adder)
     round_detect    leading_one_detector x2, k = lop_a + lop_b,
                     digits_lut (k -> d', 10^n), pow10_compare, d = d' or d'+1
     recip_lut       d -> w_d, v
     round_increment TP/R fields, r*, s*, increment, 10^7 -> 10^6
```

### Booth multiplier

`booth_radix8_ppgen` recodes the 24-bit multiplier in overlapping 4-bit
groups into 9 digits in -4..+4. Each digit selects 0, ±M, ±2M, ±3M or ±4M,
and only 3M needs an adder. Negative multiples are formed by one's
complement plus a +1 bit in a separate row. Every row is sign-extended to the
full 50 bits, so the operands are treated as unsigned without a
sign-encoding trick. The 10 rows go into a reduction tree:

* `wallace_tree` takes the rows in groups of three at every level through
  `csa_3to2` rows. 10 rows become 2 after 5 levels (10, 7, 5, 4, 3, 2).
* `dadda_tree` works column by column with the height sequence
  2, 3, 4, 6, 9, ... and places only as many 3:2 and 2:2 counters as each
  stage needs.

The tree output and the feedback pair (S, C) are merged by a
`compressor_4to2`. So each pass computes PS + PC = M x N + S + C in carry-save
form, with no carry propagation inside the multiplier.

### Carry-propagate adders

Every carry-propagate adder in the datapath is a `cpa_adder`, whose
`ADDER` parameter selects one of three types:

* `ripple_carry_adder`: full adders in series.
* `carry_lookahead_adder`: 4-bit look-ahead groups with group carries passed
  between groups.
* `carry_select_adder`: 4-bit sections. Each upper section is computed for
  carry-in 0 and 1 and the right one is picked by a multiplexer. The lowest
  section is a plain ripple adder.

These adders are the 3M adder, the split 50-bit adder and the comparator
adder. `split_cpa` adds the low 25 bits and computes the upper 25 bits both
as sum and as sum+1 (a compound adder). The low carry picks one of the two.

## Deciding how many digits to drop

Let k = lop(A_C) + lop(B_C), where lop is the bit position of the leading
one. Then the product lies in [2^k, 2^(k+2)). Over that range its digit
count can take only two values: n(k) = number of digits of 2^k, or n(k)+1.
`digits_lut` stores, for k = 23..46, d' = n(k) - 7 and the boundary 10^n(k).
The only remaining question is whether IP >= 10^n. `pow10_compare`
answers it without finishing the addition of the carry-save product: it
feeds PS, PC+1 and NOT(10^n) into a 3:2 compressor and then one 50-bit
adder, and the sign bit is the answer. This works because PC's LSB is always
0, so setting it to 1 supplies the +1 of the two's complement. Then d = d'
or d'+1.

Rounding is needed when k > 23 or when the low 25 bits of IP are at least
10^7. For k <= 23 the product is below 2^25, so the low 25 bits are all of
IP.

## Rounding by reciprocal multiplication (the four passes)

For d = 1..7, `recip_lut` holds

    v   = ceil(d * log2 10)          (4, 7, 10, 14, 17, 20, 24)
    w_d = ceil(2^(47+v) / 10^d)      (48 bits)

P = IP x w_d is a 95-bit number. With u = 47, its bits 94:47 hold the
truncated quotient TP = floor(IP / 10^d) above the low v bits. Those v bits
are a scaled remainder field R:

* its MSB r* says whether the dropped part is at least one half;
* the OR of the other bits, s*, says whether it is non-zero apart from the
  half.

Bits 46:0 of P are discarded. This choice of w_d gives an exact TP and a
correct r*/s* class (zero, below half, exactly half, above half) for every
IP below 2^47. The reasoning:

1. Write w_d = (2^(47+v) + e) / 10^d with 0 <= e < 10^d, and IP = q 10^d + r.
2. Then P / 2^47 = q 2^v + r 2^v / 10^d + err, with
   err = IP e / (10^d 2^47) < IP / 2^47 < 1.
3. Because 2^v >= 10^d, each step of r moves r 2^v / 10^d by at least 1.
   The exactly-half case lands on 2^(v-1) exactly.
4. An error below 1 therefore cannot carry into TP, and it cannot move R
   across the boundaries 1 or 2^(v-1).

The testbenches check this on random and directed values.

The 48 x 48 product is computed with the single 24 x 24 multiplier in four
passes over the halves IP = IP_H:IP_L and w_d = W_H:W_L:

| pass | multiplies | adds as feedback |
|------|------------|------------------|
| R1   | IP_L x W_L | none |
| R2   | IP_L x W_H | (R1 result) >> 24 |
| R3   | IP_H x W_L | R2 result (carry-save, unshifted) |
| R4   | IP_H x W_H | (R3 result) >> 24; bit 23 of R3 is P bit 47 |

Then P[94:47] = {R4[46:0], R3[23]}.

A shifted carry-save pair is not the shifted sum: the carry out of the bits
that are shifted away is lost. Where the feedback must be shifted, it is
therefore taken after the carry-propagate adder, which is exact. The
unshifted R2 -> R3 feedback stays in carry-save form.

`round_increment` cuts TP and R out of P[94:47] at width v and adds 1
through a half-adder chain according to the mode:

| code | mode            | increment when |
|------|-----------------|----------------|
| 000  | ties to even    | r* and (s* or LSB of TP) |
| 001  | toward zero     | never |
| 010  | toward +inf     | positive and (r* or s*) |
| 011  | toward -inf     | negative and (r* or s*) |
| 100  | ties away       | r* |
| 101-111 | as 000       | |

If the increment produces 10^7 (e.g. 9999990 x 1000001 = 9999999999990 with
d = 6 rounds up), the coefficient becomes 10^6 and the exponent goes up by
one more. The result exponent is E_a + E_b - 101 + d (+1).

Worked example: A = `5B08BBCB` = +572363 x 10^81 and B = `8F000073` =
-115 x 10^-71. The exact product is 65821745 x 10^10, which is 8 digits, so
d = 1. The dropped digit is exactly one half. The result is `B8646F9E`
(-6582174 x 10^11) with ties to even and `B8646F9F` with ties away.

## Control and timing

`mul_rounder` holds the operands, the carry-save product and the rounding
state. Its FSM has the states IDLE, MUL, CHK, R1, R2, R3, R4, FIN and DONE.

Top-level interface (`bid_fp_multiplier`):

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk, rst_n | in | 1 | clock, asynchronous active-low reset |
| start | in | 1 | when busy is low, samples a, b, round_mode |
| a, b | in | 32 | BID decimal32 operands |
| round_mode | in | 3 | code from the table above |
| z | out | 32 | result, valid when done is high, held until the next result |
| done | out | 1 | one-cycle pulse |
| busy | out | 1 | operation in progress |
| inexact | out | 1 | non-zero digits were dropped |

Latency from the start cycle to done is 3 cycles when the exact product fits
in 7 digits (MUL, CHK, DONE) and 8 cycles when it must be rounded. One
operation runs at a time. An assertion checks that PC's LSB is zero when
the comparator relies on it. Another checks that d is never 0 when rounding
starts.

Parameters (top and `mul_rounder`): `TREE` = `TREE_WALLACE` (default) or
`TREE_DADDA`, and `ADDER` = `ADD_CSEL` (default), `ADD_CLA` or `ADD_RCA`.
All six combinations give bit-identical results and differ only in
area and delay. The default is the pair reported as fastest: a Wallace tree
with carry select adders.

## Special values and exponent range

The source design does not say how the datapath handles these cases. This
RTL handles them as follows:

* A NaN operand, or infinity x 0, gives the NaN `7C000000`.
* Infinity x a non-zero finite value gives infinity with the product's sign.
* A result exponent above 191 gives infinity. A zero coefficient instead
  keeps exponent 191.
* A result exponent below 0 gives a signed zero. There is no gradual
  underflow by rounding off further digits.
* A non-canonical coefficient reads as zero.

There are no exception flags apart from `inexact`.

## Departures from the source design, and choices it leaves open

* **Rounding-mode encoding.** The source names the five modes and a 3-bit
  input but gives no codes. The codes above are chosen so that code `100`
  reproduces the source's hardware result `B8646F9F` for the worked
  example.
* **Exponent.** The biased exponents are added and the bias removed.
* **Rounding test.** The test is `>= 10^7`. A 7-digit result cannot hold
  10^7, so the product must be rounded when it equals 10^7 too.
* **Dadda heights.** They follow the standard floor sequence
  d(j+1) = floor(1.5 d(j)). A ceiling would give heights (5, 8, ...) that
  3:2 and 2:2 counters cannot always reach.
* **Widths.** Leading-one positions are 5 bits and k is 6 bits, because k
  runs to 46.
* **Feedback.** Where the feedback is shifted, it is resolved by the adder
  first (see above). The source describes carry-save feedback throughout.
* **Timing.** The rounding check (`round_detect`) runs in the cycle after
  the coefficient multiply, on the registered carry-save product. It does
  not overlap the multiply.
* **Latency and handshake.** The cycle-level schedule, start/busy/done
  handshake, reset and `inexact` output are this design's own.
* **Reciprocal table.** The w_d values are not published. They are
  computed from the formula above.
* **Special values.** The handling listed above is this design's own.
* **Board harness.** The board test used vendor debug cores (a virtual I/O
  core with its controller) and FPGA clock buffers. Those are not included.
  The top's a, b, round_mode and z ports are the signals that harness drove
  and read.

## Verification

Every module has a self-checking testbench `tb/tb_<module>.sv`, which prints
`TB_RESULT checks=N failures=M`. The testbenches compare against
`tb/bid_ref_pkg.sv`, a reference model that works from the definition: an
exact 64-bit product, the digit count by comparison with powers of ten, and
rounding by integer division and remainder. It does not use the hardware
method.

* The adders, compressors and trees are checked at several widths and row
  counts against plain addition. `booth_multiplier` is checked for both trees
  and all adder types.
* `mul_rounder` is checked in all six TREE/ADDER variants on random and
  directed operands.
* `tb_bid_fp_multiplier` runs the top at default parameters through about
  4000 random and directed multiplications. It checks the results,
  `inexact` and the 3/8-cycle latency. It also counts each mechanism and
  fails if one never occurred: no rounding, rounding with d' and with d'+1,
  all four remainder classes, increment, the 10^7 re-scaling, each mode,
  exponent overflow and underflow, special operands, 11-form inputs and
  outputs, and non-canonical inputs.

Simulate with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/bid_pkg.sv tb/bid_ref_pkg.sv tb/tb_bid_fp_multiplier.sv \
    --top-module tb_bid_fp_multiplier -o sim
./obj_dir/sim
```

Replace the testbench name to run any other. To build another variant, set
the parameters on the instance, e.g.
`bid_fp_multiplier #(.TREE(TREE_DADDA), .ADDER(ADD_CLA)) u_dut (...)`.

## Files

| file | content |
|------|---------|
| `rtl/bid_pkg.sv` | constants (precision 7, bias 101, widths), rounding-mode, tree and adder enums, `bid_fields_t` |
| `rtl/bid_fp_multiplier.sv` | top |
| `rtl/bid_decoder.sv`, `rtl/bid_encoder.sv` | BID unpack/pack |
| `rtl/mul_rounder.sv` | controller and multiplier/rounder datapath |
| `rtl/booth_multiplier.sv`, `rtl/booth_radix8_ppgen.sv` | carry-save multiplier, Booth recoding |
| `rtl/wallace_tree.sv`, `rtl/dadda_tree.sv` | reduction trees |
| `rtl/csa_3to2.sv`, `rtl/compressor_4to2.sv` | 3:2 and 4:2 compressor rows |
| `rtl/half_adder.sv`, `rtl/full_adder.sv` | 1-bit adders |
| `rtl/ripple_carry_adder.sv`, `rtl/carry_lookahead_adder.sv`, `rtl/carry_select_adder.sv`, `rtl/cpa_adder.sv` | final-stage adders |
| `rtl/split_cpa.sv` | 50-bit adder with compound upper half |
| `rtl/leading_one_detector.sv`, `rtl/digits_lut.sv`, `rtl/pow10_compare.sv`, `rtl/round_detect.sv` | rounding detection |
| `rtl/recip_lut.sv`, `rtl/round_increment.sv` | reciprocal rounding |
| `tb/bid_ref_pkg.sv` | reference model |
| `tb/tb_*.sv` | testbenches, one per module |
