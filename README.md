# RSD arithmetic unit for P-256 prime-field ECC

Elliptic-curve point arithmetic on the NIST P-256 curve comes down to four
operations modulo a 256-bit prime: addition, subtraction, multiplication and
division (inversion). The cost of 256-bit arithmetic is the carry: a binary
adder of that width has a long carry chain, and every unit built from it
inherits it. This design does all its arithmetic in **radix-2 redundant signed
digit (RSD)** form. Each digit is -1, 0 or +1, and a carry never travels more
than one digit. The adder's delay therefore does not depend on the word width.
Three units are built on this adder:

* a modular adder/subtractor that looks only at the most significant digit
  to decide on its reduction steps;
* a pipelined, recursive Karatsuba-Ofman multiplier with a reduction stage;
* a radix-4 binary-GCD modular divider.

The top level, `processor_design`, takes binary operands `a`, `b` and a
modulus `m`, runs the operation chosen by `sel`, and returns the result in
binary in `[0, m)`. The default width is N = 256. The same RTL works for any
N that is 4 times a power of two, such as N = 8 or N = 32.

## Number format

An N-digit RSD number X is kept as two N-bit vectors, its positive and
negative components: X = x⁺ − x⁻. In SystemVerilog it is a packed
`logic [1:0][N-1:0]`. `X[1]` is x⁺ and `X[0]` is x⁻, with bit 0 the least
significant. Digit i is therefore `{X[1][i], X[0][i]}`: `10` is +1, `01` is −1
and `00` is 0. Adders never produce `11`, and everything reads it as 0.

This format makes several things cheap:
* negation is a swap of the two halves, so subtraction costs nothing extra;
* a shift by k digits shifts both halves;
* converting to binary is one subtraction, x⁺ − x⁻;
* a binary number b enters as `{b, '0}`.

Two facts about RSD numbers are used throughout:

* A value has several representations, but **zero has only one**: all digits
  zero. The sign of a nonzero value is the sign of its leading nonzero digit.
* A number is even exactly when its digit 0 is zero, and divisible by 4 when
  digits 0 and 1 are both zero. Division by 2 or 4 of a number known to be
  divisible is a plain right shift.

## The carry-free adder (`rsd_adder`)

`s = x ± y`, W digits in, W+1 digits out, purely combinational. It has two
layers. Layer 1 looks at each digit-sum p = xᵢ + yᵢ ∈ {−2…2} and splits it into
a transfer cᵢ₊₁ and an interim digit wᵢ with p = 2cᵢ₊₁ + wᵢ. Where p = ±1,
the split depends on the next lower pair of digits:

| p  | lower pair has no −1 digit | lower pair has a −1 digit |
|----|----------------------------|---------------------------|
| +2 | c=+1, w=0                  | c=+1, w=0                 |
| +1 | c=+1, w=−1                 | c=0,  w=+1                |
| 0  | c=0,  w=0                  | c=0,  w=0                 |
| −1 | c=0,  w=−1                 | c=−1, w=+1                |
| −2 | c=−1, w=0                  | c=−1, w=0                 |

If the lower pair has no −1 digit, the transfer into position i is 0 or +1, so
w is chosen from {−1, 0}. Otherwise the transfer is 0 or −1, and w comes from
{0, +1}. Layer 2 forms sᵢ = wᵢ + cᵢ, which therefore never leaves {−1, 0, +1}.

The top digit of a sum is only nonzero when an input digit there is nonzero.
So a sum needs at most one digit more than its wider operand. The multiplier
and divider rely on this to size their adders so that only provably-zero
digits are ever dropped.

## Modular addition and subtraction (`mod_add_sub_rsd`)

This unit has one N-digit adder, two input multiplexers (A or the register; B
or m), an (N+1)-digit result register and a small controller. It works as
follows:

1. In the start cycle the register takes a ± b. Its most significant digit
   (MSD, digit N) is the adder's carry digit.
2. While the MSD is +1, the register becomes `reg − m`; while it is −1,
   `reg + m`. Only the low N digits pass through the adder, and the adder's
   carry digit is added to the MSD.
3. When the MSD is 0, `valid_out` goes high for one cycle and `result` holds
   the low N digits.

The modulus is stored with all-positive digits and its top bit set. So
subtracting it can never produce a +1 carry, and adding it never a −1 carry.
The MSD only moves toward zero. Start to `valid_out` takes 1, 2 or 3 cycles.
At N = 256 with the P-256 prime, random operands took 1 cycle in 57 % of cases,
2 cycles in 36 % and 3 in 8 %.

The result is congruent to a ± b and |result| < 2^N, but it is **not
necessarily in [0, m)**. It is a valid operand for the next operation, and the
top level reduces it fully only at its output.

## Multiplication (`karatsuba_rsd`, `rsd_schoolbook_mul`, `mod_reduce`, `mod_mul_rsd`)

`karatsuba_rsd` is a recursive module. A level of size N splits both operands
into halves of H = N/2 digits and instantiates itself three times at size H:

* `K_low = aL·bL` and `K_high = aH·bH`;
* `K_1 = SA·SB`, where aL + aH = CA·2^H + SA. The half sum has H+1 digits:
  SA is its low H digits and CA its carry digit in {−1, 0, +1}. SB and CB
  come from b the same way.

Keeping only SA and SB in the third product keeps all three sub-multipliers
balanced at H digits. The carry digits are put back outside:

    (aL+aH)(bL+bH) = SA·SB + (CA·SB + CB·SA)·2^H + CA·CB·2^N
    middle  = (aL+aH)(bL+bH) − K_high − K_low
    product = K_low + middle·2^H + K_high·2^N

CA·SB and CB·SA are multiplexers that select SB, −SB or 0. CA·CB is a
single-digit product. The recursion stops at 4 digits with a schoolbook
multiplier: rows a, −a or 0 selected by the digits of b, summed by a chain of
RSD adders.

**Pipeline.** Every level ends in a register, so a new operand pair can enter
every clock. The product leaves `kara_latency(N, 4)` cycles later: 7 at
N = 256, one per level. SA, SB, CA and CB go through delay lines to meet the
sub-products. The product is exact and `kara_width(N, 4)` digits wide (518 at
N = 256). Both functions are in `rsd_pkg`. The width is slightly more than 2N
because every level sizes its adders to the deepest chain of additions it has.

**Reduction.** `mod_reduce` converts the product to two's complement (2N+1
bits) and reduces its magnitude modulo m by restoring shift-and-subtract, one
bit per cycle. A negative product is mapped to m − r. This stage is generic,
with no special reduction for the P-256 prime, and takes 2N cycles.
`mod_mul_rsd` chains the two. From start to `valid_out` takes
`kara_latency + 2N + 2` cycles (521 at N = 256), and the reduction dominates.
The unit handles one operation at a time, so the multiplier's own pipeline
throughput is not used at this level.

## Division (`mod_div_rsd`)

This unit computes z = x / y mod m with a radix-4 plus-minus binary GCD. It
keeps four registers with the invariants A·x ≡ U·y and B·x ≡ V·y (mod m). They
start as A = y, B = m, U = x, V = 0. One iteration has up to three states:

| state | action |
|-------|--------|
| CHECK | A ≡ 0 mod 4: A ← A/4, U ← U/4 mod m. A ≡ 2 mod 4: A ← A/2, U ← U/2 mod m. A odd: go to SWAP. |
| SWAP  | if δ < 0: exchange A↔B and U↔V, and negate δ. |
| DIV   | A ← (A ± B)/4, taking whichever sign makes it divisible by 4; U ← (U ± V)/4 mod m with the same sign. |

The loop ends with A = 0 and B = ±1, so z = ±V. "Divide by 4 mod m" first adds
k·m, with k ∈ {0, +1, −1, 2} chosen from the dividend's two low digits and
m mod 4 so that the sum is divisible by 4. It then shifts. A 4:1 multiplexer
offers 0, m, −m and 2m. Three adders do all the work: A ± B, U ± V, and
(U or U ± V) + k·m. |U| and |V| stay below 2m, so U and V are N+2 digits wide.

**The counters δ and ρ.** Let 2^α and 2^β be upper bounds of |A| and |B|. Every
step lowers α by the number of digits it shifts out. Swapping whenever
δ = α − β < 0 keeps α ≥ β in DIV, which bounds (A ± B)/4 by 2^(α−1).

* ρ = α + β − 1 counts down to 0. At 0, A must be 0.
* ρ is a one-hot vector that starts at its top bit and is shifted right by one
  or two places. Only its LSB is tested to end the loop.
* δ is a one-hot magnitude plus a sign flag. The flag sets the shift
  direction, and δ < 0 is read from the flag and the magnitude's LSB.

At most 2N−1 steps lower ρ, so a division takes at most about 6N cycles.
Observed times at N = 256 were 750 to 800 cycles.

Requirements: m odd with 2^(N−1) < m < 2^N (true of the P-256 prime), and y not
≡ 0 mod m. The output z satisfies |z| < 2m and is not fully reduced.

## Top level (`processor_design`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk, reset | in | 1 | clock; synchronous active-high reset |
| start | in | 1 | one-cycle pulse while idle; sel, a, b, m are sampled with it |
| sel | in | 2 | 0 add, 1 sub, 2 mul, 3 div (`rsd_pkg::au_op_e`) |
| a, b, m | in | N | operands 0 ≤ a, b < m; m odd with top bit set; m prime and b ≠ 0 for div |
| result | out | N | result in [0, m), held until the next operation |
| done | out | 1 | one-cycle pulse when result is updated |

The start pulse goes straight to the selected unit. When that unit reports
valid, `rsd_to_bin_mod` turns its RSD result into binary in [0, m). It uses one
subtraction of the components and at most two corrections by m. The result is
then registered, and `done` rises one cycle later. A start pulse given while
an operation runs is ignored.

Cycles from start to done at N = 256:
* add/sub: 2 to 4;
* mul: 522;
* div: data dependent, about 770.

## Departures and limits

* **Only the arithmetic unit is built.** The full processor also has a
  controller with a ROM program, an operand memory and two 256-digit buses to
  the units and an external interface. It would sequence whole point
  multiplications, for which about 2.26 ms at 51.9 MHz has been reported. None
  of that is specified closely enough to build: no instruction set, program,
  memory size or bus protocol is given. Operands therefore enter through the
  top-level ports, and each start runs a single field operation.
* **Width.** The 256-digit width is the main configuration. A smaller build
  with 8-bit ports (`processor_design` with N = 8) has the same structure.
* **Modular reduction after multiplication** (`mod_reduce`) is this design's
  own generic bit-serial reduction. It dominates the multiplication time. A
  P-256-specific fast reduction would be the obvious replacement.
* **Algorithm details chosen here.** The two-layer adder's rule table and the
  divider's exact update rules, including the meaning of δ and ρ, are standard
  constructions filled in by this design. The same holds for the sel encoding,
  the handshakes, the binary↔RSD conversion at the ports and the pipeline
  register placement in the multiplier. All of them are checked by the
  testbenches below.
* `karatsuba_rsd` carries a Verilator `no_inline_module` hint. It lets the
  many identical sub-multipliers share one simulation model, which keeps the
  256-digit build to well under a minute. It has no effect on the logic.

## Files

`rtl/`:
* `rsd_pkg.sv`: digit type, operation codes, `kara_width`, `kara_latency`
* `rsd_adder.sv`: carry-free adder/subtractor
* `mod_add_sub_rsd.sv`: modular adder/subtractor
* `rsd_schoolbook_mul.sv`, `karatsuba_rsd.sv`: multiplier
* `mod_reduce.sv`, `mod_mul_rsd.sv`: reduction stage and modular multiplier
* `mod_div_rsd.sv`: modular divider
* `rsd_to_bin_mod.sv`: RSD → binary residue
* `processor_design.sv`: top level

`tb/` holds one self-checking testbench per module (`tb_<module>.sv`) and
`tb_processor_design_full.sv`. Every testbench prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_rsd_adder` | random and all-±1 operands at W = 24, values and digit codes |
| `tb_rsd_schoolbook_mul` | all 81×81 digit combinations |
| `tb_karatsuba_rsd` | N = 64, a new pair every cycle, exact products, latency |
| `tb_mod_add_sub_rsd` | N = 256, P-256 and random moduli, congruence, 1–3 cycles, each cycle count seen |
| `tb_mod_reduce`, `tb_mod_mul_rsd` | N = 32, residues and exact latency |
| `tb_mod_div_rsd` | N = 256 with P-256 (checked by z·y ≡ x); N = 8 with m = 251 and 131; every step kind seen |
| `tb_rsd_to_bin_mod` | N = 32, values in (−2m, 2m) |
| `tb_processor_design` | N = 32, 400 mixed operations, cycle counts, and that each mechanism occurs: MSD corrections, Karatsuba carry digits, divider swaps and A/2 and A/4 steps, ignored start. A second instance at N = 8 runs 200 operations modulo 251 |
| `tb_processor_design_full` | default N = 256, all four operations on P-256 residues |

To simulate with Verilator (5.x), from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -j 4 rtl/rsd_pkg.sv -y rtl -y tb \
        tb/tb_processor_design_full.sv --top-module tb_processor_design_full
    ./obj_dir/Vtb_processor_design_full

Substitute any other testbench name. The full-size build takes under a minute,
and the run takes a few seconds.
