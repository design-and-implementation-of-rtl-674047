# Single-precision complex multiplier with a CIFM mantissa multiplier

A complex product needs four real multiplications and two additions:

    (ar + j·ai)(br + j·bi) = (ar·br − ai·bi) + j·(ar·bi + ai·br)

This design does it in IEEE-754 single precision. It is built from four
floating-point real multipliers working in parallel, a floating-point
subtractor for the real part and a floating-point adder for the imaginary
part. The part that sets the speed of each real multiplier is the 24×24-bit
significand product. Here it comes from a CIFM multiplier (CIFM stands for
"combined integer and floating-point multiplier"). A CIFM multiplier cuts the
operands into 12-bit halves and then into 4-bit digits. All digit products
are formed at once, and the partial sums are split across two adders, so no
carry has to ripple across the full 48-bit width. The whole unit is
combinational.

```
 ar ─┬──────────────┐
 bi ─┼──┬──► fp_mult32 ── arbi ─┐
 ai ─┼──┼──► fp_mult32 ── aibr ─┴─► fp_addsub32 (add) ──► iout
 br ─┼──┼──► fp_mult32 ── arbr ─┐
     └──┴──► fp_mult32 ── aibi ─┴─► fp_addsub32 (sub) ──► rout
```

## Ports and timing of the top (`cfp_mult`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `ar`, `ai` | in | 32 | real and imaginary parts of a (binary32) |
| `br`, `bi` | in | 32 | real and imaginary parts of b |
| `rout` | out | 32 | ar·br − ai·bi |
| `iout` | out | 32 | ar·bi + ai·br |
| `arbr`, `aibi`, `arbi`, `aibr` | out | 32 | the four rounded real products |

The top has no clock, reset, handshake or parameters. The outputs settle one
combinational delay after the inputs change. For pipelining, put registers
around `cfp_mult`, or between its multipliers and adders. The four partial
products are brought out so that the two stages can be observed on their own.

Every operation rounds to nearest, ties to even. So
`rout = rnd(rnd(ar·br) − rnd(ai·bi))`. This is not a fused complex product,
and when ar·br and ai·bi nearly cancel the error can be large.

## Number format and exceptions

The format is binary32: bit 31 is the sign, bits 30:23 the exponent with bias
127, and bits 22:0 the fraction. The leading one is hidden. All units follow
the same rules, which are defined in `cfp_pkg`:

- Flush to zero. An operand whose exponent field is 0 counts as zero, with its
  sign. This covers subnormals too. A result whose rounded exponent would fall
  below 1 becomes a signed zero. There is no gradual underflow.
- Overflow. If the exponent exceeds 254, the result is a signed infinity.
- Infinity and NaN behave as in IEEE-754. inf·0, inf − inf and any NaN operand
  all give the single quiet NaN `0x7FC00000`.
- An exact cancellation x − x gives +0. The sum −0 + −0 gives −0.
- No exception flags are produced.

Apart from subnormals and flags, every result matches IEEE-754 bit for bit.

## The CIFM significand multiplier (`cifm_mult24` and below)

This is the unusual part of the design. There are three levels of hierarchy.

**4×4 cell (`mult4x4_opt`).** The four partial products `pp_k = a & b[k]` are
summed in three levels:

1. Adjacent pairs are added: `s01 = pp0 + 2·pp1` and `s23 = pp2 + 2·pp3`.
   Each is 6 bits.
2. Block 5 adds the overlapping bits, `s01[5:2] + s23[3:0]`. Block 6 holds
   `s23[5:4]`.
3. Block 5's carry is added into block 6.

The product is `{block6 + carry, block5[3:0], s01[1:0]}`.

**12×12 module (`mult12x12_cifm`).** Each operand is cut into three 4-bit
digits. Nine `mult4x4_opt` cells form all the digit products in parallel.
Each product is shifted by 4·(i+j) and the nine are summed. The module has an
enable input. When the enable is low, the output is zero.

**24×24 multiplier (`cifm_mult24`).**

- The operands are split into the halves AH, AL, BH and BL.
- Four 12×12 modules form AH·BH, AH·BL, AL·BH and AL·BL at the same time.
- Two checkers (`cifm_checker`) test each half of each operand for zero. A
  module is enabled only when both of its halves are non-zero. A disabled
  module contributes zero, which is its true product anyway. This is operand
  isolation: it saves switching activity and never changes the result.

The 48-bit product is assembled in three pieces:

```
P[11:0]   = (AL·BL)[11:0]                                   direct
ADDER 2   = (AL·BL)[23:12] + AH·BL + AL·BH + (AH·BH)[11:0]·2^12
P[35:12]  = ADDER 2 [23:0]        carry = ADDER 2 [25:24]   (2 bits)
P[47:36]  = (AH·BH)[23:12] + carry                          ADDER 1
```

The largest possible ADDER 2 sum is below 2^26, so a 2-bit carry is enough.
ADDER 1 cannot overflow, because the full product is below 2^48.

## Real multiplier (`fp_mult32`)

- Sign: the XOR of the two signs.
- Exponent: an 8-bit ripple-carry adder (`ripple_adder`) adds `ea + eb`. Its
  carry out becomes a ninth bit. Then 127 is subtracted, using 10-bit signed
  arithmetic so that overflow and underflow can be seen.
- Significand: the two 24-bit significands `{1, frac}` go to `cifm_mult24`.
  The product lies in [1, 4). If bit 47 is set, the product is shifted right
  by one and the exponent goes up by one.
- Rounding uses the guard bit, a sticky OR of the bits below it, and the LSB.
  If rounding carries the significand up to 2.0, it is renormalised and the
  exponent goes up once more.
- Finally the exception rules above are applied.

## Adder/subtractor (`fp_addsub32`)

`s = a + b`, or `a − b` when `sub = 1`. For subtraction, the sign of b is
inverted first. The data path has these stages:

1. **Small ALU and control.** The exponents are subtracted. The operand with
   the larger magnitude becomes the "big" operand: the larger exponent wins,
   and for equal exponents the larger fraction wins. Because of this, the
   mantissa subtraction is never negative. The result's sign is the big
   operand's sign.
2. **Alignment.** The small significand gets three extra bits (guard, round
   and sticky). It is shifted right by the exponent difference, capped at 31.
   Bits shifted out are ORed into the sticky bit.
3. **Big ALU.** The two are added if the effective signs are equal, and
   subtracted otherwise. The result is 28 bits.
4. **Normalisation.**
   - A carry out shifts the result right by one and increments the exponent.
   - Otherwise a leading-zero count shifts it left, and the exponent is
     decremented by the count. A left shift of more than one position only
     happens when the exponent difference is 0 or 1. In that case nothing was
     lost in alignment, so the result stays exact.
5. **Rounding.** Round to nearest even. A carry out of rounding renormalises
   once more.

The top uses two instances of this unit, with `sub` tied to 1 for the real
part and 0 for the imaginary part.

## Where this design makes its own choices

The structure described above is taken as given. The points below are not
fixed by it and were chosen here:

- **Which pairs the 12×12 modules multiply.** They are taken to compute
  AH·BH, AH·BL, AL·BH and AL·BL.
- **What the checkers check.** They are implemented as per-half zero
  detectors that gate the 12×12 modules.
- **Inside the 4×4 cell.** The split into blocks 5 and 6 is one reading of a
  short description. Nothing beyond a fixed adder structure is modelled.
- **Summing the nine digit products** inside a 12×12 module is one
  combinational sum. Synthesis picks the adder structure.
- **Product rounding.** Round-to-nearest-even is added to the real
  multiplier, which otherwise would only normalise and truncate to 23 bits.
  The special-value rules (flush to zero, infinity, NaN) are also this
  design's own.
- **Adder choice.** Only the exponent adder is an explicit ripple-carry chain.
  The significand adders and the CIFM output adders are written as plain `+`,
  so synthesis picks their structure.
- **Partial products as outputs.** The four partial products are output
  ports. The real part's minuend is ar·br.

The array and Vedic multipliers are not included. They are alternatives that
the CIFM multiplier is usually compared against, not part of this design.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog.

- `tb_mult4x4_opt`: all 256 operand pairs.
- `tb_ripple_adder`: all 8-bit operand pairs, with both carry-in values.
- `tb_cifm_checker`, `tb_mult12x12_cifm`, `tb_cifm_mult24`: compared with
  integer multiplication, using corner cases, zero halves and random operands.
- `tb_fp_mult32`, `tb_fp_addsub32`: compared bit-exactly with a reference in
  `tb/fp_ref_pkg.sv`. The reference computes in double precision and rounds to
  single precision with its own integer code. A single-precision product is
  exact in double. A single-precision sum in double is either exact or far
  from a single-precision tie. So the reference is correctly rounded.
- `tb_cfp_mult`: the whole design at its only configuration, with about
  36,000 checks. It covers directed cases, rotation by the 16 DFT twiddle
  factors exp(−j2πk/16), random operands and full-range random bit patterns.
  It counts how often each mechanism occurs and fails if any never does:
  - a checker-disabled 12×12 module
  - a product normalisation shift
  - a product rounding increment
  - an adder carry out
  - a cancellation left shift
  - an exact cancellation
  - overflow
  - a flushed result
  - a NaN

All testbenches pass with Verilator 5. The design also elaborates in Yosys
with the slang front end. A coarse synthesis of the top gives about 3,300
word-level cells and no flip-flops.

## Simulating

Each file holds one module or package, named after the file. To run the
end-to-end test with Verilator:

```
verilator --binary --timing -y rtl -y tb \
    rtl/cfp_pkg.sv tb/fp_ref_pkg.sv tb/tb_cfp_mult.sv --top-module tb_cfp_mult
./obj_dir/Vtb_cfp_mult
```

To run a block's own test, replace `tb_cfp_mult` with that block's testbench.
`-y rtl` lets Verilator find the other modules by file name. The testbenches
use no `x` or `z` values and no constrained randomisation, so they run on a
two-state simulator.
