# Single-precision fused multiply-add for relay-style logic

This is a combinational IEEE-754 single-precision fused multiply-add (FMA)
unit. It computes `A * B + C` with one rounding at the end, round to nearest
with ties to even. Its structure is the one used for an FMA built from
nano-electromechanical (NEM) relays.

In relay logic every gate stage costs a slow mechanical switching delay, but
a long chain of switches in series costs almost nothing extra. So that design
has no pipeline registers. It cuts the number of logic stages on the critical
path, reported as 16 mechanical delays, instead of balancing electrical delay.
The blocks that set the depth are the leading-zero detector (LZD) and the
leading-zero anticipator (LZA). This RTL implements that datapath as ordinary
synthesizable SystemVerilog. You can simulate it, synthesize it for any
technology, or map it to pass-switch logic.

The `fma_sp` module has these ports:

| port | dir | width | meaning |
|---|---|---|---|
| `a`, `b`, `c` | in | 32 | IEEE-754 single operands |
| `result` | out | 32 | `a*b + c`, rounded to nearest even |
| `inexact` | out | 1 | the rounded datapath value is inexact |
| `overflow` | out | 1 | the rounded datapath value overflowed to infinity |

There is no clock and no reset. The result is valid one combinational delay
after the inputs change. `inexact` and `overflow` describe the normal datapath
value; they mean nothing when the output is a special value.

Denormal inputs and outputs, infinities and NaNs are all handled. Every NaN
result is the canonical quiet NaN `0x7FC00000`.

## The datapath in three sections

1. **Multiply, prepare the exponent, align C.** A radix-4 Booth multiplier
   (`booth_mul`, used at 24 bits) forms the exact 48-bit product of the
   significands. Its 13 Booth rows, plus one row for the +1 bits of the
   negative digits, are reduced by (7:3) counters (`compressor73`) and 3:2
   rows to two rows, which a carry-chain adder then adds. At the same time, `exp_prepare` computes the alignment shift
   `ea + eb - ec - 100`. The 99-bit barrel shifter `align_shifter` then moves
   the addend significand right by that amount.
2. **Add and normalize.** A Manchester-carry-chain adder (`mcc_adder`) adds
   the product and the aligned addend, or subtracts one from the other, in a
   77-bit window. While it does, the anticipation logic (`lza_anticipate`)
   and the decoded exponent limit (`max_shift_dec`) build an edge vector. The
   76-bit LZD (`lzd76`) counts the leading zeros of that vector, and the
   77-bit left barrel shifter (`norm_shifter`) normalizes the sum by that
   count.
3. **Round and select the output.** `round_logic` rounds to nearest even,
   using one incrementer over the joined exponent and fraction.
   `special_select` then picks the output: the rounded value, NaN, infinity,
   C itself, or a signed zero.

`fp_classify` decodes each operand (zero, denormal, infinity, NaN) and
supplies the significand with its hidden bit. Its exponent and fraction
tests are single decoder outputs (`code_decoder`): an output is 1 when its
input equals one fixed code.

## The 77-bit window

Everything in section 2 works on one fixed-point window. Knowing where each
operand sits in it is the key to reading `fma_sp.sv` (see `fma_pkg.sv`):

```
bit 76        carry of an effective addition
bits 75..52   addend C when it is not shifted (2 bits above the product)
bits 49..2    the 48-bit product A*B
bits 1..0     guard room below the product for bits of C
below bit 0   addend bits that survive only as the sticky bit
```

The alignment shift is `d = ea + eb - ec - 100`, where `ea`, `eb` and `ec`
are the effective biased exponents (1 for denormals). There are three cases:

- **`d` from 0 to 127.** C moves right by `d`. Bits that fall below window
  bit 0 go to the sticky bit. These are the low 22 bits of the 99-bit shifter
  output, plus bits pushed out of the shifter entirely.
- **`d < 0` and C nonzero ("C dominant").** C sits at least two bits above
  the whole product. C stays unshifted, and the product adds nothing to the
  window except the sticky bit. The window's exponent is then taken from C.
- **C is zero.** C dominant never applies, so a tiny product keeps its own
  frame.

`ExpBase` is the biased exponent of window bit 76. It is `ea + eb - 99` in
the product frame and `ec + 1` in the C-dominant frame.

### Subtraction and the sticky bit

The part of the sum below the window is known only as "nonzero or not". The
adder accounts for it exactly. For an effective subtraction the unit forms
`larger - smaller - sticky`, and the sticky bit stays set. The true value lies
strictly between that window value and the next integer, so rounding gives
the same answer as it would for the exact sum.

The sticky part always belongs to the smaller operand. In the C-dominant case
it is the product. In the shifted case, C loses bits only when its leading bit is at window
bit 22 or lower, while a nonzero product (at least one normal factor, or the
C-dominant case applies) has its leading bit at window bit 25 or higher. So a
sign error or a total cancellation can never hide in the sticky bit.

There are two adders. The main one computes `x + ~y + !sticky`, which is
`x - y - sticky`. A second one computes `y - x - sticky`. The carry-out of the
main adder says which difference is non-negative (`neg` in `fma_sp.sv`), and
that one becomes `result_preshift`. The result sign is C's sign when `neg` is
set, otherwise the product's sign. When the window is exactly zero, the
result is +0.

## Leading-zero anticipation: the hardest part

Normalization needs the position of the leading one of the sum. Waiting for
the sum and then scanning it would put the adder and the LZD in series.
Instead, `lza_anticipate` builds an edge vector `V` from the adder's
per-bit propagate, generate and kill terms (P, G, K). Each bit of `V` looks
only at its own bit and the bit below it.

Think of each bit position as a signed digit: the minuend bit minus the
subtrahend bit, so each digit is -1, 0 or +1. For a positive difference, the
highest nonzero digit is +1. A run of -1 digits below it moves the real
leading one down. Marking the last digit of that run, the first position whose
lower neighbour is not -1, gives a position that is either the true leading
one or one above it.

In terms of the adder inputs `x` and `y'` (`y' = ~y` when subtracting):

| case | `V[i]` |
|---|---|
| addition | `~K[i-1]` (`x` or `y` has a 1 one bit lower) |
| subtraction, x > y | `~P[i] & ~K[i-1]` |
| subtraction, y > x | `~P[i] & ~G[i-1]` |

The sticky bit counts as the digit below bit 0 (`K[-1] = G[-1] = sticky`), so
the `- sticky` in the difference is anticipated as well. After the normalizing
shift, the leading one is at bit 76 or bit 75. If it is at bit 75, one more
1-bit shift (`corr` in `fma_sp.sv`) finishes the job. For an addition the
vector marks one bit above the larger operand's leading one, so the correction
fires whenever the sum does not carry into that position.

The relay design gives its per-bit equation as a three-input XOR of P and G
terms ORed with M. Written that way it does not find the leading digit of a
difference. The indicator above keeps the same bitwise structure but has a
proven error bound of one position. `tb/tb_lza_anticipate.sv` checks that
bound on random operands.

### Denormal results: the limit vector M

A left shift by `L` gives bit 76 the exponent `ExpBase - L`, and that exponent
may not drop below 1. `max_shift_dec` decodes `ExpBase` into a one-hot vector
`M`, with its 1 at bit `77 - ExpBase`, and M is ORed into `V`. The LZD then
stops at the limit. The result keeps exponent 1 with a leading 0, which is
exactly a denormal.

Each bit of M is a 7-bit `code_decoder` on `ExpBase[6:0]`, gated by one shared
test that `ExpBase` lies in 0..127. The LZD never counts past 76 anyway, so M
only needs bits 76..1 (ExpBase 1..76). Bit 0 is tied to 0.

When the limit is what stopped the LZD, the correction shift is suppressed:
it only fires while `L < ExpBase - 1`. If `ExpBase < 1` and C is zero, the
product is below 2^-153. That rounds to a zero with the product's sign, which
`special_select` chooses directly.

## The leading-zero detector

`lzd_tree` is an LZD for any power-of-two width. It is a tree of 2-bit LZDs
(`v = b1 | b0`, `p = ~b1`) joined pairwise by the rule

```
v = vH | vL          p = vH ? {0, pH} : {1, pL}
```

The design's building block is the 16-bit version. `lzd76` uses five of them:

- four cover bits 75..12 and join into 32-bit and then 64-bit detectors;
- the fifth takes bits 11..0 padded with four zeros, and acts as the lower
  half of a 128-bit detector.

It reads edge-vector bits 76..1. If none of them is set, the shift is 76, and
the leading one, if there is one, is bit 0.

In relay logic each 16-bit LZD evaluates in one mechanical delay, and each
join costs one more. Larger single-stage LZDs would save stages but need more
relays.

## Rounding and special values

`round_logic` takes the kept significand from bits 76..53 of the normalized
window. Bit 52 is the guard bit, and bits 51..0 plus the sticky bit form the
sticky. The 8-bit exponent field and the 23-bit fraction are joined into one
word and incremented together when rounding up, so a carry out of the
fraction needs no extra logic. That single increment handles three cases:

- a denormal that rounds up to the smallest normal;
- an all-ones significand that steps to the next exponent;
- exponent 254 that overflows to infinity.

An exponent above 254 before rounding also gives infinity.

`special_select` applies these rules in priority order:

1. NaN if any input is NaN, for inf × 0, or when an infinite product meets an
   infinite C of the opposite sign.
2. Infinity if the product is infinite (the product's sign) or C is infinite
   (C's sign).
3. C passed through when A or B is zero and C is not.
4. A signed zero if A×B and C are both zero: -0 only when both are negative
   zeros. A tiny product with a zero C gives a zero with the product's sign.
   An exact cancellation gives +0.
5. The rounded value otherwise.

The chosen value leaves through `mux_tree`, an 8:1 tree of 2:1 multiplexers.
Its five used inputs are the rounded value, NaN, infinity, C and zero. The
three spare inputs also carry NaN.

## Files

| file | content |
|---|---|
| `rtl/fma_pkg.sv` | widths, window layout, `fp32_t`, class flags, output-select enum |
| `rtl/fma_sp.sv` | top level: the whole FMA |
| `rtl/fp_classify.sv` | operand decode and classification |
| `rtl/booth_mul.sv` | radix-4 Booth multiplier (default 32 bits, used at 24) |
| `rtl/compressor73.sv` | row of (7:3) counters for the multiplier's reduction tree |
| `rtl/exp_prepare.sv` | alignment shift, C-dominant case, ExpBase |
| `rtl/align_shifter.sv` | 99-bit right barrel shifter with sticky |
| `rtl/mcc_adder.sv` | Manchester-carry-chain adder with P/G/K outputs (default 77 bits) |
| `rtl/max_shift_dec.sv` | exponent-limit decoder M |
| `rtl/code_decoder.sv` | one decoder output for a fixed code (exponent, fraction and M decoders) |
| `rtl/lza_anticipate.sv` | anticipation logic (edge vector) |
| `rtl/lzd_tree.sv` | tree LZD, default 16 bits |
| `rtl/lzd76.sv` | 76-bit LZD from five 16-bit LZDs |
| `rtl/norm_shifter.sv` | 77-bit left barrel shifter |
| `rtl/round_logic.sv` | round to nearest even, packing, overflow |
| `rtl/special_select.sv` | exception logic and output selection |
| `rtl/mux_tree.sv` | N:1 tree of 2:1 multiplexers, used as the 8:1 output multiplexer |
| `tb/fma_ref_pkg.sv` | exact reference model of the FMA for the testbenches |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops on its own.
A watchdog ends the run with a failure if a test hangs. To run the end-to-end
test with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/fma_pkg.sv tb/tb_fma_sp.sv --top-module tb_fma_sp
./obj_dir/Vtb_fma_sp
```

The other testbenches run the same way with their own name.

`tb_fma_sp` applies 2 million operand triples, one per clock of its stimulus
clock. It compares each result bit for bit with `fma_ref_pkg`. That model is
written independently of the RTL: it places A×B and C exactly in a 600-bit
integer, adds or subtracts, and rounds once. The stimulus mixes several
kinds of operands:

- uniformly random bit patterns;
- exponents chosen so that C cancels most of the product;
- C far above or far below the product;
- the denormal and underflow range;
- near-exact cancellation against the rounded product;
- the overflow range;
- special encodings.

The test also counts how often each mechanism fires, and fails if any never
does:

- C-dominant alignment;
- addend bits lost to the sticky bit;
- the reverse subtraction;
- the 1-bit anticipation correction;
- the exponent limit stopping normalization;
- denormal results;
- rounding up;
- overflow;
- massive cancellation;
- each special output.

It runs in a few seconds.

The unit testbenches check each block on its own. Some run exhaustively (the
16-bit LZD) or sweep a whole range (every shift amount, every ExpBase value).
The others check random values against plain arithmetic.

## How this RTL relates to the relay design

The following follows the relay FMA design:

- the architecture: multiply and align in parallel, add, LZA (anticipation
  logic, limit decode M, LZD), left shift, rounding by choosing between an
  incremented and an untouched result, and an output multiplexer with NaN and
  infinity constants;
- no pipelining;
- the shifter sizes, 99 and 77 bits with 7-bit shift amounts;
- the 76-bit LZD built from five 16-bit tree LZDs with the two-halves rule;
- a Manchester carry chain for the adders;
- single decoder outputs, one per code, for the exponent and fraction tests
  and for the 76 bits of M;
- an 8:1 output multiplexer built as a tree of 2:1 multiplexers;
- Booth recoding in the multiplier, and (7:3) counters to reduce its
  partial products.

The following are choices made here:

- The window layout and the alignment offset (100). The relay design gives
  only the form `a_exp + b_exp + offset - c_exp`. Which shifter aligns and
  which normalizes is also inferred: the 99-bit one aligns, the 77-bit one
  normalizes.
- The anticipation equations and the 1-bit correction shift (see above).
- A second adder for the reverse difference in effective subtraction.
- The multiplier returns a full product, not carry-save partial products.
  The relay design names Booth encoding and large (7:3) compressors, but not
  the shape of its tree. The shape used here is this design's own. Its
  default width is 32 bits, but the FMA uses it at 24.
- Round to nearest even is the only rounding mode, since the relay design
  names none. NaN results are canonical, and there are no exception flags
  besides `inexact` and `overflow`.
- The relay-specific optimisations are not written out by hand; synthesis
  constant propagation covers them. These are pruning multiplexer leaves that
  have constant inputs, and choosing among single-stage LZD sizes.

Not included:

- the relay devices themselves;
- the register file, control unit and memories of a general FPU, which the
  relay design shows only as a generic picture;
- a divider, which the relay design does not build.

Latency in mechanical delays and energy per operation are properties of a
relay implementation. This RTL does not model them.
