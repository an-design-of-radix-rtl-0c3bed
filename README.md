# Carry-select adder with carry-first selection, and a radix-4 Booth multiplier built on it

A classic carry-select adder (CSLA) computes each block twice, once for input carry 0 and once for input carry 1. It then uses the real input carry to pick one of the two sums. Two full sums cost area, and the block's output carry comes out only at the end of the sum path.

The adder here does the selection on **carry words** instead of sums:

1. Form the half-sum `s0 = a ^ b` and the half-carry `c0 = a & b` once.
2. From them, compute two carry words: `c01`, which assumes an input carry of 0, and `c11`, which assumes 1. No sum is formed yet.
3. Select the carry word with the real input carry.
4. Make the sum with one XOR per bit: `sum = s0 ^ {c[N-2:0], cin}`.

The output carry `c[N-1]` is ready as soon as the selection has switched. It does not wait for the sum XORs. So a chain of these blocks passes its carry through one selection per block.

This block is used in two designs. Both are in the RTL:

* a 16-bit square-root CSLA (blocks of 2, 2, 3, 4 and 5 bits), and
* a two's-complement radix-4 modified Booth multiplier. All of its partial-product additions use chains of 2-bit blocks of this kind.

Everything is combinational. There is no clock, no reset and no state.

## The proposed CSLA block (`csla_prop`)

```
 a,b ──► HSG ──s0,c0──┬─► CG0 (carry in 0) ──c01──┐
                      └─► CG1 (carry in 1) ──c11──┴─► CS ◄── cin
                                                     │ c[N-1] ──► cout
                 s0 ────────────────────────► FSG ◄──┘ c[N-2:0]
                                               ▲ cin
                                               └──► sum
```

| unit | module | equation |
|---|---|---|
| HSG, half-sum generator | `csla_hsg` | `s0(i) = a(i) ^ b(i)`, `c0(i) = a(i) & b(i)` |
| CG0 / CG1, carry generators | `csla_cg` (`CARRY_IN` = 0 / 1) | `c1(i) = c1(i-1) & s0(i) \| c0(i)`, with `c1(-1) = CARRY_IN` |
| CS, carry selection | `csla_cs` | `c = cin ? c11 : c01`, `cout = c(N-1)` |
| FSG, final-sum generator | `csla_fsg` | `sum(0) = s0(0) ^ cin`, `sum(i) = s0(i) ^ c(i-1)` |

**Why the CS unit is not a multiplexer.** Any carry that exists when the input carry is 0 also exists when it is 1. So bit by bit, `c01(i) = 1` implies `c11(i) = 1`. Under that property the 2-to-1 multiplexer reduces to `c(i) = c01(i) | (cin & c11(i))`, which is what `csla_cs` implements. An immediate assertion in `csla_cs` checks the property. If you reuse the unit with carry words from any other source, that assertion is the thing to watch.

The FSG needs only the low `N-1` carries. The top carry becomes the block's `cout`. `N >= 2`.

## 16-bit square-root CSLA (`sqrt_csla16`)

| bits | block | carry out |
|---|---|---|
| 1:0 | 2-bit ripple-carry adder (`rca`) | c1 |
| 3:2 | 2-bit `csla_prop` | c2 |
| 6:4 | 3-bit `csla_prop` | c3 |
| 10:7 | 4-bit `csla_prop` | c4 |
| 15:11 | 5-bit `csla_prop` | carry |

Each block works out its two carry words in parallel with the blocks below it. Blocks grow by one bit per stage because each stage has more time before its input carry arrives. The inter-stage carries are available on `stage_c = {c4, c3, c2, c1}`.

Reference vector:
* inputs: `a = 0110111111110000`, `b = 1100111011000011`, `cin = 0`
* expected: `sum = 0011111010110011`, `carry = 1`, `c1..c4 = 0,0,1,1`

## Radix-4 modified Booth multiplier (`booth_mult`)

`x * y` for `N`-bit two's-complement operands gives a `2N`-bit product. `N` must be even; the default is 4.

**Encoding (`booth_encoder`, one per digit).** `y` is read as `N/2` overlapping groups `{y(2j+1), y(2j), y(2j-1)}`, with `y(-1) = 0`. Each group is the digit `y(2j-1) + y(2j) - 2·y(2j+1)`, which is one of −2…+2. The digit is carried as the struct `booth_pkg::booth_sel_t`:

| group | digit | sign | one | two | cin |
|---|---|---|---|---|---|
| 000 | 0 | 0 | 0 | 0 | 0 |
| 001, 010 | +1 | 0 | 1 | 0 | 0 |
| 011 | +2 | 0 | 0 | 1 | 0 |
| 100 | −2 | 1 | 0 | 1 | 1 |
| 101, 110 | −1 | 1 | 1 | 0 | 1 |
| 111 | 0 | 1 | 0 | 0 | 0 |

**Decoding (`booth_decoder`, one row per digit).** Each bit of the row is computed as:
* `x'(i) = x(i) ^ sign`
* `p(j,i) = one & x'(i) | two & x'(i-1)`

Here `x(-1) = 0` and `x(N) = x(N-1)`. The row is `N+1` bits wide and holds 0, x, 2x, or the one's complement of x or 2x. For a negative digit the missing +1 is the digit's `cin`.

**Adder array.** The running sum starts at zero. For row `j`:
* The row is sign-extended.
* A `csla_chain` adds it to bits `2N-1 … 2j` of the running sum. A `csla_chain` is a `W`-bit adder made of 2-bit `csla_prop` blocks, with the carry passed from block to block.
* The row's `cin` is the chain's input carry, which places the +1 at weight `2^(2j)`.
* Bits below `2j` are already final and pass through unchanged.
* Carries beyond bit `2N-1` are dropped (arithmetic mod `2^(2N)`). This is exact because the product fits in `2N` bits.

For `N = 4` this is two chains, 8 and 6 bits wide. The result is a plain linear array, so delay grows with `N`. There is no Wallace tree and no pipelining.

## What is fixed by the source design, and what is a choice here

Taken from the published design:
* the CSLA equations and unit split;
* the 2/2/3/4/5 staging of the 16-bit adder, with a ripple-carry first stage;
* the Booth encoding table and the decoding cell;
* the use of 2-bit proposed CSLAs for all partial-product additions;
* two's-complement operands with sign extension.

Choices made here:
* **Multiplier width.** The default `N = 4` is a reading of a published simulation that shows eight output bits. No width is stated.
* **Adder-array arrangement.** Adding row by row to the shrinking upper part, with `cin` as carry-in, is a choice.
* **Chaining.** The 2-bit blocks are chained carry to carry.
* **CS gate form.** The OR/AND form of the CS unit is the simplest logic equal to the multiplexer under the property above.
* **Top level.** The two designs are independent. `csla_booth_top` places them side by side with separate ports.

Not modelled:
* gate delays (the RTL is zero-delay);
* the conventional and BEC-based CSLA baselines;
* the AND/OR/NOT area-delay estimation model.

## Files

| file | contents |
|---|---|
| `rtl/booth_pkg.sv` | `booth_sel_t` (sign, one, two, cin) |
| `rtl/csla_hsg.sv`, `csla_cg.sv`, `csla_cs.sv`, `csla_fsg.sv` | the four units of the CSLA |
| `rtl/csla_prop.sv` | N-bit proposed CSLA |
| `rtl/rca.sv` | ripple-carry adder |
| `rtl/sqrt_csla16.sv` | 16-bit square-root CSLA |
| `rtl/booth_encoder.sv`, `booth_decoder.sv` | Booth digit encoder, partial-product row |
| `rtl/csla_chain.sv` | W-bit adder of chained BLK-bit CSLAs |
| `rtl/booth_mult.sv` | N×N Booth multiplier |
| `rtl/csla_booth_top.sv` | top: both units side by side |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Verification and simulation

Each testbench compares the block's outputs with integer arithmetic or with tables written out in the testbench. Each one ends by printing `TB_RESULT checks=N failures=M`. Coverage by block:
* **CSLA units and blocks:** exhaustive at the widths the design uses.
* **`sqrt_csla16`:** the reference vector, directed carry chains, and 100k random operand pairs.
* **`booth_mult`:** exhaustive at `N = 4` and `N = 8`, plus 20k random pairs at `N = 16`.

The top-level test `tb_csla_booth_top` runs at the default parameters. It also counts how often each mechanism occurred and fails if one never did:
* each inter-stage carry;
* a carry rippling through all 16 bits;
* each CSLA stage switching to its carry-1 word;
* every Booth digit class, including both encodings of 0;
* negative partial-product rows.

To run one testbench with Verilator (the package goes first):

```
verilator --binary --timing --assert -Irtl -Itb rtl/booth_pkg.sv tb/tb_booth_mult.sv \
          --top-module tb_booth_mult -o sim
./obj_dir/sim
```

To change the multiplier width, set `MUL_N` on `csla_booth_top` or `N` on `booth_mult` (an even number). `csla_prop` and `csla_chain` are generic in width. `sqrt_csla16` has the fixed 16-bit staging.
