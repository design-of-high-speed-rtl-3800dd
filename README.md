# Hierarchical Vedic squarer (Urdhva Tiryakbhyam, 8/16/32 bit)

This is a combinational unsigned squarer/multiplier for 8-, 16- or 32-bit
numbers. It is built from one tiny block used over and over. At the bottom
is a 2x2 bit multiplier that follows the "vertically and crosswise"
(Urdhva Tiryakbhyam) rule of Vedic arithmetic. Each larger size is four
copies of the size below, with two carry-save adders to sum their partial
products:

    2x2 -> 4x4 -> 8x8 -> 16x16 -> 32x32

Every level has the same structure, so a larger size is built just by
adding a level. The unit has two
operand ports. With both driven by the same value `a` it gives `a*a`; with
different values it is a general unsigned multiplier.

## Vertically and crosswise

To multiply two numbers digit by digit, the rule forms each column of the
result at once. It sums every digit product whose positions add up to that
column, plus the carry from the column before:

    column 0:  a0*b0                       (vertical)
    column 1:  a1*b0 + a0*b1               (crosswise)
    column 2:  a1*b1 + carry from column 1 (vertical)

In binary, a 2x2 multiply needs only four AND partial products and two half
adders (`rtl/vedic_mul2.sv`). Its longest carry path is two bits.

## One level of the hierarchy

An N-bit level (`rtl/vedic_mulN.sv`, N = 4, 8, 16, 32) splits both operands
into halves of H = N/2 bits, `a = aH:aL` and `b = bH:bL`:

    a*b = 2^N * aH*bH  +  2^H * (aH*bL + aL*bH)  +  aL*bL

The four H x H products are formed in parallel by the level below. They are
then summed in three fields. Taking N = 32 as the example:

| result bits | where they come from |
|---|---|
| `q[15:0]`  | `aL*bL[15:0]`. These bits are final as they leave the low multiplier. |
| `q[31:16]` | Low 16 bits of `mid = aH*bL + aL*bH + aL*bL[31:16]`, a three-operand carry-save add. |
| `q[63:32]` | `aH*bH + mid[33:16]`, the second carry-save add. |

`mid` is 34 bits wide. It is the sum of two 32-bit products and a 16-bit
value, so it can carry into bits 33:32. Those two carry bits go to the upper
adder together with `mid[31:16]`. Dropping them gives wrong products for
about 7 % of random 32-bit operand pairs. Every testbench counts how often
this carry happens and checks that it does happen. The upper adder cannot
overflow its 32-bit field, because the full product always fits in 2N bits.

## Carry-save adder

`rtl/csa_adder.sv` adds three W-bit operands. One row of W full adders turns
them into a sum vector and a carry vector, with no carry moving between bit
positions. A single carry-propagate addition then combines the two vectors
(the carry vector shifted left by one). The result is W+2 bits wide, so no
sum is ever cut short. The upper adder of each level has only two real
operands; its third input is tied to zero, and synthesis removes that part.

## Top level and widths

`rtl/vedic_square.sv`:

| parameter | default | meaning |
|---|---|---|
| `WIDTH` | 32 | operand width, 8, 16 or 32; any other value stops elaboration with an error |

| port | dir | width | meaning |
|---|---|---|---|
| `a` | in | WIDTH | number to square |
| `b` | in | WIDTH | second operand; drive it with `a` for a square |
| `c` | out | 2*WIDTH | `a*b` |

The whole unit is combinational, with no clock, reset or registers. `c` is
valid one propagation delay after `a` and `b` settle. If you need a
registered squarer, put flops around it.

Reference results, which the testbenches check (hex):

| width | a = b | c |
|---|---|---|
| 8  | `22` | `0484` |
| 16 | `2222` | `048d0c84` |
| 32 | `22222222` | `048d159e1d950c84` |

## Where this differs from the original design, and how far to trust it

- Divide and conquer here uses four half-size products, as in the original
  drawing and its formula. The three-product Karatsuba-Ofman variant, which
  the original mentions as a way to scale up, is not used.
- The original design is drawn only at the 32x32 level. The 4x4, 8x8 and
  16x16 levels here use the same four-block, two-adder arrangement, as the
  original text describes in words.
- In the original drawing, the link from the middle adder to the upper adder
  is labelled as bits 31-16. Here that link is bits 33:16, so the middle
  sum's carries are not lost. Without them the product is wrong.
- How the carry-save adder works inside is this design's own choice: a
  full-adder row plus a final adder.
- The original's FPGA resource summary lists flip-flops and a clock buffer.
  That does not fit a combinational 32-bit squarer with 128 signal pins, so
  no registers were added.
- The shift-and-add and Wallace-tree squarers that the original design is
  compared against are not included.
- No timing claims are made. The original reports 31.5 ns worst-case delay
  on a Spartan-3E (about 15.4 ns at 8 bits and 22.6 ns at 16 bits), but this
  RTL has not been timed on any device.

How it was verified: every block is checked against the simulator's own
integer multiplication. The 2x2, 4x4 and 8x8 multipliers are tested on all
operand pairs. The 4-bit carry-save adder is tested on all inputs. Every
8-bit and 16-bit square is checked. The 16- and 32-bit multipliers get about
20,000 random pairs plus corner cases. Each testbench was also run against a
deliberately broken copy of its module, and each one failed as it should.

Each level also has a deferred assertion: the two carry bits above its upper
result field must stay zero. Because the full product fits in 2N bits, this
assertion should never fire.

## Files

| file | contents |
|---|---|
| `rtl/vedic_mul2.sv` | 2x2 leaf multiplier |
| `rtl/csa_adder.sv` | three-operand carry-save adder, parameter `W` (default 32) |
| `rtl/vedic_mul4.sv` ... `rtl/vedic_mul32.sv` | one hierarchy level each |
| `rtl/vedic_square.sv` | top, parameter `WIDTH` |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_vedic_square_widths.sv` | the 8-, 16- and 32-bit squarers side by side, with the reference results above |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`.
For example:

    verilator --binary --timing --assert -Irtl tb/tb_vedic_square.sv \
        --top-module tb_vedic_square -Mdir obj && ./obj/Vtb_vedic_square

Replace the file and top-module name to run any other testbench. The
`-Irtl` option lets Verilator find the submodules by file name. Every run
finishes in well under a second.
