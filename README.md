# 4-digit BCD multiplier through a binary core

Decimal (BCD) multiplication is done here by leaving the decimal domain
altogether: the two 4-digit BCD operands are turned into binary, multiplied
by a 16x16 binary multiplier, and the 32-bit binary product is turned back
into 8 BCD digits. The two converters are where the design puts its effort:

- the BCD-to-binary converter uses only shifts and adds, with 1000 written
  as 1024 - 16 - 8 so that the thousands digit costs one subtraction;
- the binary multiplier is built in "vertical and crosswise" form: each
  level splits its operands in halves, forms four half-width products in
  parallel and merges them with one row of full adders and one carry-propagate
  adder;
- the binary-to-BCD converter finds each decimal digit by repeated
  subtraction of a power of ten, and uses a leading-one detector to skip
  subtractions that cannot succeed.

```
 a[15:0] (BCD) --> bcd2bin --\
                              mult16bit --> bin2bcd --> bcd_out[31:0] (BCD)
 b[15:0] (BCD) --> bcd2bin --/  (16x16)     (clocked)    done
```

Everything up to the binary product is combinational. The only clocked block
is the binary-to-BCD converter, which runs continuously.

## Top level: `bcd_mult_top`

| port      | dir | width | meaning                                          |
|-----------|-----|-------|--------------------------------------------------|
| `clk`     | in  | 1     | clock                                            |
| `reset`   | in  | 1     | synchronous, active high                         |
| `a`, `b`  | in  | 16    | 4-digit BCD operands, digit 3 in bits 15:12      |
| `bcd_out` | out | 32    | 8-digit BCD product, digit 7 in bits 31:28       |
| `done`    | out | 1     | one-cycle pulse, high in the first cycle `bcd_out` shows a new result |

Usage: hold `a` and `b` steady and wait for two `done` pulses. The first may
belong to a conversion that started before the operands changed. After the
second one, `bcd_out` is the product of the new operands. `bcd_out` only changes
when a conversion finishes, so it never shows a half-converted value. A
conversion takes 9 + (sum of product digits 7..1) cycles, at most 72. Worst
case from an operand change to a valid output is therefore 144 cycles.

Example: 1456 x 1645. The converters give 0x05B0 and 0x066D, the binary
product is 0x00248BF0, and `bcd_out` becomes 0x02395120.

The instance names `ruchi1`..`ruchi4` are kept from the reference block
diagram. This makes the hierarchy easy to match against it.

## BCD to binary (`bcd2bin`)

For digits d3..d0 the value is d3*1000 + d2*100 + d1*10 + d0. Each constant is
written as a few powers of two:

```
1000 = 1024 - 16 - 8      ->  (d3<<10) - ((d3<<4) + (d3<<3))
 100 =   64 + 32 + 4      ->  (d2<<6) + (d2<<5) + (d2<<2)
  10 =    8 +  2          ->  (d1<<3) + (d1<<1)
```

Each digit has a small adder branch, and a final adder sums the four branches.
The thousands branch first adds its two small terms. It then subtracts that sum
from `d3<<10` by adding the one's complement plus a carry-in of 1. So the
whole converter has no subtractor, only adders.

Every adder box of the converter is a `wallace_add`: a multi-operand adder
built as a Wallace tree. While more than two operands remain, groups of three
are compressed by a row of full adders into a sum word and a carry word. The
carry word is shifted up one place, and leftover operands pass to the next
level unchanged. The last two words go to a single carry-propagate adder.
That adder also takes the carry-in, which is how the +1 of the
two's-complement subtraction enters the tree. The converter uses trees of 2,
3, 2 and 4 operands (thousands, hundreds, tens, final sum), plus one
2-operand tree with carry-in 1 for the subtraction. All words are 16 bits, and every
valid input fits (9999 = 0x270F). Digit codes 10..15 are not flagged; they
are weighted like valid digits.

## Vertical-crosswise multiplier (`vc_mult4`, `vc_addstruct`, `vc_mult8`, `mult16bit`)

Split x = xh:xl and y = yh:yl into H-bit halves. Then

```
x*y = P + (Q + R)<<H + T<<2H
P = xl*yl (vertical, right)   Q = xl*yh, R = xh*yl (crosswise)   T = xh*yh (vertical, left)
```

`vc_mult8` forms P, Q, R, T with four 4x4 multipliers (`vc_mult4`, a plain
AND-array multiplier). `mult16bit` forms them with four `vc_mult8`. In both
cases the four products go to `vc_addstruct`, which merges them as follows.
This is the part worth reading slowly.

- P[H-1:0] is already final: nothing else has weight below 2^H.
- From weight 2^H to 2^(3H-1), three 2H-bit rows overlap. They are grouped
  so that each row is a full 2H-bit word:
  ```
  row A = { R[2H-1:H], P[2H-1:H] }
  row B = { Q[2H-1:H], R[H-1:0]  }
  row C = { T[H-1:0],  Q[H-1:0]  }
  ```
- One row of 2H full adders compresses A, B and C into a sum word S and a
  carry word C' (carry-save form, no carry propagation). S[0] is final.
- One (3H-1)-bit carry-propagate adder adds `{T[2H-1:H], S[2H-1:1]}` to C',
  giving Z. The top half of T is added here, because nothing else lies at
  those weights apart from carries.
- The product is `{Z, S[0], P[H-1:0]}`.

For the 8-bit multiplier (H = 4) this is 8 full adders and an 11-bit adder.
For the 16-bit multiplier (H = 8) it is 16 full adders and a 23-bit adder. The
conventional alternative would be three full-width adders. `vc_addstruct` is
one module with H as its parameter (default 4). Z cannot overflow, because
true half products always sum to less than 2^4H. Bits z[H-1:0] are wired
straight from `p`, and synthesis reports them as such.

## Binary to BCD by subtraction (`bin2bcd`, `lod`)

The converter holds a remainder register and one 4-bit counter per digit,
and works from digit k = 7 down to k = 1. In each cycle it does this:

1. `lod` gives the bit length L of the remainder (the 1-based position of its
   leading one; 0xD82 has L = 12).
2. If L is at least the bit length of 10^k, it computes the remainder minus 10^k.
   The bit length of 10^k is 4 for 10, 7 for 100 and 10 for 1000.
3. If the difference is non-negative (no borrow), it becomes the new remainder
   and digit k counts up. The converter stays on the same digit.
4. Otherwise the difference is dropped, which restores the remainder, and the
   converter moves to digit k-1. A length below that of 10^k also moves it on
   straight away. In that case the leading-one test has shown that the
   subtraction would fail.

After digit 1 the remainder is the units digit. Then all digits are written
to `bcd` together, `done` pulses, and the converter loads `binary_in` again.

Worked example, 3458 = 0xD82, in the three-digit view. 1000 is subtracted
3 times, leaving 458. Its length 9 is below 10, so the thousands digit ends
without an attempt. 100 is subtracted 4 times, leaving 58, of length 6 < 7.
10 is subtracted 5 times, leaving 8. 8 has length 4, so a sixth subtraction
is tried; it goes negative and is restored. The units digit is 8, and the
result is 3 4 5 8.

Timing: each digit k >= 1 takes d_k + 1 cycles: one per successful
subtraction, plus one that ends the digit (a restore or a skip). Loading and
writing the result take one cycle each. So one conversion takes
`2 + (DIGITS-1) + sum(d_k, k>=1)` cycles, which is 9..72 for 8 digits.

Parameters: `WIDTH` (32) and `DIGITS` (8). The constants 10^k and their bit
lengths come from the functions `pow10` and `bitlen` in `bcd_pkg`. The input
must be below 10^DIGITS, and an assertion checks this. A second assertion
checks that no digit counts past 9.

## Where this departs from, or adds to, the reference description

- The multiplier stage is described as "FSM based". No such FSM is specified,
  and the multiplier is drawn without a clock, so here it is purely
  combinational. The sequential part is the binary-to-BCD converter.
- The reference converter flow is drawn for three powers of ten (1000, 100,
  10). Here it is extended to 10^7..10^1, because the product has 8 digits.
- The converter's cycle-level timing is this design's own: one step per cycle,
  free running, result register, and the `done` output (an extra top-level pin).
- The 16-bit addition structure uses a 23-bit carry-propagate adder, the
  width its 32-bit product needs; the 8-bit one uses an 11-bit adder.
- The Wallace adder is only named in the reference. Here it is the
  textbook tree described above, and its final adder is written as `+` and
  left to synthesis. The same holds for the carry-propagate adder of
  `vc_addstruct`. The 4x4 leaf multiplier is not specified either; it is a
  plain AND array.
- Reset is synchronous and active high. Its kind and polarity are not given
  in the reference.
- The reference implementation reports 105 flip-flops on a Virtex-4. This RTL
  has 99 flip-flop bits. No timing or area claim is made for it.

## Verification

Each block has a self-checking testbench in `tb/`. Each one ends with a line
`TB_RESULT checks=N failures=M`.

| testbench          | what it does                                                       |
|--------------------|--------------------------------------------------------------------|
| `tb_wallace_add`   | trees of 1, 2, 3, 4, 5, 9 operands, 5000 random operand sets and carry-ins |
| `tb_bcd2bin`       | all 10000 BCD codes against d3*1000+d2*100+d1*10+d0                 |
| `tb_vc_mult4`      | all 256 products                                                    |
| `tb_vc_addstruct`  | H=4 for all 65536 operand pairs; H=8 for 20000 random pairs         |
| `tb_vc_mult8`      | all 65536 products                                                  |
| `tb_mult16bit`     | corners, 0x05B0*0x066D, 50000 random pairs                          |
| `tb_lod`           | zero, every bit position with and without lower bits                |
| `tb_bin2bcd`       | 8 digits: 3458 example, edges around every power of ten, 1500 random values; 4 digits (1000/100/10 only): all values 0..9999; digits and exact cycle count; counts kept, restored and skipped steps, and each must occur |
| `tb_bcd_mult_top`  | 1456x1645, 0x0, 1x9999, 9999x9999, 3000 random pairs at default parameters; result and worst-case latency; the same step-kind counts |

Run one with Verilator 5, for example the end-to-end test:

```
verilator --binary --timing --assert -Wno-UNUSEDPARAM -y rtl \
    rtl/bcd_pkg.sv tb/tb_bcd_mult_top.sv --top-module tb_bcd_mult_top
./obj_dir/Vtb_bcd_mult_top
```

`bcd_pkg.sv` must come first on the command line, because modules import it.
All testbenches finish in well under a second.
