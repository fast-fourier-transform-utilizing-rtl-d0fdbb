# 8-point FFT on a compressor-based Urdhva multiplier

This design is a small, purely combinational 8-point FFT. Its multiplications
run on an 8 x 8 multiplier that forms partial products in the Urdhva
("vertical and crosswise") way, column by column. Each column is then reduced
with 7:2 and 4:2 compressors instead of chains of full adders. The point of
the compressor cells is speed. A 4:2 compressor sends its lateral carry to the
next column without waiting for the carry that arrives from the column below.
The 4:2 cell here is built from XOR-XNOR pairs and multiplexers, so the
slowest path through it is shorter than in a cell made of two full adders.

The hierarchy, bottom up:

| module | what it is |
|---|---|
| `full_adder`, `half_adder` | one-bit adders, used inside the 7:2 compressor |
| `compressor42` | 4:2 compressor, XOR-XNOR / multiplexer form |
| `compressor72` | 7:2 compressor made of two `compressor42`, two full adders and one half adder |
| `udmultipier_mmcompressor` | 8 x 8 unsigned Urdhva multiplier, two compressor rows plus a final adder |
| `fft_butterfly` | radix-2 complex add/subtract |
| `fft_twiddle_w8` | multiplication by W8^1, W8^2 or W8^3; odd powers use two multipliers |
| `fft8` | the top: three butterfly stages, 8 complex inputs and 8 complex outputs |
| `fft8_pkg` | widths, the 1/sqrt(2) constant and the complex types |

Nothing in the design is clocked. Every output is a combinational function of
the current inputs.

## The 4:2 compressor

`compressor42` adds four bits of one column, `x1..x4`, and a carry-in `cin`
from the column below:

    x1 + x2 + x3 + x4 + cin = sum + 2*(carry + cout)

`cout` goes to the `cin` of the next column up. It depends only on `x1..x3`
(it is their majority), so a row of these cells has no ripple. Inside the
cell:

- the two XOR-XNOR cells give `x1^x2` and `x3^x4`, together with the complement;
- `cout = (x1^x2) ? x3 : x1`;
- the four-input parity `p` is a multiplexer choice between `x3^x4` and its
  complement, steered by `x1^x2`;
- `carry = p ? cin : x4` and `sum = p ? ~cin : cin`.

`p` settles before `cin` arrives, so `cin` passes through only one multiplexer
to reach either output. The gate structure follows the multiplexer-based cell
of the source design. Which data input of each multiplexer takes which signal
is chosen so that the equation above holds.

## The 7:2 compressor and its weights

This is the part that needs the most care. `compressor72` takes seven column
bits `x[7:1]` and two carry-ins, and produces four outputs of different
weights:

    x1 + ... + x7 + cin1 + cin2 = sum + 2*carry + 4*(cout1 + cout2)

The nine inputs can add up to 9. The four outputs can cover up to 1 + 2 + 4 + 4 = 11.

Inside:

```
 x1..x4, cin1 ──► 4:2 A          x5..x7, 0, cin2 ──► 4:2 B
   A.sum ──────────────┐           B.sum ──┐
                       └──► HA ◄───────────┘
                            s ───────────────────────────► sum   (weight 1)
                            c ──┐
 A.carry, B.cout ───────────────┴► FA M:  s ──┐   c ─────► cout2 (weight 4)
 A.cout,  B.carry ────────────────────────────┴► FA L:  s ► carry (weight 2)
                                                        c ► cout1 (weight 4)
```

- The half adder adds the two weight-1 sums and gives `sum`.
- Full adder M adds the three weight-2 signals `A.carry`, `B.cout` and the
  half-adder carry.
- Full adder L adds `A.cout`, `B.carry` and the weight-2 sum of M. Its sum is
  `carry` and its carry is `cout1`.
- The carry of M is `cout2`.

Both `cout1` and `cout2` have weight 4, so in an array they go **two** columns
up, to `cin1` and `cin2` there. `carry` goes one column up as an ordinary bit.

Three choices here are this design's own, made so that the equation is exact:

- M's sum, not its carry, feeds L;
- the fourth data input of compressor B is tied to 0;
- the carry-ins enter on the `cin` pins of the two 4:2 cells.

Unlike the 4:2 cell, the lateral outputs depend on the carry-ins: `cin1`
reaches `cout2` through A, the half adder and M. A row of 7:2 cells therefore
has a carry path that steps two columns at a time.

## The multiplier's compressor array

`udmultipier_mmcompressor` computes `c[15:0] = a[7:0] * b[7:0]`. Both
operands are unsigned.

1. **Urdhva columns.** Column k gets the crosswise bits `a[i] & b[k-i]`. The
   columns 0..14 hold 1, 2, ..., 8, ..., 2, 1 bits.
2. **7:2 row.** One `compressor72` per column takes crosswise bits i = 0..6.
   Its `cout1`/`cout2` go to column k+2 and its `carry` to column k+1.
3. **4:2 row.** One `compressor42` per column adds three things: the 7:2 sum
   of column k, the 7:2 carry of column k-1, and the eighth crosswise bit
   `a[7] & b[k-7]`, which exists only from column 7 up. Its fourth input is 0.
   Its `cout` goes to the next column's `cin`.
4. **Final adder.** A 16-bit carry-propagate adder adds the sum row and the
   carry row, shifted one place.

Outputs that would carry weight 2^16 or more are left unconnected: since
a*b < 2^16 they are always zero. Lint reports these unused bits. Because there
are only two rows, a column can hold at most nine bits, so the operand width
is fixed at 8 (`localparam N`).

## FFT datapath and number format

`fft8` computes the unnormalised DFT

    y[k] = sum_{n=0..7} x[n] * exp(-j*2*pi*n*k/8)

by radix-2 decimation in frequency:

- **Stage 1:** butterflies on (x[n], x[n+4]). The difference of pair n is
  rotated by W8^n. For n = 1 and n = 3 this uses two multipliers each. For
  n = 2 it is a swap with negation (-j).
- **Stage 2:** butterflies with span 2 inside each half. One difference per
  half is rotated by -j.
- **Stage 3:** butterflies on neighbouring pairs.
- The bit-reversed stage-3 outputs are wired to `y[]` in natural order.

Number format (`fft8_pkg`):

- Inputs are `sample_t`: 8-bit two's-complement real and imaginary parts.
- Everything after the inputs is `cplx_t`: 12-bit parts. 8 x 128 x sqrt(2)
  < 2048, so no stage can overflow, and there is no scaling between stages.
- 1/sqrt(2) is 181/256. `fft_twiddle_w8` takes the magnitude of each part
  and multiplies it by the constant 181 on the compressor multiplier. It adds
  128, drops 8 bits and restores the sign. This rounds half up in magnitude,
  which keeps the error symmetric about zero.
- The multiplier operand must be at most 255 in magnitude. Stage-1 differences
  of 8-bit samples lie in [-255, 255], so this always holds. An assertion in
  `fft_twiddle_w8` checks it.
- The only inexact step is the rounding of the four 1/sqrt(2) products. Every
  output part is within about 2 of the exact DFT; the testbench's tolerance is
  2.5.

## Where this departs from, or adds to, the source design

- The source describes the FFT only by name, size (8 points) and its use of
  the compressor multiplier. The radix, the stage order, the 8-bit input width,
  the 12-bit internal width, the constant 181/256 and the sign-magnitude
  rounding are all this design's choices. Four multiplier instances is a
  result of those choices.
- The source names the multiplier and its ports: `a(7:0)`, `b(7:0)`,
  `c(15:0)`. The module keeps that name as printed, spelling included. How
  its compressors are arranged is this design's choice.
- The 4:2 cell uses the source's multiplexer structure. The 7:2 cell uses its
  two-4:2, two-full-adder, one-half-adder arrangement. The output weights and
  the pin assignments described above are this design's choices.
- The source compares its 4:2 cell with two other forms. One is made of two
  full adders. The other is an XOR/multiplexer cell without XOR-XNOR pairs.
  The multiplier and FFT built on those two cells are likewise only for
  comparison. None of them is included here.
- The source's multiplier example is 11111111 x 11110011. The design gives the
  arithmetic product, 61965 (1111001000001101), and the multiplier testbench
  checks that value.
- There are no registers, clock or reset. The design is one combinational path
  from `x` to `y`. Add registers around `fft8` if it has to run at a clock
  rate.

## Verification

Each module has a self-checking testbench in `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_full_adder`, `tb_half_adder` | all input combinations against integer addition |
| `tb_compressor42` | all 32 combinations: the weight equation, sum parity, and that `cout` is the majority of x1..x3 |
| `tb_compressor72` | all 512 combinations: the weight equation and sum parity |
| `tb_udmultipier_mmcompressor` | all 65,536 operand pairs, plus 255 x 243 as a bit pattern |
| `tb_fft_butterfly` | 2,000 random operand pairs |
| `tb_fft_twiddle_w8` | K = 1, 2, 3 over a grid of inputs in [-255, 255]; bit-exact, and within 1.5 of the ideal rotation |
| `tb_fft8` | 3,006 input sets (impulse, constants, full-scale and extreme-difference patterns, random) |

`tb_fft8` runs `fft8` with its default sizes. Each output is checked
bit-exactly against a reference built differently from the design: direct
4-point DFTs of the stage-1 sums and of the rotated stage-1 differences. Each
output is also checked against a floating-point DFT. The testbench counts how
often each datapath mechanism is used: W8^1 and W8^3 rotations, -j rotations,
full-scale and negative multiplier operands, and products that round up. A
mechanism that never occurs counts as a failure.

To run one, with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb rtl/fft8_pkg.sv tb/tb_fft8.sv --top-module tb_fft8
    ./obj_dir/Vtb_fft8

Swap in any other `tb_<module>` the same way. The package file must come
first, and `-Irtl` lets Verilator find the submodules. Every testbench
finishes in well under a second.
