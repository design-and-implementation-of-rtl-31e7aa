# Area-efficient multiply-accumulate unit with a column-compressor Vedic multiplier

This is a small unsigned multiply-accumulate (MAC) unit in two sizes: 8-bit and 16-bit operands.
Most of the design is in its multiplier. It follows the Vedic *Urdhva Tiryakbhyam* rule
("vertically and crosswise"): product bit *k* is formed from every crosswise partial product
`x[i] & y[k-i]` of its column. It does not use a Wallace or Dadda tree, and it does not add rows
of partial products. Each column gets one compressor that is exactly as large as the number of
bits that land in it. The compressor turns those bits into the final product bit and a group of
carries. **All** of those carries go to the next column at once. A column therefore waits only
for the column just below it, and never for a carry that ripples through several columns. Each
compressor is sized to its own column, which keeps the area small.

Around the multiplier, a carry-select adder adds each product to an accumulator register.

```
          x ─┐
             ├─► compressor_multiplier ──► product ──┐
          y ─┘    (one compressor per column)        ▼
                                          carry_select_adder ──► acc register ──► acc
                                                     ▲                     │
                                                     └─────────────────────┘
```

## How a product is formed

For an N×N product there are 2N columns. Column *k* receives:

* `pp(k)` partial products, which is `k+1` for `k < N` and `2N-1-k` above that, and
* every carry produced by column *k-1*.

A compressor that adds *n* same-weight bits returns one sum bit and `floor(n/2)` carry bits.
That is the least number of next-weight bits that can carry the rest of the count. For the
8-bit multiplier this gives the following column sizes, from product bit 0 upwards:

| product bit | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 | 10 | 11 | 12 | 13 | 14 | 15 |
|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|
| partial products | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 7 | 6 | 5 | 4 | 3 | 2 | 1 | 0 |
| carries in | 0 | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 7 | 6 | 5 | 4 | 3 | 2 | 1 |
| compressor size | 1 (wire) | 2 | 4 | 6 | 8 | 10 | 12 | 14 | 14 | 13 | 11 | 9 | 7 | 5 | 3 | 1 (wire) |
| carries out | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 7 | 6 | 5 | 4 | 3 | 2 | 1 | 0 |

The column compressors are therefore 2:…, 4:…, 6:… up to 14:… compressors. The 16-bit
multiplier uses the same construction with N = 16, and its largest column holds 30 bits. The
sizes are computed at elaboration time by the functions in `mac_pkg` (`pp_count`,
`carries_in`, `col_bits`). Nothing is tabulated by hand, so any N ≥ 2 elaborates. Carries that
would leave the top column are dropped, since the product always fits in 2N bits.

The critical path runs through the compressor chains of successive columns, and the middle
columns are the longest. This structure aims at area, not at the lowest possible delay.

## The compressors

**`compressor_4_2`** is the classic 4:2 compressor. It adds four bits and a carry-in of one
weight, `x1+x2+x3+x4+cin = sum + 2·(carry+cout)`, in a form with three XOR levels:

```
cout  = (x1^x2) ? x3 : x1          -- independent of cin
sum   = x1^x2^x3^x4^cin
carry = (x1^x2^x3^x4) ? cin : x4
```

**`column_compressor #(N)`** is the general N-input compressor used in each column. It is built
from the same cells as the classic higher-order compressors: 4:2 compressors, full adders and
half adders. The first 4:2 stage takes five column bits, using its carry-in pin for the fifth.
Each later 4:2 stage takes the running sum bit and four new bits. Every stage emits two carries.
The 1 to 4 bits left at the end are closed by:

| bits left | closing cells |
|---|---|
| 1 | a wire |
| 2 | a half adder |
| 3 | a full adder |
| 4 | a full adder and a half adder |

Inside a column, a 4:2 stage's carry-in comes from the same column and its cout leaves it. So
"cin/cout" here does not mean a link between neighbouring compressors. It is simply one more
way to take in five bits and pass on two carries. The carry count always comes out as
`floor(N/2)`.

## Accumulation and timing

`mac_unit #(WIDTH)` adds the product to a `2·WIDTH`-bit accumulator through
`carry_select_adder`. The adder cuts the operands into 4-bit blocks:

* The lowest block is a plain ripple-carry adder with carry-in 0.
* Each higher block computes its sum twice, once for carry-in 0 and once for carry-in 1.
* When the real carry arrives from the block below, a multiplexer picks the right result.

| signal | meaning |
|---|---|
| `rst` | synchronous, active high, highest priority: `acc <= 0` |
| `clr` | synchronous, active high: `acc <= 0` (start a new sum) |
| `en`  | `acc <= acc + x*y` |
| none  | `acc` holds |

The multiply and the add form one combinational path into the accumulator. There are no input
or output registers. Operands presented before a rising edge are in `acc` right after that edge,
so the latency is one clock and the unit accepts one product per clock. The accumulator has no
guard bits: a sum past `2^(2·WIDTH) − 1` wraps around, with no saturation and no overflow flag.
So the 8-bit MAC stores 16 flip-flops of state and the 16-bit MAC 32. Operands are unsigned.

`mac_top` holds both configurations side by side:

* `u_mac8` is the 8-bit MAC, with ports `m8_*`.
* `u_mac16` is the 16-bit MAC, with ports `m16_*`.

They share only `clk` and `rst`.

## Where this departs from, or adds to, the reference description

* **Compressor insides.** The reference describes its 7:2 compressor as two 4:2 compressors, two
  full adders and one half adder. It gives only loose stage counts for the 5:2 to 11:2
  compressors. Here one uniform chain (described above) serves every size. The function is the
  same (N bits in, one sum bit and `floor(N/2)` carries out), but the gate arrangement and delay
  of a given size may differ from the original figures.
* **Carry counts.** The reference's equations for product bits 7 and 8 list eight carries each.
  A 14- or 15-bit column can only produce seven, so this design uses `floor(n/2)` in every
  column. The product is unaffected.
* **Zero padding.** In the reference, some compressor inputs are tied to constant zeros,
  presumably so that standard compressor sizes can be reused. Here no input is tied off: every
  compressor is sized to exactly the bits of its column.
* **Accumulator width.** One passage speaks of an "8-bit result" for the 8-bit MAC. The reported
  implementation, however, uses 16 flip-flops and 36 I/O pins. This design follows the latter:
  a 16-bit accumulator, and pins for 8+8 operand bits, 16 result bits, and `clk`, `rst`, `en`,
  `clr`.
* **Choices that were left open.**
  * The names and polarity of the control pins (`rst`, `clr`, `en`).
  * Synchronous reset.
  * Wrap-around instead of saturation.
  * The 4-bit carry-select block size.
  * The carry-select adder as the accumulation adder.
  * Building the 16-bit multiplier by the same column method rather than from smaller
    multipliers.
* **Not included.** The FPGA board wiring used for the reference's demonstration (switches to
  operands, LEDs to product) is pin assignment, not logic. The timing, area and power figures of
  the reference were measured on Xilinx FPGAs and have not been reproduced here.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog.

| testbench | what it covers |
|---|---|
| `tb_compressor_4_2` | all 32 input patterns; cout independent of cin |
| `tb_column_compressor` | every compressor size from 2 to 16 against all 65,536 input patterns |
| `tb_compressor_multiplier` | 8×8 exhaustively (65,536 pairs, including 13×210 = 2730, 87×107 = 9309, 255×255 = 65025); 16×16 corners (65535×65535 = 4294836225) and 20,000 random pairs; 5×5 exhaustively |
| `tb_carry_select_adder` | widths 16, 32 and 10 (a partial top block); carries through every block plus 30,000 random pairs |
| `tb_mac_unit` | both sizes against a reference model after every clock edge, which also checks the one-cycle latency; covers hold, clear, reset and wrap-around |
| `tb_mac_top` | the whole design at its default sizes: 2,000 cycles of mixed traffic on both MACs, a reset in mid-sum, a forced 32-bit wrap and a 16-tap dot product; counts each mechanism (accumulate, hold, clear, wrap per MAC, and reset) and fails if any never occurs |

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert --top-module tb_mac_top -y rtl -y tb +libext+.sv \
          rtl/mac_pkg.sv tb/tb_mac_top.sv -o sim
./obj_dir/sim
```

Every testbench finishes in well under a second.

## Changing the design

* **Operand width.** Set `WIDTH` on `mac_unit`, or `N` on `compressor_multiplier`. Every
  compressor is re-sized automatically.
* **Carry-select block size.** Set `BLOCK` on `carry_select_adder`, or change `CSLA_BLOCK` in
  `mac_pkg`.
* **Saturation.** To saturate instead of wrapping, use the adder's `co` output in `mac_unit`. It
  is left unconnected on purpose today.
