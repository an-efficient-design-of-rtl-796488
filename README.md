# 8x8 Vedic multiplier and 17-bit multiply-accumulate unit

A multiply-accumulate (MAC) unit repeatedly computes `acc <= acc + a*b`, the
core operation of filters, convolutions and transforms. Most of its delay and
area is in the multiplier. This design builds that multiplier with the
*Urdhva-Tiryakbhyam* ("vertically and crosswise") rule of Vedic arithmetic.
All cross products of the operand halves are formed at the same time by
smaller multipliers, and carry-save adders combine them. The rule is applied
recursively: 2x2 → 4x4 → 8x8. The 16-bit product feeds an adder and a 17-bit
accumulator register.

```
 a[7:0] b[7:0]
    |     |
 +--v-----v--+
 | vedic_8x8 |  16-bit product (combinational)
 +-----+-----+
       |            +-------------------+
 +-----v-----+      |                   |
 | csa_adder |<-----+  acc (feedback)   |
 +-----+-----+                          |
       | y = acc + a*b (17 bits)        |
 +-----v------+                         |
 | accumulator|-------------------------+--> acc (output)
 +------------+
```

## The Vedic multiplier hierarchy

### 2x2 cell (`vedic_2x2`)
For `a = a1 a0` and `b = b1 b0`:
* bit 0 is the vertical product `a0&b0`;
* bit 1 comes from a half adder that sums the two crosswise products, `a0&b1` and `a1&b0`;
* a second half adder adds the carry of the first to the vertical product `a1&b1`, giving bits 2 and 3.

The result is four AND gates and two half adders, with no carry chain longer than two cells.

### Splitting an n-bit product into four n/2-bit products
The 4x4 and 8x8 levels share one arrangement. Each operand is split into a
low half L and a high half H of h = n/2 bits. Four smaller multipliers run in
parallel:

| product | operands | weight |
|---|---|---|
| Q0 | aL * bL | 1 |
| Q1 | aL * bH | 2^h |
| Q2 | aH * bL | 2^h |
| Q3 | aH * bH | 2^2h |

The product is assembled from the bottom up, one h-bit slice at a time:
1. `p[h-1:0] = Q0[h-1:0]`. Nothing else reaches these bits.
2. Carry-save adder 1 adds the two crosswise products and the upper half of
   Q0: `S = Q1 + Q2 + Q0[2h-1:h]`. Its low h bits are `p[2h-1:h]`.
3. Carry-save adder 2 adds the rest of S to the vertical high product:
   `Q3 + S[top:h]`. This gives `p[4h-1:2h]`.

With h = 4 this is exactly the 8x8 block diagram. Four 4x4 blocks produce
Q0..Q3 (8 bits each), and two CSAs produce `Y[7:4]` and `Y[15:8]`.
`vedic_4x4` uses the same scheme with h = 2 on top of `vedic_2x2`. The top
bits of each CSA result are provably zero, because the product fits in 2n
bits. They are left unconnected, and lint reports them as unused.

### Carry-save adder (`csa_adder`)
The adder takes three W-bit operands:
* A row of W full adders reduces `x + y + z` to a sum vector and a carry vector. No carry moves between bit positions in this row.
* A (W+1)-bit ripple row of full adders then adds the sum vector and the carry vector shifted left by one.
* The result has W+2 bits.

The full adders (`full_adder`) are each built from two `half_adder`s and an OR.

The second CSA at each multiplier level, and the CSA used as the MAC's adder,
have only two real operands. Their third input is tied to zero.

## The MAC loop (`mac_unit`, top)

| port | dir | width | meaning |
|---|---|---|---|
| clk | in | 1 | clock, rising edge |
| rst_n | in | 1 | asynchronous active-low reset, acc ← 0 |
| clr | in | 1 | synchronous clear, acc ← 0; wins over `en` |
| en | in | 1 | accumulate this cycle: acc ← acc + a*b |
| a, b | in | 8 | unsigned operands |
| y | out | ACC_W | combinational acc + a*b, the value the next enabled edge loads |
| acc | out | ACC_W | accumulator register |

Parameter `ACC_W` (default 17) is the width of the accumulator and of `y`.

Timing: `a`, `b` → multiplier → adder → `y` is one combinational path. With
`en` high, `acc` holds the new sum after the next rising edge, so the MAC has
one cycle of latency and accepts one operand pair per cycle. The sum wraps
modulo 2^ACC_W.

## What follows the source design and what is this implementation's choice

Follows the source design:
* the multiplier → adder → accumulator loop with feedback and the accumulator as output;
* the 2x2 cell with its four partial products and two half adders;
* the 8x8 multiplier built from four 4x4 multipliers on the nibbles, plus two carry-save adders producing `Y[3:0]`, `Y[7:4]` and `Y[15:8]`;
* unsigned 8-bit operands with a 16-bit product;
* a 17-bit output bus.

This implementation's own choices:
* **4x4 level.** It is built from four 2x2 cells with the same CSA arrangement. The source shows it only as a box and says its partial products are formed in parallel and added by carry-save adders. A flat array of 16 AND terms reduced by carry-save rows would be an equally valid reading, and would give the same function.
* **Bits between the first and second CSA.** They are not marked in the source's diagram. The split above is the one that makes the product exact.
* **CSA insides.** These are a standard full-adder row plus a ripple carry-propagate row. The source also mentions a mixed binary/quaternary sum representation with a conversion module, but gives no details. It is not built.
* **Control and arithmetic rules.** The enable, the clear and its priority over enable, the asynchronous reset, wrap-around on overflow and unsigned arithmetic were all chosen here.
* **Combinational y.** `y` is brought out because the reported critical path runs from an input to the 17-bit output with no register in between.

Not included: the array multiplier and square-root carry-select Vedic
multiplier that the design was compared against, since they are not part of
it. Power, area and delay figures depend on the FPGA flow and are not
reproduced.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| tb_half_adder | all 4 input pairs |
| tb_vedic_2x2 | all 16 operand pairs against a*b |
| tb_vedic_4x4 | all 256 operand pairs |
| tb_vedic_8x8 | all 65,536 operand pairs |
| tb_csa_adder | corners and 20,000 random triples at W=8 and W=17 |
| tb_accumulator | 5,000 cycles of random clear/enable/data against a reference register, plus async reset |
| tb_mac_unit | end to end at default size (see below) |

`tb_mac_unit` checks `y` before every clock edge and `acc` after it, against
a reference model. It runs:
* the operand sequence (15,69) (235,66) (40,35) (35,71) (41,31) (85,59), ending at acc = 26716;
* clear and enable together;
* twelve 255*255 steps that wrap the accumulator;
* 50,000 random cycles with holds, clears and a mid-run asynchronous reset.

It counts each of these events and fails if any never occurs.

Run a testbench with plain Verilator from the repository root, for example:

```
verilator --binary --timing --assert -Irtl -y rtl --top-module tb_mac_unit tb/tb_mac_unit.sv -o sim
./obj_dir/sim
```

The testbenches reset or set every register they read, so they do not depend
on initial values. The asynchronous reset is driven high before it is first
asserted, so that its falling edge is seen.

## Changing it
* Accumulator width: set `ACC_W` on `mac_unit`. The `csa_adder` that adds into the accumulator follows it.
* Wider multipliers: a 16x16 level would be four `vedic_8x8` plus two `csa_adder #(.W(16))`, wired exactly as in `vedic_8x8` with h = 8.
* Signed operands are not supported. Using them would need sign handling around the unsigned core.
