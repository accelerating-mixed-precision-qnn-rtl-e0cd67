# STAR-MAC: a precision-scalable multiply-accumulate unit for a small RISC-V core

Quantized neural networks run much faster on a microcontroller if the
multiplier can do several narrow products per cycle. This design does that
without adding a second multiplier. It replaces the 3-cycle "fast" 32-bit
multiplier of a small two-stage RISC-V core with a unit built around one
16-bit multiplier that can be reconfigured at run time:

* **Sum-apart (SA):** the multiplier works as a SIMD unit. It computes 2 or 4
  narrow products (8 or 4 bit) and keeps them in separate fields of its
  output. This suits depthwise convolution, where each channel has its own
  sum.
* **Sum-together (ST):** the same array adds the narrow products into one dot
  product. This suits fully-connected and ordinary convolution layers,
  which sum over the input channels.

A 52-bit adder, split into sub-adders whose carry chain can be cut, adds the
product into a 104-bit accumulation register (MAC-REG). MAC-REG keeps its
value between instructions, so a kernel's inner loop is one MAC instruction
per pair of source registers. The unit still runs the standard RV32M
multiplies (MUL, MULH, MULHSU, MULHU).

## Operations

A and B are the two 32-bit source registers. Each MAC operation takes two
clock cycles. The first cycle uses the low half-words `A[15:0]`, `B[15:0]`.
The second cycle uses the high half-words `A[31:16]`, `B[31:16]`.

| operation | per cycle | accumulates into | cycles | MACs |
|---|---|---|---|---|
| `mac16st` | one 16x16 product | `mr[47:0]` (one sum) | 2 | 2 |
| `mac8st`  | `a[7:0]*b[15:8] + a[15:8]*b[7:0]` | `mr[31:0]` (one sum) | 2 | 4 |
| `mac4st`  | `sum_k a[4k+3:4k]*b[15-4k:12-4k]` | `mr[23:0]` (one sum) | 2 | 8 |
| `mac16sa` | one 16x16 product | 2 lanes of 37 bits | 2 | 2 |
| `mac8sa`  | two 8x8 products, kept apart | 4 lanes of 21 bits | 2 | 4 |
| `mac4sa`  | four 4x4 products, kept apart | 8 lanes of 13 bits | 2 | 8 |
| `macrst`  | clear MAC-REG | | 1 | |
| `retrieve`| return one MAC-REG chunk, sign-extended to 32 bits | | 1 | |
| `MUL` | low word of A*B | | 3 | |
| `MULH`, `MULHSU`, `MULHU` | high word of A*B | | 4 | |

All MAC operands are signed two's-complement numbers. The design
therefore peaks at 1, 2 and 4 MACs per clock at 16, 8 and 4 bits.

**Operand order in sum-together mode.** An ST operation pairs sub-word `k`
of one operand with sub-word `n-1-k` of the other, inside each 16-bit half.
These are the anti-diagonal blocks of the partial-product matrix. Software
must pack one operand (normally the weights) in reversed order inside each
half-word. `tb/tb_star_mac_top.sv` shows how, in `fc_layer`. Sum-apart
operations pair sub-words with the same index.

**Headroom.** With 48 bits for the ST sum, up to 2^16 ST operations fit
without overflow. A 37/21/13-bit SA lane holds the sum of 2^5 = 32 products.
That is enough for depthwise kernels up to 5x5. Nothing detects overflow; a
lane simply wraps.

## The STAR multiplier (`star_mult`)

The 16x16 partial-product matrix is cut into a 4x4 grid of 4x4-bit tiles.
Each mode switches on a set of tiles:

* **16-bit:** every tile.
* **SA8:** the two 8x8 diagonal blocks. SA4 uses the four diagonal tiles.
* **ST8:** the two 8x8 anti-diagonal blocks. ST4 uses the four
  anti-diagonal tiles.

A tile multiplies two 4-bit digits. A digit is sign-extended only when it
is the top digit of a signed sub-operand. The `sign_a`/`sign_b` inputs make
the 16-bit operands signed or unsigned, so the same array also works for the
unsigned halves of a 32-bit multiply.

The output `s[31:0]` is:

* **SA:** the lanes side by side (`s[31:16]`/`s[15:0]`, or four bytes). Each
  lane is truncated to its own field, so a negative lane never borrows from
  its neighbour.
* **ST:** the dot product, right-aligned and sign-extended to 32 bits.

In the matrix's natural weights, the ST8 dot product sits at bits 24:8 and
the ST4 dot product at bits 21:12. Moving it to bit 0 is only wiring, and it
is what lets ST sums accumulate at the bottom of MAC-REG.

The tile structure is written for clarity. It is a behavioural-level
description that synthesizes, not a hand-built Baugh-Wooley array.

## The split adder and the MAC-REG map

This is the part that needs the most care. The 52-bit adder (`star_adder`)
is built from eight sub-adders:

```
 d[51:47] d[46:42] d[41:37] d[36:32] | d[31:24] d[23:16] d[15:8] d[7:0]
   5-bit    5-bit    5-bit    5-bit  |  8-bit    8-bit    8-bit   8-bit
```

There are two kinds of carry link:

* The carries between the 8-bit sub-adders pass through AND gates.
* The carry into `d[41:37]`, `d[46:42]` and `d[51:47]` comes through a
  multiplexer. It takes either the carry of the 5-bit sub-adder below it,
  or the carry out of byte 2, 1 or 0.

Each SA lane therefore gets one or more bytes for its low bits and one
5-bit group as its guard bits:

| configuration | lanes |
|---|---|
| full (standard multiply, ST) | `d[51:0]` |
| SA16 | `d[36:0]` |
| SA8  | `{d[46:42], d[15:0]}`, `d[36:16]` |
| SA4  | `{d[51:47], d[7:0]}`, `{d[46:42], d[15:8]}`, `{d[41:37], d[23:16]}`, `d[36:24]` |

R-B (`star_route_b`) feeds `s` into the low 32 bits of input B. Each 5-bit
group gets the sign of its own lane: `s[31]`, `s[23]`, `s[15]` or `s[7]`, or
zero for an unsigned product.

MAC-REG has two 52-bit halves, and each half has the same layout as `d`.

* **ST operations** read and write the lower half in both cycles.
* **SA operations** accumulate the low half-word products into the lower
  half in the first cycle. In the second cycle they accumulate the high
  half-word products into the upper half (`mr[103:52]`).

So lane `k` of an SA operation, which holds the products of sub-word `k` of
A and B, lives at:

| | lane 0 | lane 1 | lane 2 | lane 3 | lanes 4–7 |
|---|---|---|---|---|---|
| mac16sa | `mr[36:0]` | `mr[88:52]` | | | |
| mac8sa  | `mr[46:42,15:0]` | `mr[36:16]` | `mr[98:94,67:52]` | `mr[88:68]` | |
| mac4sa  | `mr[51:47,7:0]` | `mr[46:42,15:8]` | `mr[41:37,23:16]` | `mr[36:24]` | same, `+52` |

R-A (`star_route_a`) picks adder input A. It can be either MAC-REG half, or
ALU-REG for the standard multiply, as is or shifted right by 16.

## Reading results: `retrieve`

`star_route_out` holds the output multiplexers. The first level (R-O1)
selects ALU-REG or a MAC-REG chunk. The second level (R-O2) chooses between
that and the adder output. A retrieve names a chunk format, and its lane
index comes from `rs1[2:0]`:

| format | code | returns |
|---|---|---|
| `RF_ST_LO` | 0 | `mr[31:0]`: the whole sum for mac8st/mac4st, the low word for mac16st |
| `RF_ST_HI` | 1 | `mr[47:32]` sign-extended: high part of the 48-bit mac16st sum |
| `RF_SA16_LO` | 2 | bits 31:0 of 37-bit lane 0 or 1 |
| `RF_SA16_HI` | 3 | bits 36:32 of lane 0 or 1, sign-extended |
| `RF_SA8` | 4 | 21-bit lane 0..3, sign-extended |
| `RF_SA4` | 5 | 13-bit lane 0..7, sign-extended |

A kernel looks like this:

* **Fully-connected or 2D-convolution output:** `macrst`, then a run of
  `macNst`, then one `retrieve` (two for a 16-bit sum that may exceed 32
  bits).
* **Group of depthwise channels:** `macrst`, one `macNsa` per kernel tap,
  then one `retrieve` per channel.

## Standard multiplication

The host core computes 32x32 products in several cycles on one narrow
multiplier, keeping the running sum in a 34-bit register (ALU-REG). This unit
keeps that register and schedule, using the STAR multiplier in 16-bit mode
and the adder as one 52-bit adder. L and H are the low and high half-words:

| cycle | MUL | MULH / MULHSU / MULHU |
|---|---|---|
| 1 | `AL*BL` → ALU-REG | `AL*BL` → ALU-REG |
| 2 | `AL*BH + (ar>>16)` → `ar[31:16]` (low half kept) | `AL*BH + (ar>>16)` → ALU-REG |
| 3 | `AH*BL + (ar>>16)`; result `{d[15:0], ar[15:0]}` | `AH*BL + ar` → ALU-REG |
| 4 | | `AH*BH + (ar>>>16)`; result `d[31:0]` |

The low half-words are always unsigned. The high half-words are signed
according to the instruction. The 16x16 products then fit in 32 bits, and R-B
extends them with `s[31]` or with zero.

## Interface and timing

`star_mac_top` is the execute-stage slice that contains the decoder
extension (`star_decoder`) and the unit (`star_mac`).

1. Raise `instr_valid_i` with `instr_i`, `rs1_i` and `rs2_i`.
2. Hold them until `rd_valid_o` goes high.
3. `rd_wdata_o` is valid in that same cycle. Registers update at the
   cycle's closing edge.
4. The next instruction may start in the following cycle.

If a word is not for the unit, `not_mine_o` goes high and nothing starts.
`alu_we_i`/`alu_wdata_i` let the core's ALU load ALU-REG when no multiply is
using it.

Instruction encoding:

* **MAC operations:** custom-0 opcode `0001011`, R-type. funct3 selects the
  operation: `000` mac16st, `001` mac8st, `010` mac4st, `011` macrst,
  `100` mac16sa, `101` mac8sa, `110` mac4sa, `111` retrieve.
* **retrieve:** `funct7[2:0]` is the chunk format. All other funct7 bits
  must be zero.
* **RV32M multiplies:** the standard encodings. Divides and remainders
  are left to the host core's divider and raise `not_mine_o`.

## Files

| file | contents |
|---|---|
| `rtl/star_pkg.sv` | operation codes, modes, select codes, the per-cycle control word |
| `rtl/star_mult.sv` | STAR multiplier |
| `rtl/star_route_b.sv`, `rtl/star_route_a.sv` | adder input routing R-B, R-A |
| `rtl/star_adder.sv` | 52-bit split adder |
| `rtl/star_mac_reg.sv` | MAC-REG with its write multiplexers (R-MAC) |
| `rtl/star_alu_reg.sv` | ALU-REG with its write multiplexers (R-ALU) |
| `rtl/star_route_out.sv` | output routing R-O1/R-O2 |
| `rtl/star_ctrl.sv` | per-cycle control sequencing |
| `rtl/star_mac.sv` | the unit |
| `rtl/star_decoder.sv` | instruction decoding |
| `rtl/star_mac_top.sv` | top: decoder + unit |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/star_ref_pkg.sv` | reference arithmetic shared by the testbenches |

The design has no parameters: every width follows from the 16-bit
multiplier and the lane layout above.

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. For
example, the end-to-end test:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb +libext+.sv rtl/star_pkg.sv tb/star_ref_pkg.sv \
  tb/tb_star_mac_top.sv --top-module tb_star_mac_top
./obj_dir/Vtb_star_mac_top
```

To run another testbench, replace `tb_star_mac_top` with its name.

`tb_star_mac_top` drives instruction words through these kernels:

* fully-connected layers at 16, 8 and 4 bits, with 16 to 128 inputs;
* 3x3 depthwise convolutions at 16, 8 and 4 bits;
* 800 random and extreme RV32M multiplies;
* an ALU write into ALU-REG, and words that the unit must ignore.

It checks every output against integer arithmetic and checks every
instruction's latency. It also counts each mechanism (every operation and
retrieve format, ST/SA mode switches, the ALU load, ignored words) and fails
if one never happens. `tb_star_mac` tests the unit alone, including runs of
the most negative operands, which produce the largest lane sums. The testbenches run in seconds.

## How far to trust it, and where it is this design's own

The following come from the published architecture: the multiplier modes
and lane fields, the sub-adder sizes and carry network, the MAC-REG size and
layout, the routing multiplexer inputs, the 2-cycle MAC schedules, and a 32-bit
multiply that takes 3 or 4 cycles through ALU-REG. Every module has been simulated against
independent arithmetic.

These parts are choices made here, where the published description gives
no detail:

* **Instruction encoding and retrieve formats:** the opcode and field
  encoding, the retrieve chunk codes, lane numbering, and taking the lane
  index from `rs1`.
* **Standard multiply:** the exact cycle-by-cycle schedule (which
  half-word products, in which order, with which shift). The published
  routing gives the 5-bit sub-adders only MAC-REG inputs on the A side. A correct 32-bit multiply
  needs ALU-REG's sign (or zero) there, so R-A adds those inputs, plus an
  all-zero source for the first multiply cycle.
* **ST result alignment:** the multiplier returns ST results right-aligned
  (see above). This is the reading under which MAC-REG holds a 17-bit ST8
  or 10-bit ST4 sum in 32 or 24 bits.
* **Clearing and reset:** MAC-REG is cleared by a synchronous clear select.
  Both registers use an asynchronous active-low reset.
* **Other outputs:** a MAC instruction returns the adder's low word of its
  last cycle, which software ignores.
* **Multiplier internals:** the tile-level form of the multiplier.

The following are not included: the rest of the core (fetch, register
file, controller, CSRs, ALU, load/store unit, divider), and the SoC around
it. No timing, area or power figure has been reproduced; this RTL has been
checked in simulation only.
