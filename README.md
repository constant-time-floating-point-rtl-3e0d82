# Constant-time double precision floating point adder

A floating point adder whose delay does not depend on its operands. Many floating point units
take a variable number of clock cycles per addition: it depends on how far the operands must be
aligned and how many leading zeros must be removed afterwards. Real-time embedded systems often
prefer a fixed delay. This design gets one by being purely combinational. It has no clock and no
registers, and every path through it has the same structure for every input:

* the alignment shifter is a fixed stack of one-place rounds;
* the leading-one search is a fixed-depth tree of 2-to-1 multiplexers.

Operands and result are IEEE 754 double precision words: 1 sign bit, an 11-bit exponent in
[62:52] and a 52-bit fraction in [51:0]. The top module is `fp_adder`. It computes `a + b`, or
`a - b` when `sub` is 1.

## Data flow

```
 a, b, sub
    |
 fpa_compare     order by magnitude -> larger (L), smaller (S); b's sign flipped if sub
    |
 fpa_align       {1, S.frac} shifted right by L.exp - S.exp, one round per row
    |
 fpa_alu         {1, L.frac} +/- aligned S   (subtract when the signs differ)
    |      \
    |    fpa_ffo  index of the first '1' of the 53-bit ALU output
    |      /
 fpa_normalize   shift the first '1' into the hidden bit, adjust L.exp
    |
    y = {L.sign, exponent, fraction}
```

1. **Compare and swap** (`fpa_compare`). The operands are ordered by magnitude. IEEE 754 puts
   the exponent above the fraction, so comparing the 63-bit `{exponent, fraction}` fields as
   unsigned integers orders magnitudes. On a tie, `a` counts as the larger. The result takes the
   sign of the larger operand.
2. **Align** (`fpa_align`). The smaller significand, with its hidden '1' restored, is shifted
   right by the exponent difference. The larger exponent becomes the working exponent.
3. **Add or subtract** (`fpa_alu`). The ALU subtracts when the two signs differ and adds
   otherwise. Because the larger magnitude is always the minuend, the difference is never
   negative. An addition may carry into a 54th bit, which comes out as `carry`.
4. **Find the first '1'** (`fpa_ffo`). See below.
5. **Renormalise** (`fpa_normalize`).
   * Carry set: the result moves right one place and the exponent goes up by one.
   * No carry: the result moves left by `52 - pos`, where `pos` is the index of its first '1'.
     The exponent goes down by the same amount.

## The alignment shifter

`fpa_align` is written the way the design draws it: as 53 rows, each one bit wide per cell
position. Row 0 holds `{1, frac}`. Row k+1 is row k shifted right by one, with a '0' entering
at the top, when the shift amount is greater than k. Otherwise row k+1 is a copy of row k.

After 53 rounds every bit has left the string. So the 53 rows cover every shift amount, and any
difference of 53 or more gives zero. Bits that leave at the bottom are dropped. No guard or
sticky bits are kept.

A logarithmic barrel shifter (six stages) would give the same function with less depth. The row
form is kept because it is the published structure. Synthesis is free to restructure it, since
each row's enable is just a comparison of the shift amount with a constant.

## The find-first-one tree

`fpa_ffo` returns the index of the most significant '1' of an N-bit string (N = 53 here). It
uses divide and conquer:

* The string is split into an upper part of `ceil(n/2)` bits and a lower part of `floor(n/2)`
  bits. Each part is split again, down to parts of two bits (or one).
* A **two-bit leaf** is one multiplexer whose inputs are the two constant bit indices. Its
  select is the upper bit. For example, the top leaf outputs 52 if bit 52 is set, otherwise 51.
* An **inner node** is one multiplexer with the NOR of its upper part as select. If the upper
  part is all zero, the node passes the lower part's answer. Otherwise it passes the upper
  part's answer.
* Each part's NOR ("none set") is the AND of its children's NORs, so it is built along with the
  tree.

The leaves carry absolute indices, so no adders are needed on the way up. The depth is
`ceil(log2 N)` multiplexers: six for 53 bits.

For 53 bits the root separates [52:26] from [25:0]. The next levels separate [52:39] from
[38:26], and [25:13] from [12:0].

The module builds the tree in heap order, with no recursive instantiation:

* node 1 is the root;
* node k has its upper part at node 2k and its lower part at node 2k+1;
* two constant functions (`node_width`, `node_low`) work out each node's bit range.

A node whose width is 0 does not exist and generates nothing. `none` goes high when the input is
all zero.

The published drawing of the tree uses the same select signals for the ranges above. In one
place it splits unevenly: [52:45] against [44:39], where an even split is [52:46] against
[45:39]. This RTL splits every part as evenly as it can, as the written description of the
method asks. The index it returns is the same either way.

## Number behaviour

The published design specifies the datapath above and nothing about the edge cases of
IEEE 754. This RTL settles them as follows.

| Case | Behaviour here |
|---|---|
| Rounding | Truncation. Bits lost in alignment, and the bit dropped on a carry, are discarded. Results can differ from IEEE round-to-nearest in the last place. In a subtraction, truncating the subtrahend first can leave the result one unit above the exact value truncated. |
| Zero operand (exponent 0) | Treated as zero. Its significand is forced to 0, so adding zero returns the other operand. |
| Subnormal operands | Flushed to zero, like zero operands. |
| Exact cancellation | Gives +0. |
| Result exponent would be 0 or below | Flushed to +0. |
| Result exponent would reach 2047 | Saturates to infinity with the larger operand's sign. |
| Infinity or NaN inputs (exponent 2047) | Not decoded; the outputs are not those IEEE 754 requires. |
| Sign | Always the larger operand's sign, except that a zero result is +0. |

## Departures from the published design

These are the places where this RTL differs from, or goes beyond, the design it implements:

* **Subtraction input.** The design describes adding or subtracting according to the operand
  signs but gives no operation input. `sub` is added here; it flips b's sign before the compare.
* **ALU carry.** The design shows a 53-bit ALU output. An addition needs a 54th bit, so the ALU
  brings out `carry` and the normaliser handles it.
* **Edge cases.** Zero operands, flush-to-zero, saturation to infinity and +0 for exact
  cancellation (see the table above) are choices of this design.
* **No registers.** The published FPGA synthesis report lists 8 D flip-flops and a 288 MHz
  maximum clock next to a 59 ns combinational critical path. The description states that the
  design is purely combinational and does not say where registers would go. This RTL follows
  the description and has none. To use it in a clocked system, place registers around it and
  allow for its full propagation delay.
* **Tree splits.** The uneven split in the published drawing is evened out, as described above.

The published area and timing figures (Xilinx Spartan-3 xc3s200: about 1,900 LUTs, 75 logic
levels) belong to that FPGA flow and are not reproduced here.

## Files

| File | Contents |
|---|---|
| `rtl/fpa_pkg.sv` | Field widths (11-bit exponent, 52-bit fraction, 53-bit significand) and the `fp64_t` struct |
| `rtl/fp_adder.sv` | Top level: wiring, zero-operand handling, sign and output assembly |
| `rtl/fpa_compare.sv` | Magnitude comparison and swap |
| `rtl/fpa_align.sv` | Row-by-row alignment shifter |
| `rtl/fpa_alu.sv` | 53-bit add/subtract with carry out |
| `rtl/fpa_ffo.sv` | Multiplexer-tree leading-one finder, width parameter `N` (default 53) |
| `rtl/fpa_normalize.sv` | Renormalisation, exponent adjustment, flush and saturation |
| `tb/tb_*.sv` | One self-checking testbench per module |

The widths are package constants, not parameters. Only `fpa_ffo` is parameterised; its
testbench also runs a 7-bit instance.

## Verification

Each testbench computes its expected values independently of the module it tests:

* `tb_fpa_compare` compares with real-valued absolute values.
* `tb_fpa_align` halves a 64-bit integer repeatedly.
* `tb_fpa_alu` uses 64-bit integer sums and differences.
* `tb_fpa_ffo` scans the string from the top bit.
* `tb_fpa_normalize` normalises one bit at a time.

`tb_fp_adder` runs the full-size top in two ways:

* About 3,000 exact cases are checked bit for bit against the simulator's real arithmetic. These
  are integers, and multiples of 2^-10, below 2^40, so no precision is lost.
* 20,000 random cases over the whole finite range are checked against a 64-bit integer model of
  the same truncating algorithm. The cases are biased towards close exponents, equal
  magnitudes, very distant exponents, and exponents near both ends of the range.

It counts each mechanism it exercises and fails if any count stays at zero. The mechanisms are:

* operand swap;
* effective subtraction;
* carry renormalisation;
* left renormalisation;
* alignment of 53 places or more;
* exact cancellation;
* underflow flush;
* overflow to infinity;
* zero operand.

Each testbench prints a final `TB_RESULT checks=N failures=M` line.

Simulating with Verilator, for example the top:

```
verilator --binary --timing --assert -Irtl \
    rtl/fpa_pkg.sv rtl/fpa_compare.sv rtl/fpa_align.sv rtl/fpa_alu.sv \
    rtl/fpa_ffo.sv rtl/fpa_normalize.sv rtl/fp_adder.sv tb/tb_fp_adder.sv \
    --top-module tb_fp_adder
./obj_dir/Vtb_fp_adder
```

For a block testbench, list `rtl/fpa_pkg.sv`, the block's file and its `tb/tb_<block>.sv`.
`tb_fpa_ffo` does not need the package. Every testbench finishes in well under a second.
