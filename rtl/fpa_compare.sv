// fpa_compare: magnitude comparator and operand swap, the first step of the adder.
// The two operands are ordered by magnitude so that the rest of the datapath can always shift
// the smaller one and subtract it from the larger one, which keeps the ALU result non-negative.
// Because the IEEE 754 fields are laid out exponent above fraction, comparing the 63-bit
// {exponent, fraction} fields as unsigned integers orders the magnitudes; the sign is ignored.
// Ordering the operands before alignment follows the published design; the integer compare
// is this design's way of doing it.
// On equal magnitudes `a` is taken as the larger operand (this tie rule is a choice of this
// design; it only decides which sign a non-zero result gets, and equal magnitudes either double
// or cancel to zero).
// Interface: a, b in; op_large, op_small out, each a whole 64-bit word with its sign. Purely
// combinational, no clock.
module fpa_compare
  import fpa_pkg::*;
(
  input  fp64_t a,
  input  fp64_t b,
  output fp64_t op_large,
  output fp64_t op_small
);

  logic b_bigger;

  always_comb begin
    b_bigger = {b.exp, b.frac} > {a.exp, a.frac};
    op_large    = b_bigger ? b : a;
    op_small    = b_bigger ? a : b;
  end

endmodule
