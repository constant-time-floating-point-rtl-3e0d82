// fp_adder: constant-time IEEE 754 double precision adder/subtractor, built only from
// combinational logic so that every result takes the same, data-independent delay.
// Data flow:
//   1. fpa_compare orders the operands by magnitude (b's sign is flipped first for a - b).
//   2. fpa_align prefixes the hidden '1' to the smaller fraction and shifts it right by the
//      exponent difference, one round per row.
//   3. fpa_alu adds, or subtracts when the signs differ, the larger significand and the
//      aligned one.
//   4. fpa_ffo finds the first '1' of the ALU output with a tree of 2-to-1 multiplexers.
//   5. fpa_normalize shifts the ALU output so that '1' becomes the hidden bit and adjusts the
//      larger exponent; the result takes the sign of the larger operand.
// The flow, the shifter, the multiplexer tree and the sign rule follow the published design.
// Choices of this design where that description is silent: there is no rounding (bits
// shifted out are dropped, i.e. truncation toward zero in magnitude); an operand with exponent
// 0 counts as zero (subnormals are flushed); a result too op_small for a normal number is
// flushed to +0 and one too op_large saturates to infinity; exact cancellation gives +0; the
// all-ones exponent is not decoded, so infinities and NaNs as inputs are not handled as
// IEEE 754 specifies.
// Interface: a, b (64-bit doubles) and sub (1: a - b, 0: a + b) in; y (64-bit double) out.
// No clock: y is valid one propagation delay after the inputs settle.
module fp_adder
  import fpa_pkg::*;
(
  input  logic [63:0] a,
  input  logic [63:0] b,
  input  logic        sub,
  output logic [63:0] y
);

  fp64_t op_a, op_b, op_large, op_small;
  exp_t  diff;
  sig_t  big_sig, aligned, small_sig, alu_out;
  logic  eff_sub, carry, none, zero;
  pos_t  pos;
  exp_t  exp_out;
  frac_t frac_out;

  assign op_a = fp64_t'(a);
  assign op_b = fp64_t'({b[63] ^ sub, b[62:0]});

  fpa_compare u_compare (
    .a(op_a), .b(op_b), .op_large(op_large), .op_small(op_small)
  );

  // Exponents are ordered by the comparator, so the difference is never negative.
  assign diff    = op_large.exp - op_small.exp;
  assign eff_sub = op_large.sign ^ op_small.sign;

  fpa_align u_align (
    .frac(op_small.frac), .shamt(diff), .shifted(aligned)
  );

  // A zero (or subnormal) operand contributes nothing.
  assign big_sig   = (op_large.exp != '0) ? {1'b1, op_large.frac} : '0;
  assign small_sig = (op_small.exp != '0) ? aligned : '0;

  fpa_alu u_alu (
    .big(big_sig), .shifted(small_sig), .do_sub(eff_sub), .result(alu_out), .carry(carry)
  );

  fpa_ffo #(.N(SIG_W)) u_ffo (
    .bits(alu_out), .pos(pos), .none(none)
  );

  fpa_normalize u_norm (
    .exp_in(op_large.exp), .result(alu_out), .carry(carry), .pos(pos), .none(none),
    .exp_out(exp_out), .frac_out(frac_out), .zero(zero)
  );

  assign y = zero ? 64'd0 : {op_large.sign, exp_out, frac_out};

endmodule
