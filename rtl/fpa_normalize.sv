// fpa_normalize: realigns the ALU output into IEEE 754 form.
// The position of the first '1' of the ALU output (from fpa_ffo) tells how far the result has
// to move left so that this '1' becomes the hidden bit, and the larger operand's exponent is
// lowered by the same amount. When an addition carried into bit 53 the result instead moves
// one place right and the exponent goes up by one; the bit that falls off is dropped.
// Cases the datapath itself leaves open are settled here as follows (choices of this design):
//   - an all-zero ALU output without a carry gives zero;
//   - a result whose exponent would fall to 0 or below is flushed to zero (no subnormals);
//   - a result whose exponent would reach 2047 saturates to infinity (exponent all ones,
//     fraction zero).
// `zero` tells the top level to emit +0 for the first two cases.
// Interface: exp_in, result, carry, pos, none in; exp_out, frac_out, zero out. Combinational.
module fpa_normalize
  import fpa_pkg::*;
(
  input  exp_t  exp_in,
  input  sig_t  result,
  input  logic  carry,
  input  pos_t  pos,
  input  logic  none,
  output exp_t  exp_out,
  output frac_t frac_out,
  output logic  zero
);

  localparam exp_t EXP_MAX = '1;   // all-ones exponent: infinity

  pos_t                 lz;        // left shift that brings the first '1' to bit 52
  frac_t                shifted;   // shifted result without its leading '1'
  logic [EXP_W:0]       exp_up;    // exponent after a carry, one bit wider to see overflow

  always_comb begin
    lz       = pos_t'(SIG_W - 1) - pos;
    shifted  = frac_t'(result << lz);
    exp_up   = {1'b0, exp_in} + 1'b1;
    zero     = 1'b0;
    exp_out  = '0;
    frac_out = '0;
    if (carry) begin
      // The carry is the leading '1'; `none` may be set here (e.g. 1.0 + 1.0).
      if (exp_up >= {1'b0, EXP_MAX}) begin
        exp_out = EXP_MAX;
      end else begin
        exp_out  = exp_up[EXP_W-1:0];
        frac_out = result[SIG_W-1:1];
      end
    end else if (none) begin
      zero = 1'b1;
    end else if (exp_in <= exp_t'(lz)) begin
      zero = 1'b1;
    end else begin
      exp_out  = exp_in - exp_t'(lz);
      frac_out = shifted;
    end
  end

endmodule
