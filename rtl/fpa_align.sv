// fpa_align: alignment shifter for the smaller operand's significand.
// The hidden '1' is placed above the 52 fraction bits and the 53-bit string is then shifted
// right one position per round, a '0' entering at the top each time, for as many rounds as the
// exponents differ. The shifter is written as that stack of rounds: row k+1 is row k shifted by
// one place when the shift amount exceeds k, and row k unchanged otherwise. After 53 rounds
// every bit has left the string, so any difference of 53 or more gives zero and only 53 rows
// are built. Bits shifted out at the bottom are dropped (no guard or sticky bits are kept; the
// adder truncates).
// The row-per-round structure and the '1' prefixed before the first round follow the
// published design; dropping the shifted-out bits is this design's reading of it.
// Interface: frac (52 bits) and shamt (the 11-bit exponent difference) in; shifted (53 bits)
// out. Purely combinational; its delay is the same for every shift amount.
module fpa_align
  import fpa_pkg::*;
(
  input  frac_t frac,
  input  exp_t  shamt,
  output sig_t  shifted
);

  sig_t row [SIG_W+1];

  always_comb begin
    row[0] = {1'b1, frac};
    for (int unsigned k = 0; k < SIG_W; k++) begin
      row[k+1] = (32'(shamt) > k) ? {1'b0, row[k][SIG_W-1:1]} : row[k];
    end
    shifted = row[SIG_W];
  end

endmodule
