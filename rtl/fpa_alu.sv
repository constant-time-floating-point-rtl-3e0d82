// fpa_alu: significand adder/subtractor.
// Adds the aligned smaller significand to the larger one, or subtracts it when the operands'
// effective signs differ (Add/Sub). Since the comparator has put the larger magnitude on `big`,
// a subtraction never goes negative and needs no sign handling here. An addition can carry into
// a 54th bit, which comes out on `carry` for the normaliser; a subtraction never sets it.
// Subtraction is done as big + ~shifted + 1 so that one carry chain serves both operations.
// The Add/Sub control chosen by the operand signs follows the published design; the carry
// output and the single-adder form are choices of this design.
// Interface: big, shifted (53 bits), do_sub in; result (53 bits), carry out. Combinational.
module fpa_alu
  import fpa_pkg::*;
(
  input  sig_t big,
  input  sig_t shifted,
  input  logic do_sub,
  output sig_t result,
  output logic carry
);

  logic [SIG_W:0] sum;

  always_comb begin
    sum    = {1'b0, big} + {1'b0, shifted ^ {SIG_W{do_sub}}} + (SIG_W+1)'(do_sub);
    result = sum[SIG_W-1:0];
    carry  = sum[SIG_W] & ~do_sub;
  end

endmodule
