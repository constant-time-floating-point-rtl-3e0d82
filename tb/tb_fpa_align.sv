// tb_fpa_align: self-checking testbench for the alignment shifter.
// For random fractions and every shift amount from 0 to 60, plus random amounts up to 2047,
// the output must equal the significand with its hidden '1', divided by 2 to the shift amount
// and truncated. The expected value is computed by repeated halving of a 64-bit integer.
module tb_fpa_align;
  import fpa_pkg::*;

  frac_t frac;
  exp_t  shamt;
  sig_t  shifted;
  int checks = 0, failures = 0;

  fpa_align dut (.frac(frac), .shamt(shamt), .shifted(shifted));

  task automatic check(input frac_t f, input exp_t s);
    longint unsigned v;
    frac = f; shamt = s;
    #1;
    v = {12'd1, f};
    for (int i = 0; i < int'(s) && v != 0; i++) v = v / 2;
    checks++;
    if (64'(shifted) !== v) begin
      failures++;
      $display("FAIL frac=%h shamt=%0d got=%h exp=%h", f, s, shifted, v);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    frac_t f;
    for (int r = 0; r < 20; r++) begin
      f = frac_t'({$urandom, $urandom});
      for (int s = 0; s <= 60; s++) check(f, exp_t'(s));
    end
    for (int r = 0; r < 500; r++) check(frac_t'({$urandom, $urandom}), exp_t'($urandom));
    check('1, 11'd52);
    check('0, 11'd52);
    check('1, 11'd53);
    check('1, 11'd2047);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
