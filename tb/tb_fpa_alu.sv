// tb_fpa_alu: self-checking testbench for the significand adder/subtractor.
// The larger input always has its hidden bit set and the smaller input is no larger than it,
// as the comparator and shifter guarantee. Additions are checked against 64-bit integer sums
// (carry is bit 53 of the sum); subtractions against 64-bit integer differences with carry 0.
module tb_fpa_alu;
  import fpa_pkg::*;

  sig_t big, shifted, result;
  logic do_sub, carry;
  int checks = 0, failures = 0;

  fpa_alu dut (.big(big), .shifted(shifted), .do_sub(do_sub), .result(result), .carry(carry));

  task automatic check(input sig_t x, input sig_t y, input logic s);
    longint unsigned e;
    big = x; shifted = y; do_sub = s;
    #1;
    e = s ? longint'(x) - longint'(y) : longint'(x) + longint'(y);
    checks++;
    if ({carry, result} !== e[SIG_W:0] || e[63:SIG_W+1] != 0) begin
      failures++;
      $display("FAIL big=%h sh=%h sub=%b got=%b_%h exp=%h", x, y, s, carry, result, e);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sig_t x, y;
    for (int i = 0; i < 3000; i++) begin
      x = sig_t'({$urandom, $urandom}) | (sig_t'(1) << (SIG_W - 1));
      y = sig_t'({$urandom, $urandom}) >> ($urandom % 54);
      if (y > x) y = x;
      check(x, y, i[0]);
    end
    check('1, '1, 1'b0);
    check('1, '1, 1'b1);
    check(sig_t'(1) << (SIG_W - 1), '0, 1'b1);
    check(sig_t'(1) << (SIG_W - 1), sig_t'(1) << (SIG_W - 1), 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
