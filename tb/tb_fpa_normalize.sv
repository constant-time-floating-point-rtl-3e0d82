// tb_fpa_normalize: self-checking testbench for the normaliser.
// Each case gives an exponent and an ALU result (with carry); the first-'1' index is computed
// here by a scan and fed in, as the adder's search tree would. The expected exponent and
// fraction come from moving the value one bit at a time until bit 52 holds its leading '1',
// counting the moves, then applying the flush-to-zero and saturate-to-infinity rules.
module tb_fpa_normalize;
  import fpa_pkg::*;

  exp_t  exp_in, exp_out;
  sig_t  result;
  logic  carry, none, zero;
  pos_t  pos;
  frac_t frac_out;
  int checks = 0, failures = 0;
  int n_carry = 0, n_shift = 0, n_flush = 0, n_inf = 0;

  fpa_normalize dut (
    .exp_in(exp_in), .result(result), .carry(carry), .pos(pos), .none(none),
    .exp_out(exp_out), .frac_out(frac_out), .zero(zero)
  );

  task automatic check(input exp_t e, input sig_t r, input logic c);
    longint unsigned v;
    int              ex;
    logic            ez;
    exp_t            ee;
    frac_t           ef;
    exp_in = e; result = r; carry = c;
    pos = '0; none = 1'b1;
    for (int i = 0; i < SIG_W; i++) if (r[i]) begin pos = pos_t'(i); none = 1'b0; end
    #1;
    v  = {10'd0, c, r};
    ex = int'(e);
    ez = 1'b0; ee = '0; ef = '0;
    if (v == 0) ez = 1'b1;
    else begin
      while (v >= (64'd1 << SIG_W))       begin v = v >> 1; ex++; end
      while (v <  (64'd1 << (SIG_W - 1))) begin v = v << 1; ex--; end
      if (ex >= 2047)   begin ee = '1; n_inf++; end
      else if (ex <= 0) begin ez = 1'b1; n_flush++; end
      else begin ee = exp_t'(ex); ef = v[FRAC_W-1:0]; end
      if (c) n_carry++; else if (r[SIG_W-1] == 1'b0) n_shift++;
    end
    checks++;
    if (zero !== ez || (!ez && (exp_out !== ee || frac_out !== ef))) begin
      failures++;
      $display("FAIL e=%0d r=%h c=%b got z=%b %0d %h exp z=%b %0d %h",
               e, r, c, zero, exp_out, frac_out, ez, ee, ef);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++)
      check(exp_t'($urandom % 2047), sig_t'({$urandom, $urandom}) >> ($urandom % 54), i % 3 == 0);
    check(11'd2046, '1, 1'b1);
    check(11'd1, sig_t'(1) << 51, 1'b0);
    check(11'd100, '0, 1'b0);
    check(11'd60, sig_t'(1), 1'b0);
    check(11'd53, sig_t'(1), 1'b0);
    if (n_carry == 0 || n_shift == 0 || n_flush == 0 || n_inf == 0) failures++;
    $display("carry=%0d shift=%0d flush=%0d inf=%0d", n_carry, n_shift, n_flush, n_inf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
