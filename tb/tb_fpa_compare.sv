// tb_fpa_compare: self-checking testbench for the magnitude comparator.
// Random pairs of finite doubles (and pairs with equal magnitude) are applied. The expected
// ordering is worked out with real arithmetic on the absolute values, so it does not reuse the
// comparator's integer trick. The larger output must carry the larger magnitude with its own
// sign, the smaller output the other word, and on a tie `a` must come out as the larger.
module tb_fpa_compare;
  import fpa_pkg::*;

  fp64_t a, b, op_large, op_small;
  int checks = 0, failures = 0;

  fpa_compare dut (.a(a), .b(b), .op_large(op_large), .op_small(op_small));

  function automatic logic [63:0] rand_double();
    logic [63:0] v;
    v = {$urandom, $urandom};
    if (v[62:52] == '1) v[62:52] = 11'h7fe;   // keep to finite numbers
    return v;
  endfunction

  task automatic check(input logic [63:0] va, input logic [63:0] vb);
    real         ma, mb;
    logic [63:0] exp_l, exp_s;
    a = va; b = vb;
    #1;
    ma = $bitstoreal({1'b0, va[62:0]});
    mb = $bitstoreal({1'b0, vb[62:0]});
    if (mb > ma) begin exp_l = vb; exp_s = va; end
    else         begin exp_l = va; exp_s = vb; end
    checks++;
    if (op_large !== exp_l || op_small !== exp_s) begin
      failures++;
      $display("FAIL a=%h b=%h large=%h small=%h", va, vb, op_large, op_small);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] x, y;
    for (int i = 0; i < 2000; i++) begin
      x = rand_double();
      y = rand_double();
      if (i % 4 == 1) y[62:52] = x[62:52];                 // same exponent, fraction decides
      if (i % 4 == 2) y = {~x[63], x[62:0]};               // equal magnitudes
      check(x, y);
    end
    check(64'h3ff0_0000_0000_0000, 64'hbff0_0000_0000_0001);
    check(64'h0000_0000_0000_0000, 64'h8000_0000_0000_0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
