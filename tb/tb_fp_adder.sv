// tb_fp_adder: end-to-end, self-checking testbench for the constant-time adder at its full
// 64-bit size (the top is instantiated with no parameter overrides).
// Two kinds of checks:
//   - Exact cases: integers and multiples of 2^-10 below 2^40, for which no bit is lost, are
//     added and subtracted with the simulator's real arithmetic and the bit patterns compared.
//     These tie the design to IEEE 754 values independently of its algorithm.
//   - Random cases over the whole finite range: compared with a reference that computes the
//     same truncating algorithm on 64-bit integers, normalising one bit at a time.
// It counts how often each mechanism of the datapath was exercised (operand swap, effective
// subtraction, carry renormalisation, left renormalisation, alignment beyond 53 places, exact
// cancellation, underflow flush, overflow to infinity, zero operands) and counts a failure for
// any that never happened. The adder has no clock: outputs are sampled 1 ns after each input
// change, and the check is that they are then already final.
module tb_fp_adder;
  logic [63:0] a, b, y;
  logic        sub;
  int checks = 0, failures = 0;
  int n_swap = 0, n_effsub = 0, n_carry = 0, n_left = 0, n_far = 0, n_cancel = 0;
  int n_flush = 0, n_inf = 0, n_zero_op = 0;

  fp_adder dut (.a(a), .b(b), .sub(sub), .y(y));

  // Same algorithm as the design (truncating, flush-to-zero, saturate-to-infinity), written
  // on plain integers. Also records which mechanisms the case exercised.
  function automatic logic [63:0] ref_add(logic [63:0] x, logic [63:0] z, logic s);
    logic [63:0]     l, m;
    logic            sl, sm;
    int              el, em, d, e;
    longint unsigned ml, mm, r;
    z[63] = z[63] ^ s;
    if (z[62:0] > x[62:0]) begin l = z; m = x; n_swap++; end
    else                   begin l = x; m = z; end
    sl = l[63]; sm = m[63];
    el = int'(l[62:52]); em = int'(m[62:52]);
    ml = (el != 0) ? {11'd0, 1'b1, l[51:0]} : 0;
    mm = (em != 0) ? {11'd0, 1'b1, m[51:0]} : 0;
    if (em == 0) n_zero_op++;
    d  = el - em;
    if (d >= 53 && em != 0) n_far++;
    mm = (d >= 64) ? 0 : mm >> d;
    if (sl != sm) begin r = ml - mm; n_effsub++; end
    else          r = ml + mm;
    if (r == 0) begin n_cancel++; return 64'd0; end
    e = el;
    if (r >= (64'd1 << 53)) n_carry++;
    if (r <  (64'd1 << 52)) n_left++;
    while (r >= (64'd1 << 53)) begin r = r >> 1; e++; end
    while (r <  (64'd1 << 52)) begin r = r << 1; e--; end
    if (e >= 2047) begin n_inf++;   return {sl, 11'h7ff, 52'd0}; end
    if (e <= 0)    begin n_flush++; return 64'd0; end
    return {sl, 11'(e), r[51:0]};
  endfunction

  task automatic apply(input logic [63:0] x, input logic [63:0] z, input logic s,
                       input logic [63:0] expect_y, input string what);
    a = x; b = z; sub = s;
    #1;
    checks++;
    if (y !== expect_y) begin
      failures++;
      $display("FAIL %s a=%h b=%h sub=%b y=%h expected=%h", what, x, z, s, y, expect_y);
    end
  endtask

  function automatic logic [63:0] rand_finite();
    logic [63:0] v;
    v = {$urandom, $urandom};
    if (v[62:52] == '1) v[62:52] = 11'h7fe;
    return v;
  endfunction

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] x, z, r;
    real         rx, rz;
    longint      ix, iz;
    logic        s;

    // Exact cases checked against real arithmetic.
    for (int i = 0; i < 3000; i++) begin
      ix = longint'({$urandom, $urandom} >> (24 + $urandom % 40));
      iz = (i % 5 == 0) ? ix : longint'({$urandom, $urandom} >> (24 + $urandom % 40));
      if ($urandom % 2 != 0) ix = -ix;
      if ($urandom % 2 != 0) iz = -iz;
      rx = real'(ix); rz = real'(iz);
      if (i % 2 != 0) begin rx = rx * (2.0 ** -10); rz = rz * (2.0 ** -10); end
      s = 1'($urandom);
      x = $realtobits(rx); z = $realtobits(rz);
      void'(ref_add(x, z, s));   // mechanism counts only
      apply(x, z, s, $realtobits(s ? rx - rz : rx + rz), "exact");
    end
    apply($realtobits(1.5), $realtobits(0.25), 1'b0, $realtobits(1.75), "1.5+0.25");
    apply($realtobits(1.0), $realtobits(1.0), 1'b1, 64'd0, "1-1");
    apply($realtobits(-3.0), $realtobits(5.0), 1'b0, $realtobits(2.0), "-3+5");
    apply($realtobits(0.0), $realtobits(-7.5), 1'b0, $realtobits(-7.5), "0+-7.5");

    // Random cases over the full range, with exponents often close together.
    for (int i = 0; i < 20000; i++) begin
      x = rand_finite();
      z = rand_finite();
      case (i % 8)
        0, 1, 2: z[62:52] = 11'(int'(x[62:52]) + int'($urandom % 5) - 2);
        3:       z = {z[63], x[62:52], x[51:0] ^ 52'($urandom % 16)};
        4:       z[62:52] = 11'(int'(x[62:52]) + 53 + int'($urandom % 12));
        5:       begin x[62:52] = 11'(1 + $urandom % 4); z[62:52] = x[62:52]; end
        6:       begin x[62:52] = 11'h7fe - 11'($urandom % 2); z[62:52] = x[62:52]; end
        default: ;
      endcase
      if (z[62:52] == '1) z[62:52] = 11'h7fe;
      if (i % 97 == 0) z[62:52] = '0;
      s = 1'($urandom);
      r = ref_add(x, z, s);
      apply(x, z, s, r, "random");
    end

    $display("swap=%0d effsub=%0d carry=%0d left=%0d far=%0d cancel=%0d flush=%0d inf=%0d zero_op=%0d",
             n_swap, n_effsub, n_carry, n_left, n_far, n_cancel, n_flush, n_inf, n_zero_op);
    if (n_swap == 0)    begin failures++; $display("FAIL never swapped operands"); end
    if (n_effsub == 0)  begin failures++; $display("FAIL never subtracted"); end
    if (n_carry == 0)   begin failures++; $display("FAIL never carried"); end
    if (n_left == 0)    begin failures++; $display("FAIL never renormalised left"); end
    if (n_far == 0)     begin failures++; $display("FAIL never aligned past 53"); end
    if (n_cancel == 0)  begin failures++; $display("FAIL never cancelled"); end
    if (n_flush == 0)   begin failures++; $display("FAIL never flushed"); end
    if (n_inf == 0)     begin failures++; $display("FAIL never overflowed"); end
    if (n_zero_op == 0) begin failures++; $display("FAIL never had a zero operand"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
