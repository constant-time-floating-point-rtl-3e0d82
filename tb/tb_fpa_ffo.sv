// tb_fpa_ffo: self-checking testbench for the find-first-'1' multiplexer tree.
// Every position of a 53-bit string is tried as the leading '1', with random bits below it,
// plus random strings and the all-zero string. The expected index is found by scanning from
// the top bit down. A second instance of width 7 checks the tree for an odd, small width.
module tb_fpa_ffo;
  logic [52:0] bits;
  logic [5:0]  pos;
  logic        none;
  logic [6:0]  bits7;
  logic [2:0]  pos7;
  logic        none7;
  int checks = 0, failures = 0;

  fpa_ffo dut (.bits(bits), .pos(pos), .none(none));
  fpa_ffo #(.N(7)) dut7 (.bits(bits7), .pos(pos7), .none(none7));

  task automatic check(input logic [52:0] v);
    int e;
    bits = v;
    bits7 = v[6:0];
    #1;
    e = -1;
    for (int i = 52; i >= 0; i--) if (v[i] && e < 0) e = i;
    checks++;
    if ((e < 0) ? (!none || pos != 0) : (none || int'(pos) != e)) begin
      failures++;
      $display("FAIL bits=%h pos=%0d none=%b exp=%0d", v, pos, none, e);
    end
    e = -1;
    for (int i = 6; i >= 0; i--) if (v[i] && e < 0) e = i;
    checks++;
    if ((e < 0) ? !none7 : (none7 || int'(pos7) != e)) begin
      failures++;
      $display("FAIL7 bits=%b pos=%0d none=%b exp=%0d", v[6:0], pos7, none7, e);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [52:0] r;
    for (int rep = 0; rep < 10; rep++)
      for (int i = 0; i < 53; i++) begin
        r = 53'({$urandom, $urandom});
        check((53'(1) << i) | (r & ((53'(1) << i) - 1)));
      end
    for (int rep = 0; rep < 500; rep++) check(53'({$urandom, $urandom}) >> ($urandom % 53));
    check('0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
