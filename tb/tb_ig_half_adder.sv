// tb_ig_half_adder: exhaustive self-checking test of the IG half adder.
//
// For all four (a, b) pairs it checks {carry, sum} == a + b, the garbage
// outputs G1 = a and G2 = a AND NOT b, and that the cell preserves parity
// (a ^ b, the constant inputs being 0, equals the xor of all four
// outputs). Combinational: sampled 1 time unit after each change. A
// watchdog ends the run if it hangs.
module tb_ig_half_adder;

  logic       a, b, sum, carry;
  logic [1:0] garbage;
  int         checks = 0, failures = 0;

  ig_half_adder dut (.a, .b, .sum, .carry, .garbage);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    #100_000;
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      check({carry, sum} == 2'(int'(a) + int'(b)),
            $sformatf("a=%b b=%b gave carry=%b sum=%b", a, b, carry, sum));
      check(garbage == {a, a & ~b}, $sformatf("a=%b b=%b garbage=%b", a, b, garbage));
      check((a ^ b) == (sum ^ carry ^ garbage[1] ^ garbage[0]),
            $sformatf("parity not preserved for a=%b b=%b", a, b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
