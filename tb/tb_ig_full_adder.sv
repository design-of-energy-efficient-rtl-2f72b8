// tb_ig_full_adder: exhaustive self-checking test of the two-IG full adder.
//
// For all eight (a, b, cin) it checks {cout, sum} == a + b + cin, the three
// garbage outputs (G1 = a AND NOT b, G2 = a XOR b, G3 = cin ? a : b, as
// follows from the cell's wiring), and that the cell preserves parity
// (a ^ b ^ cin equals the xor of all five outputs). Combinational: sampled
// 1 time unit after each change. A watchdog ends the run if it hangs.
module tb_ig_full_adder;

  logic       a, b, cin, sum, cout;
  logic [2:0] garbage;
  int         checks = 0, failures = 0;

  ig_full_adder dut (.a, .b, .cin, .sum, .cout, .garbage);

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
    for (int v = 0; v < 8; v++) begin
      {a, b, cin} = 3'(v);
      #1;
      check({cout, sum} == 2'(int'(a) + int'(b) + int'(cin)),
            $sformatf("a=%b b=%b cin=%b gave cout=%b sum=%b", a, b, cin, cout, sum));
      check(garbage == {a & ~b, a ^ b, cin ? a : b},
            $sformatf("a=%b b=%b cin=%b garbage=%03b", a, b, cin, garbage));
      check((a ^ b ^ cin) == (sum ^ cout ^ (^garbage)),
            $sformatf("parity not preserved for a=%b b=%b cin=%b", a, b, cin));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
