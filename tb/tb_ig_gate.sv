// tb_ig_gate: exhaustive self-checking test of the IG gate.
//
// Applies all 16 input patterns and compares P, Q, R, S with the gate's
// published truth table, written out below as a constant. Also checks that
// the gate preserves parity (A^B^C^D == P^Q^R^S) and is a permutation of
// the 16 patterns. Combinational: sampled 1 time unit after each change.
// A watchdog ends the run if it hangs.
module tb_ig_gate;

  logic a, b, c, d, p, q, r, s;
  int   checks = 0, failures = 0;

  // Truth table: index {A,B,C,D}, value {P,Q,R,S}
  localparam logic [3:0] IG_TT [16] = '{
    4'b0000, 4'b0001, 4'b0010, 4'b0011,
    4'b0100, 4'b0101, 4'b0110, 4'b0111,
    4'b1101, 4'b1100, 4'b1111, 4'b1110,
    4'b1010, 4'b1011, 4'b1000, 4'b1001
  };

  ig_gate dut (.a, .b, .c, .d, .p, .q, .r, .s);

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
    automatic bit [15:0] seen = '0;
    for (int v = 0; v < 16; v++) begin
      {a, b, c, d} = 4'(v);
      #1;
      check({p, q, r, s} == IG_TT[v],
            $sformatf("in=%04b out=%b%b%b%b expected %04b", v[3:0], p, q, r, s, IG_TT[v]));
      check((a ^ b ^ c ^ d) == (p ^ q ^ r ^ s),
            $sformatf("parity not preserved for in=%04b", v[3:0]));
      check(!seen[{p, q, r, s}], $sformatf("output %b%b%b%b repeated", p, q, r, s));
      seen[{p, q, r, s}] = 1'b1;
    end
    check(seen == 16'hFFFF, "not every output pattern produced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
