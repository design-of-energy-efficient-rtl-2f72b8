// tb_frg_gate: exhaustive self-checking test of the Fredkin gate.
//
// Applies all 8 input patterns and compares P, Q, R with the gate's
// published truth table, written out below as a constant (not derived from
// the equations the gate uses). Also checks that the gate preserves parity
// (A^B^C == P^Q^R) and is reversible (no two inputs give the same output).
// The gate is combinational: outputs are sampled 1 time unit after the
// inputs change, with no clock. A watchdog ends the run if it hangs.
module tb_frg_gate;

  logic a, b, c, p, q, r;
  int   checks = 0, failures = 0;

  // Truth table: index {A,B,C}, value {P,Q,R}
  localparam logic [2:0] FRG_TT [8] = '{
    3'b000, 3'b001, 3'b010, 3'b011,
    3'b100, 3'b110, 3'b101, 3'b111
  };

  frg_gate dut (.a, .b, .c, .p, .q, .r);

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
    automatic bit [7:0] seen = '0;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      check({p, q, r} == FRG_TT[v],
            $sformatf("in=%03b out=%b%b%b expected %03b", v[2:0], p, q, r, FRG_TT[v]));
      check((a ^ b ^ c) == (p ^ q ^ r), $sformatf("parity not preserved for in=%03b", v[2:0]));
      check(!seen[{p, q, r}], $sformatf("output %b%b%b repeated (not reversible)", p, q, r));
      seen[{p, q, r}] = 1'b1;
    end
    check(seen == 8'hFF, "not every output pattern produced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
