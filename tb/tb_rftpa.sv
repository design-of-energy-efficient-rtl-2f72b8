// tb_rftpa: exhaustive self-checking test of the parallel adder stage.
//
// Drives all 65536 patterns of the 16 partial-product inputs (not only
// those an AND array can produce) and checks that p equals the weighted
// sum of pp[i][j] * 2^(i+j), computed here with integer arithmetic, and
// that the stage preserves parity: the xor of the 16 inputs equals the xor
// of the 8 product bits and 32 garbage bits. Counts how often the final
// carry (P7) was produced and fails if it never was. Combinational:
// sampled 1 time unit after each change. A watchdog ends the run if it
// hangs.
module tb_rftpa;
  import rev_mult_pkg::*;

  pp_array_t      pp;
  product_t       p;
  rftpa_garbage_t garbage;
  int             checks = 0, failures = 0;
  int             n_p7 = 0;

  rftpa dut (.pp, .p, .garbage);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    for (int v = 0; v < 65536; v++) begin
      automatic int expected = 0;
      pp = 16'(v);
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++)
          expected += int'(pp[i][j]) << (i + j);
      #1;
      check(int'(p) == expected, $sformatf("pp=%h p=%0d expected %0d", pp, p, expected));
      check((^pp) == (^{p, garbage}), $sformatf("pp=%h parity not preserved", pp));
      if (p[7]) n_p7++;
    end
    check(n_p7 > 0, "carry into P7 never produced");
    $display("P7 carry produced %0d times", n_p7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
