// tb_ppg_frg_array: exhaustive self-checking test of the partial-product
// stage.
//
// For all 256 (x, y) pairs it checks every partial product
// pp[i][j] == x_i AND y_j and both garbage bits of every Fredkin cell
// (g(8i+2j+1) = x_i, g(8i+2j) = NOT x_i AND y_j). Combinational: sampled 1
// time unit after each change. A watchdog ends the run if it hangs.
module tb_ppg_frg_array;
  import rev_mult_pkg::*;

  operand_t     x, y;
  pp_array_t    pp;
  ppg_garbage_t garbage;
  int           checks = 0, failures = 0;

  ppg_frg_array dut (.x, .y, .pp, .garbage);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    for (int v = 0; v < 256; v++) begin
      {x, y} = 8'(v);
      #1;
      for (int i = 0; i < 4; i++) begin
        for (int j = 0; j < 4; j++) begin
          automatic int k = 4 * i + j;
          check(pp[i][j] == (x[i] & y[j]),
                $sformatf("x=%h y=%h pp[%0d][%0d]=%b", x, y, i, j, pp[i][j]));
          check(garbage[2*k+1] == x[i] && garbage[2*k] == (~x[i] & y[j]),
                $sformatf("x=%h y=%h garbage of cell x%0dy%0d = %b%b",
                          x, y, i, j, garbage[2*k+1], garbage[2*k]));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
