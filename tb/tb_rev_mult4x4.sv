// tb_rev_mult4x4: end-to-end self-checking test of the 4x4 reversible
// multiplier at its only size (it has no parameters).
//
// Applies all 256 operand pairs and checks:
//   - the product: p == x * y, computed here with integer arithmetic;
//   - the partial-product garbage of every Fredkin cell
//     (g(8i+2j+1) = x_i, g(8i+2j) = NOT x_i AND y_j);
//   - the parity identity of the whole circuit: every gate preserves
//     parity, each operand bit drives four gates, so the xor of the 8
//     product bits and 64 garbage bits must be 0;
//   - parity fault detection: flipping any single one of those 72 output
//     bits in a copy must make the identity fail.
// It also counts, across the 256 pairs, how often each of the 12 adder
// cells produced a carry, and fails for a cell that never did, so that
// every carry path (including the final carry into P7) is exercised.
// The circuit is combinational: each result is sampled 1 time unit after
// the operands change, with no clock. A watchdog ends the run if it hangs.
module tb_rev_mult4x4;
  import rev_mult_pkg::*;

  operand_t       x, y;
  product_t       p;
  ppg_garbage_t   ppg_garbage;
  rftpa_garbage_t add_garbage;
  int             checks = 0, failures = 0;

  int ha_carries [4];
  int fa_carries [8];
  int detected_flips = 0;

  rev_mult4x4 dut (.x, .y, .p, .ppg_garbage, .add_garbage);

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
    foreach (ha_carries[k]) ha_carries[k] = 0;
    foreach (fa_carries[k]) fa_carries[k] = 0;

    for (int v = 0; v < 256; v++) begin
      automatic logic [71:0] all_out;
      {x, y} = 8'(v);
      #1;
      check(int'(p) == int'(x) * int'(y),
            $sformatf("%0d * %0d gave %0d", x, y, p));
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++)
          check(ppg_garbage[8*i+2*j+1] == x[i] && ppg_garbage[8*i+2*j] == (~x[i] & y[j]),
                $sformatf("x=%h y=%h garbage of cell x%0dy%0d", x, y, i, j));

      all_out = {p, ppg_garbage, add_garbage};
      check((^all_out) == 1'b0, $sformatf("x=%h y=%h parity identity broken", x, y));
      // A single flipped output bit must be visible through the parity.
      if (v % 16 == 5) begin
        for (int b = 0; b < 72; b++) begin
          automatic logic [71:0] corrupted = all_out ^ (72'd1 << b);
          if ((^corrupted) != 1'b0) detected_flips++;
          check((^corrupted) != 1'b0, $sformatf("flip of output bit %0d not detected", b));
        end
      end

      // Carry activity of the adder cells (ha0..ha3, fa0..fa7 of rftpa).
      if (dut.u_rftpa.ha_carry[0]) ha_carries[0]++;
      if (dut.u_rftpa.ha_carry[1]) ha_carries[1]++;
      if (dut.u_rftpa.ha_carry[2]) ha_carries[2]++;
      if (dut.u_rftpa.ha_carry[3]) ha_carries[3]++;
      for (int k = 0; k < 8; k++)
        if (dut.u_rftpa.fa_cout[k]) fa_carries[k]++;
    end

    foreach (ha_carries[k]) begin
      $display("half adder ha%0d carried %0d times", k, ha_carries[k]);
      check(ha_carries[k] > 0, $sformatf("half adder ha%0d never produced a carry", k));
    end
    foreach (fa_carries[k]) begin
      $display("full adder fa%0d carried %0d times", k, fa_carries[k]);
      check(fa_carries[k] > 0, $sformatf("full adder fa%0d never produced a carry", k));
    end
    $display("single-bit output flips detected by parity: %0d", detected_flips);
    check(detected_flips > 0, "parity fault detection never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
