// ppg_frg_array: partial-product generation stage of the 4x4 reversible
// multiplier.
//
// Sixteen Fredkin gates, one per partial product, each used as an AND
// gate: A = x_i, B = y_j, C = 0 gives R = x_i*y_j, with P = x_i and
// Q = x_i'y_j left over as garbage. All sixteen work in parallel. The
// structure (16 FRG gates, garbage named g0..g31 with x0y0 producing g1 g0
// and x3y3 producing g31 g30) follows the published circuit; putting x_i
// on the control input A rather than y_j is this design's choice.
//
// Interface: x, y (4 bits each) in; pp[i][j] = x_i*y_j out;
// garbage[8i+2j+1] = x_i and garbage[8i+2j] = x_i'y_j. Purely
// combinational, one gate delay.
module ppg_frg_array
  import rev_mult_pkg::*;
(
  input  operand_t     x,
  input  operand_t     y,
  output pp_array_t    pp,
  output ppg_garbage_t garbage
);

  for (genvar i = 0; i < OP_W; i++) begin : g_row
    for (genvar j = 0; j < OP_W; j++) begin : g_col
      frg_gate u_frg (
        .a (x[i]),
        .b (y[j]),
        .c (1'b0),
        .p (garbage[2*(OP_W*i+j)+1]),
        .q (garbage[2*(OP_W*i+j)]),
        .r (pp[i][j])
      );
    end
  end

endmodule
