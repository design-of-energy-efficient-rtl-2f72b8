// rftpa: reversible fault tolerant parallel adder, the summing stage of the
// 4x4 reversible multiplier.
//
// It adds the 16 partial products pp[i][j] (weight 2^(i+j)) into the 8-bit
// product with 4 IG half adders (ig_half_adder) and 8 two-IG full adders
// (ig_full_adder), arranged in three ripple chains as in the published
// circuit. Columns are numbered by weight 0..7:
//
//   upper right chain  ha0 (col 1: x1y0, x0y1)           -> P1
//                      fa0 (col 2: x0y2, x2y0, ha0 carry)
//                      fa1 (col 3: x0y3, x3y0, fa0 carry)
//                      ha3 (col 4: x1y3, fa1 carry)
//   upper left chain   ha2 (col 3: x1y2, x2y1)
//                      fa2 (col 4: x3y1, x2y2, ha2 carry)
//                      fa3 (col 5: x2y3, x3y2, fa2 carry)
//   lower chain        ha1 (col 2: x1y1, fa0 sum)        -> P2
//                      fa4 (col 3: fa1 sum, ha2 sum, ha1 carry)  -> P3
//                      fa5 (col 4: ha3 sum, fa2 sum, fa4 carry)  -> P4
//                      fa6 (col 5: ha3 carry, fa3 sum, fa5 carry) -> P5
//                      fa7 (col 6: x3y3, fa3 carry, fa6 carry)    -> P6, P7
//   P0 = x0y0 directly.
//
// Each sum of the upper chains goes to the lower cell of its own column and
// each carry that leaves an upper chain to the lower cell one column up.
// The stage adds any 16 input bits correctly, not only true partial
// products, because the largest possible weighted sum (225) fits in 8 bits.
// The cell numbering ha0..ha3, fa0..fa7 is this design's own and sets the
// packing of the garbage port.
//
// Interface: pp in (rev_mult_pkg::pp_array_t); p (8 bits) out; garbage out
// (rev_mult_pkg::rftpa_garbage_t, 32 bits). Purely combinational; the
// longest path runs fa0 -> fa1 -> ha3 -> fa5 -> fa6 -> fa7.
module rftpa
  import rev_mult_pkg::*;
(
  input  pp_array_t      pp,
  output product_t       p,
  output rftpa_garbage_t garbage
);

  logic [N_HA-1:0] ha_sum, ha_carry;
  logic [N_FA-1:0] fa_sum, fa_cout;

  // ---- upper right chain --------------------------------------------------
  ig_half_adder u_ha0 (.a(pp[1][0]), .b(pp[0][1]),
                       .sum(ha_sum[0]), .carry(ha_carry[0]), .garbage(garbage.ha[0]));
  ig_full_adder u_fa0 (.a(pp[0][2]), .b(pp[2][0]), .cin(ha_carry[0]),
                       .sum(fa_sum[0]), .cout(fa_cout[0]), .garbage(garbage.fa[0]));
  ig_full_adder u_fa1 (.a(pp[0][3]), .b(pp[3][0]), .cin(fa_cout[0]),
                       .sum(fa_sum[1]), .cout(fa_cout[1]), .garbage(garbage.fa[1]));
  ig_half_adder u_ha3 (.a(pp[1][3]), .b(fa_cout[1]),
                       .sum(ha_sum[3]), .carry(ha_carry[3]), .garbage(garbage.ha[3]));

  // ---- upper left chain ---------------------------------------------------
  ig_half_adder u_ha2 (.a(pp[1][2]), .b(pp[2][1]),
                       .sum(ha_sum[2]), .carry(ha_carry[2]), .garbage(garbage.ha[2]));
  ig_full_adder u_fa2 (.a(pp[3][1]), .b(pp[2][2]), .cin(ha_carry[2]),
                       .sum(fa_sum[2]), .cout(fa_cout[2]), .garbage(garbage.fa[2]));
  ig_full_adder u_fa3 (.a(pp[2][3]), .b(pp[3][2]), .cin(fa_cout[2]),
                       .sum(fa_sum[3]), .cout(fa_cout[3]), .garbage(garbage.fa[3]));

  // ---- lower chain --------------------------------------------------------
  ig_half_adder u_ha1 (.a(pp[1][1]), .b(fa_sum[0]),
                       .sum(ha_sum[1]), .carry(ha_carry[1]), .garbage(garbage.ha[1]));
  ig_full_adder u_fa4 (.a(fa_sum[1]), .b(ha_sum[2]), .cin(ha_carry[1]),
                       .sum(fa_sum[4]), .cout(fa_cout[4]), .garbage(garbage.fa[4]));
  ig_full_adder u_fa5 (.a(ha_sum[3]), .b(fa_sum[2]), .cin(fa_cout[4]),
                       .sum(fa_sum[5]), .cout(fa_cout[5]), .garbage(garbage.fa[5]));
  ig_full_adder u_fa6 (.a(ha_carry[3]), .b(fa_sum[3]), .cin(fa_cout[5]),
                       .sum(fa_sum[6]), .cout(fa_cout[6]), .garbage(garbage.fa[6]));
  ig_full_adder u_fa7 (.a(pp[3][3]), .b(fa_cout[3]), .cin(fa_cout[6]),
                       .sum(fa_sum[7]), .cout(fa_cout[7]), .garbage(garbage.fa[7]));

  assign p = {fa_cout[7], fa_sum[7], fa_sum[6], fa_sum[5], fa_sum[4],
              ha_sum[1], ha_sum[0], pp[0][0]};

endmodule
