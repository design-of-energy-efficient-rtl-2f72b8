// ig_full_adder: fault tolerant full adder (FTFA) built from two IG gates.
//
// The first IG gate works as a half adder on A and B (C = D = 0) and gives
// A xor B and AB. The second IG gate takes A xor B on its A input, the
// carry-in on B and AB on C, so that
//   Q = A xor B xor Cin                  (sum)
//   R = (A xor B)Cin xor AB              (carry out)
// Its P output (A xor B) is garbage G2 and its S output is garbage G3.
// The cell has two constant-0 inputs and three garbage outputs, as the
// published cell has.
//
// The published drawing does not name the line from the first gate that
// drives the second gate's D input. Here it is the first gate's
// pass-through P = A, so the first gate's S output (AB') is garbage G1 and
// G3 = Cin*A xor Cin'*B. Sum and carry do not depend on this choice.
//
// Interface: a, b, cin in; sum, cout out; garbage = {G1, G2, G3}. Purely
// combinational, two IG gate delays from a or b to sum and cout, one from
// cin.
module ig_full_adder (
  input  logic       a,
  input  logic       b,
  input  logic       cin,
  output logic       sum,
  output logic       cout,
  output logic [2:0] garbage
);

  logic a_pass;     // first gate P = A, drives the second gate's D
  logic a_xor_b;    // first gate Q
  logic a_and_b;    // first gate R

  ig_gate u_ig_first (
    .a (a),
    .b (b),
    .c (1'b0),
    .d (1'b0),
    .p (a_pass),
    .q (a_xor_b),
    .r (a_and_b),
    .s (garbage[2])
  );

  ig_gate u_ig_second (
    .a (a_xor_b),
    .b (cin),
    .c (a_and_b),
    .d (a_pass),
    .p (garbage[1]),
    .q (sum),
    .r (cout),
    .s (garbage[0])
  );

endmodule
