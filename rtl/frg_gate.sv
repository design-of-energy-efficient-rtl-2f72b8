// frg_gate: 3-input, 3-output Fredkin gate (FRG), a parity-preserving
// reversible gate.
//
// A is a control that passes straight through to P. When A is 0, B goes to
// Q and C to R; when A is 1, the two are swapped:
//   P = A,  Q = A'B xor AC,  R = A'C xor AB.
// The gate is a bijection on its 8 input patterns and the xor of its
// outputs always equals the xor of its inputs (it preserves parity), which
// is what makes a network of such gates able to reveal a single flipped
// bit. The equations and truth table are the published ones for this gate.
//
// Interface: single-bit a, b, c in; p, q, r out. Purely combinational, no
// clock; outputs follow the inputs after one gate delay.
module frg_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  always_comb begin
    p = a;
    q = (~a & b) ^ (a & c);
    r = (~a & c) ^ (a & b);
  end

endmodule
