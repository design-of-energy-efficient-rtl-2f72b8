// ig_gate: 4-input, 4-output IG gate, a parity-preserving reversible gate.
//
//   P = A
//   Q = A xor B
//   R = AB xor C
//   S = BD xor B'(A xor D)
// With C = D = 0 the gate is a half adder (Q = sum, R = carry); two of them
// make a full adder (see ig_half_adder and ig_full_adder). The mapping is a
// permutation of the 16 input patterns and the xor of the four outputs
// equals the xor of the four inputs. The equations and truth table are the
// published ones for this gate.
//
// Interface: single-bit a, b, c, d in; p, q, r, s out. Purely
// combinational, no clock.
module ig_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);

  always_comb begin
    p = a;
    q = a ^ b;
    r = (a & b) ^ c;
    s = (b & d) ^ (~b & (a ^ d));
  end

endmodule
