// ig_half_adder: fault tolerant half adder built from a single IG gate.
//
// The IG gate's inputs C and D are tied to constant 0. Its outputs then
// are P = A, Q = A xor B (the sum), R = AB (the carry) and S = AB'. P and S
// are not needed by the addition; they are the gate's two garbage outputs,
// G1 and G2, and are brought out so that the parity of the cell (A xor B
// equals the xor of all four outputs) can be checked outside.
//
// Interface: a, b in; sum, carry out; garbage[1] = G1 = A,
// garbage[0] = G2 = AB'. The bit order of the garbage port is this design's
// choice. Purely combinational, one IG gate delay.
module ig_half_adder (
  input  logic       a,
  input  logic       b,
  output logic       sum,
  output logic       carry,
  output logic [1:0] garbage
);

  ig_gate u_ig (
    .a (a),
    .b (b),
    .c (1'b0),
    .d (1'b0),
    .p (garbage[1]),
    .q (sum),
    .r (carry),
    .s (garbage[0])
  );

endmodule
