// rev_mult4x4: 4x4 unsigned multiplier built only from parity-preserving
// reversible gates (Fredkin and IG gates).
//
// Two stages, as in the published design:
//   1. ppg_frg_array: 16 Fredkin gates wired as AND gates form all partial
//      products x_i*y_j in parallel.
//   2. rftpa: 4 IG half adders and 8 two-IG full adders add them into
//      the product P7..P0.
// Every gate preserves parity (xor of inputs = xor of outputs). Each x_i
// and y_j drives four gates and every other gate output is used once, so
// the xor of all 8 product bits and all 64 garbage bits is always 0; a
// single flipped output bit breaks that identity. That is the fault
// detection the gate choice aims at. No checker is built into the
// hardware, the garbage ports let one be added outside; the identity is
// stated below as a simulation assertion.
//
// Interface: x, y (4 bits) in; p = x*y (8 bits) out; ppg_garbage (32 bits)
// and add_garbage (32 bits, rev_mult_pkg::rftpa_garbage_t) out. Bringing
// the garbage out as ports is this design's choice.
// Timing: purely combinational, no clock, no reset, no registers; the
// product is valid one combinational delay (one FRG plus up to eleven IG
// gates) after the operands change.
module rev_mult4x4
  import rev_mult_pkg::*;
(
  input  operand_t       x,
  input  operand_t       y,
  output product_t       p,
  output ppg_garbage_t   ppg_garbage,
  output rftpa_garbage_t add_garbage
);

  pp_array_t pp;

  ppg_frg_array u_ppg (
    .x       (x),
    .y       (y),
    .pp      (pp),
    .garbage (ppg_garbage)
  );

  rftpa u_rftpa (
    .pp      (pp),
    .p       (p),
    .garbage (add_garbage)
  );

  // Parity identity of the whole reversible network (simulation only).
  always_comb begin
    assert (^{p, ppg_garbage, add_garbage} == 1'b0)
      else $error("parity of product and garbage outputs is not even");
  end

endmodule
