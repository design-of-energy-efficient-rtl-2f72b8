// rev_mult_pkg: types shared by the 4x4 parity-preserving reversible-logic
// multiplier (rev_mult4x4) and its two stages.
//
// The multiplier works on 4-bit unsigned operands and gives an 8-bit
// product. Every reversible gate in it also has "garbage" outputs, values a
// reversible gate must produce so that its input can be recovered from its
// output, but which the multiplication does not need. They are kept as
// outputs so that the parity of the whole circuit stays observable.
//
// Counts fixed by the design: 16 Fredkin gates in the partial-product
// stage, each with two garbage outputs (32 bits), and in the adder stage 4
// IG half adders with two garbage outputs each plus 8 two-IG full adders
// with three garbage outputs each (8 + 24 = 32 bits). The way the adder
// stage's garbage is packed below is this design's own choice.
package rev_mult_pkg;

  localparam int unsigned OP_W   = 4;          // operand width
  localparam int unsigned PROD_W = 2 * OP_W;   // product width

  localparam int unsigned N_HA = 4;            // IG half adders in the adder stage
  localparam int unsigned N_FA = 8;            // two-IG full adders in the adder stage

  typedef logic [OP_W-1:0]   operand_t;
  typedef logic [PROD_W-1:0] product_t;

  // pp[i][j] = x_i AND y_j, weight 2^(i+j)
  typedef logic [OP_W-1:0][OP_W-1:0] pp_array_t;

  // g31..g0 of the partial-product stage; the Fredkin gate forming x_i*y_j
  // drives bits 8i+2j+1 (its P output) and 8i+2j (its Q output).
  typedef logic [2*OP_W*OP_W-1:0] ppg_garbage_t;

  // Garbage of the adder stage.
  //   ha[k] = {G1, G2} of half adder k, k = 0..3
  //   fa[k] = {G1, G2, G3} of full adder k, k = 0..7
  // Cell numbering is given in rftpa.sv.
  typedef struct packed {
    logic [N_FA-1:0][2:0] fa;
    logic [N_HA-1:0][1:0] ha;
  } rftpa_garbage_t;

endpackage
