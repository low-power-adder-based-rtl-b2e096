// fa_stacked: the low-leakage 1-bit full adder built from stacked
// AND-OR-Invert cells.
//
// Instead of XOR/AND/OR cells, the adder uses cells with taller transistor
// stacks:
//   n_ab = ~(a | b)                          NOR of the operands
//   p    = AOI21(a, b, n_ab) = ~((a&b)|n_ab) = a ^ b   (propagate)
//   n_pc = ~(p | ci)
//   s    = ~((p & ci) | n_pc)                = p ^ ci
//   co   = AO22(p, ci, a, b) = (p & ci) | (a & b)
// The structure (an AOI21 making the propagate term, an AO22 making the carry)
// and the sum expression follow the design; the sum stage is written as a
// Boolean expression because no cell name is given for it. Purely
// combinational: s and co settle one cell chain after a, b, ci.
module fa_stacked (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);

  logic n_ab;   // ~(a | b)
  logic p;      // a ^ b, from the AOI21 cell
  logic n_pc;   // ~(p | ci)

  assign n_ab = ~(a | b);

  cell_aoi21 u_aoi21 (
    .a (a),
    .b (b),
    .c (n_ab),
    .y (p)
  );

  assign n_pc = ~(p | ci);
  assign s    = ~((p & ci) | n_pc);

  cell_ao22 u_ao22 (
    .a (p),
    .b (ci),
    .c (a),
    .d (b),
    .y (co)
  );

endmodule
