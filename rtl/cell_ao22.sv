// cell_ao22: AND-OR cell with two 2-input AND terms, Y = (A & B) | (C & D).
//
// The low-leakage full adder forms its carry out in this cell. Its stacked
// NMOS pairs reduce leakage at the transistor level; this model carries the
// Boolean function only. Pin names A, B, C, D, Y follow the stacked-cell
// schematic; the pairing (A, B) and (C, D) is the standard meaning of the
// AO22 cell name. Purely combinational, no timing.
module cell_ao22 (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic y
);

  assign y = (a & b) | (c & d);

endmodule
