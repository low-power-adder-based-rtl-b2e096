// cell_aoi21: AND-OR-Invert cell with one 2-input AND term and one single
// input, Y = ~((A & B) | C).
//
// In the low-leakage full adder this is the cell with the deep NMOS stack
// (two series transistors on the A/B branch, a series PMOS on C). The
// transistor stack only changes leakage, not logic, so this model carries the
// Boolean function only. Pin names A, B, C, Y follow the stacked-cell
// schematic; which pins form the AND pair (A, B) is taken from the standard
// meaning of the AOI21 cell name. Purely combinational, no timing.
module cell_aoi21 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic y
);

  assign y = ~((a & b) | c);

endmodule
