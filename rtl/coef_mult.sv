// coef_mult: coefficient multiplier (the "X" boxes) of the filter section.
//
// y = (x * coef) >>> COEF_FRAC, truncated to DATA_W bits. x is a
// two's-complement sample, coef a two's-complement fixed-point weight with
// COEF_FRAC fraction bits, so the full product has COEF_FRAC fraction bits and
// the arithmetic right shift returns it to the sample's scale (rounding toward
// minus infinity). Bits above DATA_W are dropped, so a product that does not
// fit wraps. The multiplier's structure is not specified by the design; it is
// written as a plain signed multiply here. Purely combinational.
module coef_mult #(
  parameter int unsigned DATA_W    = qrs_filter_pkg::DATA_W,
  parameter int unsigned COEF_W    = qrs_filter_pkg::COEF_W,
  parameter int unsigned COEF_FRAC = qrs_filter_pkg::COEF_FRAC
) (
  input  logic signed [DATA_W-1:0] x,
  input  logic signed [COEF_W-1:0] coef,
  output logic signed [DATA_W-1:0] y
);

  localparam int unsigned PROD_W = DATA_W + COEF_W;

  logic signed [PROD_W-1:0] prod;

  // Arithmetic shift right by COEF_FRAC, then keep DATA_W bits: the same as
  // taking the DATA_W bits starting at bit COEF_FRAC of the full product.
  assign prod = PROD_W'(x) * PROD_W'(coef);
  assign y    = prod[COEF_FRAC +: DATA_W];

endmodule
