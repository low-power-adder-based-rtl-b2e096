// qrs_filter_pkg: shared number formats of the QRS-detector digital filter.
//
// Samples and partial sums are two's-complement DATA_W-bit words. Filter
// coefficients are two's-complement COEF_W-bit words with COEF_FRAC fraction
// bits (Q1.14 by default, so a coefficient spans [-2, 2)). The four
// coefficient weights of one filter section travel together in coefs_t.
// None of these widths is fixed by the filter architecture itself; they are
// this implementation's choice (16 bits matches one of the adder widths the
// design is characterised at).
package qrs_filter_pkg;

  parameter int unsigned DATA_W    = 16;
  parameter int unsigned COEF_W    = 16;
  parameter int unsigned COEF_FRAC = 14;

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic signed [COEF_W-1:0] coef_t;

  // Weights of one filter section: a1, a2 weight the input x[n] and x[n-1];
  // b2, b3 weight the fed-back outputs y[n-1] and y[n-2].
  typedef struct packed {
    coef_t a1;
    coef_t a2;
    coef_t b2;
    coef_t b3;
  } coefs_t;

endpackage
