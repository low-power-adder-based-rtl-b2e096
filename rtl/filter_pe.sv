// filter_pe: processing element of the QRS-detector filter (the part that
// holds the multipliers and adders, without the delay elements).
//
// Four coefficient multipliers and two three-input adders:
//   r     = a2*x1 + b3*y2 + psum_in          (right adder)
//   y_out = a1*x0 + b2*y1 + r                (left adder)
// where x0 = x[n], x1 = x[n-1] come from the input delay line, y1 = y[n-1],
// y2 = y[n-2] from the output delay line, and psum_in is the delayed partial
// sum of a following section (zero for a single section). The tap
// arrangement follows the filter diagram; the adders are the low-leakage
// ripple adders. Arithmetic is DATA_W-bit two's complement and wraps.
// Purely combinational.
module filter_pe
  import qrs_filter_pkg::*;
(
  input  data_t  x0,
  input  data_t  x1,
  input  data_t  y1,
  input  data_t  y2,
  input  data_t  psum_in,
  input  coefs_t coefs,
  output data_t  y_out,
  output data_t  r_out
);

  data_t p_a1, p_a2, p_b2, p_b3;

  coef_mult u_mul_a1 (.x(x0), .coef(coefs.a1), .y(p_a1));
  coef_mult u_mul_a2 (.x(x1), .coef(coefs.a2), .y(p_a2));
  coef_mult u_mul_b2 (.x(y1), .coef(coefs.b2), .y(p_b2));
  coef_mult u_mul_b3 (.x(y2), .coef(coefs.b3), .y(p_b3));

  adder3 #(.WIDTH(DATA_W)) u_add_right (
    .a   (p_a2),
    .b   (p_b3),
    .c   (psum_in),
    .sum (r_out)
  );

  adder3 #(.WIDTH(DATA_W)) u_add_left (
    .a   (p_a1),
    .b   (p_b2),
    .c   (r_out),
    .sum (y_out)
  );

endmodule
