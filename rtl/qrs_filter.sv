// qrs_filter: one section of the digital filter of a QRS (ECG heartbeat)
// detector, with low-leakage ripple adders as its adders.
//
// Per accepted sample x[n] it computes
//   y[n] = a1*x[n] + a2*x[n-1] + b2*y[n-1] + b3*y[n-2] + c[n-1]
// with a1, a2, b2, b3 two's-complement fixed-point weights (COEF_FRAC fraction
// bits) and c the partial sum offered by a following section through
// cascade_in (tie it to zero for a lone second-order section). Each product is
// scaled back to DATA_W bits and all sums wrap modulo 2^DATA_W.
//
// Structure: the processing element (filter_pe) holds the four multipliers and
// two three-input adders; around it sit the Z^-1 delay elements of the input
// line (x[n-1]), the output line (y[n-2]) and the cascade input (c[n-1]). The
// output itself is registered (y_out holds y[n]), which is what lets y[n-1]
// feed back without a combinational loop; that register, the sample enable and
// the reset are this design's choices.
//
// Interface and timing: present x_in with sample_en high for one clk cycle;
// on that rising edge the section takes the sample, and from the next cycle
// y_out holds y[n] and out_valid is high for one cycle (latency 1 clk). With
// sample_en low every register holds. x_chain_out (x[n-1]) and y_chain_out
// (y[n-1] once y[n] is out) continue the delay lines toward a following
// section. rst_n (asynchronous, active low) clears all history.
module qrs_filter
  import qrs_filter_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   sample_en,
  input  data_t  x_in,
  input  coefs_t coefs,
  input  data_t  cascade_in,
  output data_t  y_out,
  output logic   out_valid,
  output data_t  x_chain_out,
  output data_t  y_chain_out
);

  data_t x_d1;     // x[n-1]
  data_t y_d1;     // y[n-2] while y_out is y[n-1]
  data_t c_d1;     // c[n-1]
  data_t y_next;   // y[n], combinational
  data_t r_unused;

  // Input delay line
  delay_reg #(.WIDTH(DATA_W)) u_zx (
    .clk (clk), .rst_n (rst_n), .en (sample_en), .d (x_in), .q (x_d1)
  );

  // Output register: holds y[n-1] during the computation of y[n]
  delay_reg #(.WIDTH(DATA_W)) u_zy0 (
    .clk (clk), .rst_n (rst_n), .en (sample_en), .d (y_next), .q (y_out)
  );

  // Output delay line
  delay_reg #(.WIDTH(DATA_W)) u_zy1 (
    .clk (clk), .rst_n (rst_n), .en (sample_en), .d (y_out), .q (y_d1)
  );

  // Delay on the partial sum arriving from a following section
  delay_reg #(.WIDTH(DATA_W)) u_zc (
    .clk (clk), .rst_n (rst_n), .en (sample_en), .d (cascade_in), .q (c_d1)
  );

  filter_pe u_pe (
    .x0      (x_in),
    .x1      (x_d1),
    .y1      (y_out),
    .y2      (y_d1),
    .psum_in (c_d1),
    .coefs   (coefs),
    .y_out   (y_next),
    .r_out   (r_unused)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
    end else begin
      out_valid <= sample_en;
    end
  end

  assign x_chain_out = x_d1;
  assign y_chain_out = y_d1;

endmodule
