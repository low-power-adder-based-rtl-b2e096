// adder3: three-operand WIDTH-bit adder of the filter section, built as two
// chained ripple-carry adders (rca_adder) of low-leakage full adders.
//
// sum = a + b + c modulo 2^WIDTH. For two's-complement operands this is the
// wrapped sum; there is no saturation. Each adder of the filter section has
// three incoming operands (two products and a partial sum), so it is built
// from two-input ripple adders; the chaining of two of them is this design's
// choice. Purely combinational: the critical path runs through both carry
// chains.
module adder3 #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] c,
  output logic [WIDTH-1:0] sum
);

  logic [WIDTH-1:0] ab;
  logic             unused_cout0, unused_cout1, unused_ovf0, unused_ovf1;

  rca_adder #(.WIDTH(WIDTH)) u_add_ab (
    .a    (a),
    .b    (b),
    .cin  (1'b0),
    .sum  (ab),
    .cout (unused_cout0),
    .ovf  (unused_ovf0)
  );

  rca_adder #(.WIDTH(WIDTH)) u_add_abc (
    .a    (ab),
    .b    (c),
    .cin  (1'b0),
    .sum  (sum),
    .cout (unused_cout1),
    .ovf  (unused_ovf1)
  );

endmodule
