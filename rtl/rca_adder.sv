// rca_adder: WIDTH-bit ripple-carry adder made of the low-leakage full adder
// (fa_stacked), one cell per bit.
//
// {cout, sum} = a + b + cin, unsigned; for two's-complement operands, sum is
// the wrapped result and ovf flags signed overflow (carry into the top bit
// differs from carry out of it). The carry ripples from bit 0 to bit
// WIDTH-1, so delay grows linearly with WIDTH, as does area. The design is
// characterised at 4, 8, 16 and 32 bits; 16 is the default here because it
// is the word width of the filter. Purely combinational.
module rca_adder #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout,
  output logic             ovf
);

  logic [WIDTH:0] c;  // c[i] is the carry into bit i

  assign c[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    fa_stacked u_fa (
      .a  (a[i]),
      .b  (b[i]),
      .ci (c[i]),
      .s  (sum[i]),
      .co (c[i+1])
    );
  end

  assign cout = c[WIDTH];
  assign ovf  = c[WIDTH] ^ c[WIDTH-1];

endmodule
