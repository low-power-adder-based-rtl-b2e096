// delay_reg: one Z^-1 delay element of the filter, a WIDTH-bit register.
//
// On a rising clk edge with en high, q takes d; with en low, q holds, so the
// filter advances one sample per en pulse rather than per clock. rst_n is an
// asynchronous active-low reset that clears q to zero, which empties the
// filter's history. The enable and the reset are this design's choice; the
// filter architecture only calls for a one-sample delay.
module delay_reg #(
  parameter int unsigned WIDTH = qrs_filter_pkg::DATA_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0;
    end else if (en) begin
      q <= d;
    end
  end

endmodule
