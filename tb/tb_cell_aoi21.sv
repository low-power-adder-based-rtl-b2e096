// tb_cell_aoi21: exhaustive check of the AOI21 cell against ~((A&B)|C) over
// all eight input combinations.
module tb_cell_aoi21;

  logic a, b, c, y;
  int   checks = 0;
  int   failures = 0;

  cell_aoi21 dut (.a(a), .b(b), .c(c), .y(y));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic expect_y;
      {a, b, c} = 3'(v);
      #1;
      // Truth table: output is 0 when C is 1 or both A and B are 1
      expect_y = !((v == 1) || (v == 3) || (v == 5) || (v == 6) || (v == 7));
      checks++;
      if (y !== expect_y) begin
        failures++;
        $display("FAIL a=%0b b=%0b c=%0b y=%0b expected %0b", a, b, c, y, expect_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
