// tb_cell_ao22: exhaustive check of the AO22 cell against (A&B)|(C&D) over
// all sixteen input combinations.
module tb_cell_ao22;

  logic a, b, c, d, y;
  int   checks = 0;
  int   failures = 0;

  cell_ao22 dut (.a(a), .b(b), .c(c), .d(d), .y(y));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic expect_y;
      {a, b, c, d} = 4'(v);
      #1;
      // 1 exactly when the top two bits or the bottom two bits are both set
      expect_y = ((v >> 2) == 3) || ((v & 3) == 3);
      checks++;
      if (y !== expect_y) begin
        failures++;
        $display("FAIL abcd=%04b y=%0b expected %0b", v[3:0], y, expect_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
