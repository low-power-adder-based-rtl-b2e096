// tb_fa_stacked: exhaustive check of the low-leakage full adder. For every
// input combination the outputs must equal the arithmetic sum a+b+ci, and
// also the conventional XOR/AND/OR full adder s = a^b^ci,
// co = ((a^b)&ci) | (a&b).
module tb_fa_stacked;

  logic a, b, ci, s, co;
  int   checks = 0;
  int   failures = 0;

  fa_stacked dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int total;
      {a, b, ci} = 3'(v);
      #1;
      total = int'(a) + int'(b) + int'(ci);
      checks++;
      if ({co, s} !== 2'(total)) begin
        failures++;
        $display("FAIL a=%0b b=%0b ci=%0b -> co=%0b s=%0b, expected sum %0d", a, b, ci, co, s, total);
      end
      checks++;
      if (s !== (a ^ b ^ ci) || co !== (((a ^ b) & ci) | (a & b))) begin
        failures++;
        $display("FAIL a=%0b b=%0b ci=%0b differs from the XOR/AND/OR adder", a, b, ci);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
