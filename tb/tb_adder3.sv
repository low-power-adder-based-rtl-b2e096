// tb_adder3: checks the three-operand adder at its default width (16) with
// corner and random operands against (a + b + c) mod 2^16.
module tb_adder3;

  logic [15:0] a, b, c, sum;
  int checks = 0;
  int failures = 0;

  adder3 dut (.a(a), .b(b), .c(c), .sum(sum));

  task automatic check();
    int unsigned total;
    total = (int'(a) + int'(b) + int'(c)) & 32'hFFFF;
    checks++;
    if (sum != 16'(total)) begin
      failures++;
      $display("FAIL a=%0h b=%0h c=%0h sum=%0h expected %0h", a, b, c, sum, total);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 16'hFFFF; b = 16'hFFFF; c = 16'hFFFF; #1; check();
    a = 16'h0001; b = 16'hFFFF; c = 16'h0000; #1; check();
    a = 16'h7FFF; b = 16'h0001; c = 16'h8000; #1; check();
    a = 16'h0000; b = 16'h0000; c = 16'h1234; #1; check();
    for (int i = 0; i < 3000; i++) begin
      a = 16'($urandom); b = 16'($urandom); c = 16'($urandom);
      #1;
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
