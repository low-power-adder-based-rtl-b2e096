// tb_coef_mult: checks the coefficient multiplier at its defaults (16-bit
// samples, 16-bit Q1.14 coefficients) against floor(x * coef / 2^14) kept to
// 16 bits, for hand-picked and random operands.
module tb_coef_mult;

  import qrs_filter_pkg::*;

  data_t x, y;
  coef_t coef;
  int checks = 0;
  int failures = 0;

  coef_mult dut (.x(x), .coef(coef), .y(y));

  task automatic check();
    longint p, q;
    p = longint'(x) * longint'(coef);
    // Floor division by 2^14, done with integer division
    q = (p >= 0) ? p / 16384 : -((-p + 16383) / 16384);
    checks++;
    if (y != data_t'(q)) begin
      failures++;
      $display("FAIL x=%0d coef=%0d y=%0d expected %0d", x, coef, y, data_t'(q));
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = 16'sd1000;  coef = 16'sd16384;  #1; check();   // x * 1.0
    x = -16'sd1000; coef = 16'sd8192;   #1; check();   // x * 0.5
    x = 16'sd3;     coef = -16'sd8192;  #1; check();   // rounds toward -inf
    x = 16'sd32767; coef = 16'sh7FFF;   #1; check();   // wraps
    x = -16'sd32768; coef = -16'sd32768; #1; check();
    for (int i = 0; i < 3000; i++) begin
      x = data_t'($urandom); coef = coef_t'($urandom);
      #1;
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
