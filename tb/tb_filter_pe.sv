// tb_filter_pe: checks the filter processing element, r = a2*x1 + b3*y2 +
// psum_in and y = a1*x0 + b2*y1 + r, each product scaled by 2^-14 (floor) and
// all sums modulo 2^16, for unit-weight, single-tap and random cases.
module tb_filter_pe;

  import qrs_filter_pkg::*;

  data_t  x0, x1, y1, y2, psum, y, r;
  coefs_t coefs;
  int checks = 0;
  int failures = 0;

  filter_pe dut (.x0(x0), .x1(x1), .y1(y1), .y2(y2), .psum_in(psum), .coefs(coefs),
                 .y_out(y), .r_out(r));

  function automatic longint scale(input longint v, input longint c);
    longint p;
    p = v * c;
    return (p >= 0) ? p / 16384 : -((-p + 16383) / 16384);
  endfunction

  task automatic check();
    longint er, ey;
    er = scale(longint'(x1), longint'(coefs.a2)) + scale(longint'(y2), longint'(coefs.b3)) + longint'(psum);
    ey = scale(longint'(x0), longint'(coefs.a1)) + scale(longint'(y1), longint'(coefs.b2)) + er;
    checks++;
    if (r != data_t'(er) || y != data_t'(ey)) begin
      failures++;
      $display("FAIL x0=%0d x1=%0d y1=%0d y2=%0d psum=%0d: r=%0d y=%0d, expected %0d %0d",
               x0, x1, y1, y2, psum, r, y, data_t'(er), data_t'(ey));
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Each tap alone with weight 1.0
    coefs = '{a1: 16'sd16384, a2: 16'sd0, b2: 16'sd0, b3: 16'sd0};
    x0 = 16'sd11; x1 = 16'sd22; y1 = 16'sd33; y2 = 16'sd44; psum = 16'sd0; #1; check();
    coefs = '{a1: 16'sd0, a2: 16'sd16384, b2: 16'sd0, b3: 16'sd0}; #1; check();
    coefs = '{a1: 16'sd0, a2: 16'sd0, b2: 16'sd16384, b3: 16'sd0}; #1; check();
    coefs = '{a1: 16'sd0, a2: 16'sd0, b2: 16'sd0, b3: 16'sd16384}; #1; check();
    coefs = '{a1: 16'sd0, a2: 16'sd0, b2: 16'sd0, b3: 16'sd0}; psum = -16'sd7; #1; check();
    for (int i = 0; i < 3000; i++) begin
      coefs = coefs_t'({$urandom, $urandom});
      x0 = data_t'($urandom); x1 = data_t'($urandom);
      y1 = data_t'($urandom); y2 = data_t'($urandom);
      psum = data_t'($urandom);
      #1;
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
