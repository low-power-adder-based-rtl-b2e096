// tb_delay_reg: checks the Z^-1 register: it is cleared by reset, takes d on
// an enabled clock edge (one cycle later q shows it), and holds while en is
// low.
module tb_delay_reg;

  logic        clk = 1'b0;
  logic        rst_n, en;
  logic [15:0] d, q;
  logic [15:0] model;
  int checks = 0;
  int failures = 0;
  int holds = 0;

  delay_reg dut (.clk(clk), .rst_n(rst_n), .en(en), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; en = 1'b1; d = 16'h1234;
    @(posedge clk); #1;
    checks++;
    if (q != 16'h0) begin failures++; $display("FAIL reset: q=%0h", q); end
    rst_n = 1'b1;
    model = 16'h0;
    for (int i = 0; i < 500; i++) begin
      en = 1'($urandom);
      d  = 16'($urandom);
      @(posedge clk);
      if (en) model = d; else holds++;
      #1;
      checks++;
      if (q != model) begin
        failures++;
        $display("FAIL cycle %0d: q=%0h expected %0h", i, q, model);
      end
    end
    checks++;
    if (holds == 0) begin failures++; $display("FAIL: hold never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
