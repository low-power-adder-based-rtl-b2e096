// tb_rca_adder: checks the ripple-carry adder at the default width (16) and at
// 4, 8 and 32 bits. The 4-bit adder is tested exhaustively (all a, b, cin);
// the wider ones with corner values (full carry ripple, signed overflow in
// both directions) and random operands. Expected sum, carry and overflow are
// computed with 64-bit integer arithmetic.
module tb_rca_adder;

  int checks = 0;
  int failures = 0;

  // Default-width instance
  logic [15:0] a16, b16, s16;
  logic        ci16, co16, ov16;
  rca_adder dut16 (.a(a16), .b(b16), .cin(ci16), .sum(s16), .cout(co16), .ovf(ov16));

  logic [3:0]  a4, b4, s4;
  logic        ci4, co4, ov4;
  rca_adder #(.WIDTH(4)) dut4 (.a(a4), .b(b4), .cin(ci4), .sum(s4), .cout(co4), .ovf(ov4));

  logic [7:0]  a8, b8, s8;
  logic        ci8, co8, ov8;
  rca_adder #(.WIDTH(8)) dut8 (.a(a8), .b(b8), .cin(ci8), .sum(s8), .cout(co8), .ovf(ov8));

  logic [31:0] a32, b32, s32;
  logic        ci32, co32, ov32;
  rca_adder #(.WIDTH(32)) dut32 (.a(a32), .b(b32), .cin(ci32), .sum(s32), .cout(co32), .ovf(ov32));

  // Compare one result against integer arithmetic
  task automatic check(input int w, input longint unsigned a, input longint unsigned b,
                       input bit ci, input longint unsigned sum, input bit co, input bit ov);
    longint unsigned total, mask, exp_sum;
    longint          sa, sb, ssum;
    bit              exp_co, exp_ov;
    mask    = (64'd1 << w) - 1;
    total   = a + b + ci;
    exp_sum = total & mask;
    exp_co  = ((total >> w) & 1) != 0;
    // Signed view of operands and result
    sa   = a[w-1] ? longint'(a) - longint'(64'd1 << w) : longint'(a);
    sb   = b[w-1] ? longint'(b) - longint'(64'd1 << w) : longint'(b);
    ssum = sa + sb + longint'(ci);
    exp_ov = (ssum >= (64'sd1 <<< (w-1))) || (ssum < -(64'sd1 <<< (w-1)));
    checks++;
    if (sum != exp_sum || co != exp_co || ov != exp_ov) begin
      failures++;
      $display("FAIL w=%0d a=%0h b=%0h ci=%0b: sum=%0h co=%0b ov=%0b, expected %0h %0b %0b",
               w, a, b, ci, sum, co, ov, exp_sum, exp_co, exp_ov);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // 4 bits: exhaustive
    for (int v = 0; v < 512; v++) begin
      {ci4, a4, b4} = 9'(v);
      #1;
      check(4, 64'(a4), 64'(b4), ci4, 64'(s4), co4, ov4);
    end
    // Corner cases for the wide adders
    a16 = 16'hFFFF; b16 = 16'h0000; ci16 = 1'b1; #1; check(16, 64'(a16), 64'(b16), ci16, 64'(s16), co16, ov16);
    a16 = 16'h7FFF; b16 = 16'h0001; ci16 = 1'b0; #1; check(16, 64'(a16), 64'(b16), ci16, 64'(s16), co16, ov16);
    a16 = 16'h8000; b16 = 16'hFFFF; ci16 = 1'b0; #1; check(16, 64'(a16), 64'(b16), ci16, 64'(s16), co16, ov16);
    a32 = 32'hFFFF_FFFF; b32 = 32'h0; ci32 = 1'b1; #1; check(32, 64'(a32), 64'(b32), ci32, 64'(s32), co32, ov32);
    a32 = 32'h7FFF_FFFF; b32 = 32'h7FFF_FFFF; ci32 = 1'b1; #1; check(32, 64'(a32), 64'(b32), ci32, 64'(s32), co32, ov32);
    a8 = 8'h80; b8 = 8'h80; ci8 = 1'b0; #1; check(8, 64'(a8), 64'(b8), ci8, 64'(s8), co8, ov8);
    // Random operands
    for (int i = 0; i < 2000; i++) begin
      a8  = 8'($urandom);  b8  = 8'($urandom);  ci8  = 1'($urandom);
      a16 = 16'($urandom); b16 = 16'($urandom); ci16 = 1'($urandom);
      a32 = $urandom;      b32 = $urandom;      ci32 = 1'($urandom);
      #1;
      check(8, 64'(a8), 64'(b8), ci8, 64'(s8), co8, ov8);
      check(16, 64'(a16), 64'(b16), ci16, 64'(s16), co16, ov16);
      check(32, 64'(a32), 64'(b32), ci32, 64'(s32), co32, ov32);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
