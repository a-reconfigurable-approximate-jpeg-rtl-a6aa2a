// tb_approx_mult: checks the truncating multiplier against integer floor
// division of the operands, for even, odd and zero approximation counts.
module tb_approx_mult;
  import jpeg_ref_pkg::*;

  int checks = 0, failures = 0;
  logic signed [31:0] a, b;
  logic signed [7:0]  b8;
  logic signed [63:0] p0, p5, p8;
  logic signed [39:0] q8;

  approx_mult #(.APPROX_LSB(0)) u0 (.a, .b, .p(p0));
  approx_mult #(.APPROX_LSB(5)) u5 (.a, .b, .p(p5));
  approx_mult #(.APPROX_LSB(8)) u8 (.a, .b, .p(p8));
  approx_mult #(.A_W(32), .B_W(8), .APPROX_LSB(8)) u8n (.a, .b(b8), .p(q8));

  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s a=%0d b=%0d got=%0d exp=%0d", what, a, b, got, exp);
    end
  endtask

  task automatic apply(input int x, input int y);
    a = x; b = y; b8 = 8'(y);
    #1;
    check(p0, longint'(x) * longint'(y), "exact");
    check(p5, ref_mul(x, y, 5), "lsb5");
    check(p8, ref_mul(x, y, 8), "lsb8");
    check(q8, ref_mul(x, longint'(b8), 8), "32x8 lsb8");
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(1004, -128);
    check(p8, -126976, "directed 1004*-128 = 62*-8*256");
    apply(-1, -1);
    check(p8, 256, "directed -1*-1 truncates to -1*-1*256");
    apply(15, 15);
    check(p8, 0, "directed small operands vanish");
    for (int i = 0; i < 3000; i++) apply(int'($urandom) >>> ($urandom % 20), int'($urandom) >>> ($urandom % 20));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
