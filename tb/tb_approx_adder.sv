// tb_approx_adder: checks the approximate adder against a segment-wise
// reference for several approximation counts, including directed cases
// where a carry prediction is wrong and the exact adder would differ.
module tb_approx_adder;
  import jpeg_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [31:0] a, b;
  logic [31:0] s0, s6, s8, s16;

  approx_adder #(.APPROX_LSB(0))  u0  (.a, .b, .sum(s0));
  approx_adder #(.APPROX_LSB(6))  u6  (.a, .b, .sum(s6));
  approx_adder #(.APPROX_LSB(8))  u8  (.a, .b, .sum(s8));
  approx_adder #(.APPROX_LSB(16)) u16 (.a, .b, .sum(s16));

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s a=%h b=%h got=%h exp=%h", what, a, b, got, exp);
    end
  endtask

  task automatic apply(input logic [31:0] x, input logic [31:0] y);
    a = x; b = y;
    #1;
    check(s0,  x + y,                               "exact");
    check(s6,  ref_add(int'(x), int'(y), 6),         "lsb6");
    check(s8,  ref_add(int'(x), int'(y), 8),         "lsb8");
    check(s16, ref_add(int'(x), int'(y), 16),        "lsb16");
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // carry generated in bits 0..3, propagated through 4..7: prediction at 8 misses it
    apply(32'h0000_00FF, 32'h0000_0001);
    check(s8, 32'h0000_0000, "lsb8 directed miss");
    check(s0, 32'h0000_0100, "exact directed");
    // window generates its own carry: predicted correctly
    apply(32'h0000_00F0, 32'h0000_0010);
    check(s8, 32'h0000_0100, "lsb8 directed hit");
    apply(32'hFFFF_FFFF, 32'h0000_0001);
    apply(32'h7FFF_FFFF, 32'h0000_0001);
    for (int i = 0; i < 3000; i++) apply($urandom, $urandom);
    for (int i = 0; i < 1000; i++) apply($urandom & 32'h0000_FFFF, $urandom & 32'h0000_FFFF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
