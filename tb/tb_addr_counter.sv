// tb_addr_counter: runs the address counter against a synchronous memory
// model whose word equals its address, with random stalls, and checks that
// every address 0..NUM-1 is delivered exactly once and in order, that last
// marks the final one and valid falls after it, and that with no stalls
// one address is delivered per clock.
module tb_addr_counter;
  localparam int NUM = 100;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic start, advance, valid, last;
  logic [6:0] rd_addr;
  logic [6:0] q;
  int expect_a = 0;
  int cycles = 0;
  bit stall_on = 1;

  addr_counter #(.NUM(NUM)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) q <= rd_addr;   // memory whose content is the address

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s q=%0d exp=%0d", what, q, expect_a);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) advance = stall_on ? ($urandom % 3 != 0) : 1'b1;

  always @(posedge clk) begin
    if (rst_n && valid) begin
      cycles++;
      if (advance) begin
        check(q == 7'(expect_a), "address in order");
        check(last == (expect_a == NUM - 1), "last flag");
        expect_a++;
      end
    end
  end

  initial begin
    start = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      @(negedge clk);
      stall_on = (pass == 0);
      start = 1;
      expect_a = 0;
      cycles = 0;
      @(negedge clk);
      start = 0;
      while (expect_a < NUM) @(negedge clk);
      @(negedge clk);
      check(!valid, "valid falls after last");
      if (pass == 1) check(cycles == NUM, "one address per clock without stalls");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
