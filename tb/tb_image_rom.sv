// tb_image_rom: loads a small image memory through the load port and reads
// it back, checking the one-cycle read latency and that reads during
// loading return the previously stored word.
module tb_image_rom;
  localparam int DEPTH = 256;

  int checks = 0, failures = 0;
  logic clk = 0;
  logic load_en;
  logic [7:0] load_addr, rd_addr;
  logic [23:0] load_data, q;
  logic [23:0] model [DEPTH];

  image_rom #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load_en = 0; load_addr = 0; load_data = 0; rd_addr = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      load_en = 1; load_addr = 8'(i); load_data = 24'($urandom);
      model[i] = load_data;
    end
    @(negedge clk);
    load_en = 0;
    for (int i = 0; i < 600; i++) begin
      int a;
      a = $urandom % DEPTH;
      @(negedge clk);
      rd_addr = 8'(a);
      @(posedge clk); #1;
      check(q == model[a], "read after load");
    end
    // write and read the same address: old data, then new
    @(negedge clk);
    rd_addr = 8'd7; load_addr = 8'd7; load_data = 24'hC0FFEE; load_en = 1;
    @(posedge clk); #1;
    check(q == model[7], "read-during-write returns old word");
    @(negedge clk); load_en = 0;
    @(posedge clk); #1;
    check(q == 24'hC0FFEE, "new word after write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
