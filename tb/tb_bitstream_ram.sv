// tb_bitstream_ram: writes words through port A while reading through
// port B and checks every read against a model, including the one-cycle
// read latency and read-during-write of the same address (old word).
module tb_bitstream_ram;
  localparam int DEPTH = 512;

  int checks = 0, failures = 0;
  logic clk = 0;
  logic wr_en;
  logic [8:0] wr_addr, rd_addr;
  logic [31:0] wr_data, rd_q;
  logic [31:0] model [DEPTH];

  bitstream_ram #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; wr_addr = 0; wr_data = 0; rd_addr = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 9'(i); wr_data = $urandom;
      model[i] = wr_data;
    end
    for (int i = 0; i < 2000; i++) begin
      logic [31:0] expq;
      @(negedge clk);
      wr_en   = ($urandom % 2);
      wr_addr = 9'($urandom);
      wr_data = $urandom;
      rd_addr = (i % 5 == 0) ? wr_addr : 9'($urandom);
      expq    = model[rd_addr];
      @(posedge clk); #1;
      check(rd_q == expq, "port B read");
      if (wr_en) model[wr_addr] = wr_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
