// tb_rgb2ycbcr: checks the colour transform against the real-valued JFIF
// equations (within one code), against the fixed-point model (exactly), and
// the hold behaviour of its output register under back-pressure.
module tb_rgb2ycbcr;
  import jpeg_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [23:0] rgb;
  logic [7:0] y, cb, cr;

  rgb2ycbcr dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s rgb=%h y=%0d cb=%0d cr=%0d", what, rgb, y, cb, cr);
    end
  endtask

  function automatic int rnd(input real v);
    int i;
    i = $rtoi(v + 0.5);
    return (i < 0) ? 0 : (i > 255) ? 255 : i;
  endfunction

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; out_ready = 1; rgb = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      int r, g, b;
      real ry, rcb, rcr;
      @(negedge clk);
      rgb = (i == 0) ? 24'hFFFFFF : (i == 1) ? 24'h000000 : 24'($urandom);
      in_valid = 1;
      r = rgb[23:16]; g = rgb[15:8]; b = rgb[7:0];
      @(posedge clk);
      #1;
      in_valid = 0;
      check(out_valid, "valid after one cycle");
      ry  =  0.299 * r + 0.587 * g + 0.114 * b;
      rcb = -0.1687 * r - 0.3313 * g + 0.5 * b + 128.0;
      rcr =  0.5 * r - 0.4187 * g - 0.0813 * b + 128.0;
      check(y  == ref_csc(int'(rgb), 0), "Y model");
      check(cb == ref_csc(int'(rgb), 1), "Cb model");
      check(cr == ref_csc(int'(rgb), 2), "Cr model");
      check((y - rnd(ry)) * (y - rnd(ry)) <= 1, "Y equation");
      check((cb - rnd(rcb)) * (cb - rnd(rcb)) <= 1, "Cb equation");
      check((cr - rnd(rcr)) * (cr - rnd(rcr)) <= 1, "Cr equation");
      if (i == 0) check(y == 255 && cb == 128 && cr == 128, "white");
      if (i == 1) check(y == 0 && cb == 128 && cr == 128, "black");
    end
    // back-pressure: output held, input refused
    @(negedge clk);
    out_ready = 0; rgb = 24'h123456; in_valid = 1;
    @(posedge clk); #1;
    begin
      logic [7:0] hy;
      hy = y;
      @(negedge clk); rgb = 24'hABCDEF;
      check(!in_ready, "refuses while full");
      @(posedge clk); #1;
      check(out_valid && y == hy, "holds while full");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
