// tb_quantizer: checks approximate (8 bits, default) and exact quantisation
// of random and directed coefficient blocks against the reference model and,
// for the exact unit, against real division and rounding. Also checks the
// 46:1 table, clipping, one-cycle latency and holding under back-pressure.
// A further instance sets each of its 64 multipliers on its own (0..12
// approximated bits, varying by coefficient) and is checked per coefficient.
module tb_quantizer;
  import jpeg_pkg::*;
  import jpeg_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid, out_ready;
  logic rdy_a, rdy_e, rdy_h, rdy_1, val_a, val_e, val_h, val_1;
  word_t  coef [64];
  qcoef_t q_a [64], q_e [64], q_h [64], q_1 [64], q_m [64];
  logic   rdy_m, val_m;

  function automatic lsb64_t mix64();
    for (int i = 0; i < 64; i++) mix64[i] = (i * 5 + 3) % 13;
  endfunction
  localparam lsb64_t MIX = mix64();

  quantizer dut (.clk, .rst_n, .in_valid, .in_ready (rdy_a), .coef,
                 .out_valid (val_a), .out_ready, .q (q_a));
  quantizer #(.MULT_APPROX(0)) dut_exact (.clk, .rst_n, .in_valid, .in_ready (rdy_e), .coef,
                 .out_valid (val_e), .out_ready, .q (q_e));
  quantizer #(.MULT_APPROX(0), .QTAB(Q_HIGH)) dut_high (.clk, .rst_n, .in_valid, .in_ready (rdy_h),
                 .coef, .out_valid (val_h), .out_ready, .q (q_h));

  quantizer #(.MULT_APPROX(0), .QTAB(Q_ONES)) dut_one (.clk, .rst_n, .in_valid, .in_ready (rdy_1),
                 .coef, .out_valid (val_1), .out_ready, .q (q_1));
  quantizer #(.MULT_LSB(MIX)) dut_mix (.clk, .rst_n, .in_valid, .in_ready (rdy_m),
                 .coef, .out_valid (val_m), .out_ready, .q (q_m));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int qs [64], qh [64];
    blk_t dy, ea, ee, eh;
    for (int k = 0; k < 64; k++) begin
      qs[k] = int'(Q_STD[k]);
      qh[k] = int'(Q_HIGH[k]);
    end
    in_valid = 0; out_ready = 1;
    for (int k = 0; k < 64; k++) coef[k] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      for (int k = 0; k < 64; k++) begin
        int mag;
        mag = (t == 0) ? 2000 * 524288 : (t == 1) ? -3 * 524288 : int'($urandom % (1200 * 524288));
        dy[k] = (t > 1 && $urandom % 2) ? -mag : mag;
        if (t == 2) dy[k] = qs[k] * 524288 / 2;       // exactly half a step: rounds up to 1
        coef[k] = dy[k];
      end
      ea = ref_quant(dy, qs, 8);
      ee = ref_quant(dy, qs, 0);
      eh = ref_quant(dy, qh, 0);
      @(negedge clk);
      in_valid = 1;
      @(posedge clk);
      @(negedge clk);
      in_valid = 0;
      check(val_a && val_e && val_h, "one-cycle latency");
      for (int k = 0; k < 64; k++) begin
        real r;
        check(q_a[k] == ea[k], "approximate vs model");
        check(q_e[k] == ee[k], "exact vs model");
        check(q_h[k] == eh[k], "46:1 table vs model");
        begin
          blk_t em;
          em = ref_quant(dy, qs, int'(MIX[k]));
          check(val_m && q_m[k] == em[k], "per-unit multiplier vs model");
        end
        r = real'(dy[k]) / 524288.0 / qs[k];
        if (r > 1023.0) r = 1023.0;
        if (r < -1023.0) r = -1023.0;
        check(q_e[k] - r <= 0.51 && r - q_e[k] <= 0.51, "exact vs real division");
        if (t == 0) check(q_1[k] == 1023, "clipped high");
        if (t == 1) check(q_1[k] == -3, "unit table passes -3");
        if (t == 2 && (qs[k] & (qs[k] - 1)) == 0) check(q_e[k] == 1, "half rounds up (exact reciprocal)");
      end
    end
    // back-pressure
    @(negedge clk);
    out_ready = 0;
    for (int k = 0; k < 64; k++) coef[k] = 32'sd100 * 524288;
    in_valid = 1;
    @(posedge clk); @(negedge clk);
    for (int k = 0; k < 64; k++) coef[k] = 0;
    check(!rdy_a, "refuses while full");
    @(posedge clk); @(negedge clk);
    check(val_a && q_e[0] == 6, "holds while full (100/16 rounds to 6)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
