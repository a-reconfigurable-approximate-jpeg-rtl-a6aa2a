// tb_dct_2d: streams random 8x8 blocks through an approximate DCT (8
// approximated bits, the default) and an exact one (0 bits) with random
// output back-pressure. Every result is compared with the reference model;
// the exact one also with the real-valued DCT. Checks the two-cycle
// latency and that a block is accepted at one sample per cycle. A third
// instance sets every adder and multiplier on its own (a different number
// of approximated bits per unit) and is compared with the per-unit model.
module tb_dct_2d;
  import jpeg_pkg::*;
  import jpeg_ref_pkg::*;

  localparam int NBLK = 40;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid, rdy_a, rdy_e, out_ready;
  logic [7:0] sample;
  logic val_a, val_e, val_m, rdy_m;
  word_t coef_a [64], coef_e [64], coef_m [64];

  // per-unit settings of the mixed instance: 0..9 bits, varying by unit
  function automatic lsb8_t mix8(input int s);
    for (int i = 0; i < 8; i++) mix8[i] = (i * 3 + s) % 10;
  endfunction
  function automatic lsb64_t mix64(input int s);
    for (int i = 0; i < 64; i++) mix64[i] = (i * 7 + s) % 10;
  endfunction
  localparam lsb8_t  RM = mix8(1), RA = mix8(4);
  localparam lsb64_t CM = mix64(2), CA = mix64(5);

  dct_2d dut (.clk, .rst_n, .in_valid (in_valid && rdy_e), .in_ready (rdy_a), .sample,
              .out_valid (val_a), .out_ready, .coef (coef_a));
  dct_2d #(.MULT_APPROX(0), .ADD_APPROX(0)) dut_exact (
              .clk, .rst_n, .in_valid (in_valid && rdy_a), .in_ready (rdy_e), .sample,
              .out_valid (val_e), .out_ready, .coef (coef_e));
  dct_2d #(.ROW_MULT_LSB(RM), .ROW_ADD_LSB(RA), .COL_MULT_LSB(CM), .COL_ADD_LSB(CA)) dut_mix (
              .clk, .rst_n, .in_valid (in_valid && rdy_a && rdy_e), .in_ready (rdy_m), .sample,
              .out_valid (val_m), .out_ready, .coef (coef_m));

  always #5 clk = ~clk;

  blk_t blocks [NBLK];
  int   nout = 0;
  int   cyc = 0;
  int   last_acc_cyc = -10;
  int   first_acc_cyc = 0;
  int   stall_mode = 0;


  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s (block %0d)", what, nout);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // driver
  initial begin
    for (int b = 0; b < NBLK; b++)
      for (int i = 0; i < 64; i++)
        blocks[b][i] = (b == 0) ? 255 : (b == 1) ? 0 : (b == 2) ? ((i % 2) ? 255 : 0) : int'($urandom % 256);
    in_valid = 0; sample = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < NBLK; b++) begin
      for (int i = 0; i < 64; i++) begin
        @(negedge clk);
        in_valid = 1;
        sample = 8'(blocks[b][i]);
        @(posedge clk);
        while (!(rdy_a && rdy_e)) @(posedge clk);
      end
      @(negedge clk);
      in_valid = 0;
    end
  end

  // sink with back-pressure in the second half
  initial begin
    out_ready = 1;
    forever begin
      @(negedge clk);
      out_ready = (nout < NBLK / 2) ? 1'b1 : ($urandom % 3 == 0);
    end
  end

  int nacc = 0;
  always @(posedge clk) begin
    if (rst_n && in_valid && rdy_a && rdy_e) begin
      if (nacc % 64 == 0) first_acc_cyc = cyc;
      if (nacc % 64 == 63) begin
        last_acc_cyc = cyc;
        if (stall_mode == 0) check(cyc - first_acc_cyc == 63, "one sample per cycle");
      end
      nacc++;
    end
    if (nout >= NBLK / 2) stall_mode = 1;
    if (rst_n && val_a && out_ready) begin
      blk_t ea, ee, em;
      int rm [8], ra [8], cm [64], ca [64];
      for (int i = 0; i < 8; i++) begin rm[i] = int'(RM[i]); ra[i] = int'(RA[i]); end
      for (int i = 0; i < 64; i++) begin cm[i] = int'(CM[i]); ca[i] = int'(CA[i]); end
      ea = ref_dct(blocks[nout], 8, 8);
      ee = ref_dct(blocks[nout], 0, 0);
      em = ref_dct_units(blocks[nout], rm, ra, cm, ca);
      check(val_e, "both units in step");
      check(val_m, "mixed unit in step");
      for (int k = 0; k < 64; k++) begin
        real exact;
        check(coef_a[k] == ea[k], "approximate DCT vs model");
        check(coef_e[k] == ee[k], "exact DCT vs model");
        check(coef_m[k] == em[k], "per-unit DCT vs model");
        // real-valued DCT of the centred block
        exact = 0.0;
        for (int r = 0; r < 8; r++)
          for (int c = 0; c < 8; c++)
            exact += (blocks[nout][r*8+c] - 128) *
                     ((k/8 == 0) ? 0.35355339 : 0.5) * $cos((2*r+1)*(k/8)*3.14159265358979/16.0) *
                     ((k%8 == 0) ? 0.35355339 : 0.5) * $cos((2*c+1)*(k%8)*3.14159265358979/16.0);
        check((coef_e[k] / 524288.0 - exact) < 1.5 && (exact - coef_e[k] / 524288.0) < 1.5,
              "exact DCT vs real DCT");
      end
      if (nout < NBLK / 2) check(cyc == last_acc_cyc + 2, "latency two cycles");
      nout++;
      if (nout == NBLK) begin
        check(nacc == NBLK * 64, "all samples accepted");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
    cyc++;
  end
endmodule
