// tb_jpeg_fpga_top: full-size run of the FPGA system at its default
// parameters (512 x 512 image, 8 approximated bits, standard table).
//
// Generates a 512 x 512 test image (gradients with mild noise, a 64 x 64
// patch of full noise, and a column of blocks holding a single (7,7)
// cosine), loads it through the image memory's load port in block order,
// pulses start and waits for done. The scan is then read back through the
// bitstream memory's probe port, decoded, and every coefficient of all
// 4096 x 3 blocks is compared with the reference model. Counts and requires
// the mechanisms of the design: input stalls by back-pressure, ZRL and EOB
// codes, blocks ending without EOB, 0xFF byte stuffing and the final
// 1-padding; checks that no more than one pixel is taken per clock.
module tb_jpeg_fpga_top;
  import jpeg_pkg::*;
  import jpeg_ref_pkg::*;

  localparam int W = 512, H = 512, NPIX = W * H, NBLK = NPIX / 64;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic load_en, start, done;
  logic [17:0] load_addr;
  logic [23:0] load_data;
  logic [31:0] byte_count;
  logic [17:0] word_count;
  logic [16:0] probe_addr;
  logic [31:0] probe_q;

  jpeg_fpga_top dut (.*);

  always #5 clk = ~clk;

  int img [NPIX];
  int n_stall = 0, n_acc = 0, run_cycles = 0;
  bit running = 0;

  always @(posedge clk) begin
    if (running) begin
      run_cycles++;
      if (dut.pix_valid && !dut.pix_ready) n_stall++;
      if (dut.pix_valid && dut.pix_ready) n_acc++;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    scan_decoder dec;
    int qt [64];
    int n_noeob;
    for (int k = 0; k < 64; k++) qt[k] = int'(Q_STD[k]);
    // image in block order: address = (by*64 + bx)*64 + row*8 + col
    for (int a = 0; a < NPIX; a++) begin
      int blk, bx, by, x, y, r, g, b;
      blk = a / 64; bx = blk % (W / 8); by = blk / (W / 8);
      x = bx * 8 + (a % 8); y = by * 8 + (a % 64) / 8;
      if (bx < 8 && by < 8) begin
        r = $urandom % 256; g = $urandom % 256; b = $urandom % 256;
      end else if (bx % 16 == 15) begin
        r = 128 + $rtoi(220.0 * $cos((2 * (x % 8) + 1) * 7 * 3.14159265 / 16.0)
                              * $cos((2 * (y % 8) + 1) * 7 * 3.14159265 / 16.0));
        g = r; b = r;
      end else begin
        r = (x / 2 + int'($urandom % 9)) % 256;
        g = (y / 2 + int'($urandom % 9)) % 256;
        b = ((x + y) / 4 + int'($urandom % 9)) % 256;
      end
      img[a] = (r << 16) | (g << 8) | b;
    end
    load_en = 0; load_addr = 0; load_data = 0; start = 0; probe_addr = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < NPIX; a++) begin
      @(negedge clk);
      load_en = 1; load_addr = 18'(a); load_data = 24'(img[a]);
    end
    @(negedge clk);
    load_en = 0;
    start = 1;
    running = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(posedge clk);
    running = 0;
    repeat (2) @(posedge clk);
    $display("scan: %0d bytes, %0d words, %0d cycles, %0d stall cycles", byte_count, word_count,
             run_cycles, n_stall);
    check(n_acc == NPIX, "every pixel taken once");
    check(run_cycles >= NPIX, "at most one pixel per clock");
    check(int'(word_count) == (byte_count + 3) / 4, "word count matches byte count");
    // read the scan back through the probe port
    dec = new();
    for (int w = 0; w < int'(word_count); w++) begin
      @(negedge clk);
      probe_addr = 17'(w);
      @(posedge clk); #1;
      for (int k = 0; k < 4; k++)
        if (w * 4 + k < int'(byte_count)) dec.data.push_back(8'(probe_q >> (24 - 8 * k)));
    end
    n_noeob = 0;
    for (int blk = 0; blk < NBLK; blk++)
      for (int c = 0; c < 3; c++) begin
        blk_t px, got, exp_q;
        int eob0, bad;
        for (int i = 0; i < 64; i++) px[i] = ref_csc(img[blk * 64 + i], c);
        exp_q = ref_quant(ref_dct(px, 8, 8), qt, 8);
        eob0 = dec.n_eob;
        got = dec.block(c);
        if (dec.n_eob == eob0) n_noeob++;
        bad = 0;
        for (int k = 0; k < 64; k++) if (got[k] != exp_q[k]) bad++;
        check(bad == 0 && !dec.error, $sformatf("block %0d component %0d decodes to the model", blk, c));
      end
    check(dec.at_end(), "scan ends with 1-padding exactly at byte_count");
    check(n_stall > 0, "input stall happened");
    check(dec.n_zrl > 0, "ZRL happened");
    check(dec.n_eob > 0, "EOB happened");
    check(n_noeob > 0, "block without EOB happened");
    check(dec.n_stuffed > 0, "byte stuffing happened");
    $display("stalls=%0d zrl=%0d eob=%0d no_eob=%0d stuffed=%0d", n_stall, dec.n_zrl, dec.n_eob,
             n_noeob, dec.n_stuffed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
