// tb_jpeg_encoder: end-to-end test of the encoder core on a small image.
//
// Builds a 64 x 32 pixel image (32 blocks): eight noise blocks in a row,
// then flat areas, gradients and a single high-frequency cosine. The first
// half is streamed back to back, the second with random gaps. It collects
// the scan words, decodes the scan and compares every coefficient of every
// Y, Cb and Cr block with the reference model (colour transform,
// approximate DCT and quantiser at 8 approximated bits).
// Also checks the byte count, the 1-padding at the end and that input
// stalls, ZRL and EOB codes and 0xFF byte stuffing all occurred.
module tb_jpeg_encoder;
  import jpeg_pkg::*;
  import jpeg_ref_pkg::*;

  localparam int NBLK = 32;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic pix_valid, pix_ready, pix_last;
  logic [23:0] pix_rgb;
  logic word_valid, done;
  logic [31:0] word, byte_count;

  jpeg_encoder dut (.*);

  always #5 clk = ~clk;

  int img [NBLK][64];
  logic [31:0] words [$];
  int n_stall = 0;

  always @(posedge clk) begin
    if (rst_n && word_valid) words.push_back(word);
    if (rst_n && pix_valid && !pix_ready) n_stall++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    scan_decoder dec;
    int qt [64];
    for (int k = 0; k < 64; k++) qt[k] = int'(Q_STD[k]);
    for (int b = 0; b < NBLK; b++)
      for (int i = 0; i < 64; i++) begin
        int r, g, bl;
        case ((b < 8) ? 0 : b % 4)
          0: begin r = $urandom % 256; g = $urandom % 256; bl = $urandom % 256; end   // noise
          1: begin r = 200; g = 40; bl = 90; end                                       // flat
          2: begin r = 8 * (i % 8) + 4 * b; g = 16 * (i / 8); bl = 255 - 6 * i / 2; end // gradient
          default: begin                                 // single (7,7) cosine: long zero run
            r = 128 + $rtoi(220.0 * $cos((2 * (i % 8) + 1) * 7 * 3.14159265 / 16.0)
                                  * $cos((2 * (i / 8) + 1) * 7 * 3.14159265 / 16.0));
            g = r; bl = r;
          end
        endcase
        img[b][i] = (r << 16) | (g << 8) | bl;
      end
    pix_valid = 0; pix_last = 0; pix_rgb = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < NBLK; b++)
      for (int i = 0; i < 64; i++) begin
        @(negedge clk);
        while (b >= NBLK / 2 && $urandom % 8 == 0) begin
          pix_valid = 0;
          @(negedge clk);
        end
        pix_valid = 1;
        pix_rgb   = 24'(img[b][i]);
        pix_last  = (b == NBLK - 1) && (i == 63);
        @(posedge clk);
        while (!pix_ready) @(posedge clk);
      end
    @(negedge clk);
    pix_valid = 0; pix_last = 0;
    while (!done) @(posedge clk);
    repeat (2) @(posedge clk);
    check(words.size() == (byte_count + 3) / 4, "word count matches byte count");
    dec = new();
    for (int w = 0; w < words.size(); w++)
      for (int k = 0; k < 4; k++)
        if (w * 4 + k < byte_count) dec.data.push_back(8'(words[w] >> (24 - 8 * k)));
    for (int b = 0; b < NBLK; b++)
      for (int c = 0; c < 3; c++) begin
        blk_t px, got, exp_q;
        for (int i = 0; i < 64; i++) px[i] = ref_csc(img[b][i], c);
        exp_q = ref_quant(ref_dct(px, 8, 8), qt, 8);
        got = dec.block(c);
        for (int k = 0; k < 64; k++) begin
          check(got[k] == exp_q[k] && !dec.error, "decoded coefficient");
          if (got[k] != exp_q[k] && failures < 10)
            $display("  block %0d comp %0d k %0d got %0d exp %0d", b, c, k, got[k], exp_q[k]);
        end
      end
    check(dec.at_end(), "scan ends with 1-padding exactly at byte_count");
    check(n_stall > 0, "input stall happened");
    check(dec.n_zrl > 0, "ZRL happened");
    check(dec.n_eob > 0, "EOB happened");
    check(dec.n_stuffed > 0, "byte stuffing happened");
    $display("bytes=%0d stalls=%0d zrl=%0d eob=%0d stuffed=%0d", byte_count, n_stall,
             dec.n_zrl, dec.n_eob, dec.n_stuffed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
