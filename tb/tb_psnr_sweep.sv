// tb_psnr_sweep: runs the encoder core under the operating points whose
// image quality is compared: 0, 4 and 8 approximated bits with the standard
// (about 15:1) table, and 0 and 8 bits with the 46:1 table.
//
// Each configuration encodes the same 64 x 64 test image (smooth shading
// with texture). The scan is decoded and checked coefficient by coefficient
// against the reference model, then dequantised, inverse transformed in
// real arithmetic, converted back to RGB and compared with the original to
// give a PSNR. Checks that quality falls as more bits are approximated and
// as the coarser table is used, and that the exact encoder with the
// standard table stays above 30 dB on this image.
module tb_psnr_sweep;
  import jpeg_pkg::*;
  import jpeg_ref_pkg::*;

  localparam int W = 64, NBLK = (W / 8) * (W / 8), NCFG = 5;
  localparam int LSB [NCFG] = '{0, 4, 8, 0, 8};

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  int img [NBLK * 64];
  logic [31:0] words [NCFG][$];
  logic [31:0] nbytes [NCFG];
  logic        fin [NCFG];

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    logic pix_valid, pix_ready, pix_last, word_valid, done;
    logic [23:0] pix_rgb;
    logic [31:0] word, byte_count;

    jpeg_encoder #(
      .DCT_MULT_APPROX (LSB[g]), .DCT_ADD_APPROX (LSB[g]), .Q_MULT_APPROX (LSB[g]),
      .QTAB_Y ((g < 3) ? Q_STD : Q_HIGH), .QTAB_C ((g < 3) ? Q_STD : Q_HIGH)
    ) u_enc (.*);

    always @(posedge clk) if (rst_n && word_valid) words[g].push_back(word);
    assign nbytes[g] = byte_count;
    assign fin[g]    = done;

    initial begin
      pix_valid = 0; pix_last = 0; pix_rgb = '0;
      @(posedge rst_n);
      for (int a = 0; a < NBLK * 64; a++) begin
        @(negedge clk);
        pix_valid = 1;
        pix_rgb   = 24'(img[a]);
        pix_last  = (a == NBLK * 64 - 1);
        @(posedge clk);
        while (!pix_ready) @(posedge clk);
      end
      @(negedge clk);
      pix_valid = 0;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real clampr(input real v);
    return (v < 0.0) ? 0.0 : (v > 255.0) ? 255.0 : v;
  endfunction

  initial begin
    real psnr [NCFG];
    for (int a = 0; a < NBLK * 64; a++) begin
      int blk, x, y, r, g, b;
      blk = a / 64;
      x = (blk % (W / 8)) * 8 + a % 8;
      y = (blk / (W / 8)) * 8 + (a % 64) / 8;
      r = 60 + 2 * x + int'($urandom % 5);
      g = 40 + x + y + $rtoi(20.0 * $sin(x / 3.0));
      b = 200 - 2 * y + $rtoi(15.0 * $cos(y / 2.0));
      img[a] = (r << 16) | (g << 8) | b;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < NCFG; c++) while (!fin[c]) @(posedge clk);
    repeat (2) @(posedge clk);
    for (int cfg = 0; cfg < NCFG; cfg++) begin
      scan_decoder dec;
      int qt [64];
      real se;
      real rec [3][64];
      se = 0.0;
      for (int k = 0; k < 64; k++) qt[k] = int'((cfg < 3) ? Q_STD[k] : Q_HIGH[k]);
      dec = new();
      for (int w = 0; w < words[cfg].size(); w++)
        for (int k = 0; k < 4; k++)
          if (w * 4 + k < nbytes[cfg]) dec.data.push_back(8'(words[cfg][w] >> (24 - 8 * k)));
      for (int blk = 0; blk < NBLK; blk++) begin
        for (int c = 0; c < 3; c++) begin
          blk_t px, got, exp_q;
          int bad;
          for (int i = 0; i < 64; i++) px[i] = ref_csc(img[blk * 64 + i], c);
          exp_q = ref_quant(ref_dct(px, LSB[cfg], LSB[cfg]), qt, LSB[cfg]);
          got = dec.block(c);
          bad = 0;
          for (int k = 0; k < 64; k++) if (got[k] != exp_q[k]) bad++;
          check(bad == 0 && !dec.error, "decoded block matches the model");
          // dequantise and inverse transform
          for (int i = 0; i < 64; i++) begin
            real s;
            s = 0.0;
            for (int u = 0; u < 8; u++)
              for (int v = 0; v < 8; v++)
                s += got[u*8+v] * qt[u*8+v] *
                     ((u == 0) ? 0.35355339 : 0.5) * $cos((2 * (i / 8) + 1) * u * 3.14159265358979 / 16.0) *
                     ((v == 0) ? 0.35355339 : 0.5) * $cos((2 * (i % 8) + 1) * v * 3.14159265358979 / 16.0);
            rec[c][i] = s + 128.0;
          end
        end
        for (int i = 0; i < 64; i++) begin
          real yy, cb, cr, r, g, b;
          int o;
          yy = rec[0][i]; cb = rec[1][i] - 128.0; cr = rec[2][i] - 128.0;
          r = clampr(yy + 1.402 * cr);
          g = clampr(yy - 0.344136 * cb - 0.714136 * cr);
          b = clampr(yy + 1.772 * cb);
          o = img[blk * 64 + i];
          se += (r - ((o >> 16) & 255)) ** 2 + (g - ((o >> 8) & 255)) ** 2 + (b - (o & 255)) ** 2;
        end
      end
      psnr[cfg] = 10.0 * $log10(255.0 * 255.0 / (se / (NBLK * 64 * 3)));
      check(dec.at_end(), "scan fully consumed");
      $display("config %0d: %0d approximated bits, %s table: %0d bytes, ratio %0.1f:1, PSNR %0.2f dB",
               cfg, LSB[cfg], (cfg < 3) ? "15:1" : "46:1", nbytes[cfg],
               (NBLK * 64 * 3.0) / nbytes[cfg], psnr[cfg]);
    end
    check(psnr[0] > 30.0, "exact encoder above 30 dB");
    check(psnr[0] > psnr[2], "8 approximated bits lose quality");
    check(psnr[3] > psnr[4], "8 approximated bits lose quality (46:1)");
    check(psnr[0] > psnr[3], "coarser table loses quality");
    check(nbytes[3] < nbytes[0], "coarser table compresses more");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
