// jpeg_encoder: reconfigurable approximate baseline JPEG encoder core.
//
// Pixels arrive as 24-bit RGB words, one per accepted cycle, already ordered
// as 8x8 blocks (the 64 pixels of a block in raster order, then the next
// block). The datapath is:
//
//   rgb2ycbcr -> 3 x { dct_2d -> quantizer -> zigzag_rle -> huffman_encoder
//             -> sync_fifo } -> stream_merger -> bit_packer -> 32-bit words
//
// Each colour component has its own DCT and quantiser, built from
// approximate adders and multipliers whose number of approximated result
// bits is set per unit type by DCT_MULT_APPROX, DCT_ADD_APPROX and
// Q_MULT_APPROX (0 = exact). The three code streams are interleaved as
// Y, Cb, Cr blocks (4:4:4 minimum coded units) and packed into the scan.
//
// Handshake: pix_valid/pix_ready. pix_ready drops only when a later stage
// is still busy (the DCT output register is occupied, or a code FIFO is
// full); otherwise one pixel is accepted per cycle. pix_last marks the last
// pixel of the image; once every accepted block has been written to the
// scan, the packer is flushed and done rises. word_valid/word deliver the
// scan, byte_count its length in bytes. No JPEG headers are produced.
//
// From the source design: the stage order, one DCT and one quantiser per
// component, approximate adders and multipliers in the DCT and quantiser
// only, configurable approximation. The interleave, FIFOs, handshakes and
// end-of-image flush are this design's choices.
module jpeg_encoder
  import jpeg_pkg::*;
#(
  parameter int unsigned DCT_MULT_APPROX = 8,
  parameter int unsigned DCT_ADD_APPROX  = 8,
  parameter int unsigned Q_MULT_APPROX   = 8,
  parameter qtab_t       QTAB_Y          = Q_STD,
  parameter qtab_t       QTAB_C          = Q_STD,
  parameter int unsigned FIFO_DEPTH      = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        pix_valid,
  output logic        pix_ready,
  input  logic [23:0] pix_rgb,
  input  logic        pix_last,
  output logic        word_valid,
  output logic [31:0] word,
  output logic [31:0] byte_count,
  output logic        done
);

  localparam int unsigned VLC_BITS = $bits(vlc_t);

  // ------------------------------------------------ colour transformation
  logic       csc_valid, csc_ready;
  logic [7:0] comp [3];

  rgb2ycbcr u_csc (
    .clk, .rst_n,
    .in_valid (pix_valid), .in_ready (pix_ready), .rgb (pix_rgb),
    .out_valid (csc_valid), .out_ready (csc_ready),
    .y (comp[0]), .cb (comp[1]), .cr (comp[2])
  );

  // ------------------------------------------------ per-component chains
  logic   dct_in_ready [3];
  logic   dct_valid [3], dct_ready [3];
  word_t  dct_coef [3][64];
  logic   q_valid [3], q_ready [3];
  qcoef_t q_coef [3][64];
  logic   sym_valid [3], sym_ready [3];
  rle_sym_t sym [3];
  logic   vlc_valid [3], vlc_ready [3];
  vlc_t   vlc [3];
  logic   f_valid [3], f_ready [3];
  vlc_t   f_vlc [3];

  assign csc_ready = dct_in_ready[0] && dct_in_ready[1] && dct_in_ready[2];

  for (genvar c = 0; c < 3; c++) begin : g_comp
    logic [VLC_BITS-1:0] f_data;

    dct_2d #(.MULT_APPROX(DCT_MULT_APPROX), .ADD_APPROX(DCT_ADD_APPROX)) u_dct (
      .clk, .rst_n,
      .in_valid (csc_valid && csc_ready), .in_ready (dct_in_ready[c]),
      .sample (comp[c]),
      .out_valid (dct_valid[c]), .out_ready (dct_ready[c]), .coef (dct_coef[c])
    );

    quantizer #(.MULT_APPROX(Q_MULT_APPROX), .QTAB((c == 0) ? QTAB_Y : QTAB_C)) u_quant (
      .clk, .rst_n,
      .in_valid (dct_valid[c]), .in_ready (dct_ready[c]), .coef (dct_coef[c]),
      .out_valid (q_valid[c]), .out_ready (q_ready[c]), .q (q_coef[c])
    );

    zigzag_rle #(.CHROMA(c != 0)) u_rle (
      .clk, .rst_n,
      .in_valid (q_valid[c]), .in_ready (q_ready[c]), .q (q_coef[c]),
      .sym_valid (sym_valid[c]), .sym_ready (sym_ready[c]), .sym (sym[c])
    );

    huffman_encoder u_huff (
      .sym_valid (sym_valid[c]), .sym_ready (sym_ready[c]), .sym (sym[c]),
      .vlc_valid (vlc_valid[c]), .vlc_ready (vlc_ready[c]), .vlc (vlc[c])
    );

    sync_fifo #(.WIDTH(VLC_BITS), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n,
      .in_valid (vlc_valid[c]), .in_ready (vlc_ready[c]), .in_data (vlc[c]),
      .out_valid (f_valid[c]), .out_ready (f_ready[c]), .out_data (f_data)
    );
    assign f_vlc[c] = vlc_t'(f_data);
  end

  // ------------------------------------------------ merge and pack
  logic m_valid, m_ready, mcu_done;
  vlc_t m_vlc;
  logic flush;

  stream_merger u_merge (
    .clk, .rst_n,
    .in_valid (f_valid), .in_ready (f_ready), .in_vlc (f_vlc),
    .out_valid (m_valid), .out_ready (m_ready), .out_vlc (m_vlc),
    .mcu_done
  );

  bit_packer u_pack (
    .clk, .rst_n,
    .vlc_valid (m_valid), .vlc_ready (m_ready), .vlc (m_vlc),
    .flush, .word_valid, .word, .byte_count, .done
  );

  // ------------------------------------------------ end of image
  logic [5:0]  pix_cnt;
  logic [31:0] blocks_in, blocks_out;
  logic        eoi_seen, flushed;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pix_cnt    <= '0;
      blocks_in  <= '0;
      blocks_out <= '0;
      eoi_seen   <= 1'b0;
      flushed    <= 1'b0;
    end else begin
      if (pix_valid && pix_ready) begin
        pix_cnt <= pix_cnt + 6'd1;
        if (pix_cnt == 6'd63) blocks_in <= blocks_in + 32'd1;
        if (pix_last) eoi_seen <= 1'b1;
      end
      if (mcu_done) blocks_out <= blocks_out + 32'd1;
      if (flush) flushed <= 1'b1;
    end
  end

  assign flush = eoi_seen && !flushed && (blocks_out == blocks_in);

endmodule
