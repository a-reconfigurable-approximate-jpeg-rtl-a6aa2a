// jpeg_fpga_top: the encoder system as placed on the FPGA board.
//
// An image memory (image_rom) holds the 24-bit RGB image, block ordered. A
// start pulse makes the address counter step through it, one address per
// clock while the encoder accepts pixels, and the jpeg_encoder core turns
// the stream into a JPEG scan. Every 32-bit scan word is written to the
// next address of a dual-port bitstream memory (bitstream_ram) whose second
// port is brought out so the result can be read back. done rises when the
// scan is complete; byte_count and word_count give its length.
//
// The board clock generator is outside this module: clk is an input and the
// whole system is one clock domain, so no synchronisers are needed. Push
// buttons, switches and LEDs map to start, rst_n and done. The image load
// port stands for the memory initialisation file.
//
// Default sizes: 512 x 512 pixels, 2^17 output words, 8 approximated bits
// in every approximate unit, the standard quantisation table.
module jpeg_fpga_top
  import jpeg_pkg::*;
#(
  parameter int unsigned IMG_W           = 512,
  parameter int unsigned IMG_H           = 512,
  parameter int unsigned OUT_DEPTH       = 1 << 17,
  parameter int unsigned DCT_MULT_APPROX = 8,
  parameter int unsigned DCT_ADD_APPROX  = 8,
  parameter int unsigned Q_MULT_APPROX   = 8,
  parameter qtab_t       QTAB_Y          = Q_STD,
  parameter qtab_t       QTAB_C          = Q_STD,
  parameter int unsigned NPIX            = IMG_W * IMG_H,
  parameter int unsigned IAW             = $clog2(NPIX),
  parameter int unsigned OAW             = $clog2(OUT_DEPTH)
) (
  input  logic           clk,
  input  logic           rst_n,
  // image loading (memory initialisation)
  input  logic           load_en,
  input  logic [IAW-1:0] load_addr,
  input  logic [23:0]    load_data,
  // control and status
  input  logic           start,
  output logic           done,
  output logic [31:0]    byte_count,
  output logic [OAW:0]   word_count,
  // bitstream read-back port
  input  logic [OAW-1:0] probe_addr,
  output logic [31:0]    probe_q
);

  logic [IAW-1:0] rd_addr;
  logic [23:0]    pixel;
  logic           pix_valid, pix_ready, pix_last;
  logic           word_valid;
  logic [31:0]    word;

  image_rom #(.DEPTH(NPIX)) u_img (
    .clk, .load_en, .load_addr, .load_data, .rd_addr, .q (pixel)
  );

  addr_counter #(.NUM(NPIX)) u_cnt (
    .clk, .rst_n, .start, .advance (pix_ready),
    .rd_addr, .valid (pix_valid), .last (pix_last)
  );

  jpeg_encoder #(
    .DCT_MULT_APPROX (DCT_MULT_APPROX), .DCT_ADD_APPROX (DCT_ADD_APPROX),
    .Q_MULT_APPROX (Q_MULT_APPROX), .QTAB_Y (QTAB_Y), .QTAB_C (QTAB_C)
  ) u_enc (
    .clk, .rst_n,
    .pix_valid, .pix_ready, .pix_rgb (pixel), .pix_last,
    .word_valid, .word, .byte_count, .done
  );

  // write address of the next scan word; words beyond the memory are dropped
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          word_count <= '0;
    else if (word_valid) word_count <= word_count + 1'b1;
  end

  bitstream_ram #(.DEPTH(OUT_DEPTH)) u_out (
    .clk,
    .wr_en   (word_valid && (word_count < (OAW+1)'(OUT_DEPTH))),
    .wr_addr (word_count[OAW-1:0]),
    .wr_data (word),
    .rd_addr (probe_addr),
    .rd_q    (probe_q)
  );

endmodule
