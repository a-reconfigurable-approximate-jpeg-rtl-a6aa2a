// image_rom: on-chip block memory holding the source image.
//
// DEPTH words of 24 bits, each {R,G,B} of one pixel, stored block by block
// (the 64 pixels of an 8x8 block in raster order, blocks in raster order).
// The read port is synchronous: q holds mem[rd_addr] one cycle after
// rd_addr is presented, as in an FPGA block RAM. During encoding the
// memory is only read, so it acts as a ROM; the write port stands in for
// the memory initialisation file and is used to load an image before
// encoding starts. The write port shares nothing with the read port.
//
// The default size, 512 x 512 pixels, and the 24-bit pixel packing follow
// the source design; the load port is this design's choice.
module image_rom #(
  parameter int unsigned DEPTH  = 512 * 512,
  parameter int unsigned AW     = $clog2(DEPTH),
  parameter string       INIT_FILE = ""
) (
  input  logic          clk,
  input  logic          load_en,
  input  logic [AW-1:0] load_addr,
  input  logic [23:0]   load_data,
  input  logic [AW-1:0] rd_addr,
  output logic [23:0]   q
);

  logic [23:0] mem [DEPTH];

  initial begin
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk) begin
    if (load_en) mem[load_addr] <= load_data;
    q <= mem[rd_addr];
  end

endmodule
