// rgb2ycbcr: colour space transformation from 8-bit RGB to 8-bit YCbCr.
//
// Uses the JFIF equations with 14-bit fixed-point weights:
//   Y  =  0.299 R + 0.587 G + 0.114 B
//   Cb = -0.1687 R - 0.3313 G + 0.5 B + 128
//   Cr =  0.5 R - 0.4187 G - 0.0813 B + 128
// each rounded to nearest and clamped to 0..255. The weights sum exactly to
// 2^14 (Y) or 0 (Cb, Cr), so grey stays grey. The stage is exact: the
// approximate arithmetic is applied only in the DCT and the quantiser.
//
// One register stage with a valid/ready handshake: a pixel accepted in cycle
// t appears on ycc_* in cycle t+1 and stays until taken. Chroma is not
// subsampled (4:4:4). The pixel packing {R,G,B} and the coefficients are
// this design's choices; the source only names the transformation.
module rgb2ycbcr (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [23:0] rgb,        // {R[23:16], G[15:8], B[7:0]}
  output logic        out_valid,
  input  logic        out_ready,
  output logic [7:0]  y,
  output logic [7:0]  cb,
  output logic [7:0]  cr
);

  function automatic logic [7:0] clamp8(input logic signed [31:0] v);
    if (v < 0)   return 8'd0;
    if (v > 255) return 8'd255;
    return 8'(v);
  endfunction

  logic signed [31:0] r, g, b;
  logic signed [31:0] ys, cbs, crs;

  always_comb begin
    r   = 32'(rgb[23:16]);
    g   = 32'(rgb[15:8]);
    b   = 32'(rgb[7:0]);
    ys  = ( 4899 * r + 9617 * g + 1868 * b + 8192) >>> 14;
    cbs = ((-2764 * r - 5428 * g + 8192 * b + 8192) >>> 14) + 128;
    crs = (( 8192 * r - 6860 * g - 1332 * b + 8192) >>> 14) + 128;
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y         <= '0;
      cb        <= '0;
      cr        <= '0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) begin
        y  <= clamp8(ys);
        cb <= clamp8(cbs);
        cr <= clamp8(crs);
      end
    end
  end

endmodule
