// approx_mult: reconfigurable truncating approximate multiplier.
//
// Signed A_W x B_W multiplication with a 64-bit-style full-width product
// (A_W + B_W bits). To approximate APPROX_LSB bits of the product, the
// multiplicand loses its ceil(APPROX_LSB/2) low bits and the multiplier its
// floor(APPROX_LSB/2) low bits (arithmetic shift, i.e. rounding towards minus
// infinity). The narrower operands are multiplied and the product is shifted
// back, so its APPROX_LSB low bits are '0'. APPROX_LSB = 0 gives an exact
// multiplier.
//
// From the source design: for 2n approximated bits both operands are
// truncated by n bits, an (ma-n)x(mb-n) product is formed and the 2n low
// product bits are filled with '0'. The split for an odd count and the
// signed (arithmetic) truncation are this design's choices.
//
// Purely combinational.
module approx_mult #(
  parameter int unsigned A_W        = 32,
  parameter int unsigned B_W        = 32,
  parameter int unsigned APPROX_LSB = 8
) (
  input  logic signed [A_W-1:0]     a,
  input  logic signed [B_W-1:0]     b,
  output logic signed [A_W+B_W-1:0] p
);

  localparam int unsigned NA = (APPROX_LSB + 1) / 2;
  localparam int unsigned NB = APPROX_LSB / 2;

  logic signed [A_W-NA-1:0]       a_t;
  logic signed [B_W-NB-1:0]       b_t;
  logic signed [A_W+B_W-NA-NB-1:0] p_t;

  assign a_t = a[A_W-1:NA];
  assign b_t = b[B_W-1:NB];
  assign p_t = (A_W+B_W-NA-NB)'(a_t) * (A_W+B_W-NA-NB)'(b_t);

  generate
    if (APPROX_LSB == 0) begin : g_exact
      assign p = p_t;
    end else begin : g_trunc
      assign p = {p_t, {APPROX_LSB{1'b0}}};
    end
  endgenerate

endmodule
