// quantizer: approximate quantisation of one 8x8 block of DCT coefficients.
//
// Each coefficient DY[k] (scaled by 2^19) is divided by its table entry
// Q[k] by multiplying with the reciprocal R[k] = round(2^16 / Q[k]), then
// rounded to the nearest integer (halves upwards):
//   q[k] = (DY[k] * R[k] + 2^34) >>> 35
// and clipped to +-1023 so that every value has a legal JPEG AC category.
// The 64 products are formed in parallel by 32x32 approx_mult units with
// MULT_APPROX approximated product bits, or MULT_LSB[k] for the unit of
// coefficient k when that array is given. The quantisation matrix is a
// parameter; the default is the standard table from jpeg_pkg.
//
// One register stage with valid/ready per block: a block accepted in cycle
// t is on q in cycle t+1 and is held until out_ready.
//
// From the source design: division by a per-coefficient constant with
// rounding, 64 approximate 32x32 multipliers per quantiser, and the
// quantisation tables. The reciprocal form, its 16-bit precision and the
// clipping are this design's choices.
module quantizer
  import jpeg_pkg::*;
#(
  parameter int unsigned MULT_APPROX = 8,
  parameter qtab_t       QTAB        = Q_STD,
  // per-unit settings; by default every multiplier takes MULT_APPROX
  parameter lsb64_t      MULT_LSB    = '{default: MULT_APPROX}
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  output logic   in_ready,
  input  word_t  coef [64],
  output logic   out_valid,
  input  logic   out_ready,
  output qcoef_t q [64]
);

  localparam int unsigned SHIFT = DCT_FRAC + RECIP_FRAC;

  qcoef_t qn [64];

  for (genvar k = 0; k < 64; k++) begin : g_q
    localparam int unsigned R = ((1 << RECIP_FRAC) + QTAB[k] / 2) / QTAB[k];
    logic signed [63:0] prod;
    logic signed [63:0] rounded;
    approx_mult #(.A_W(32), .B_W(32), .APPROX_LSB(MULT_LSB[k])) u_mul (
      .a (coef[k]), .b (word_t'(R)), .p (prod)
    );
    always_comb begin
      rounded = (prod + (64'sd1 <<< (SHIFT - 1))) >>> SHIFT;
      if (rounded > 64'(COEF_MAX))       qn[k] = qcoef_t'(COEF_MAX);
      else if (rounded < -64'(COEF_MAX)) qn[k] = qcoef_t'(-COEF_MAX);
      else                               qn[k] = qcoef_t'(rounded);
    end
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int k = 0; k < 64; k++) q[k] <= '0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid)
        for (int k = 0; k < 64; k++) q[k] <= qn[k];
    end
  end

endmodule
