// dct_2d: approximate 8x8 two-dimensional DCT, DY = T * Y * T^T.
//
// Samples of one colour component arrive one per accepted cycle, row by row
// inside an 8x8 block (index 0..63). Each sample is centred by subtracting
// 128 and then:
//   Row pass   : eight 32x8 multipliers form x[r][c] * T[v][c] for v = 0..7
//                and eight accumulators build Z[r][v] = sum_c x[r][c] T[v][c]
//                over the eight samples of the row. The finished row is
//                scaled from 2^11 to 2^8 (arithmetic shift by 3).
//   Column pass: one cycle after a row finishes, sixty-four 32x32
//                multipliers and sixty-four accumulators add T[u][r] * Z[r][v]
//                into DY[u][v] for all 64 (u,v) at once.
// After row 7 the 64 coefficients (scaled by 2^19) are written to the output
// register, which holds them until out_ready. Every multiplier is an
// approx_mult and every accumulating adder an approx_adder, with the
// approximation counts given by MULT_APPROX and ADD_APPROX. Each unit can
// also be set on its own through ROW_MULT_LSB[v], ROW_ADD_LSB[v] (row pass,
// output frequency v) and COL_MULT_LSB[k], COL_ADD_LSB[k] (column pass,
// coefficient k = u*8+v); these default to the common values.
//
// Handshake: in_valid/in_ready per sample, out_valid/out_ready per block.
// The last sample of a block is refused while the output register is still
// full, so no result is ever overwritten. Latency: out_valid rises two
// cycles after the last sample of the block is accepted. Throughput: one
// sample per cycle.
//
// From the source design: the matrix form of the transform, the 128 offset,
// the use of approximate 32-bit adders and 32x32/32x8 multipliers. The
// row/column schedule, the fixed-point scaling and the handshake are this
// design's choices (the source counts 73 multipliers and 64 adders per DCT;
// this schedule uses 72 multipliers and 72 adders).
module dct_2d
  import jpeg_pkg::*;
#(
  parameter int unsigned MULT_APPROX  = 8,
  parameter int unsigned ADD_APPROX   = 8,
  // per-unit settings; by default every unit takes the common value above
  parameter lsb8_t       ROW_MULT_LSB = '{default: MULT_APPROX},
  parameter lsb8_t       ROW_ADD_LSB  = '{default: ADD_APPROX},
  parameter lsb64_t      COL_MULT_LSB = '{default: MULT_APPROX},
  parameter lsb64_t      COL_ADD_LSB  = '{default: ADD_APPROX}
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic [7:0] sample,
  output logic       out_valid,
  input  logic       out_ready,
  output word_t      coef [64]       // DY[u][v] at index u*8+v, scaled 2^19
);

  logic [5:0] idx;                   // position of the next sample in the block
  logic       fire;
  logic [2:0] col;

  assign col      = idx[2:0];
  assign in_ready = (idx != 6'd63) || !out_valid;
  assign fire     = in_valid && in_ready;

  // ------------------------------------------------------------ row pass
  logic signed [7:0] xc;             // centred sample, -128..127
  word_t             acc1 [8];
  word_t             sum1 [8];
  word_t             zrow [8];
  logic              zvalid;
  logic [2:0]        zr;

  assign xc = $signed(sample - 8'd128);

  // products of the sample with the basis entry of its column
  logic signed [39:0] prod_sel [8];
  for (genvar v = 0; v < 8; v++) begin : g_rowmul
    word_t tsel;
    always_comb begin
      tsel = '0;
      for (int c = 0; c < 8; c++)
        if (col == 3'(c)) tsel = word_t'(dct_t(v, c));
    end
    approx_mult #(.A_W(32), .B_W(8), .APPROX_LSB(ROW_MULT_LSB[v])) u_mul (
      .a (tsel), .b (xc), .p (prod_sel[v])
    );
  end

  for (genvar v = 0; v < 8; v++) begin : g_row
    approx_adder #(.WIDTH(32), .APPROX_LSB(ROW_ADD_LSB[v])) u_add (
      .a ((col == 3'd0) ? '0 : acc1[v]), .b (word_t'(prod_sel[v])), .sum (sum1[v])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx    <= '0;
      zvalid <= 1'b0;
      zr     <= '0;
      for (int v = 0; v < 8; v++) begin
        acc1[v] <= '0;
        zrow[v] <= '0;
      end
    end else begin
      zvalid <= fire && (col == 3'd7);
      if (fire) begin
        idx <= idx + 6'd1;
        for (int v = 0; v < 8; v++) begin
          if (col == 3'd7) zrow[v] <= sum1[v] >>> ROW_SHIFT;
          else             acc1[v] <= sum1[v];
        end
        if (col == 3'd7) zr <= idx[5:3];
      end
    end
  end

  // --------------------------------------------------------- column pass
  word_t acc2 [64];
  word_t sum2 [64];

  for (genvar k = 0; k < 64; k++) begin : g_col
    localparam int U = k / 8;
    localparam int V = k % 8;
    word_t              tsel;
    logic signed [63:0] prod;
    always_comb begin
      tsel = '0;
      for (int r = 0; r < 8; r++)
        if (zr == 3'(r)) tsel = word_t'(dct_t(U, r));
    end
    approx_mult #(.A_W(32), .B_W(32), .APPROX_LSB(COL_MULT_LSB[k])) u_mul (
      .a (tsel), .b (zrow[V]), .p (prod)
    );
    approx_adder #(.WIDTH(32), .APPROX_LSB(COL_ADD_LSB[k])) u_add (
      .a ((zr == 3'd0) ? '0 : acc2[k]), .b (prod[31:0]), .sum (sum2[k])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int k = 0; k < 64; k++) begin
        acc2[k] <= '0;
        coef[k] <= '0;
      end
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (zvalid) begin
        if (zr == 3'd7) begin
          out_valid <= 1'b1;
          for (int k = 0; k < 64; k++) coef[k] <= sum2[k];
        end else begin
          for (int k = 0; k < 64; k++) acc2[k] <= sum2[k];
        end
      end
    end
  end

endmodule
