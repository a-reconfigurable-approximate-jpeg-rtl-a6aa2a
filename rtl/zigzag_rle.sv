// zigzag_rle: zigzag sequencing and run-length coding of one colour
// component's quantised 8x8 blocks.
//
// A block is held on q (raster order) while in_valid is high. The unit walks
// it in zigzag order, one coefficient per cycle, and emits JPEG symbols:
//   index 0      : DC symbol for the difference to the previous block's DC
//                  of this component (predictor cleared by reset),
//   zero         : counted in the run, nothing emitted,
//   non-zero     : ZRL symbols (run 15, size 0) while 16 or more zeros are
//                  pending, then (run, size, amplitude),
//   trailing zero: one EOB symbol (run 0, size 0) at index 63.
// Each symbol carries size and amplitude bits already in JPEG form and a
// 'last' flag on the final symbol of the block. One action per cycle; a
// symbol waits for sym_ready. in_ready pulses in the cycle the last symbol
// is taken, releasing the block. A block therefore takes 64 cycles plus one
// per ZRL, fewer or more than that only through sym_ready stalls.
//
// From the source design: zigzag order and run-length coding ahead of the
// Huffman coder. The JPEG symbol format (DC differences, ZRL, EOB) follows
// the baseline JPEG standard; the cycle schedule is this design's choice.
module zigzag_rle
  import jpeg_pkg::*;
#(
  parameter bit CHROMA = 1'b0
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  output logic     in_ready,
  input  qcoef_t   q [64],
  output logic     sym_valid,
  input  logic     sym_ready,
  output rle_sym_t sym
);

  logic [5:0] idx;
  logic [5:0] run;
  qcoef_t     prev_dc;
  qcoef_t     cur;
  logic signed [12:0] diff;
  logic [3:0] sz;
  logic       advance;   // move to the next coefficient this cycle
  logic       is_zrl;

  always_comb begin
    cur = '0;
    for (int i = 0; i < 64; i++)
      if (idx == 6'(i)) cur = q[ZIGZAG[i]];
  end

  assign diff = 13'(cur) - 13'(prev_dc);

  always_comb begin
    sym        = '0;
    sym.chroma = CHROMA;
    sym_valid  = 1'b0;
    advance    = 1'b0;
    is_zrl     = 1'b0;
    sz         = '0;
    if (in_valid) begin
      if (idx == 6'd0) begin
        sz         = mag_size(int'(diff));
        sym_valid  = 1'b1;
        sym.is_dc  = 1'b1;
        sym.size   = sz;
        sym.amp    = amp_bits(int'(diff), sz);
        advance    = sym_ready;
      end else if (cur == '0) begin
        if (idx == 6'd63) begin
          sym_valid = 1'b1;            // EOB
          sym.last  = 1'b1;
          advance   = sym_ready;
        end else begin
          advance   = 1'b1;
        end
      end else if (run >= 6'd16) begin
        sym_valid = 1'b1;              // ZRL
        sym.run   = 4'd15;
        is_zrl    = 1'b1;
      end else begin
        sz        = mag_size(int'(cur));
        sym_valid = 1'b1;
        sym.run   = run[3:0];
        sym.size  = sz;
        sym.amp   = amp_bits(int'(cur), sz);
        sym.last  = (idx == 6'd63);
        advance   = sym_ready;
      end
    end
  end

  assign in_ready = in_valid && advance && (idx == 6'd63);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx     <= '0;
      run     <= '0;
      prev_dc <= '0;
    end else if (in_valid) begin
      if (is_zrl && sym_ready) begin
        run <= run - 6'd16;
      end else if (advance) begin
        idx <= idx + 6'd1;               // wraps to 0 after index 63
        if (idx == 6'd0) begin
          prev_dc <= cur;
          run     <= '0;
        end else if (cur == '0) begin
          run <= run + 6'd1;
        end else begin
          run <= '0;
        end
      end
    end
  end

endmodule
