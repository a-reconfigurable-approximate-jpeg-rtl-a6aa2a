// bit_packer: packs variable-length codes into the 32-bit JPEG scan words.
//
// Codes enter MSB first into a 64-bit left-aligned bit buffer (accepted
// while the buffer holds at most 37 bits, so a 27-bit code always fits).
// Each cycle one byte leaves the buffer when 8 bits are present. A 0xFF
// byte is followed by a stuffed 0x00 byte in the next cycle, as JPEG
// requires inside entropy-coded data. Bytes are gathered big-endian into
// 32-bit words; word_valid pulses for one cycle with each full word.
//
// flush (a pulse, given once no more codes will come) pads the last partial
// byte with '1' bits, drains the buffer and emits a final partial word whose
// unused low bytes are zero; done then stays high. byte_count counts every
// byte of the scan, stuffed bytes included, so the real length of the last
// word is known.
//
// Throughput: at most one byte per cycle; vlc_ready drops while the buffer
// is full, which stalls the encoder upstream.
//
// Byte stuffing, 1-padding and the word format are this design's choices
// following the baseline JPEG rules; the source only says that the coder
// produces the JPEG bitstream and that 32-bit words are stored in RAM.
module bit_packer
  import jpeg_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        vlc_valid,
  output logic        vlc_ready,
  input  vlc_t        vlc,
  input  logic        flush,
  output logic        word_valid,
  output logic [31:0] word,
  output logic [31:0] byte_count,
  output logic        done
);

  logic [63:0] bitbuf;
  logic [6:0]  nbits;
  logic        stuff;      // a 0x00 must follow the last byte
  logic        flushing;
  logic [23:0] wacc;
  logic [1:0]  wcnt;

  // combinational next state
  logic [63:0] buf_n;
  logic [6:0]  nb_n;
  logic        emit;
  logic [7:0]  byte_o;
  logic        stuff_n;
  logic        take;

  assign vlc_ready = (nbits <= 7'd37) && !flushing && !done;
  assign take      = vlc_valid && vlc_ready;

  always_comb begin
    buf_n   = bitbuf;
    nb_n    = nbits;
    emit    = 1'b0;
    byte_o  = 8'h00;
    stuff_n = stuff;
    if (stuff) begin
      emit    = 1'b1;
      byte_o  = 8'h00;
      stuff_n = 1'b0;
    end else if (nbits >= 7'd8) begin
      emit    = 1'b1;
      byte_o  = bitbuf[63:56];
      buf_n   = bitbuf << 8;
      nb_n    = nbits - 7'd8;
      stuff_n = (bitbuf[63:56] == 8'hFF);
    end else if (flushing && nbits != 7'd0) begin
      emit    = 1'b1;
      byte_o  = bitbuf[63:56] | (8'hFF >> nbits);
      buf_n   = '0;
      nb_n    = '0;
      stuff_n = (byte_o == 8'hFF);
    end
    if (take) begin
      buf_n = buf_n | ((64'(vlc.bits) << (7'd64 - 7'(vlc.len))) >> nb_n);
      nb_n  = nb_n + 7'(vlc.len);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bitbuf     <= '0;
      nbits      <= '0;
      stuff      <= 1'b0;
      flushing   <= 1'b0;
      wacc       <= '0;
      wcnt       <= '0;
      word_valid <= 1'b0;
      word       <= '0;
      byte_count <= '0;
      done       <= 1'b0;
    end else begin
      bitbuf     <= buf_n;
      nbits      <= nb_n;
      stuff      <= stuff_n;
      word_valid <= 1'b0;
      if (flush) flushing <= 1'b1;
      if (emit) begin
        byte_count <= byte_count + 32'd1;
        wcnt       <= wcnt + 2'd1;
        wacc       <= {wacc[15:0], byte_o};
        if (wcnt == 2'd3) begin
          word_valid <= 1'b1;
          word       <= {wacc, byte_o};
        end
      end else if (flushing && !done && nbits == 7'd0 && !stuff) begin
        // everything drained: emit the partial word, if any, and stop
        if (wcnt != 2'd0) begin
          word_valid <= 1'b1;
          unique case (wcnt)
            2'd1:    word <= {wacc[7:0], 24'h0};
            2'd2:    word <= {wacc[15:0], 16'h0};
            default: word <= {wacc[23:0], 8'h0};
          endcase
          wcnt <= '0;
        end
        flushing <= 1'b0;
        done     <= 1'b1;
      end
    end
  end

endmodule
