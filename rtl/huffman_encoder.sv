// huffman_encoder: Huffman coding of one run-length symbol.
//
// Looks the symbol up in the JPEG reference tables from jpeg_pkg: the DC
// table indexed by size, the AC table indexed by (run << 4 | size), each in
// a luminance and a chrominance version chosen by sym.chroma. The code is
// followed by the size amplitude bits; the result is right aligned in
// vlc.bits with its total length (at most 16 + 11 = 27) in vlc.len.
//
// Purely combinational; valid and ready pass straight through, so the unit
// sits between the run-length coder and the output FIFO without a cycle of
// its own.
//
// From the source design: Huffman coding of the run-length symbols. Using
// the fixed reference tables (rather than tables built from the image
// statistics) is this design's choice.
module huffman_encoder
  import jpeg_pkg::*;
(
  input  logic     sym_valid,
  output logic     sym_ready,
  input  rle_sym_t sym,
  output logic     vlc_valid,
  input  logic     vlc_ready,
  output vlc_t     vlc
);

  hcode_t hc;
  logic [7:0] key;

  assign key = sym.is_dc ? {4'd0, sym.size} : {sym.run, sym.size};

  always_comb begin
    unique case ({sym.is_dc, sym.chroma})
      2'b10:   hc = DC_LUM_TAB[key];
      2'b11:   hc = DC_CHR_TAB[key];
      2'b00:   hc = AC_LUM_TAB[key];
      default: hc = AC_CHR_TAB[key];
    endcase
    vlc.bits = (VLC_W'(hc.code) << sym.size) | VLC_W'(sym.amp);
    vlc.len  = hc.len + 5'(sym.size);
    vlc.last = sym.last;
  end

  assign vlc_valid = sym_valid;
  assign sym_ready = vlc_ready;

endmodule
