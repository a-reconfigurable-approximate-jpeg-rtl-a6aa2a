// jpeg_pkg: types and constants shared by the approximate JPEG encoder.
//
// Holds the fixed-point DCT basis (scaled by 2^11), the zigzag order, the
// two quantisation matrices of the 15:1 and 46:1 operating points, the
// JPEG reference Huffman tables (baseline Annex K tables, given as code-length
// counts and symbol lists) and the functions that turn those lists into the
// code/length lookup tables used by the Huffman encoder. All tables are
// computed at elaboration time, so no memory initialisation file is needed.
package jpeg_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned DATA_W     = 32;  // width of every datapath adder/multiplier
  localparam int unsigned COS_FRAC   = 11;  // DCT basis scaled by 2^11
  localparam int unsigned ROW_SHIFT  = 3;   // row results reduced from 2^11 to 2^8
  localparam int unsigned DCT_FRAC   = 2 * COS_FRAC - ROW_SHIFT;  // 2^19 on DCT outputs
  localparam int unsigned RECIP_FRAC = 16;  // quantiser reciprocals scaled by 2^16
  localparam int          COEF_MAX   = 1023; // quantised coefficients are clipped to +-1023

  typedef logic signed [DATA_W-1:0] word_t;
  typedef logic signed [11:0]       qcoef_t;     // quantised coefficient
  typedef qcoef_t                   qblock_t [64];
  typedef word_t                    dblock_t [64];
  typedef int unsigned              qtab_t [64];
  typedef int unsigned              lsb8_t [8];      // approximation of each of 8 units
  typedef int unsigned              lsb64_t [64];    // approximation of each of 64 units

  // Entropy-coding symbol produced by the zigzag/run-length stage.
  typedef struct packed {
    logic        chroma;  // 0: luminance tables, 1: chrominance tables
    logic        is_dc;   // DC difference symbol (size only, no run)
    logic [3:0]  run;     // zero run preceding the coefficient (AC)
    logic [3:0]  size;    // magnitude category; run=0,size=0 is EOB, run=15,size=0 is ZRL
    logic [10:0] amp;     // size low bits of the JPEG amplitude code
    logic        last;    // final symbol of the 8x8 block
  } rle_sym_t;

  // Variable-length code ready for bit packing: value right aligned.
  localparam int unsigned VLC_W = 27;  // 16-bit Huffman code + 11 amplitude bits
  typedef struct packed {
    logic [VLC_W-1:0] bits;
    logic [4:0]       len;
    logic             last;
  } vlc_t;

  // ---------------------------------------------------- quantisation tables
  // Standard table (about 15:1) and the scaled table (about 46:1).
  localparam qtab_t Q_STD = '{
    16, 11, 10, 16, 24, 40, 51, 61,
    12, 12, 14, 19, 26, 58, 60, 55,
    14, 13, 16, 24, 40, 57, 69, 56,
    14, 17, 22, 29, 51, 87, 80, 62,
    18, 22, 37, 56, 68,109,103, 77,
    24, 35, 55, 64, 81,104,113, 92,
    49, 64, 78, 87,103,121,120,101,
    72, 92, 95, 98,112,100,103, 99};
  localparam qtab_t Q_HIGH = '{
     80, 55, 50, 80,120,200,255,305,
     60, 60, 70, 95,130,290,300,275,
     70, 65, 80,120,200,285,345,280,
     70, 85,110,145,255,435,400,310,
     90,110,185,280,340,545,515,385,
    120,175,275,320,405,520,565,460,
    245,320,390,435,515,605,600,505,
    360,460,475,490,560,500,515,495};
  localparam qtab_t Q_ONES = '{default: 1};

  // --------------------------------------------------------- DCT basis
  // T[k][n] = c(k) * cos((2n+1) k pi / 16) * 2^11, c(0) = 1/sqrt(8), c(k) = 1/2.
  function automatic int cos_q(input int m);  // 1024*cos(m*pi/16), any m >= 0
    int t [9];
    int mm;
    t = '{1024, 1004, 946, 851, 724, 569, 392, 200, 0};
    mm = m % 32;
    if (mm > 16) mm = 32 - mm;
    if (mm > 8) return -t[16 - mm];
    return t[mm];
  endfunction

  function automatic int dct_t(input int k, input int n);
    if (k == 0) return 724;  // 2048 / sqrt(8)
    return cos_q((2 * n + 1) * k);
  endfunction

  // -------------------------------------------------------- zigzag order
  // ZIGZAG[i] is the raster index (row*8+col) of the i-th coefficient sent.
  localparam int ZIGZAG [64] = '{
     0,  1,  8, 16,  9,  2,  3, 10,
    17, 24, 32, 25, 18, 11,  4,  5,
    12, 19, 26, 33, 40, 48, 41, 34,
    27, 20, 13,  6,  7, 14, 21, 28,
    35, 42, 49, 56, 57, 50, 43, 36,
    29, 22, 15, 23, 30, 37, 44, 51,
    58, 59, 52, 45, 38, 31, 39, 46,
    53, 60, 61, 54, 47, 55, 62, 63};

  // ------------------------------------------------------ Huffman tables
  typedef int unsigned bits_t [16];    // number of codes of length 1..16
  typedef logic [7:0]  hval_t [162];   // symbols in order of increasing code

  localparam bits_t DC_LUM_BITS = '{0,1,5,1,1,1,1,1,1,0,0,0,0,0,0,0};
  localparam bits_t DC_CHR_BITS = '{0,3,1,1,1,1,1,1,1,1,1,0,0,0,0,0};
  // DC symbols are the categories 0..11 in order for both tables.
  localparam bits_t AC_LUM_BITS = '{0,2,1,3,3,2,4,3,5,5,4,4,0,0,1,125};
  localparam bits_t AC_CHR_BITS = '{0,2,1,2,4,4,3,4,7,5,4,4,0,1,2,119};
  localparam hval_t AC_LUM_VALS = '{8'h01,8'h02,8'h03,8'h00,8'h04,8'h11,8'h05,8'h12,8'h21,8'h31,8'h41,8'h06,8'h13,8'h51,8'h61,8'h07,8'h22,8'h71,8'h14,8'h32,8'h81,8'h91,8'ha1,8'h08,8'h23,8'h42,8'hb1,8'hc1,8'h15,8'h52,8'hd1,8'hf0,8'h24,8'h33,8'h62,8'h72,8'h82,8'h09,8'h0a,8'h16,8'h17,8'h18,8'h19,8'h1a,8'h25,8'h26,8'h27,8'h28,8'h29,8'h2a,8'h34,8'h35,8'h36,8'h37,8'h38,8'h39,8'h3a,8'h43,8'h44,8'h45,8'h46,8'h47,8'h48,8'h49,8'h4a,8'h53,8'h54,8'h55,8'h56,8'h57,8'h58,8'h59,8'h5a,8'h63,8'h64,8'h65,8'h66,8'h67,8'h68,8'h69,8'h6a,8'h73,8'h74,8'h75,8'h76,8'h77,8'h78,8'h79,8'h7a,8'h83,8'h84,8'h85,8'h86,8'h87,8'h88,8'h89,8'h8a,8'h92,8'h93,8'h94,8'h95,8'h96,8'h97,8'h98,8'h99,8'h9a,8'ha2,8'ha3,8'ha4,8'ha5,8'ha6,8'ha7,8'ha8,8'ha9,8'haa,8'hb2,8'hb3,8'hb4,8'hb5,8'hb6,8'hb7,8'hb8,8'hb9,8'hba,8'hc2,8'hc3,8'hc4,8'hc5,8'hc6,8'hc7,8'hc8,8'hc9,8'hca,8'hd2,8'hd3,8'hd4,8'hd5,8'hd6,8'hd7,8'hd8,8'hd9,8'hda,8'he1,8'he2,8'he3,8'he4,8'he5,8'he6,8'he7,8'he8,8'he9,8'hea,8'hf1,8'hf2,8'hf3,8'hf4,8'hf5,8'hf6,8'hf7,8'hf8,8'hf9,8'hfa};
  localparam hval_t AC_CHR_VALS = '{8'h00,8'h01,8'h02,8'h03,8'h11,8'h04,8'h05,8'h21,8'h31,8'h06,8'h12,8'h41,8'h51,8'h07,8'h61,8'h71,8'h13,8'h22,8'h32,8'h81,8'h08,8'h14,8'h42,8'h91,8'ha1,8'hb1,8'hc1,8'h09,8'h23,8'h33,8'h52,8'hf0,8'h15,8'h62,8'h72,8'hd1,8'h0a,8'h16,8'h24,8'h34,8'he1,8'h25,8'hf1,8'h17,8'h18,8'h19,8'h1a,8'h26,8'h27,8'h28,8'h29,8'h2a,8'h35,8'h36,8'h37,8'h38,8'h39,8'h3a,8'h43,8'h44,8'h45,8'h46,8'h47,8'h48,8'h49,8'h4a,8'h53,8'h54,8'h55,8'h56,8'h57,8'h58,8'h59,8'h5a,8'h63,8'h64,8'h65,8'h66,8'h67,8'h68,8'h69,8'h6a,8'h73,8'h74,8'h75,8'h76,8'h77,8'h78,8'h79,8'h7a,8'h82,8'h83,8'h84,8'h85,8'h86,8'h87,8'h88,8'h89,8'h8a,8'h92,8'h93,8'h94,8'h95,8'h96,8'h97,8'h98,8'h99,8'h9a,8'ha2,8'ha3,8'ha4,8'ha5,8'ha6,8'ha7,8'ha8,8'ha9,8'haa,8'hb2,8'hb3,8'hb4,8'hb5,8'hb6,8'hb7,8'hb8,8'hb9,8'hba,8'hc2,8'hc3,8'hc4,8'hc5,8'hc6,8'hc7,8'hc8,8'hc9,8'hca,8'hd2,8'hd3,8'hd4,8'hd5,8'hd6,8'hd7,8'hd8,8'hd9,8'hda,8'he2,8'he3,8'he4,8'he5,8'he6,8'he7,8'he8,8'he9,8'hea,8'hf2,8'hf3,8'hf4,8'hf5,8'hf6,8'hf7,8'hf8,8'hf9,8'hfa};

  // Code and length for every 8-bit symbol (unused symbols have length 0).
  typedef struct packed {
    logic [15:0] code;
    logic [4:0]  len;
  } hcode_t;
  typedef hcode_t [255:0] htab_t;  // packed so it can be built by a constant function

  // Canonical code assignment: codes of each length are consecutive and the
  // first code of length L+1 is (last code of length L + 1) << 1.
  function automatic htab_t build_table(input bits_t bits, input hval_t vals, input bit is_dc);
    htab_t tab;
    int    code;
    int    k;
    for (int s = 0; s < 256; s++) tab[s] = '0;
    code = 0;
    k    = 0;
    for (int l = 1; l <= 16; l++) begin
      for (int j = 0; j < int'(bits[l-1]); j++) begin
        int sym;
        sym = is_dc ? k : int'(vals[k]);
        tab[sym].code = 16'(code);
        tab[sym].len  = 5'(l);
        code++;
        k++;
      end
      code = code << 1;
    end
    return tab;
  endfunction

  localparam hval_t NO_VALS = '{default: 8'h00};
  localparam htab_t DC_LUM_TAB = build_table(DC_LUM_BITS, NO_VALS, 1'b1);
  localparam htab_t DC_CHR_TAB = build_table(DC_CHR_BITS, NO_VALS, 1'b1);
  localparam htab_t AC_LUM_TAB = build_table(AC_LUM_BITS, AC_LUM_VALS, 1'b0);
  localparam htab_t AC_CHR_TAB = build_table(AC_CHR_BITS, AC_CHR_VALS, 1'b0);

  // -------------------------------------------------------- JPEG helpers
  // Magnitude category: number of bits needed for |v|.
  function automatic logic [3:0] mag_size(input int v);
    int a;
    a = (v < 0) ? -v : v;
    for (int s = 0; s <= 11; s++)
      if (a < (1 << s)) return 4'(s);
    return 4'd12;
  endfunction

  // Amplitude bits: v itself when positive, v-1 (ones complement) when negative.
  function automatic logic [10:0] amp_bits(input int v, input logic [3:0] size);
    int t;
    t = (v < 0) ? v - 1 : v;
    return 11'(t) & 11'((1 << size) - 1);
  endfunction

endpackage
