// jpeg_ref_pkg: reference models for the encoder testbenches.
//
// Written separately from the RTL: the approximate adder is modelled as
// whole-segment additions with the carry-in taken from the carry-out of a
// separate window addition, the truncating multiplier with exact integer
// division, the DCT basis with $cos, the zigzag order by walking the
// anti-diagonals. A baseline JPEG scan decoder (byte unstuffing, canonical
// Huffman decoding, DC prediction) turns the encoder output back into
// quantised coefficients so they can be compared with the models.
package jpeg_ref_pkg;

  // ---------------------------------------------------- arithmetic models
  function automatic int ref_add(input int a, input int b, input int lsb,
                                 input int sub_w = 4, input int win = 4);
    longint unsigned ua, ub, res;
    int cuts [$];
    if (lsb == 0) return a + b;
    ua = longint'(unsigned'(a));
    ub = longint'(unsigned'(b));
    cuts.push_back(0);
    for (int i = sub_w; i < lsb; i += sub_w) cuts.push_back(i);
    if (lsb < 32) cuts.push_back(lsb);
    cuts.push_back(32);
    res = 0;
    for (int s = 0; s + 1 < cuts.size(); s++) begin
      int lo, hi, wlo;
      longint unsigned m, wm, cin, part;
      lo = cuts[s]; hi = cuts[s+1];
      m  = (64'd1 << (hi - lo)) - 1;
      if (lo == 0) cin = 0;
      else begin
        wlo = (lo > win) ? lo - win : 0;
        wm  = (64'd1 << (lo - wlo)) - 1;
        cin = (((ua >> wlo) & wm) + ((ub >> wlo) & wm)) >> (lo - wlo);
      end
      part = (((ua >> lo) & m) + ((ub >> lo) & m) + cin) & m;
      res  = res | (part << lo);
    end
    return int'(res[31:0]);
  endfunction

  function automatic longint trunc_div(input longint v, input int n);
    longint p;
    p = longint'(1) << n;
    return (v - (v & (p - 1))) / p;   // floor(v / 2^n)
  endfunction

  function automatic longint ref_mul(input longint a, input longint b, input int lsb);
    int na, nb;
    na = (lsb + 1) / 2;
    nb = lsb / 2;
    return trunc_div(a, na) * trunc_div(b, nb) * (longint'(1) << lsb);
  endfunction

  // ---------------------------------------------------- DCT / quantiser
  function automatic int basis(input int k, input int n);
    real ck, v;
    ck = (k == 0) ? 1.0 / $sqrt(8.0) : 0.5;
    v  = ck * $cos((2.0 * n + 1.0) * k * 3.14159265358979 / 16.0) * 2048.0;
    return (v >= 0.0) ? $rtoi(v + 0.5) : -$rtoi(-v + 0.5);
  endfunction

  typedef int blk_t [64];

  // DCT with its own approximation for every unit: rm/ra for the row-pass
  // multiplier/adder of frequency v, cm/ca for the column-pass units of
  // coefficient u*8+v.
  function automatic blk_t ref_dct_units(input blk_t px, input int rm [8], input int ra [8],
                                         input int cm [64], input int ca [64]);
    int   z [64];
    blk_t dy;
    for (int r = 0; r < 8; r++)
      for (int v = 0; v < 8; v++) begin
        int acc;
        acc = 0;
        for (int c = 0; c < 8; c++)
          acc = ref_add((c == 0) ? 0 : acc,
                        int'(ref_mul(basis(v, c), px[r*8+c] - 128, rm[v])), ra[v]);
        z[r*8+v] = acc >>> 3;
      end
    for (int u = 0; u < 8; u++)
      for (int v = 0; v < 8; v++) begin
        int acc;
        acc = 0;
        for (int r = 0; r < 8; r++)
          acc = ref_add((r == 0) ? 0 : acc,
                        int'(ref_mul(basis(u, r), z[r*8+v], cm[u*8+v])), ca[u*8+v]);
        dy[u*8+v] = acc;
      end
    return dy;
  endfunction

  function automatic blk_t ref_dct(input blk_t px, input int lm, input int la);
    int rm [8], ra [8], cm [64], ca [64];
    for (int i = 0; i < 8; i++) begin rm[i] = lm; ra[i] = la; end
    for (int i = 0; i < 64; i++) begin cm[i] = lm; ca[i] = la; end
    return ref_dct_units(px, rm, ra, cm, ca);
  endfunction

  function automatic blk_t ref_quant(input blk_t dy, input int qt [64], input int lm);
    blk_t q;
    for (int k = 0; k < 64; k++) begin
      longint rcp, p, r;
      rcp = (65536 + qt[k] / 2) / qt[k];
      p   = ref_mul(dy[k], rcp, lm);
      r   = (p + (longint'(1) << 34)) >>> 35;
      if (r > 1023) r = 1023;
      if (r < -1023) r = -1023;
      q[k] = int'(r);
    end
    return q;
  endfunction

  // integer colour transform (14-bit JFIF weights, rounded, clamped)
  function automatic int ref_csc(input int rgb, input int comp);
    int r, g, b, v;
    r = (rgb >> 16) & 255; g = (rgb >> 8) & 255; b = rgb & 255;
    case (comp)
      0:       v = (4899 * r + 9617 * g + 1868 * b + 8192) >>> 14;
      1:       v = ((-2764 * r - 5428 * g + 8192 * b + 8192) >>> 14) + 128;
      default: v = ((8192 * r - 6860 * g - 1332 * b + 8192) >>> 14) + 128;
    endcase
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction

  // ---------------------------------------------------- zigzag order
  function automatic blk_t zigzag_order();
    blk_t zz;
    int   i;
    i = 0;
    for (int s = 0; s < 15; s++)
      for (int t = 0; t <= s; t++) begin
        int r, c;
        // even diagonals run upwards (row falls), odd ones downwards
        r = (s % 2 == 0) ? s - t : t;
        c = s - r;
        if (r < 8 && c < 8) begin
          zz[i] = r * 8 + c;
          i++;
        end
      end
    return zz;
  endfunction

  // ---------------------------------------------------- scan decoder
  class scan_decoder;
    byte unsigned data [$];
    int           pos;
    int           bitpos;   // bits left in cur
    int           cur;
    int           prev_dc [3];
    int           bits_tab [4][16];
    int           vals_tab [4][$];
    blk_t         zz;
    bit           error;
    int           n_zrl, n_eob, n_stuffed;

    function new();
      int dc_lum [16] = '{0,1,5,1,1,1,1,1,1,0,0,0,0,0,0,0};
      int dc_chr [16] = '{0,3,1,1,1,1,1,1,1,1,1,0,0,0,0,0};
      int ac_lum [16] = '{0,2,1,3,3,2,4,3,5,5,4,4,0,0,1,125};
      int ac_chr [16] = '{0,2,1,2,4,4,3,4,7,5,4,4,0,1,2,119};
      bits_tab[0] = dc_lum; bits_tab[1] = dc_chr;
      bits_tab[2] = ac_lum; bits_tab[3] = ac_chr;
      for (int v = 0; v < 12; v++) begin
        vals_tab[0].push_back(v);
        vals_tab[1].push_back(v);
      end
      for (int v = 0; v < 162; v++) begin
        vals_tab[2].push_back(int'(jpeg_pkg::AC_LUM_VALS[v]));
        vals_tab[3].push_back(int'(jpeg_pkg::AC_CHR_VALS[v]));
      end
      zz = zigzag_order();
      reset();
    endfunction

    function void reset();
      pos = 0; bitpos = 0; cur = 0; error = 0;
      n_zrl = 0; n_eob = 0; n_stuffed = 0;
      prev_dc = '{0, 0, 0};
      data.delete();
    endfunction

    function int get_bit();
      if (bitpos == 0) begin
        if (pos >= data.size()) begin
          error = 1;
          return 1;
        end
        cur = data[pos];
        pos++;
        if (cur == 8'hFF) begin
          if (pos < data.size() && data[pos] == 8'h00) begin
            pos++;
            n_stuffed++;
          end
          else error = 1;
        end
        bitpos = 8;
      end
      bitpos--;
      return (cur >> bitpos) & 1;
    endfunction

    function int receive(int s);
      int v;
      v = 0;
      for (int i = 0; i < s; i++) v = (v << 1) | get_bit();
      return v;
    endfunction

    function int extend(int v, int s);
      if (s == 0) return 0;
      return (v < (1 << (s - 1))) ? v - (1 << s) + 1 : v;
    endfunction

    function int decode(int t);
      int code, first, idx;
      code = 0; first = 0; idx = 0;
      for (int l = 1; l <= 16; l++) begin
        code = (code << 1) | get_bit();
        if (code - first < bits_tab[t][l-1]) return vals_tab[t][idx + code - first];
        idx   += bits_tab[t][l-1];
        first  = (first + bits_tab[t][l-1]) << 1;
      end
      error = 1;
      return 0;
    endfunction

    // true when only '1' padding bits of the final byte remain
    function bit at_end();
      if (pos != data.size()) return 0;
      for (int i = 0; i < bitpos; i++) if (((cur >> i) & 1) == 0) return 0;
      return 1;
    endfunction

    // decodes one block of component comp into raster-ordered coefficients
    function blk_t block(int comp);
      blk_t q;
      int   s, k, rs;
      q = '{default: 0};
      s = decode((comp == 0) ? 0 : 1);
      prev_dc[comp] += extend(receive(s), s);
      q[0] = prev_dc[comp];
      k = 1;
      while (k < 64 && !error) begin
        rs = decode((comp == 0) ? 2 : 3);
        if ((rs & 15) == 0) begin
          if ((rs >> 4) == 15) begin
            k += 16;
            n_zrl++;
          end else begin
            n_eob++;
            break;
          end
        end else begin
          k += rs >> 4;
          if (k > 63) begin
            error = 1;
            break;
          end
          q[zz[k]] = extend(receive(rs & 15), rs & 15);
          k++;
        end
      end
      return q;
    endfunction
  endclass

endpackage
