// tb_huffman_encoder: checks codes from the JPEG reference tables, written
// out bit by bit in the testbench, for luminance and chrominance DC and AC
// symbols (EOB and ZRL included), the amplitude bits that follow them,
// the pass-through of the handshake, and that each full table is
// prefix-free and uses exactly the listed number of codes of each length.
module tb_huffman_encoder;
  import jpeg_pkg::*;

  int checks = 0, failures = 0;
  logic sym_valid, sym_ready, vlc_valid, vlc_ready;
  rle_sym_t sym;
  vlc_t vlc;

  huffman_encoder dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s bits=%b len=%0d", what, vlc.bits, vlc.len);
    end
  endtask

  // code given as a string of '0'/'1'
  task automatic expect_code(input bit chroma, input bit dc, input int run, input int size,
                             input int ampv, input string code);
    logic [26:0] e;
    int len;
    sym = '0;
    sym.chroma = chroma; sym.is_dc = dc; sym.run = 4'(run); sym.size = 4'(size);
    sym.amp = 11'(ampv);
    #1;
    e = '0;
    for (int i = 0; i < code.len(); i++) e = (e << 1) | ((code[i] == "1") ? 27'd1 : 27'd0);
    len = code.len() + size;
    e = (e << size) | 27'(ampv);
    check(vlc.len == 5'(len) && vlc.bits == e,
          $sformatf("%s %s run=%0d size=%0d", chroma ? "chroma" : "luma", dc ? "DC" : "AC", run, size));
  endtask

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sym_valid = 1; vlc_ready = 0; sym = '0;
    #1;
    check(vlc_valid && !sym_ready, "valid passes, ready passes");
    vlc_ready = 1; sym_valid = 0;
    #1;
    check(!vlc_valid && sym_ready, "handshake follows");
    // luminance DC
    expect_code(0, 1, 0, 0, 0, "00");
    expect_code(0, 1, 0, 1, 1, "010");
    expect_code(0, 1, 0, 3, 5, "100");
    expect_code(0, 1, 0, 6, 33, "1110");
    expect_code(0, 1, 0, 11, 1234, "111111110");
    // chrominance DC
    expect_code(1, 1, 0, 0, 0, "00");
    expect_code(1, 1, 0, 2, 2, "10");
    expect_code(1, 1, 0, 11, 7, "11111111110");
    // luminance AC
    expect_code(0, 0, 0, 0, 0, "1010");          // EOB
    expect_code(0, 0, 15, 0, 0, "11111111001");  // ZRL
    expect_code(0, 0, 0, 1, 1, "00");
    expect_code(0, 0, 0, 2, 3, "01");
    expect_code(0, 0, 0, 3, 5, "100");
    expect_code(0, 0, 0, 4, 9, "1011");
    expect_code(0, 0, 1, 1, 0, "1100");
    expect_code(0, 0, 1, 2, 2, "11011");
    expect_code(0, 0, 2, 1, 1, "11100");
    expect_code(0, 0, 3, 1, 1, "111010");
    expect_code(0, 0, 15, 10, 1023, "1111111111111110");
    // chrominance AC
    expect_code(1, 0, 0, 0, 0, "00");            // EOB
    expect_code(1, 0, 15, 0, 0, "1111111010");   // ZRL
    expect_code(1, 0, 0, 1, 1, "01");
    expect_code(1, 0, 0, 2, 1, "100");
    expect_code(1, 0, 1, 1, 0, "1011");
    expect_code(1, 0, 0, 4, 15, "11000");
    expect_code(1, 0, 2, 1, 1, "11010");
    // each table: code-length histogram and prefix-freedom
    for (int t = 0; t < 4; t++) begin
      int hist [17];
      int n;
      hist = '{default: 0};
      n = 0;
      for (int s = 0; s < 256; s++) begin
        hcode_t a;
        a = (t == 0) ? DC_LUM_TAB[s] : (t == 1) ? DC_CHR_TAB[s] : (t == 2) ? AC_LUM_TAB[s] : AC_CHR_TAB[s];
        if (a.len != 0) begin
          hist[a.len]++;
          n++;
          for (int s2 = 0; s2 < 256; s2++) begin
            hcode_t b;
            b = (t == 0) ? DC_LUM_TAB[s2] : (t == 1) ? DC_CHR_TAB[s2] : (t == 2) ? AC_LUM_TAB[s2] : AC_CHR_TAB[s2];
            if (s2 != s && b.len >= a.len && b.len != 0)
              if ((b.code >> (b.len - a.len)) == a.code) check(0, $sformatf("prefix table %0d", t));
          end
        end
      end
      check(n == ((t < 2) ? 12 : 162), $sformatf("table %0d size", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
