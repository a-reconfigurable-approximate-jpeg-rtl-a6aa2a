// tb_zigzag_rle: feeds quantised blocks of varied sparsity (dense, sparse,
// empty, long zero runs, non-zero final coefficient) and compares every
// emitted symbol with a reference run-length coding done on a zigzag order
// computed in the testbench. The symbol consumer stalls at random.
// Counts how often DC, AC, ZRL and EOB symbols and a block without EOB occur.
module tb_zigzag_rle;
  import jpeg_pkg::*;
  import jpeg_ref_pkg::*;

  localparam int NBLK = 300;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, sym_valid, sym_ready;
  qcoef_t q [64];
  rle_sym_t sym;

  zigzag_rle #(.CHROMA(1'b1)) dut (.*);

  always #5 clk = ~clk;

  typedef struct { bit dc; int run; int size; int amp; bit last; } esym_t;
  esym_t exp_q [$];
  int n_zrl = 0, n_eob = 0, n_noeob = 0, n_ac = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  function automatic int sz(input int v);
    int a, s;
    a = (v < 0) ? -v : v;
    s = 0;
    while (a > 0) begin
      a = a / 2;
      s++;
    end
    return s;
  endfunction

  function automatic int amp(input int v, input int s);
    return ((v < 0) ? v - 1 + (1 << s) : v) % (1 << s);
  endfunction

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    forever begin
      @(negedge clk);
      sym_ready = ($urandom % 4 != 0);
    end
  end

  always @(posedge clk) begin
    if (rst_n && sym_valid && sym_ready) begin
      esym_t e;
      if (exp_q.size() == 0) check(0, "unexpected symbol");
      else begin
        e = exp_q.pop_front();
        check(sym.is_dc == e.dc && sym.run == 4'(e.run) && sym.size == 4'(e.size) &&
              sym.amp == 11'(e.amp) && sym.last == e.last && sym.chroma, "symbol matches");
      end
    end
  end

  initial begin
    blk_t zz;
    int   prev;
    zz = zigzag_order();
    prev = 0;
    in_valid = 0;
    for (int k = 0; k < 64; k++) q[k] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < NBLK; b++) begin
      int v [64];
      int run;
      int dens;
      dens = (b % 5 == 0) ? 0 : (b % 5 == 1) ? 100 : (b % 5 == 2) ? 5 : 30;
      for (int k = 0; k < 64; k++) begin
        v[k] = ($urandom % 100 < dens) ? int'($urandom % 2047) - 1023 : 0;
        if (b % 7 == 3 && k > 0 && k < 40) v[k] = 0;  // long zero runs
      end
      if (b % 4 == 0) v[zz[63]] = -1;                   // final coefficient set
      v[0] = int'($urandom % 2047) - 1023;
      // reference symbols
      begin
        esym_t e;
        e = '{dc: 1, run: 0, size: sz(v[0] - prev), amp: amp(v[0] - prev, sz(v[0] - prev)), last: 0};
        exp_q.push_back(e);
        prev = v[0];
        run = 0;
        for (int i = 1; i < 64; i++) begin
          int c;
          c = v[zz[i]];
          if (c == 0) run++;
          else begin
            while (run > 15) begin
              exp_q.push_back('{dc: 0, run: 15, size: 0, amp: 0, last: 0});
              run -= 16;
              n_zrl++;
            end
            exp_q.push_back('{dc: 0, run: run, size: sz(c), amp: amp(c, sz(c)), last: i == 63});
            n_ac++;
            run = 0;
          end
        end
        if (run > 0) begin
          exp_q.push_back('{dc: 0, run: 0, size: 0, amp: 0, last: 1});
          n_eob++;
        end else n_noeob++;
      end
      @(negedge clk);
      for (int k = 0; k < 64; k++) q[k] = qcoef_t'(v[k]);
      in_valid = 1;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
      in_valid = 0;
      for (int k = 0; k < 64; k++) q[k] = 12'h5A5;      // garbage between blocks
    end
    repeat (5) @(posedge clk);
    check(exp_q.size() == 0, "all symbols emitted");
    check(n_zrl > 0, "ZRL exercised");
    check(n_eob > 0, "EOB exercised");
    check(n_noeob > 0, "block ending without EOB exercised");
    $display("zrl=%0d eob=%0d no_eob=%0d ac=%0d", n_zrl, n_eob, n_noeob, n_ac);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
