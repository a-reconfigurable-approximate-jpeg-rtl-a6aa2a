// approx_adder: reconfigurable approximate adder in the style of a
// gracefully-degrading accuracy-configurable adder (GDA).
//
// The sum a + b (two's complement, wraps at WIDTH bits, no carry in) is
// formed by sub-adders. Bits at and above APPROX_LSB form one exact adder.
// The low APPROX_LSB bits are cut into sub-adders of SUB_W bits. The carry
// into every sub-adder inside the low field, and the carry into the exact
// upper part, is not rippled from below: it is predicted by a carry-lookahead
// over the WINDOW bits right below that boundary, with the carry into that
// window taken as '0'. The prediction is wrong only when all WINDOW
// propagate bits are '1' and a carry arrives from further below, so the
// error grows gracefully with APPROX_LSB while the longest carry chain
// shrinks. APPROX_LSB = 0 gives an exact adder.
//
// From the source design: sub-adders, carry prediction from the preceding
// bits using generate/propagate with the incoming carry assumed '0', and a
// variable number of approximated LSBs set at design time. The sub-adder
// width and window width are this design's choices.
//
// Purely combinational: sum is valid in the same cycle as a and b.
module approx_adder #(
  parameter int unsigned WIDTH      = 32,
  parameter int unsigned APPROX_LSB = 8,
  parameter int unsigned SUB_W      = 4,
  parameter int unsigned WINDOW     = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] sum
);

  // A boundary at bit i (0 < i < WIDTH) uses a predicted carry.
  function automatic bit is_cut(input int unsigned i);
    if (i == 0 || i >= WIDTH || APPROX_LSB == 0) return 1'b0;
    if (i == APPROX_LSB) return 1'b1;
    return (i < APPROX_LSB) && (i % SUB_W == 0);
  endfunction

  logic [WIDTH-1:0] g, p;
  logic [WIDTH-1:0] c;

  assign g = a & b;
  assign p = a ^ b;

  assign c[0] = 1'b0;

  for (genvar i = 1; i < WIDTH; i++) begin : g_carry
    if (is_cut(i)) begin : g_predict
      // lookahead over bits [i-WINDOW, i-1] with carry-in assumed '0'
      localparam int unsigned LO = (i > WINDOW) ? i - WINDOW : 0;
      logic [i-LO:0] pc;
      assign pc[0] = 1'b0;
      for (genvar j = LO; j < i; j++) begin : g_la
        assign pc[j-LO+1] = g[j] | (p[j] & pc[j-LO]);
      end
      assign c[i] = pc[i-LO];
    end else begin : g_ripple
      assign c[i] = g[i-1] | (p[i-1] & c[i-1]);
    end
  end

  assign sum = p ^ c;

endmodule
