// sync_fifo: single-clock first-in first-out buffer.
//
// DEPTH entries (a power of two) of WIDTH bits held in a register array.
// Write when in_valid && in_ready, read when out_valid && out_ready; both may
// happen in the same cycle. The head entry is presented combinationally on
// out_data (first-word fall-through), so a word written in cycle t can be
// read in cycle t+1.
module sync_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 64
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wptr, rptr;
  logic             wr, rd;

  assign in_ready  = (wptr - rptr) != (AW+1)'(DEPTH);
  assign out_valid = wptr != rptr;
  assign out_data  = mem[rptr[AW-1:0]];
  assign wr        = in_valid && in_ready;
  assign rd        = out_valid && out_ready;

  always_ff @(posedge clk) begin
    if (wr) mem[wptr[AW-1:0]] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (wr) wptr <= wptr + 1'b1;
      if (rd) rptr <= rptr + 1'b1;
    end
  end

endmodule
