// bitstream_ram: dual-port block memory that receives the encoded scan.
//
// Port A writes one 32-bit word per cycle when wr_en is high; port B reads
// with a one-cycle synchronous latency (rd_q holds mem[rd_addr] from the
// previous cycle). Port B lets the finished bitstream be read out ("probed")
// while or after the encoder writes it. A read and a write of the same
// address in one cycle return the old word.
//
// The source gives the function (a dual-port RAM into which the bitstream
// is dumped); the default depth of 2^17 words (512 KiB, enough for a
// 512 x 512 colour image down to about 1.5:1 compression) is this design's
// choice.
module bitstream_ram #(
  parameter int unsigned DEPTH = 1 << 17,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [31:0]   wr_data,
  input  logic [AW-1:0] rd_addr,
  output logic [31:0]   rd_q
);

  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    rd_q <= mem[rd_addr];
  end

endmodule
