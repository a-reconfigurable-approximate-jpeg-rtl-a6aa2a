// addr_counter: address generator that streams the image memory into the
// encoder.
//
// start (a pulse) begins a pass over addresses 0..NUM-1. The counter drives
// rd_addr with the address the memory must read for the next cycle, so
// with a synchronous one-cycle memory the word at 'addr' is on the memory
// output exactly while 'addr' is current. valid is high for the whole pass;
// last marks the final address. The address advances in every cycle in
// which the encoder accepts the pixel (advance), i.e. one address per clock
// while the encoder is not stalled. busy falls after the last pixel.
//
// The source names the counter and its one-address-per-clock behaviour;
// the stall input is this design's addition, needed because the encoder
// can apply back-pressure.
module addr_counter #(
  parameter int unsigned NUM = 512 * 512,
  parameter int unsigned AW  = $clog2(NUM)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          advance,
  output logic [AW-1:0] rd_addr,
  output logic          valid,
  output logic          last
);

  logic [AW-1:0] addr;
  logic          step;

  assign last    = valid && (addr == AW'(NUM - 1));
  assign step    = valid && advance;
  assign rd_addr = start ? '0 : (step ? addr + 1'b1 : addr);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr  <= '0;
      valid <= 1'b0;
    end else if (start) begin
      addr  <= '0;
      valid <= 1'b1;
    end else if (step) begin
      addr <= addr + 1'b1;
      if (last) valid <= 1'b0;
    end
  end

endmodule
