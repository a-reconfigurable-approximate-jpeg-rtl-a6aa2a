// stream_merger: interleaves the three components' code streams into one.
//
// The Y, Cb and Cr coders each fill their own FIFO with variable-length
// codes. The merger forwards codes from one FIFO at a time, in the order
// Y block, Cb block, Cr block, moving to the next component after the code
// marked 'last' (end of that 8x8 block). This gives the interleaved
// minimum-coded-unit order of a 4:4:4 baseline JPEG scan. mcu_done pulses
// when the Cr block of a unit has been forwarded.
//
// Combinational forwarding: one code per cycle when the packer is ready.
// The component order is this design's choice (standard JPEG interleave).
module stream_merger
  import jpeg_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid [3],
  output logic in_ready [3],
  input  vlc_t in_vlc   [3],
  output logic out_valid,
  input  logic out_ready,
  output vlc_t out_vlc,
  output logic mcu_done
);

  logic [1:0] ch;

  always_comb begin
    out_valid = 1'b0;
    out_vlc   = '0;
    for (int i = 0; i < 3; i++) begin
      in_ready[i] = 1'b0;
      if (ch == 2'(i)) begin
        out_valid   = in_valid[i];
        out_vlc     = in_vlc[i];
        in_ready[i] = out_ready;
      end
    end
  end

  assign mcu_done = out_valid && out_ready && out_vlc.last && (ch == 2'd2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ch <= '0;
    end else if (out_valid && out_ready && out_vlc.last) begin
      ch <= (ch == 2'd2) ? 2'd0 : ch + 2'd1;
    end
  end

endmodule
