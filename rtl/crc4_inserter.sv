// crc4_inserter: fills in the CRC of a serial frame.
//
// The frame builders (PHASEMOD, DUMPTRIG, TIMECODE, COMMAND) emit four
// placeholder bits where the CRC belongs and mark them with crc_slot; this
// block computes the CRC-4 (generator 10011, see tfpga_pkg) over every bit
// marked in_frame, and sends the CRC, most significant bit first, in place
// of the placeholders. frame_start clears the CRC: the bit that carries it
// (the start bit) is not covered. err_inject inverts the CRC bits so that a
// receiver can be shown to detect a bad frame (the *-Err bits of CONTROL).
// The specification says the CRC is "generated in the Timing FPGA" and
// inserted later; which bits it covers and its bit order are this design's.
//
// Timing: bit_out is the input bit, or CRC bit, registered once (one clock
// of latency). frame_out is in_frame or crc_slot delayed to match.
module crc4_inserter
  import tfpga_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic bit_in,
  input  logic frame_start,
  input  logic in_frame,
  input  logic crc_slot,
  input  logic err_inject,
  output logic bit_out,
  output logic frame_out
);
  logic [3:0] crc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      crc       <= '0;
      bit_out   <= 1'b0;
      frame_out <= 1'b0;
    end else begin
      frame_out <= in_frame | crc_slot;
      if (crc_slot) begin
        bit_out <= crc[3] ^ err_inject;
        crc     <= {crc[2:0], 1'b0};
      end else begin
        bit_out <= bit_in;
        if (frame_start)   crc <= '0;
        else if (in_frame) crc <= crc4_step(crc, bit_in);
      end
    end
  end
endmodule
