// perr_format: PHASERR frame builder for one sub-band pair.
//
// Sends, back to back, 20-bit frames that each carry the current phase
// error of the baseband A and baseband B sub-band: pe_a[0..7], pe_b[0..7],
// then a CRC-4 over those 16 bits (sent MSB first, inverted when err_inject,
// CONTROL PE-Err, is set). The frames are synchronous with the tick: the
// internal STICK restarts the frame count so that a frame starts in the first
// clock after the tick, and the phase errors are sampled at each frame
// start. 1,280,000 clocks per tick hold exactly 64,000 frames. pe_f is the
// frame flag (high with the first bit of every frame).
// What follows the specification: 20-bit frames, synchronous with the T bit,
// two phase errors, a frame flag and a CRC. The order of the fields and the
// use of the F bit as a separate frame flag are this design's.
// Timing: pe_bit and pe_f are registered; frame bit k of the frame that
// starts at the tick leaves in clock k+2 after the STICK pulse.
module perr_format
  import tfpga_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       stick,
  input  logic [7:0] pe_a,
  input  logic [7:0] pe_b,
  input  logic       err_inject,
  output logic       pe_bit,
  output logic       pe_f
);
  logic [15:0] data;
  logic [4:0]  cnt;
  logic [3:0]  crc;

  always_comb begin
    crc = 4'd0;
    for (int i = 0; i < 16; i++) crc = crc4_step(crc, data[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data   <= '0;
      cnt    <= 5'd0;
      pe_bit <= 1'b0;
      pe_f   <= 1'b0;
    end else begin
      if (stick || cnt == 5'd19) begin
        cnt  <= 5'd0;
        data <= {pe_b, pe_a};
      end else begin
        cnt <= cnt + 5'd1;
      end
      pe_f <= (cnt == 5'd0);
      if (cnt < 5'd16) pe_bit <= data[cnt[3:0]];
      else             pe_bit <= crc[3 - (cnt[1:0])] ^ err_inject;
    end
  end
endmodule
