// xb_cmd_gen: the Crossbar Board Command Generator.
//
// The CMIB writes the sub-band pair number (0-17) to XBADDR and then the
// 16-bit command to XBDATA; the write of XBDATA starts the transfer. The
// command is sent as a frame on the COMMAND stream of that one sub-band:
// start bit 0 (placed where the preamble would have been 1), command[0..15],
// then the CRC-4. All COMMAND streams carry preamble otherwise. busy stays
// high from the XBDATA write to the end of the frame; addr_err is high while
// XBADDR holds a number above 17, and a start with such an address is
// ignored. The preamble is resynchronized at each internal STICK so that it
// matches the other streams. Only one command is sent at a time, as the
// specification allows.
// What follows the specification: the register pair, busy and range error
// bits, one command at a time, a CRC (XB-Err corrupts it). The frame layout is
// this design's, since the cable signalling document is not reproduced.
// Timing: 128 MHz system clock, output registered once (crc4_inserter).
module xb_cmd_gen
  import tfpga_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              stick,
  input  logic [4:0]        addr,
  input  logic              start,
  input  logic [15:0]       data,
  input  logic              err_inject,
  output logic [NUM_SB-1:0] cmd,
  output logic              cmd_frame,
  output logic              busy,
  output logic              addr_err
);
  typedef enum logic [1:0] {XS_IDLE, XS_WAIT, XS_SEND} xs_e;
  xs_e         st;
  logic [15:0] sh;
  logic [4:0]  bitn;
  logic [4:0]  lane, lane_d;
  logic        pre, pre_d, act_d;
  logic        bit_c, start_c, frame_c, slot_c, crc_bit;

  assign addr_err = (addr > 5'(NUM_SB - 1));

  always_comb begin
    bit_c   = pre;
    start_c = 1'b0;
    frame_c = 1'b0;
    slot_c  = 1'b0;
    if (st == XS_WAIT && pre) begin
      bit_c   = 1'b0;
      start_c = 1'b1;
    end else if (st == XS_SEND) begin
      if (bitn < 5'd16) begin
        bit_c   = sh[0];
        frame_c = 1'b1;
      end else begin
        slot_c = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st     <= XS_IDLE;
      sh     <= '0;
      bitn   <= '0;
      lane   <= '0;
      lane_d <= '0;
      pre    <= 1'b0;
      pre_d  <= 1'b0;
      act_d  <= 1'b0;
    end else begin
      pre    <= stick ? 1'b0 : ~pre;
      pre_d  <= pre;
      lane_d <= lane;
      act_d  <= (st == XS_SEND) || (st == XS_WAIT && pre);
      unique case (st)
        XS_IDLE: if (start && !addr_err) begin
          st   <= XS_WAIT;
          sh   <= data;
          lane <= addr;
        end
        XS_WAIT: if (pre) begin
          st   <= XS_SEND;
          bitn <= '0;
        end
        XS_SEND: begin
          bitn <= bitn + 5'd1;
          if (bitn < 5'd16) sh <= sh >> 1;
          if (bitn == 5'd19) st <= XS_IDLE;
        end
        default: st <= XS_IDLE;
      endcase
    end
  end

  assign busy = (st != XS_IDLE) || act_d;

  crc4_inserter u_crc (
    .clk, .rst_n,
    .bit_in     (bit_c),
    .frame_start(start_c),
    .in_frame   (frame_c),
    .crc_slot   (slot_c),
    .err_inject,
    .bit_out    (crc_bit),
    .frame_out  (cmd_frame)
  );

  always_comb begin
    for (int i = 0; i < NUM_SB; i++)
      cmd[i] = (act_d && lane_d == 5'(i)) ? crc_bit : pre_d;
  end
endmodule
