// ppscode_rx: receiver and repeater for one external PPSCODE input.
//
// The PPSCODE is a 128 Mb/s serial stream, clocked by its own 128 MHz clock,
// that carries alternating preamble (0101...) and, once per second, a frame:
// a start bit 0 (seen as two zeros in a row after at least three preamble
// bits), then
//   bit 0       T, the 1PPS tick bit (always 1); its arrival is the PPS epoch
//   bits 1-6    COUNTPPS, second of the minute, LSB first
//   bits 7-10   unused, 1010
//   bits 11-18  COUNTHOP, number of boards the code has passed, LSB first
//   bits 19-22  CRC-4 (generator 10011) over bits 0-18, MSB first
// followed by a 1 and preamble again. Bits 0-10 and the CRC generator are
// the specification's; the position of the hop count and of the CRC after
// it are this design's choice (the printed bit map has no hop field).
//
// Outputs: pps pulses for one clock after the T bit; second, hop, crc_err
// (CRC of the last frame bad) and ovf (received hop count 255, which wraps
// when incremented) are updated at the end of each frame. ici_err is the
// input-clock interval check: set at a PPS when the number of clocks since
// the previous PPS is not ppslen+1. bad_int is high when the last eight
// frames all had a CRC or interval error (the integrated BAD flag).
//
// Repeater: dout is the input stream delayed by PC_REPEAT_DLY (18) clocks,
// the delay the specification gives per board, with the hop count
// incremented bit-serially (LSB first, carry in 1) and the CRC recomputed
// over the changed frame, so the next board in the chain sees a valid code.
module ppscode_rx
  import tfpga_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        din,
  input  logic [26:0] ppslen,
  output logic        dout,
  output logic        pps,
  output logic [5:0]  second,
  output logic [7:0]  hop,
  output logic        crc_err,
  output logic        ovf,
  output logic        ici_err,
  output logic        bad_int
);
  logic        prev;
  logic [1:0]  alt;
  logic        recv;
  logic [4:0]  idx;
  logic [PC_FRAME_LEN-1:0] frame;
  logic [3:0]  crc_in;
  logic [3:0]  crc_out;
  logic        carry;
  logic [26:0] icnt;
  logic        ivalid;
  logic [7:0]  hist;
  logic [PC_REPEAT_DLY-2:0] dly;

  // Bit for the repeated stream, formed from the bit now on din.
  logic ob;
  always_comb begin
    ob = din;
    if (recv) begin
      if (idx >= 5'(PC_HOP_LSB) && idx < 5'(PC_CRC_LSB)) ob = din ^ carry;
      else if (idx >= 5'(PC_CRC_LSB))                    ob = crc_out[3];
    end
  end

  logic [3:0] crc_in_n;
  assign crc_in_n = crc4_step(crc_in, din);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev    <= 1'b1;
      alt     <= '0;
      recv    <= 1'b0;
      idx     <= '0;
      frame   <= '0;
      crc_in  <= '0;
      crc_out <= '0;
      carry   <= 1'b0;
      pps     <= 1'b0;
      second  <= '0;
      hop     <= '0;
      crc_err <= 1'b0;
      ovf     <= 1'b0;
      ici_err <= 1'b0;
      icnt    <= '0;
      ivalid  <= 1'b0;
      hist    <= '0;
      dly     <= '0;
      dout    <= 1'b0;
    end else begin
      prev <= din;
      pps  <= recv && idx == 5'(PC_T_BIT) && din;
      {dout, dly} <= {dly, ob};
      if (!recv) begin
        if (!prev && !din && alt == 2'd3) begin
          recv    <= 1'b1;
          idx     <= '0;
          crc_in  <= '0;
          crc_out <= '0;
          carry   <= 1'b1;
        end
        if (prev != din) alt <= (alt == 2'd3) ? alt : alt + 2'd1;
        else             alt <= '0;
      end else begin
        frame[idx] <= din;
        crc_in     <= crc_in_n;
        if (idx < 5'(PC_CRC_LSB)) crc_out <= crc4_step(crc_out, ob);
        else                      crc_out <= {crc_out[2:0], 1'b0};
        if (idx >= 5'(PC_HOP_LSB) && idx < 5'(PC_CRC_LSB)) carry <= carry & din;
        idx <= idx + 5'd1;
        if (idx == 5'(PC_FRAME_LEN - 1)) begin
          recv    <= 1'b0;
          alt     <= '0;
          second  <= frame[PC_SEC_LSB +: 6];
          hop     <= frame[PC_HOP_LSB +: 8];
          ovf     <= (frame[PC_HOP_LSB +: 8] == 8'hFF);
          crc_err <= (crc_in_n != 4'd0);
          hist    <= {hist[6:0], (crc_in_n != 4'd0) | ici_err};
        end
      end
      // input-clock PPS interval check
      if (pps) begin
        icnt    <= '0;
        ivalid  <= 1'b1;
        ici_err <= ivalid && (icnt != ppslen);
      end else if (icnt != '1) begin
        icnt <= icnt + 27'd1;
      end
    end
  end

  assign bad_int = &hist;
endmodule
