// tc_gen: the Time Code Generator.
//
// At every internal STICK it sends one TIMECODE frame carrying the time
// stamp of the tick that starts: the tick (T) bit, the header control bit
// C, the 3-bit EPOCH, the 10-bit tick count TCOUNT and the 32-bit second
// count SCOUNT since the epoch (fields of the TCSTAMP registers), followed by
// a CRC-4. In manual mode the CMIB writes the values every interrupt and they
// are sent unchanged at the next tick. In automatic mode (TCSTAMP2 A bit) T
// follows the internal PPS, TCOUNT counts internal ticks since the last PPS,
// and SCOUNT is loaded from the written value at the first PPS after
// TCSTAMP2 is written and then counts PPS pulses; cur_* give the values in
// use, for read-back.
//
// Frame on the wire (one bit per 128 MHz clock): preamble (alternating
// 1/0) ... start bit 0 in the clock of the STICK pulse, where the preamble
// would have been 1; then T in the first clock after the tick, so that T lines
// up with the first DUMPTRIG/PHASEMOD instruction bit; C; EPOCH[0..2];
// TCOUNT[0..9]; SCOUNT[0..31]; CRC-4 (4 bits); preamble again. The
// field list is the specification's (TCSTAMP); the exact frame layout of the
// cable signalling document is not reproduced there, so the order, start
// bit and CRC placement are this design's.
// Timing: tc_bit is registered once after the frame logic (crc4_inserter).
module tc_gen
  import tfpga_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        stick,
  input  logic        spps,
  input  logic        auto_mode,
  input  logic        reg_t,
  input  logic        reg_c,
  input  logic [2:0]  reg_epoch,
  input  logic [9:0]  reg_tcount,
  input  logic [31:0] reg_scount,
  input  logic        load,
  input  logic        err_inject,
  output logic        tc_bit,
  output logic        tc_frame,
  output logic        cur_t,
  output logic [9:0]  cur_tcount,
  output logic [31:0] cur_scount
);
  localparam int NBITS = 47;

  logic [NBITS-1:0] sh;
  logic [5:0]       bitn;
  logic             active;
  logic             pre;
  logic [9:0]       tcnt;
  logic [31:0]      scnt;
  logic             load_pend;

  // Values for the frame that starts at this tick.
  logic        t_n;
  logic [9:0]  tcount_n;
  logic [31:0] scount_n;
  always_comb begin
    if (auto_mode) begin
      t_n      = spps;
      tcount_n = spps ? 10'd0 : tcnt + 10'd1;
      scount_n = !spps ? scnt : (load_pend ? reg_scount : scnt + 32'd1);
    end else begin
      t_n      = reg_t;
      tcount_n = reg_tcount;
      scount_n = reg_scount;
    end
  end

  logic bit_c, start_c, frame_c, slot_c;
  always_comb begin
    bit_c   = pre;
    start_c = 1'b0;
    frame_c = 1'b0;
    slot_c  = 1'b0;
    if (stick) begin
      bit_c   = 1'b0;
      start_c = 1'b1;
    end else if (active) begin
      if (bitn < 6'(NBITS)) begin
        bit_c   = sh[0];
        frame_c = 1'b1;
      end else begin
        slot_c = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh        <= '0;
      bitn      <= '0;
      active    <= 1'b0;
      pre       <= 1'b0;
      tcnt      <= '0;
      scnt      <= '0;
      load_pend <= 1'b0;
    end else begin
      pre <= stick ? 1'b0 : ~pre;
      if (load) load_pend <= 1'b1;
      if (stick) begin
        sh     <= {scount_n, tcount_n, reg_epoch, reg_c, t_n};
        bitn   <= '0;
        active <= 1'b1;
        tcnt   <= tcount_n;
        if (auto_mode && spps) begin
          scnt <= scount_n;
          if (load_pend && !load) load_pend <= 1'b0;
        end
      end else if (active) begin
        sh   <= sh >> 1;
        bitn <= bitn + 6'd1;
        if (bitn == 6'(NBITS + 3)) active <= 1'b0;
      end
    end
  end

  assign cur_t      = auto_mode ? (tcnt == 10'd0) : reg_t;
  assign cur_tcount = auto_mode ? tcnt : reg_tcount;
  assign cur_scount = auto_mode ? scnt : reg_scount;

  crc4_inserter u_crc (
    .clk, .rst_n,
    .bit_in     (bit_c),
    .frame_start(start_c),
    .in_frame   (frame_c),
    .crc_slot   (slot_c),
    .err_inject,
    .bit_out    (tc_bit),
    .frame_out  (tc_frame)
  );
endmodule
