// dt_gen: one DUMPTRIG generator.
//
// The CMIB writes 16-bit instructions through the DTPORT memory port into a
// circular instruction RAM (DEPTH words, 32k or 2k in the FPGA). Once the
// generator is armed, the first internal STICK starts the state machine,
// which then reads instructions continuously, without waiting for further
// ticks, and turns each into bits of the DUMPTRIG stream:
//   TRIG  one trigger bit (1), which must fall where the preamble is 0
//   SBIT  the start bit (0) of a frame, where the preamble is 1; clears the CRC
//   DATA  width+1 bits of data, data[0] first
//   CRC   four placeholder bits, replaced by the frame CRC (crc4_inserter)
//   NOP   length preamble bits;  NOPL  length*2048 preamble bits
//   END   back to IDLE, continuous preamble
// Instruction word: [15:11] command, [10:8] width, [7:0] data, or
// [10:0] length for NOP/NOPL. Any other command sets the command error and
// returns to IDLE. The preamble alternates 1/0 every clock and is
// resynchronized by a STICK seen in IDLE so that the first bit after the
// tick falls on a preamble 0: a TRIG placed first is then legal and lines up
// with the TIMECODE T bit, as the specification requires.
//
// Monitors (STATUS4, DTWADDR, DTRADDR, DTTRIGCNT): command, trigger
// position, start bit position and RAM (read address equal to write address
// while reading) errors are collected over a tick interval and published at
// the next STICK, together with both RAM addresses and the number of clocks
// from the last trigger to the STICK (saturating, 21 bits).
//
// Timing: all in the 128 MHz system clock. The instruction RAM is read
// synchronously with the next read address, so one bit leaves per clock.
// The first instruction is decoded in the clock after the STICK pulse and
// its bit appears on dt_bit one clock later. clr (CONTROL DT-Clr, a level)
// holds the generator in IDLE with both addresses at zero.
// What follows the specification: command set, encodings, the state diagram
// (IDLE, READ, DATA, NOP), the circular RAM and the monitor registers.
// This design's own choices: the CRC coverage, saturating counters, and
// that a width of 110 sends seven bits (the printed table repeats data[5:0]).
module dt_gen
  import tfpga_pkg::*;
#(
  parameter int DEPTH = 32768
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clr,
  input  logic        arm,
  input  logic        stick,
  input  logic        wr_en,
  input  logic [15:0] wr_data,
  input  logic        err_inject,
  output logic        dt_bit,
  output logic        dt_frame,
  output logic        trig_o,
  output gen_state_e  state_o,
  output logic [14:0] waddr_tick,
  output logic [14:0] raddr_tick,
  output logic [20:0] trigcnt,
  output logic        err_cmd,
  output logic        err_trig,
  output logic        err_sbit,
  output logic        err_ram
);
  localparam int AW = $clog2(DEPTH);

  logic [15:0]   mem [DEPTH];
  logic [15:0]   q;
  logic [AW-1:0] waddr, raddr, raddr_n;
  gen_state_e    state, state_n;
  logic          pre;
  logic [21:0]   cnt, cnt_n;
  logic [2:0]    bidx, bidx_n;
  logic          crc_mode, crc_mode_n;
  logic [20:0]   tcount;
  logic          acc_cmd, acc_trig, acc_sbit, acc_ram;

  // Per-clock decode results
  logic bit_c, start_c, frame_c, slot_c, trig_c;
  logic e_cmd, e_trig, e_sbit, e_ram;

  cmd_e        cmd;
  logic [2:0]  width;
  logic [10:0] len;
  logic [21:0] nopl_bits;
  logic [7:0]  dat;
  assign dat       = q[7:0];
  assign cmd       = cmd_e'(q[15:11]);
  assign width     = q[10:8];
  assign len       = q[10:0];
  assign nopl_bits = {len, 11'd0};

  always_comb begin
    state_n    = state;
    raddr_n    = raddr;
    cnt_n      = cnt;
    bidx_n     = bidx;
    crc_mode_n = crc_mode;
    bit_c      = pre;
    start_c    = 1'b0;
    frame_c    = 1'b0;
    slot_c     = 1'b0;
    trig_c     = 1'b0;
    e_cmd      = 1'b0;
    e_trig     = 1'b0;
    e_sbit     = 1'b0;
    e_ram      = 1'b0;
    unique case (state)
      GS_IDLE: begin
        if (stick && arm) state_n = GS_READ;
      end
      GS_READ: begin
        e_ram = (raddr == waddr);
        case (cmd)
          CMD_TRIG: begin
            bit_c   = 1'b1;
            trig_c  = 1'b1;
            e_trig  = pre;
            raddr_n = raddr + 1'b1;
          end
          CMD_SBIT: begin
            bit_c   = 1'b0;
            start_c = 1'b1;
            e_sbit  = ~pre;
            raddr_n = raddr + 1'b1;
          end
          CMD_DATA: begin
            bit_c   = q[0];
            frame_c = 1'b1;
            if (width == 3'd0) raddr_n = raddr + 1'b1;
            else begin
              state_n = GS_DATA;
              cnt_n   = {19'd0, width};
              bidx_n  = 3'd1;
            end
          end
          CMD_CRC: begin
            slot_c     = 1'b1;
            state_n    = GS_NOP;
            crc_mode_n = 1'b1;
            cnt_n      = 22'd3;
          end
          CMD_END: begin
            state_n = GS_IDLE;
          end
          CMD_NOP: begin
            if (len <= 11'd1) raddr_n = raddr + 1'b1;
            else begin
              state_n    = GS_NOP;
              crc_mode_n = 1'b0;
              cnt_n      = {11'd0, len} - 22'd1;
            end
          end
          CMD_NOPL: begin
            if (len == 11'd0) raddr_n = raddr + 1'b1;
            else begin
              state_n    = GS_NOP;
              crc_mode_n = 1'b0;
              cnt_n      = nopl_bits - 22'd1;
            end
          end
          default: begin
            e_cmd   = 1'b1;
            state_n = GS_IDLE;
          end
        endcase
      end
      GS_DATA: begin
        bit_c   = dat[bidx];
        frame_c = 1'b1;
        bidx_n  = bidx + 3'd1;
        cnt_n   = cnt - 22'd1;
        if (cnt == 22'd1) begin
          state_n = GS_READ;
          raddr_n = raddr + 1'b1;
        end
      end
      GS_NOP: begin
        slot_c = crc_mode;
        cnt_n  = cnt - 22'd1;
        if (cnt == 22'd1) begin
          state_n = GS_READ;
          raddr_n = raddr + 1'b1;
        end
      end
      default: state_n = GS_IDLE;
    endcase
  end

  // Instruction RAM: write port from the MCB memory port, synchronous read.
  always_ff @(posedge clk) begin
    if (wr_en) mem[waddr] <= wr_data;
    q <= mem[clr ? '0 : raddr_n];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= GS_IDLE;
      waddr    <= '0;
      raddr    <= '0;
      cnt      <= '0;
      bidx     <= '0;
      crc_mode <= 1'b0;
      pre      <= 1'b0;
      trig_o   <= 1'b0;
    end else begin
      pre    <= (state == GS_IDLE && stick) ? 1'b0 : ~pre;
      trig_o <= trig_c;
      if (clr) begin
        state <= GS_IDLE;
        waddr <= '0;
        raddr <= '0;
      end else begin
        state    <= state_n;
        raddr    <= raddr_n;
        cnt      <= cnt_n;
        bidx     <= bidx_n;
        crc_mode <= crc_mode_n;
        if (wr_en) waddr <= waddr + 1'b1;
      end
    end
  end

  // Monitors, published at each STICK.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tcount     <= '0;
      trigcnt    <= '0;
      waddr_tick <= '0;
      raddr_tick <= '0;
      {acc_cmd, acc_trig, acc_sbit, acc_ram} <= '0;
      {err_cmd, err_trig, err_sbit, err_ram} <= '0;
    end else begin
      if (trig_c)               tcount <= 21'd1;
      else if (tcount != '1)    tcount <= tcount + 21'd1;
      if (stick) begin
        trigcnt    <= tcount;
        waddr_tick <= 15'(waddr);
        raddr_tick <= 15'(raddr);
        {err_cmd, err_trig, err_sbit, err_ram} <=
          {acc_cmd | e_cmd, acc_trig | e_trig, acc_sbit | e_sbit, acc_ram | e_ram};
        {acc_cmd, acc_trig, acc_sbit, acc_ram} <= '0;
      end else begin
        acc_cmd  <= acc_cmd  | e_cmd;
        acc_trig <= acc_trig | e_trig;
        acc_sbit <= acc_sbit | e_sbit;
        acc_ram  <= acc_ram  | e_ram;
      end
    end
  end

  assign state_o = state;

  crc4_inserter u_crc (
    .clk, .rst_n,
    .bit_in     (bit_c),
    .frame_start(start_c),
    .in_frame   (frame_c),
    .crc_slot   (slot_c),
    .err_inject,
    .bit_out    (dt_bit),
    .frame_out  (dt_frame)
  );
endmodule
