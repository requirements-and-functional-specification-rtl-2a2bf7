// pm_gen: the PHASEMOD generator.
//
// The CMIB writes the phase model instructions for the next tick interval
// into a 4k x 16 RAM through the PMPORT memory port. On every internal STICK
// while enabled (CONTROL PM-En) the state machine starts reading at the
// read address (0 after the clear that precedes each batch) and turns
// instructions into bits of the PHASEMOD stream until an END
// instruction sends it back to IDLE, where it sends preamble:
//   SBIT  start bit (0), which must fall where the preamble is 1; clears the CRC
//   DATA  width+1 data bits, data[0] first
//   CRC   four placeholder bits, replaced by the frame CRC (crc4_inserter)
//   NOP   length preamble bits
//   END   back to IDLE
// Instruction word: [15:11] command, [10:8] width, [7:0] data, or [10:0]
// length for NOP. Other commands (TRIG, NOPL and the reserved codes) set the
// command error and return to IDLE. The preamble alternates every clock and
// is resynchronized at each STICK so that the first bit after the tick is a
// preamble 1: an SBIT placed first is then in a legal position, as the
// specification states.
//
// Writing is linear from address 0 and reading restarts wherever the read
// address is: the CMIB clears the generator (CONTROL PM-Clr, a level) before
// each batch of writes, which zeroes both addresses. The write and read
// addresses are captured at every END (PMWADDR, PMRADDR). STATUS4 errors,
// collected over a tick interval and published at the STICK: command error,
// frame error (a STICK arrives while a frame set is still being sent), start
// bit error, and write/read address reaching the end of the RAM (the address
// then stays there).
//
// Timing: 128 MHz system clock; the first instruction is decoded in the
// clock after the STICK pulse and its bit leaves pm_bit one clock later.
module pm_gen
  import tfpga_pkg::*;
#(
  parameter int DEPTH = 4096
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clr,
  input  logic        en,
  input  logic        stick,
  input  logic        wr_en,
  input  logic [15:0] wr_data,
  input  logic        err_inject,
  output logic        pm_bit,
  output logic        pm_frame,
  output gen_state_e  state_o,
  output logic [11:0] waddr_end,
  output logic [11:0] raddr_end,
  output logic        err_cmd,
  output logic        err_frame,
  output logic        err_sbit,
  output logic        err_wr,
  output logic        err_rd
);
  localparam int AW = $clog2(DEPTH);
  localparam logic [AW-1:0] LAST = AW'(DEPTH - 1);

  logic [15:0]   mem [DEPTH];
  logic [15:0]   q;
  logic [AW-1:0] waddr, raddr, raddr_n, raddr_inc;
  gen_state_e    state, state_n;
  logic          pre;
  logic [10:0]   cnt, cnt_n;
  logic [2:0]    bidx, bidx_n;
  logic          crc_mode, crc_mode_n;
  logic          acc_cmd, acc_frame, acc_sbit, acc_wr, acc_rd;

  logic bit_c, start_c, frame_c, slot_c, end_c;
  logic e_cmd, e_frame, e_sbit, e_wr, e_rd;

  cmd_e        cmd;
  logic [2:0]  width;
  logic [10:0] len;
  logic [7:0]  dat;
  assign cmd   = cmd_e'(q[15:11]);
  assign width = q[10:8];
  assign len   = q[10:0];
  assign dat   = q[7:0];

  // The read address stops at the end of the RAM.
  assign raddr_inc = (raddr == LAST) ? raddr : raddr + 1'b1;

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
    end_c      = 1'b0;
    e_cmd      = 1'b0;
    e_sbit     = 1'b0;
    e_frame    = stick && (state != GS_IDLE);
    e_rd       = (state != GS_IDLE) && (raddr == LAST);
    e_wr       = wr_en && (waddr == LAST);
    unique case (state)
      GS_IDLE: begin
        if (stick && en) state_n = GS_READ;
      end
      GS_READ: begin
        case (cmd)
          CMD_SBIT: begin
            bit_c   = 1'b0;
            start_c = 1'b1;
            e_sbit  = ~pre;
            raddr_n = raddr_inc;
          end
          CMD_DATA: begin
            bit_c   = dat[0];
            frame_c = 1'b1;
            if (width == 3'd0) raddr_n = raddr_inc;
            else begin
              state_n = GS_DATA;
              cnt_n   = {8'd0, width};
              bidx_n  = 3'd1;
            end
          end
          CMD_CRC: begin
            slot_c     = 1'b1;
            state_n    = GS_NOP;
            crc_mode_n = 1'b1;
            cnt_n      = 11'd3;
          end
          CMD_END: begin
            end_c   = 1'b1;
            state_n = GS_IDLE;
          end
          CMD_NOP: begin
            if (len <= 11'd1) raddr_n = raddr_inc;
            else begin
              state_n    = GS_NOP;
              crc_mode_n = 1'b0;
              cnt_n      = len - 11'd1;
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
        cnt_n   = cnt - 11'd1;
        if (cnt == 11'd1) begin
          state_n = GS_READ;
          raddr_n = raddr_inc;
        end
      end
      GS_NOP: begin
        slot_c = crc_mode;
        cnt_n  = cnt - 11'd1;
        if (cnt == 11'd1) begin
          state_n = GS_READ;
          raddr_n = raddr_inc;
        end
      end
      default: state_n = GS_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[waddr] <= wr_data;
    q <= mem[clr ? '0 : raddr_n];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= GS_IDLE;
      waddr     <= '0;
      raddr     <= '0;
      cnt       <= '0;
      bidx      <= '0;
      crc_mode  <= 1'b0;
      pre       <= 1'b1;
      waddr_end <= '0;
      raddr_end <= '0;
    end else begin
      pre <= stick ? 1'b1 : ~pre;
      if (end_c) begin
        waddr_end <= 12'(waddr);
        raddr_end <= 12'(raddr);
      end
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
        if (wr_en && waddr != LAST) waddr <= waddr + 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {acc_cmd, acc_frame, acc_sbit, acc_wr, acc_rd} <= '0;
      {err_cmd, err_frame, err_sbit, err_wr, err_rd} <= '0;
    end else if (stick) begin
      {err_cmd, err_frame, err_sbit, err_wr, err_rd} <=
        {acc_cmd | e_cmd, acc_frame | e_frame, acc_sbit | e_sbit, acc_wr | e_wr, acc_rd | e_rd};
      {acc_cmd, acc_frame, acc_sbit, acc_wr, acc_rd} <= '0;
    end else begin
      acc_cmd   <= acc_cmd   | e_cmd;
      acc_frame <= acc_frame | e_frame;
      acc_sbit  <= acc_sbit  | e_sbit;
      acc_wr    <= acc_wr    | e_wr;
      acc_rd    <= acc_rd    | e_rd;
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
    .bit_out    (pm_bit),
    .frame_out  (pm_frame)
  );
endmodule
