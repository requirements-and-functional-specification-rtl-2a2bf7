// perr_sync: input synchronizer for one phase error port of a Filter FPGA.
//
// The Filter FPGA sends an 8-bit phase error per 128 MHz clock as two 4-bit
// nibbles, least significant first, on both edges of SCLK, together with a
// tick (PTICK, high with the LS nibble of the first sample of a 10 ms
// interval) and a sample indicator (PSIND). Because trace lengths differ,
// the LS nibble can arrive on either edge; clk_sel (a CLKSEL register bit)
// says which:
//   clk_sel = 0: LS nibble taken on a rising edge, MS nibble on the falling
//                edge after it
//   clk_sel = 1: LS nibble taken on a falling edge, MS nibble on the rising
//                edge after it
// Both edges are captured into flops; the pair is joined in the rising-edge
// domain and registered, so pe/tick/sind change once per clock.
//
// Checks: sind_err pulses when a tick arrives without PSIND high (PSIND
// marks the first of repeated samples and the tick always comes with a new
// sample). A CRC-4 is run over one selected bit line at the full nibble
// rate (both halves of each clock, LS half first) between two internal
// ticks and held in crc (PECRC). bsel[1:0] picks line 0-3; with bsel[2] set,
// PSIND replaces line 0 (PECRCSEL).
// Timing: pe, tick and sind are valid two rising edges after the MS nibble
// was captured. tick_rise pulses in the clock where tick goes high.
module perr_sync
  import tfpga_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] perr,
  input  logic       ptick,
  input  logic       psind,
  input  logic       clk_sel,
  input  logic [2:0] bsel,
  input  logic       stick,
  output logic [7:0] pe,
  output logic       tick,
  output logic       tick_rise,
  output logic       sind,
  output logic       sind_err,
  output logic [3:0] crc
);
  // capture on both edges: {psind, ptick, perr}
  logic [5:0] r_cap, f_cap, f_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_cap <= '0;
      f_q   <= '0;
    end else begin
      r_cap <= {psind, ptick, perr};
      f_q   <= f_cap;
    end
  end
  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) f_cap <= '0;
    else        f_cap <= {psind, ptick, perr};
  end

  logic [5:0] lsn, msn;
  assign lsn = clk_sel ? f_q   : r_cap;
  assign msn = clk_sel ? r_cap : f_cap;
  logic [3:0] lsn_n, msn_n;
  assign lsn_n = lsn[3:0];
  assign msn_n = msn[3:0];

  // Bit line chosen for the CRC, LS half then MS half.
  logic b0, b1;
  always_comb begin
    if (bsel[2] && bsel[1:0] == 2'd0) begin
      b0 = lsn[5];
      b1 = msn[5];
    end else begin
      b0 = lsn_n[bsel[1:0]];
      b1 = msn_n[bsel[1:0]];
    end
  end

  logic [3:0] crc_run;
  logic       tick_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pe       <= '0;
      tick     <= 1'b0;
      tick_q   <= 1'b0;
      sind     <= 1'b0;
      sind_err <= 1'b0;
      crc_run  <= '0;
      crc      <= '0;
    end else begin
      pe       <= {msn[3:0], lsn[3:0]};
      tick     <= lsn[4];
      tick_q   <= tick;
      sind     <= lsn[5];
      sind_err <= lsn[4] & ~lsn[5];
      if (stick) begin
        crc     <= crc_run;
        crc_run <= crc4_step(crc4_step(4'd0, b0), b1);
      end else begin
        crc_run <= crc4_step(crc4_step(crc_run, b0), b1);
      end
    end
  end
  assign tick_rise = tick & ~tick_q;
endmodule
