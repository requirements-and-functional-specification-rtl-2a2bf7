// perr_gen: the Phase Error Generator.
//
// 18 Filter FPGAs per baseband (A and B) each send an 8-bit phase error per
// clock as DDR nibbles. This block
//  - synchronizes all 36 inputs to the system clock and joins the nibbles
//    (perr_sync; the edge of each input is chosen by its CLKSEL bit);
//  - switches: sub-band output i takes A input swcfg_a[i] and B input
//    swcfg_b[i] (PESWCFG registers, values 0-17; larger values give 0),
//    which must match the data switch of the Output FPGAs;
//  - formats each pair into the PHASERR stream of its output (perr_format);
//  - monitors: a CRC-4 per input over one selected bit line between
//    internal ticks (PECRC, line chosen by PECRCSEL), the interval between a
//    selected PTICK and the system tick in 256 MHz units (PTICKCNT, with
//    PTICKSEL and the SEL mode bits), the sample-indicator errors of every
//    input collected over a tick interval (STATUS1-3), and the phase errors
//    of two selected inputs captured at the tick (TPEOUT, TPESEL).
// Timing: 128 MHz system clock (both edges for the input capture). The
// internal tick (stick) aligns the PHASERR frames and closes the monitor
// windows; stick_ref (the returned STICK, as a pulse) is the reference of
// the PTICK interval.
module perr_gen
  import tfpga_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NUM_SB-1:0][3:0] perr_a,
  input  logic [NUM_SB-1:0]      ptick_a,
  input  logic [NUM_SB-1:0]      psind_a,
  input  logic [NUM_SB-1:0][3:0] perr_b,
  input  logic [NUM_SB-1:0]      ptick_b,
  input  logic [NUM_SB-1:0]      psind_b,
  input  logic [NUM_SB-1:0]      clksel_a,
  input  logic [NUM_SB-1:0]      clksel_b,
  input  logic [2:0]             bsel_a,
  input  logic [2:0]             bsel_b,
  input  logic [NUM_SB-1:0][4:0] swcfg_a,
  input  logic [NUM_SB-1:0][4:0] swcfg_b,
  input  logic [4:0]             ptsel_a,
  input  logic [4:0]             ptsel_b,
  input  logic [1:0]             ptmode_a,
  input  logic [1:0]             ptmode_b,
  input  logic [4:0]             tpesel_a,
  input  logic [4:0]             tpesel_b,
  input  logic                   stick,
  input  logic                   stick_ref,
  input  logic                   err_inject,
  output logic [NUM_SB-1:0]      phaserr,
  output logic [NUM_SB-1:0]      phaserr_f,
  output logic [NUM_SB-1:0][3:0] crc_a,
  output logic [NUM_SB-1:0][3:0] crc_b,
  output logic [21:0]            ptickcnt_a,
  output logic [21:0]            ptickcnt_b,
  output logic [15:0]            tpeout,
  output logic [NUM_SB-1:0]      sind_err_a,
  output logic [NUM_SB-1:0]      sind_err_b,
  output logic                   ptick_int_a,
  output logic                   ptick_int_b
);
  logic [NUM_SB-1:0][7:0] pe_a, pe_b;
  logic [NUM_SB-1:0]      tk_a, tk_b, tr_a, tr_b, sd_a, sd_b, se_a, se_b;

  for (genvar i = 0; i < NUM_SB; i++) begin : g_in
    perr_sync u_a (.clk, .rst_n, .perr(perr_a[i]), .ptick(ptick_a[i]), .psind(psind_a[i]),
                   .clk_sel(clksel_a[i]), .bsel(bsel_a), .stick,
                   .pe(pe_a[i]), .tick(tk_a[i]), .tick_rise(tr_a[i]), .sind(sd_a[i]),
                   .sind_err(se_a[i]), .crc(crc_a[i]));
    perr_sync u_b (.clk, .rst_n, .perr(perr_b[i]), .ptick(ptick_b[i]), .psind(psind_b[i]),
                   .clk_sel(clksel_b[i]), .bsel(bsel_b), .stick,
                   .pe(pe_b[i]), .tick(tk_b[i]), .tick_rise(tr_b[i]), .sind(sd_b[i]),
                   .sind_err(se_b[i]), .crc(crc_b[i]));
  end

  // input switch and formatters
  for (genvar i = 0; i < NUM_SB; i++) begin : g_out
    logic [7:0] sa, sb;
    assign sa = (swcfg_a[i] < 5'(NUM_SB)) ? pe_a[swcfg_a[i]] : 8'd0;
    assign sb = (swcfg_b[i] < 5'(NUM_SB)) ? pe_b[swcfg_b[i]] : 8'd0;
    perr_format u_fmt (.clk, .rst_n, .stick, .pe_a(sa), .pe_b(sb), .err_inject,
                       .pe_bit(phaserr[i]), .pe_f(phaserr_f[i]));
  end

  // PTICK interval measurement
  logic tra_s, trb_s, hal_a, hal_b;
  assign tra_s = (ptsel_a < 5'(NUM_SB)) ? tr_a[ptsel_a] : 1'b0;
  assign trb_s = (ptsel_b < 5'(NUM_SB)) ? tr_b[ptsel_b] : 1'b0;
  assign hal_a = (ptsel_a < 5'(NUM_SB)) ? clksel_a[ptsel_a] : 1'b0;
  assign hal_b = (ptsel_b < 5'(NUM_SB)) ? clksel_b[ptsel_b] : 1'b0;
  assign ptick_int_a = (ptsel_a < 5'(NUM_SB)) ? tk_a[ptsel_a] : 1'b0;
  assign ptick_int_b = (ptsel_b < 5'(NUM_SB)) ? tk_b[ptsel_b] : 1'b0;

  interval_meter #(.W(22)) u_im_a (.clk, .rst_n, .sel(ptmode_a), .d_pulse(tra_s), .d_half(hal_a),
                                   .s_pulse(stick_ref), .s_half(1'b0), .count(ptickcnt_a));
  interval_meter #(.W(22)) u_im_b (.clk, .rst_n, .sel(ptmode_b), .d_pulse(trb_s), .d_half(hal_b),
                                   .s_pulse(stick_ref), .s_half(1'b0), .count(ptickcnt_b));

  // sample indicator errors and tick phase error capture
  logic [NUM_SB-1:0] acc_a, acc_b;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_a <= '0; acc_b <= '0;
      sind_err_a <= '0; sind_err_b <= '0;
      tpeout <= '0;
    end else if (stick) begin
      sind_err_a <= acc_a | se_a;
      sind_err_b <= acc_b | se_b;
      acc_a <= '0; acc_b <= '0;
      tpeout <= {(tpesel_b < 5'(NUM_SB)) ? pe_b[tpesel_b] : 8'd0,
                 (tpesel_a < 5'(NUM_SB)) ? pe_a[tpesel_a] : 8'd0};
    end else begin
      acc_a <= acc_a | se_a;
      acc_b <= acc_b | se_b;
    end
  end

  logic unused;
  assign unused = ^{sd_a, sd_b};
endmodule
