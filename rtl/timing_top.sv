// timing_top: the Station Board Timing FPGA.
//
// The Timing FPGA turns the external time code (PPSCODE A/B) into the board
// clock and the system timing, 1 PPS and a 100 Hz tick. It then builds the
// five control streams each of the 18 sub-band outputs carries to the
// Baseline Board: TIMECODE, COMMAND (Crossbar Board commands), PHASERR
// (switched phase errors from the Filter FPGAs), PHASEMOD (phase model) and
// DUMPTRIG (dump triggers). A CMIB controls and monitors it all through the
// MCB register bus.
//
// Structure and clock domains:
//  - ppscode_decoder (PPSCODE clocks, MCB clock, sclk): chooses a code and a
//    board clock. It drives BCLK, BPPS and BTICK, and repeats both codes
//    with the hop count incremented.
//  - The board returns BCLK, BPPS and BTICK as sclk, spps and stick. All
//    generators run on sclk (128 MHz) from the internal tick that
//    system_tick derives from them.
//  - perr_gen, tc_gen, xb_cmd_gen, pm_gen, NUM_DT dt_gen and dt_switch
//    build the streams. TIMECODE, COMMAND, PHASERR and PHASEMOD get one
//    register stage to match dt_switch, so that the T bit and the first
//    bit of every other stream after a tick share a clock. One
//    ctrl_serializer per sub-band sends them at 8x sclk on clk_ser.
//  - mcb_regs (MCB clock) holds the registers. The settings reach sclk
//    through two-flop synchronizers: they are quasi-static. Write strobes
//    and the interrupt cross as toggle pulses. The data that goes with a
//    strobe (port data, DTSELECT) is read straight from the MCB registers
//    when the strobe arrives, because it has been stable for several MCB
//    clocks by then.
//  - Monitor values reach the MCB domain through two-flop synchronizers.
//    Like the specification's registers that are "set at tick so the ISR
//    reads", they are read well after they last changed.
//  - test_port_mux drives the four test pins.
// Resets:
//  - rst_n is the asynchronous hardware reset of everything except
//    CONTROL, which only the configuration reset por_n clears.
//  - CONTROL RST-SW holds all sclk-domain logic in reset. The decoder (which
//    makes the board clock) and the registers stay out of it, so the
//    software reset can be released again.
// Parts with no logic of their own are ports:
//  - the SCLK PLL: pll_rst out, pll_locked in;
//  - the gigabit transmitter PLL: clk_ser and tx_pll_locked in;
//  - the pads;
//  - the Output FPGA control link: csrr out.
// Following the document: the blocks, their connections, the control-bit
// and register meanings, and the DUMPTRIG RAM depths of 32k and 2k. The
// number of generators of each size and the serializer lane order are
// this design's.
// Lint notes: parts of the sclk copy of the settings (cfg_s) go unused,
// because the fields that only travel with a write strobe are taken from
// the MCB copy. srst_q is a reset synchronizer, so its last stage is
// both a flop and an asynchronous reset. Only sub-band 0's PHASERR frame flag reaches a test pin.
module timing_top
  import tfpga_pkg::*;
#(
  parameter int NUM_DT         = 16,
  parameter int NUM_DT_BIG     = 2,
  parameter int DT_DEPTH_BIG   = 32768,
  parameter int DT_DEPTH_SMALL = 2048,
  parameter int PM_DEPTH       = 4096
) (
  input  logic                   rst_n,
  input  logic                   por_n,
  // PPSCODE inputs and repeated outputs
  input  logic                   clk_a,
  input  logic                   clk_b,
  input  logic                   clk_x,
  input  logic                   pc_a,
  input  logic                   pc_b,
  output logic                   opc_a,
  output logic                   opc_b,
  output logic                   oclk_a,
  output logic                   oclk_b,
  // board clock and system timing, out and back
  output logic                   bclk,
  output logic                   bpps,
  output logic                   btick,
  input  logic                   sclk,
  input  logic                   spps,
  input  logic                   stick,
  output logic                   pll_rst,
  input  logic                   pll_locked,
  input  logic                   clk_ser,
  input  logic                   tx_pll_locked,
  // Filter FPGA inputs (baseband A and B)
  input  logic [NUM_SB-1:0][3:0] perr_a,
  input  logic [NUM_SB-1:0]      ptick_a,
  input  logic [NUM_SB-1:0]      psind_a,
  input  logic [NUM_SB-1:0][3:0] perr_b,
  input  logic [NUM_SB-1:0]      ptick_b,
  input  logic [NUM_SB-1:0]      psind_b,
  // ticks from the Output FPGAs
  input  logic                   otick_a,
  input  logic                   otick_b,
  // sub-band control outputs
  output logic [NUM_SB-1:0]      ctrl_ser,
  output logic [NUM_SB-1:0][7:0] ctrl_word,
  output logic [15:0]            csrr,
  // MCB
  input  logic                   mcb_clk,
  input  logic [7:0]             mcb_addr,
  input  logic [15:0]            mcb_data_i,
  output logic [15:0]            mcb_data_o,
  output logic                   mcb_data_oe,
  input  logic                   mcb_cs_n,
  input  logic                   mcb_rd_wr_n,
  output logic                   mcb_intr,
  output logic [3:0]             testpin
);

  // ---------------------------------------------------------------- registers
  cfg_t        cfg, cfg_s;
  sts_t        sts_raw, sts_m;
  logic        pm_wr_m, dt_wr_m, tc_load_m, xb_start_m, pcstate_wr;
  logic [15:0] pm_wdata_m, dt_wdata_m;
  logic        intr_s, intr_m, us_tick_s, us_tick_m, mcb_ind;

  mcb_regs u_regs (
    .mcb_clk, .rst_n, .por_n, .mcb_addr, .mcb_data_i, .mcb_data_o, .mcb_data_oe,
    .mcb_cs_n, .mcb_rd_wr_n, .mcb_intr, .mcb_ind,
    .intr(intr_m), .us_tick(us_tick_m), .sts(sts_m), .cfg,
    .pm_wr(pm_wr_m), .pm_wdata(pm_wdata_m), .dt_wr(dt_wr_m), .dt_wdata(dt_wdata_m),
    .tc_load(tc_load_m), .xb_start(xb_start_m), .pcstate_wr
  );

  assign pll_rst = cfg.pll_rst;
  assign csrr    = cfg.csrr;

  // Software reset for the sclk domain: asserted at once, released in step
  // with sclk.
  logic       rst_sw_s;
  logic [1:0] srst_q;
  logic       srst_n;

  sync_bits #(.W(1)) u_sync_rstsw (.dst_clk(sclk), .rst_n, .d(cfg.rst_sw), .q(rst_sw_s));

  logic       arst_n;
  assign arst_n = rst_n && !rst_sw_s;

  always_ff @(posedge sclk or negedge arst_n) begin
    if (!arst_n) srst_q <= '0;
    else         srst_q <= {srst_q[0], 1'b1};
  end
  assign srst_n = srst_q[1];

  sync_bits #(.W($bits(cfg_t))) u_sync_cfg (.dst_clk(sclk), .rst_n, .d(cfg), .q(cfg_s));

  logic pm_wr_s, dt_wr_s, tc_load_s, xb_start_s;
  pulse_sync u_ps_pmwr (.src_clk(mcb_clk), .src_rst_n(rst_n), .src_pulse(pm_wr_m),
                        .dst_clk(sclk), .dst_rst_n(srst_n), .dst_pulse(pm_wr_s));
  pulse_sync u_ps_dtwr (.src_clk(mcb_clk), .src_rst_n(rst_n), .src_pulse(dt_wr_m),
                        .dst_clk(sclk), .dst_rst_n(srst_n), .dst_pulse(dt_wr_s));
  pulse_sync u_ps_tcld (.src_clk(mcb_clk), .src_rst_n(rst_n), .src_pulse(tc_load_m),
                        .dst_clk(sclk), .dst_rst_n(srst_n), .dst_pulse(tc_load_s));
  pulse_sync u_ps_xbst (.src_clk(mcb_clk), .src_rst_n(rst_n), .src_pulse(xb_start_m),
                        .dst_clk(sclk), .dst_rst_n(srst_n), .dst_pulse(xb_start_s));
  pulse_sync u_ps_intr (.src_clk(sclk), .src_rst_n(srst_n), .src_pulse(intr_s),
                        .dst_clk(mcb_clk), .dst_rst_n(rst_n), .dst_pulse(intr_m));
  pulse_sync u_ps_us   (.src_clk(sclk), .src_rst_n(srst_n), .src_pulse(us_tick_s),
                        .dst_clk(mcb_clk), .dst_rst_n(rst_n), .dst_pulse(us_tick_m));

  // Microsecond tick for TIMER: every 128 sclk clocks.
  logic [6:0] us_cnt;
  always_ff @(posedge sclk or negedge srst_n) begin
    if (!srst_n) us_cnt <= '0;
    else         us_cnt <= us_cnt + 7'd1;
  end
  assign us_tick_s = (us_cnt == 7'd127);

  // ------------------------------------------------------------------ PPSCODE
  src_e        clk_sel, dat_sel;
  logic [5:0]  sec_a, sec_b;
  logic [7:0]  hop_a, hop_b;
  logic        crc_a, crc_b, ovf_a, ovf_b, ici_a, ici_b, bad_int_a, bad_int_b;
  logic [15:0] tog_a, tog_b, tog_s, tog_x;
  logic        bad_a, bad_b, bad_s, bad_x, sci_a, sci_b, pcpps_intv, pps_sys;

  ppscode_decoder u_ppscode (
    .rst_n, .clk_a, .clk_b, .clk_x, .pc_a, .pc_b, .mcb_clk, .sclk,
    .ppsdly(cfg_s.ppsdly), .ppslen(cfg_s.ppslen), .ticklen(cfg_s.ticklen),
    .man_sel(cfg.man_sel), .man_clk_sel(cfg.man_clk_sel), .man_dat_sel(cfg.man_dat_sel),
    .sel_rst(cfg.sel_rst), .pcstate_wr,
    .opc_a, .opc_b, .oclk_a, .oclk_b, .bclk, .bpps, .btick,
    .clk_sel, .dat_sel, .sec_a, .sec_b, .hop_a, .hop_b, .crc_a, .crc_b,
    .ovf_a, .ovf_b, .ici_a, .ici_b, .bad_int_a, .bad_int_b,
    .tog_a, .tog_b, .tog_s, .tog_x, .bad_a, .bad_b, .bad_s, .bad_x,
    .sci_a, .sci_b, .pcpps_intv, .pps_sys
  );

  // -------------------------------------------------------------- system tick
  logic       stick_rise, spps_rise, stick_int, spps_int;
  logic [6:0] tcount;
  logic       stick_intv, spps_intv, stick_mis, stick_bad, spps_bad;

  system_tick u_tick (
    .clk(sclk), .rst_n(srst_n), .spps, .stick,
    .ppslen(cfg_s.ppslen), .ticklen(cfg_s.ticklen),
    .sysdly(cfg_s.sysdly), .intdly(cfg_s.intdly),
    .stick_rise, .spps_rise, .stick_int, .spps_int, .tcount, .intr(intr_s),
    .stick_intv, .spps_intv, .stick_mis, .stick_bad, .spps_bad
  );

  // Internal preamble phase (for the test pins): 1 in the clock after the
  // internal tick, alternating after that.
  logic pre_int;
  always_ff @(posedge sclk or negedge srst_n) begin
    if (!srst_n)        pre_int <= 1'b0;
    else if (stick_int) pre_int <= 1'b1;
    else                pre_int <= ~pre_int;
  end

  // --------------------------------------------------------- phase errors
  logic [NUM_SB-1:0]      phaserr, phaserr_f;
  logic [NUM_SB-1:0][3:0] pecrc_a, pecrc_b;
  logic [21:0]            ptickcnt_a, ptickcnt_b;
  logic [15:0]            tpeout;
  logic [NUM_SB-1:0]      sind_err_a, sind_err_b;
  logic                   ptick_int_a, ptick_int_b;

  perr_gen u_perr (
    .clk(sclk), .rst_n(srst_n),
    .perr_a, .ptick_a, .psind_a, .perr_b, .ptick_b, .psind_b,
    .clksel_a(cfg_s.clksel_a), .clksel_b(cfg_s.clksel_b),
    .bsel_a(cfg_s.bsel_a), .bsel_b(cfg_s.bsel_b),
    .swcfg_a(cfg_s.swcfg_a), .swcfg_b(cfg_s.swcfg_b),
    .ptsel_a(cfg_s.ptsel_a), .ptsel_b(cfg_s.ptsel_b),
    .ptmode_a(cfg_s.ptmode_a), .ptmode_b(cfg_s.ptmode_b),
    .tpesel_a(cfg_s.tpesel_a), .tpesel_b(cfg_s.tpesel_b),
    .stick(stick_int), .stick_ref(stick_rise), .err_inject(cfg_s.pe_err),
    .phaserr, .phaserr_f, .crc_a(pecrc_a), .crc_b(pecrc_b),
    .ptickcnt_a, .ptickcnt_b, .tpeout, .sind_err_a, .sind_err_b,
    .ptick_int_a, .ptick_int_b
  );

  // ----------------------------------------------------------------- TIMECODE
  logic        tc_bit, tc_frame, tc_cur_t;
  logic [9:0]  tc_cur_tcount;
  logic [31:0] tc_cur_scount;

  tc_gen u_tc (
    .clk(sclk), .rst_n(srst_n), .stick(stick_int), .spps(spps_int),
    .auto_mode(cfg_s.tc_auto), .reg_t(cfg.tc_t), .reg_c(cfg.tc_c),
    .reg_epoch(cfg.tc_epoch), .reg_tcount(cfg.tc_tcount), .reg_scount(cfg.tc_scount),
    .load(tc_load_s), .err_inject(cfg_s.tc_err),
    .tc_bit, .tc_frame, .cur_t(tc_cur_t), .cur_tcount(tc_cur_tcount),
    .cur_scount(tc_cur_scount)
  );

  // ------------------------------------------------------------------ COMMAND
  logic [NUM_SB-1:0] xb_cmd;
  logic              xb_frame, xb_busy, xb_addr_err;

  xb_cmd_gen u_xb (
    .clk(sclk), .rst_n(srst_n), .stick(stick_int),
    .addr(cfg.xb_addr), .start(xb_start_s), .data(cfg.xb_data),
    .err_inject(cfg_s.xb_err),
    .cmd(xb_cmd), .cmd_frame(xb_frame), .busy(xb_busy), .addr_err(xb_addr_err)
  );

  // ----------------------------------------------------------------- PHASEMOD
  logic       pm_bit, pm_frame;
  logic [11:0] pm_waddr, pm_raddr;
  logic       pm_e_cmd, pm_e_frame, pm_e_sbit, pm_e_wr, pm_e_rd;

  pm_gen #(.DEPTH(PM_DEPTH)) u_pm (
    .clk(sclk), .rst_n(srst_n), .clr(cfg_s.pm_clr), .en(cfg_s.pm_en),
    .stick(stick_int), .wr_en(pm_wr_s), .wr_data(pm_wdata_m),
    .err_inject(cfg_s.pm_err),
    .pm_bit, .pm_frame, .state_o(), .waddr_end(pm_waddr), .raddr_end(pm_raddr),
    .err_cmd(pm_e_cmd), .err_frame(pm_e_frame), .err_sbit(pm_e_sbit),
    .err_wr(pm_e_wr), .err_rd(pm_e_rd)
  );

  // ----------------------------------------------------------------- DUMPTRIG
  logic [NUM_DT-1:0]       dt_bit, dt_frame, dt_trig;
  logic [NUM_DT-1:0]       dt_e_cmd, dt_e_trig, dt_e_sbit, dt_e_ram;
  logic [MAX_DT-1:0][14:0] dt_waddr, dt_raddr;
  logic [MAX_DT-1:0][20:0] dt_trigcnt;
  logic [NUM_SB-1:0]       dt_out;
  logic [3:0]              dsel_m;

  assign dsel_m = cfg.dtsel;

  for (genvar g = 0; g < NUM_DT; g++) begin : g_dt
    dt_gen #(.DEPTH(g < NUM_DT_BIG ? DT_DEPTH_BIG : DT_DEPTH_SMALL)) u_dt (
      .clk(sclk), .rst_n(srst_n), .clr(cfg_s.dt_clr[g]), .arm(cfg_s.dt_arm[g]),
      .stick(stick_int), .wr_en(dt_wr_s && dsel_m == 4'(g)), .wr_data(dt_wdata_m),
      .err_inject(cfg_s.dt_err[g]),
      .dt_bit(dt_bit[g]), .dt_frame(dt_frame[g]), .trig_o(dt_trig[g]),
      .state_o(), .waddr_tick(dt_waddr[g]), .raddr_tick(dt_raddr[g]),
      .trigcnt(dt_trigcnt[g]),
      .err_cmd(dt_e_cmd[g]), .err_trig(dt_e_trig[g]), .err_sbit(dt_e_sbit[g]),
      .err_ram(dt_e_ram[g])
    );
  end
  for (genvar g = NUM_DT; g < MAX_DT; g++) begin : g_dt_none
    assign dt_waddr[g]   = '0;
    assign dt_raddr[g]   = '0;
    assign dt_trigcnt[g] = '0;
  end

  dt_switch #(.NUM_DT(NUM_DT)) u_dtsw (
    .clk(sclk), .rst_n(srst_n), .dt_in(dt_bit), .sel(cfg_s.dtswitch), .dt_out
  );

  // -------------------------------------------------------------- interval meters
  // Output FPGA ticks: caught on the edge chosen by TO-ClkA/B.
  logic [1:0] ot_r, ot_f, ot_q, ot_d;
  always_ff @(posedge sclk or negedge srst_n) begin
    if (!srst_n) begin ot_r <= '0; ot_q <= '0; ot_d <= '0; end
    else begin
      ot_r <= {otick_b, otick_a};
      ot_q <= {cfg_s.to_clk_b ? ot_f[1] : ot_r[1], cfg_s.to_clk_a ? ot_f[0] : ot_r[0]};
      ot_d <= ot_q;
    end
  end
  always_ff @(negedge sclk or negedge srst_n) begin
    if (!srst_n) ot_f <= '0;
    else         ot_f <= {otick_b, otick_a};
  end

  logic [21:0] timout_a, timout_b;
  logic [27:0] ppscnt;

  interval_meter #(.W(22)) u_to_a (
    .clk(sclk), .rst_n(srst_n), .sel(cfg_s.tomode_a),
    .d_pulse(ot_q[0] && !ot_d[0]), .d_half(cfg_s.to_clk_a),
    .s_pulse(stick_int), .s_half(1'b0), .count(timout_a)
  );
  interval_meter #(.W(22)) u_to_b (
    .clk(sclk), .rst_n(srst_n), .sel(cfg_s.tomode_b),
    .d_pulse(ot_q[1] && !ot_d[1]), .d_half(cfg_s.to_clk_b),
    .s_pulse(stick_int), .s_half(1'b0), .count(timout_b)
  );
  interval_meter #(.W(28)) u_ppscnt (
    .clk(sclk), .rst_n(srst_n), .sel(2'b00),
    .d_pulse(pps_sys), .d_half(1'b0), .s_pulse(spps_rise), .s_half(1'b0),
    .count(ppscnt)
  );

  // -------------------------------------------------------------- serializers
  // dt_switch registers the DUMPTRIG streams; the other streams get the same
  // one clock here, so that a trigger placed first after the tick stays in
  // the clock of the TIMECODE T bit and the first PHASEMOD and PHASERR bits.
  logic                   tc_q, pm_q;
  logic [NUM_SB-1:0]      xb_q, pe_q;
  always_ff @(posedge sclk or negedge srst_n) begin
    if (!srst_n) begin
      tc_q <= 1'b0; pm_q <= 1'b0; xb_q <= '0; pe_q <= '0;
    end else begin
      tc_q <= tc_bit; pm_q <= pm_bit; xb_q <= xb_cmd; pe_q <= phaserr;
    end
  end

  for (genvar i = 0; i < NUM_SB; i++) begin : g_ser
    ctrl_serializer u_ser (
      .clk(sclk), .clk_ser, .rst_n(srst_n),
      .sync_bit(cfg_s.tx_bit), .tc(tc_q), .cmd(xb_q[i]), .pe(pe_q[i]),
      .pm(pm_q), .dt(dt_out[i]), .word_o(ctrl_word[i]), .ser_o(ctrl_ser[i])
    );
  end

  // ------------------------------------------------------------ monitor values
  always_comb begin
    sts_raw = '0;
    sts_raw.pecrc_a     = pecrc_a;
    sts_raw.pecrc_b     = pecrc_b;
    sts_raw.ptickcnt_a  = ptickcnt_a;
    sts_raw.ptickcnt_b  = ptickcnt_b;
    sts_raw.clktx_bad   = !tx_pll_locked;
    sts_raw.xclk_bad    = bad_x;
    sts_raw.sclk_bad    = !pll_locked;
    sts_raw.stick_intv  = stick_intv;
    sts_raw.spps_intv   = spps_intv;
    sts_raw.stick_mis   = stick_mis;
    sts_raw.clka_bad    = bad_a;
    sts_raw.clkb_bad    = bad_b;
    sts_raw.pcpps_intv  = pcpps_intv;
    sts_raw.stick_bad   = stick_bad;
    sts_raw.spps_bad    = spps_bad;
    sts_raw.sind_err_a  = sind_err_a;
    sts_raw.sind_err_b  = sind_err_b;
    sts_raw.pm_errs     = {pm_e_wr, pm_e_rd, pm_e_sbit, pm_e_frame, pm_e_cmd};
    sts_raw.dt_errs     = {|dt_e_ram, |dt_e_sbit, |dt_e_trig, |dt_e_cmd};
    sts_raw.dt_waddr    = dt_waddr;
    sts_raw.dt_raddr    = dt_raddr;
    sts_raw.dt_trigcnt  = dt_trigcnt;
    sts_raw.pm_waddr    = pm_waddr;
    sts_raw.pm_raddr    = pm_raddr;
    sts_raw.tcount      = tcount;
    sts_raw.tpeout      = tpeout;
    sts_raw.timout_a    = timout_a;
    sts_raw.timout_b    = timout_b;
    sts_raw.ppscnt      = ppscnt;
    sts_raw.clk_sel     = clk_sel;
    sts_raw.dat_sel     = dat_sel;
    sts_raw.sci_a       = sci_a;
    sts_raw.sci_b       = sci_b;
    sts_raw.ici_a       = ici_a;
    sts_raw.ici_b       = ici_b;
    sts_raw.bad_int_a   = bad_int_a;
    sts_raw.bad_int_b   = bad_int_b;
    sts_raw.sec_a       = sec_a;
    sts_raw.sec_b       = sec_b;
    sts_raw.hop_a       = hop_a;
    sts_raw.hop_b       = hop_b;
    sts_raw.crc_a       = crc_a;
    sts_raw.crc_b       = crc_b;
    sts_raw.ovf_a       = ovf_a;
    sts_raw.ovf_b       = ovf_b;
    sts_raw.tog_a       = tog_a;
    sts_raw.tog_b       = tog_b;
    sts_raw.tog_s       = tog_s;
    sts_raw.tog_x       = tog_x;
    sts_raw.bad_a       = bad_a;
    sts_raw.bad_b       = bad_b;
    sts_raw.bad_s       = bad_s;
    sts_raw.bad_x       = bad_x;
    sts_raw.tc_cur_t      = tc_cur_t;
    sts_raw.tc_cur_tcount = tc_cur_tcount;
    sts_raw.tc_cur_scount = tc_cur_scount;
    sts_raw.xb_busy     = xb_busy;
    sts_raw.xb_addr_err = xb_addr_err;
  end

  sync_bits #(.W($bits(sts_t))) u_sync_sts (.dst_clk(mcb_clk), .rst_n, .d(sts_raw), .q(sts_m));

  // ---------------------------------------------------------------- test pins
  logic [63:0] tp_sig;
  logic [3:0]  dsel_s;
  assign dsel_s = cfg_s.dtsel;

  always_comb begin
    tp_sig = '0;
    tp_sig[6'h00] = !srst_n;
    tp_sig[6'h01] = sclk;
    tp_sig[6'h03] = stick_int;
    tp_sig[6'h04] = spps_int;
    tp_sig[6'h05] = pre_int;
    tp_sig[6'h06] = clk_a;
    tp_sig[6'h07] = clk_b;
    tp_sig[6'h08] = clk_x;
    tp_sig[6'h09] = pc_a;
    tp_sig[6'h0A] = pc_b;
    tp_sig[6'h0B] = pps_sys;
    tp_sig[6'h0C] = cfg_s.tx_bit;
    tp_sig[6'h1B] = xb_cmd[0];
    tp_sig[6'h1C] = phaserr[0];
    tp_sig[6'h1D] = tc_bit;
    tp_sig[6'h1E] = pm_bit;
    tp_sig[6'h1F] = dt_out[0];
    tp_sig[6'h20] = mcb_clk;
    tp_sig[6'h21] = mcb_cs_n;
    tp_sig[6'h22] = mcb_rd_wr_n;
    tp_sig[6'h23] = cfg_s.pm_en;
    tp_sig[6'h24] = pm_wr_s;
    tp_sig[6'h25] = cfg_s.pm_clr;
    tp_sig[6'h26] = cfg_s.dt_arm[dsel_s];
    tp_sig[6'h27] = dt_wr_s;
    tp_sig[6'h28] = cfg_s.dt_clr[dsel_s];
    tp_sig[6'h29] = dt_trig[dsel_s];
    tp_sig[6'h2A] = ptick_int_a;
    tp_sig[6'h2B] = ptick_int_b;
    tp_sig[6'h2C] = mcb_ind;
    tp_sig[6'h3B] = xb_frame;
    tp_sig[6'h3C] = phaserr_f[0];
    tp_sig[6'h3D] = tc_frame;
    tp_sig[6'h3E] = pm_frame;
    tp_sig[6'h3F] = dt_frame[dsel_s];
  end

  test_port_mux u_tp (
    .sig(tp_sig),
    .sel({cfg.testpin1[13:8], cfg.testpin1[5:0], cfg.testpin0[13:8], cfg.testpin0[5:0]}),
    .tp(testpin)
  );

endmodule
