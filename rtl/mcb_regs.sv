// mcb_regs: the Monitor & Control Bus (MCB) register file.
//
// The CMIB configures and monitors the timing logic through 16-bit
// registers at 8-bit addresses (00h-60h). Every register runs on the MCB
// clock (at most 33 MHz, unrelated to the 128 MHz system clock). Settings
// leave as one packed cfg_t, and monitor values arrive as one packed sts_t.
// Both are crossed to the other domains outside this block.
//
// Bus timing: a write stores mcb_data_i at the rising edge where cs_n and
// rd_wr_n are both low (one cycle). For a read, the address is captured at
// the rising edge where cs_n is low and rd_wr_n high. The addressed value
// is then driven (mcb_data_oe) for as long as cs_n stays low, so the CMIB
// samples it one edge later.
//
// Side effects: a write to PMPORT or DTPORT pulses pm_wr or dt_wr, with
// the data and the generator number (DTSELECT) held steady. A write to
// TCSTAMP2 pulses tc_load, to XBDATA pulses xb_start, and to PCSTATE
// pulses pcstate_wr. Any write to INTRIND clears the interrupt indicator.
// Reads of STATUS0-4 return the written value XOR the live status bits.
// TIMER0/1 is a 32-bit microsecond counter that advances on us_tick. The
// interrupt input (a 10 ms event, already in this domain) sets the
// indicator. When INTR-En is set it also gives the one-MCB-clock mcb_intr
// pulse.
//
// Following the document: the register map and bit positions, the XOR read
// of STATUS, CONTROL kept through a hardware reset, PPSLEN/TICKLEN reset
// to their normal values, DTSELECT choosing the generator that CONTROL
// DT-Clr/DT-Arm/DT-Err, DTWADDR, DTRADDR, DTPORT and DTTRIGCNT address,
// and the read/write timing. This design's own choices:
//  - CONTROL is cleared only by por_n, the configuration reset;
//  - the DESIGNID value;
//  - TIMER is read-only and free-running;
//  - the TIMOUT/PTICKCNT SEL bits are written at the same addresses they
//    are read from;
//  - reserved bits read 0;
//  - an unused address reads 0.
module mcb_regs
  import tfpga_pkg::*;
#(
  parameter logic [15:0] DESIGN_ID = 16'h0110
) (
  input  logic        mcb_clk,
  input  logic        rst_n,
  input  logic        por_n,
  input  logic [7:0]  mcb_addr,
  input  logic [15:0] mcb_data_i,
  output logic [15:0] mcb_data_o,
  output logic        mcb_data_oe,
  input  logic        mcb_cs_n,
  input  logic        mcb_rd_wr_n,
  output logic        mcb_intr,
  output logic        mcb_ind,
  input  logic        intr,
  input  logic        us_tick,
  input  sts_t        sts,
  output cfg_t        cfg,
  output logic        pm_wr,
  output logic [15:0] pm_wdata,
  output logic        dt_wr,
  output logic [15:0] dt_wdata,
  output logic        tc_load,
  output logic        xb_start,
  output logic        pcstate_wr
);

  logic        wr, rd;
  logic [7:0]  raddr;
  logic        rd_act;
  logic [15:0] xr [5];
  logic [15:0] mcbtest;
  logic [31:0] timer;
  logic        ind;
  logic [3:0]  dsel;
  logic [15:0]       ctl;
  logic [MAX_DT-1:0] dt_clr_q, dt_arm_q, dt_err_q;
  cfg_t              c_q;

  assign wr   = !mcb_cs_n && !mcb_rd_wr_n;
  assign rd   = !mcb_cs_n &&  mcb_rd_wr_n;
  assign dsel = c_q.dtsel;

  // CONTROL: kept through the hardware reset, cleared only at configuration.
  // ctl holds the shared bits at their register positions.

  always_ff @(posedge mcb_clk or negedge por_n) begin
    if (!por_n) begin
      ctl      <= '0;
      dt_clr_q <= '0;
      dt_arm_q <= '0;
      dt_err_q <= '0;
    end else if (wr && mcb_addr == A_CONTROL) begin
      ctl <= mcb_data_i & 16'hF79C;
      dt_clr_q[dsel] <= mcb_data_i[5];
      dt_arm_q[dsel] <= mcb_data_i[6];
      dt_err_q[dsel] <= mcb_data_i[11];
    end
  end

  always_comb begin
    cfg         = c_q;
    cfg.xb_err  = ctl[2];
    cfg.pm_clr  = ctl[3];
    cfg.pm_en   = ctl[4];
    cfg.sys_sel = ctl[7];
    cfg.tx_bit  = ctl[8];
    cfg.intr_en = ctl[9];
    cfg.rst_sw  = ctl[10];
    cfg.pm_err  = ctl[12];
    cfg.tc_err  = ctl[13];
    cfg.pe_err  = ctl[14];
    cfg.pll_rst = ctl[15];
    cfg.dt_clr  = dt_clr_q;
    cfg.dt_arm  = dt_arm_q;
    cfg.dt_err  = dt_err_q;
  end

  // All other writable registers.
  always_ff @(posedge mcb_clk or negedge rst_n) begin
    if (!rst_n) begin
      c_q.testpin0 <= '0;  c_q.testpin1 <= '0;
      c_q.bsel_a <= '0;    c_q.bsel_b <= '0;
      c_q.ptsel_a <= '0;   c_q.ptsel_b <= '0;
      c_q.ptmode_a <= '0;  c_q.ptmode_b <= '0;
      c_q.ppsdly <= '0;    c_q.sysdly <= '0;   c_q.intdly <= '0;
      c_q.tc_auto <= 1'b0; c_q.tc_t <= 1'b0;   c_q.tc_c <= 1'b0;
      c_q.tc_epoch <= '0;  c_q.tc_tcount <= '0; c_q.tc_scount <= '0;
      c_q.swcfg_a <= '0;   c_q.swcfg_b <= '0;
      c_q.clksel_a <= '0;  c_q.clksel_b <= '0;
      c_q.to_clk_a <= 1'b0; c_q.to_clk_b <= 1'b0;
      c_q.ppslen <= PPSLEN_DEFAULT;
      c_q.ticklen <= TICKLEN_DEFAULT;
      c_q.tpesel_a <= '0;  c_q.tpesel_b <= '0;
      c_q.tomode_a <= '0;  c_q.tomode_b <= '0;
      c_q.dtsel <= '0;     c_q.dtswitch <= '0;
      c_q.man_sel <= 1'b0; c_q.sel_rst <= 1'b0;
      c_q.man_clk_sel <= '0; c_q.man_dat_sel <= '0;
      c_q.csrr <= '0;      c_q.xb_addr <= '0;  c_q.xb_data <= '0;
      c_q.pc_ctl <= '0;
      c_q.xb_err <= 1'b0; c_q.pm_clr <= 1'b0; c_q.pm_en <= 1'b0; c_q.sys_sel <= 1'b0;
      c_q.tx_bit <= 1'b0; c_q.intr_en <= 1'b0; c_q.rst_sw <= 1'b0; c_q.pm_err <= 1'b0;
      c_q.tc_err <= 1'b0; c_q.pe_err <= 1'b0; c_q.pll_rst <= 1'b0;
      c_q.dt_clr <= '0; c_q.dt_arm <= '0; c_q.dt_err <= '0;
      for (int i = 0; i < 5; i++) xr[i] <= '0;
      mcbtest <= '0;
      pm_wdata <= '0;      dt_wdata <= '0;
      pm_wr <= 1'b0;       dt_wr <= 1'b0;
      tc_load <= 1'b0;     xb_start <= 1'b0;  pcstate_wr <= 1'b0;
    end else begin
      pm_wr <= 1'b0;  dt_wr <= 1'b0;  tc_load <= 1'b0;
      xb_start <= 1'b0;  pcstate_wr <= 1'b0;
      if (wr) begin
        unique case (mcb_addr)
          A_TESTPIN0:   c_q.testpin0 <= mcb_data_i;
          A_TESTPIN1:   c_q.testpin1 <= mcb_data_i;
          A_PECRCSEL:   begin c_q.bsel_a <= mcb_data_i[2:0]; c_q.bsel_b <= mcb_data_i[6:4]; end
          A_PTICKSEL:   begin c_q.ptsel_a <= mcb_data_i[4:0]; c_q.ptsel_b <= mcb_data_i[12:8]; end
          A_PTICKCNTA1: c_q.ptmode_a <= mcb_data_i[15:14];
          A_PTICKCNTB1: c_q.ptmode_b <= mcb_data_i[15:14];
          A_PPSDLY0:    c_q.ppsdly[15:0] <= mcb_data_i;
          A_PPSDLY1:    c_q.ppsdly[26:16] <= mcb_data_i[10:0];
          A_SYSDLY:     c_q.sysdly[15:0] <= mcb_data_i;
          A_SYSDLY_MS:  c_q.sysdly[16] <= mcb_data_i[0];
          A_INTDLY:     c_q.intdly <= mcb_data_i;
          A_TCSTAMP0:   c_q.tc_scount[15:0] <= mcb_data_i;
          A_TCSTAMP1:   c_q.tc_scount[31:16] <= mcb_data_i;
          A_TCSTAMP2: begin
            c_q.tc_tcount <= mcb_data_i[9:0];
            c_q.tc_epoch  <= mcb_data_i[12:10];
            c_q.tc_c      <= mcb_data_i[13];
            c_q.tc_t      <= mcb_data_i[14];
            c_q.tc_auto   <= mcb_data_i[15];
            tc_load       <= 1'b1;
          end
          A_PMPORT:     begin pm_wdata <= mcb_data_i; pm_wr <= 1'b1; end
          A_DTPORT:     begin dt_wdata <= mcb_data_i; dt_wr <= 1'b1; end
          A_CLKSELA:    c_q.clksel_a[15:0] <= mcb_data_i;
          A_CLKSELB:    c_q.clksel_b[15:0] <= mcb_data_i;
          A_CLKSELABT: begin
            c_q.clksel_a[17:16] <= mcb_data_i[1:0];
            c_q.to_clk_a        <= mcb_data_i[6];
            c_q.clksel_b[17:16] <= mcb_data_i[9:8];
            c_q.to_clk_b        <= mcb_data_i[14];
          end
          A_PLEN0:      c_q.ppslen[15:0] <= mcb_data_i;
          A_PLEN1:      c_q.ppslen[26:16] <= mcb_data_i[10:0];
          A_TLEN0:      c_q.ticklen[15:0] <= mcb_data_i;
          A_TLEN1:      c_q.ticklen[20:16] <= mcb_data_i[4:0];
          A_MCBTEST:    mcbtest <= mcb_data_i;
          A_TPESEL:     begin c_q.tpesel_a <= mcb_data_i[4:0]; c_q.tpesel_b <= mcb_data_i[12:8]; end
          A_TIMOUTA1:   c_q.tomode_a <= mcb_data_i[15:14];
          A_TIMOUTB1:   c_q.tomode_b <= mcb_data_i[15:14];
          A_DTSELECT:   c_q.dtsel <= mcb_data_i[3:0];
          A_PCSTATE: begin
            c_q.man_clk_sel <= mcb_data_i[1:0];
            c_q.man_dat_sel <= mcb_data_i[3:2];
            c_q.man_sel     <= mcb_data_i[12];
            c_q.sel_rst     <= mcb_data_i[13];
            pcstate_wr      <= 1'b1;
          end
          A_CSRR:       c_q.csrr <= mcb_data_i;
          A_XBADDR:     c_q.xb_addr <= mcb_data_i[4:0];
          A_XBDATA:     begin c_q.xb_data <= mcb_data_i; xb_start <= 1'b1; end
          A_PCCTLSTS:   c_q.pc_ctl <= mcb_data_i[5:4];
          default: begin
            if (mcb_addr >= A_STATUS0 && mcb_addr <= A_STATUS4)
              xr[3'(mcb_addr - A_STATUS0)] <= mcb_data_i;
            else if (mcb_addr >= A_PESWCFG0 && mcb_addr < A_PESWCFG0 + 8'(NUM_SB)) begin
              c_q.swcfg_a[mcb_addr - A_PESWCFG0] <= mcb_data_i[4:0];
              c_q.swcfg_b[mcb_addr - A_PESWCFG0] <= mcb_data_i[12:8];
            end else if (mcb_addr >= A_DTSWITCH0 && mcb_addr < A_DTSWITCH0 + 8'd5) begin
              for (int k = 0; k < 4; k++)
                if (4 * (int'(mcb_addr) - int'(A_DTSWITCH0)) + k < NUM_SB)
                  c_q.dtswitch[4 * (int'(mcb_addr) - int'(A_DTSWITCH0)) + k] <= mcb_data_i[4*k +: 4];
            end
          end
        endcase
      end
    end
  end

  // Interrupt indicator, interrupt pulse and microsecond timer.
  always_ff @(posedge mcb_clk or negedge rst_n) begin
    if (!rst_n) begin
      ind      <= 1'b0;
      mcb_intr <= 1'b0;
      timer    <= '0;
    end else begin
      mcb_intr <= intr && cfg.intr_en;
      if (intr)                            ind <= 1'b1;
      else if (wr && mcb_addr == A_INTRIND) ind <= 1'b0;
      if (us_tick) timer <= timer + 32'd1;
    end
  end
  assign mcb_ind = ind;

  // Read address register and output enable.
  always_ff @(posedge mcb_clk or negedge rst_n) begin
    if (!rst_n) begin
      raddr  <= '0;
      rd_act <= 1'b0;
    end else begin
      if (rd) raddr <= mcb_addr;
      rd_act <= rd || (rd_act && !mcb_cs_n);
    end
  end
  assign mcb_data_oe = rd_act && !mcb_cs_n;

  // Read data for the captured address.
  logic [15:0] st [5];
  always_comb begin
    st[0] = {1'b0,
             (sts.dat_sel == SRC_A) ? sts.ovf_a : (sts.dat_sel == SRC_B) ? sts.ovf_b : 1'b0,
             sts.spps_bad, sts.stick_bad, sts.pcpps_intv,
             (sts.dat_sel == SRC_A) ? sts.crc_a : (sts.dat_sel == SRC_B) ? sts.crc_b : 1'b0,
             sts.clkb_bad, sts.clka_bad,
             sts.stick_mis, sts.spps_intv, sts.stick_intv, sts.sclk_bad,
             sts.xclk_bad, sts.clktx_bad, 2'b00};
    st[1] = sts.sind_err_a[15:0];
    st[2] = sts.sind_err_b[15:0];
    st[3] = {6'b0, sts.sind_err_b[17:16], 6'b0, sts.sind_err_a[17:16]};
    st[4] = {4'b0, sts.dt_errs, 3'b0, sts.pm_errs};
  end

  always_comb begin
    mcb_data_o = '0;
    unique case (raddr)
      A_DESIGNID:   mcb_data_o = DESIGN_ID;
      A_TESTPIN0:   mcb_data_o = cfg.testpin0 & 16'h3F3F;
      A_TESTPIN1:   mcb_data_o = cfg.testpin1 & 16'h3F3F;
      A_PECRCSEL:   mcb_data_o = {9'b0, cfg.bsel_b, 1'b0, cfg.bsel_a};
      A_PTICKSEL:   mcb_data_o = {3'b0, cfg.ptsel_b, 3'b0, cfg.ptsel_a};
      A_PTICKCNTA0: mcb_data_o = sts.ptickcnt_a[15:0];
      A_PTICKCNTA1: mcb_data_o = {cfg.ptmode_a, 8'b0, sts.ptickcnt_a[21:16]};
      A_PTICKCNTB0: mcb_data_o = sts.ptickcnt_b[15:0];
      A_PTICKCNTB1: mcb_data_o = {cfg.ptmode_b, 8'b0, sts.ptickcnt_b[21:16]};
      A_PPSDLY0:    mcb_data_o = cfg.ppsdly[15:0];
      A_PPSDLY1:    mcb_data_o = {5'b0, cfg.ppsdly[26:16]};
      A_SYSDLY:     mcb_data_o = cfg.sysdly[15:0];
      A_SYSDLY_MS:  mcb_data_o = {15'b0, cfg.sysdly[16]};
      A_INTDLY:     mcb_data_o = cfg.intdly;
      A_TCSTAMP0:   mcb_data_o = cfg.tc_auto ? sts.tc_cur_scount[15:0]  : cfg.tc_scount[15:0];
      A_TCSTAMP1:   mcb_data_o = cfg.tc_auto ? sts.tc_cur_scount[31:16] : cfg.tc_scount[31:16];
      A_TCSTAMP2:   mcb_data_o = cfg.tc_auto
                      ? {1'b1, sts.tc_cur_t, cfg.tc_c, cfg.tc_epoch, sts.tc_cur_tcount}
                      : {1'b0, cfg.tc_t, cfg.tc_c, cfg.tc_epoch, cfg.tc_tcount};
      A_PPSCODE:    mcb_data_o = (sts.dat_sel == SRC_A) ? {sts.hop_a, sts.sec_a, 2'b00} :
                                 (sts.dat_sel == SRC_B) ? {sts.hop_b, sts.sec_b, 2'b00} : 16'h0;
      A_CONTROL:    mcb_data_o = {cfg.pll_rst, cfg.pe_err, cfg.tc_err, cfg.pm_err,
                                  cfg.dt_err[dsel], cfg.rst_sw, cfg.intr_en, cfg.tx_bit,
                                  cfg.sys_sel, cfg.dt_arm[dsel], cfg.dt_clr[dsel],
                                  cfg.pm_en, cfg.pm_clr, cfg.xb_err, 2'b00};
      A_DTWADDR:    mcb_data_o = {1'b0, sts.dt_waddr[dsel]};
      A_DTRADDR:    mcb_data_o = {1'b0, sts.dt_raddr[dsel]};
      A_DTTRIGCNT0: mcb_data_o = sts.dt_trigcnt[dsel][15:0];
      A_DTTRIGCNT1: mcb_data_o = {11'b0, sts.dt_trigcnt[dsel][20:16]};
      A_PMPORT:     mcb_data_o = pm_wdata;
      A_DTPORT:     mcb_data_o = dt_wdata;
      A_CLKSELA:    mcb_data_o = cfg.clksel_a[15:0];
      A_CLKSELB:    mcb_data_o = cfg.clksel_b[15:0];
      A_CLKSELABT:  mcb_data_o = {1'b0, cfg.to_clk_b, 4'b0, cfg.clksel_b[17:16],
                                  1'b0, cfg.to_clk_a, 4'b0, cfg.clksel_a[17:16]};
      A_PLEN0:      mcb_data_o = cfg.ppslen[15:0];
      A_PLEN1:      mcb_data_o = {5'b0, cfg.ppslen[26:16]};
      A_TLEN0:      mcb_data_o = cfg.ticklen[15:0];
      A_TLEN1:      mcb_data_o = {11'b0, cfg.ticklen[20:16]};
      A_MCBTEST:    mcb_data_o = mcbtest;
      A_INTRIND:    mcb_data_o = {15'b0, ind};
      A_TIMER0:     mcb_data_o = timer[15:0];
      A_TIMER1:     mcb_data_o = timer[31:16];
      A_PMWADDR:    mcb_data_o = {4'b0, sts.pm_waddr};
      A_PMRADDR:    mcb_data_o = {4'b0, sts.pm_raddr};
      A_TCOUNT:     mcb_data_o = {9'b0, sts.tcount};
      A_TPESEL:     mcb_data_o = {3'b0, cfg.tpesel_b, 3'b0, cfg.tpesel_a};
      A_TPEOUT:     mcb_data_o = sts.tpeout;
      A_TIMOUTA0:   mcb_data_o = sts.timout_a[15:0];
      A_TIMOUTA1:   mcb_data_o = {cfg.tomode_a, 8'b0, sts.timout_a[21:16]};
      A_TIMOUTB0:   mcb_data_o = sts.timout_b[15:0];
      A_TIMOUTB1:   mcb_data_o = {cfg.tomode_b, 8'b0, sts.timout_b[21:16]};
      A_DTSELECT:   mcb_data_o = {12'b0, cfg.dtsel};
      A_PCSTATE:    mcb_data_o = {sts.bad_int_b, sts.bad_int_a, cfg.sel_rst, cfg.man_sel,
                                  sts.ovf_b, sts.ovf_a, sts.crc_b, sts.crc_a,
                                  sts.ici_b, sts.ici_a, sts.sci_b, sts.sci_a,
                                  sts.dat_sel, sts.clk_sel};
      A_CSRR:       mcb_data_o = cfg.csrr;
      A_PPSCNT0:    mcb_data_o = sts.ppscnt[15:0];
      A_PPSCNT1:    mcb_data_o = {4'b0, sts.ppscnt[27:16]};
      A_XBADDR:     mcb_data_o = {sts.xb_busy, sts.xb_addr_err, 9'b0, cfg.xb_addr};
      A_XBDATA:     mcb_data_o = cfg.xb_data;
      A_PPSCODE_A:  mcb_data_o = {sts.hop_a, sts.sec_a, sts.ovf_a, sts.crc_a};
      A_PPSCODE_B:  mcb_data_o = {sts.hop_b, sts.sec_b, sts.ovf_b, sts.crc_b};
      A_TOGCOUNT_A: mcb_data_o = sts.tog_a;
      A_TOGCOUNT_A + 8'd1: mcb_data_o = sts.tog_b;
      A_TOGCOUNT_A + 8'd2: mcb_data_o = sts.tog_s;
      A_TOGCOUNT_A + 8'd3: mcb_data_o = sts.tog_x;
      A_PCCTLSTS:   mcb_data_o = {10'b0, cfg.pc_ctl, sts.bad_x, sts.bad_s, sts.bad_b, sts.bad_a};
      default: begin
        if (raddr >= A_STATUS0 && raddr <= A_STATUS4)
          mcb_data_o = xr[3'(raddr - A_STATUS0)] ^ st[3'(raddr - A_STATUS0)];
        else if (raddr >= A_PECRCA0 && raddr < A_PECRCA0 + 8'd5) begin
          for (int k = 0; k < 4; k++)
            if (4 * (int'(raddr) - int'(A_PECRCA0)) + k < NUM_SB)
              mcb_data_o[4*k +: 4] = sts.pecrc_a[4 * (int'(raddr) - int'(A_PECRCA0)) + k];
        end else if (raddr >= A_PECRCB0 && raddr < A_PECRCB0 + 8'd5) begin
          for (int k = 0; k < 4; k++)
            if (4 * (int'(raddr) - int'(A_PECRCB0)) + k < NUM_SB)
              mcb_data_o[4*k +: 4] = sts.pecrc_b[4 * (int'(raddr) - int'(A_PECRCB0)) + k];
        end else if (raddr >= A_PESWCFG0 && raddr < A_PESWCFG0 + 8'(NUM_SB))
          mcb_data_o = {3'b0, cfg.swcfg_b[raddr - A_PESWCFG0], 3'b0, cfg.swcfg_a[raddr - A_PESWCFG0]};
        else if (raddr >= A_DTSWITCH0 && raddr < A_DTSWITCH0 + 8'd5) begin
          for (int k = 0; k < 4; k++)
            if (4 * (int'(raddr) - int'(A_DTSWITCH0)) + k < NUM_SB)
              mcb_data_o[4*k +: 4] = cfg.dtswitch[4 * (int'(raddr) - int'(A_DTSWITCH0)) + k];
        end
      end
    endcase
  end

  // One register write per MCB clock; bus signals must be driven.
  a_bus_known: assert property (@(posedge mcb_clk) disable iff (!rst_n)
                                !$isunknown({mcb_cs_n, mcb_rd_wr_n}));

endmodule
