// ppscode_decoder: the PPSCODE Decoder.
//
// Two external time codes (PPSCODE A and B, each with its own 128 MHz
// clock) come from two Crossbar Boards; an external coaxial clock X may also
// be present. This block
//  - receives, checks and repeats both codes (ppscode_rx, one per input,
//    each in its own clock domain), with the hop count incremented;
//  - measures the A, B, S (board) and X clocks (clk_monitor, TOGCOUNT);
//  - chooses the PPSCODE source and the board clock (PCSTATE DAT-Sel and
//    CLK-Sel, in the MCB clock domain, which is the one clock always there):
//    A by default, B when A is bad and B is good, back to A only when B fails
//    or SEL-rst is pulsed; off when neither is good. X is the board clock
//    when it has been good ever since reset (or since the last PCSTATE write
//    or SEL-rst); otherwise the clock of the chosen code. MAN-sel forces the
//    written selections. An input is bad when its clock monitor says so or
//    when its last eight frames all had errors;
//  - drives BCLK from the chosen clock through a clock multiplexer;
//  - in the system clock domain (sclk, which is BCLK returned through the
//    board buffer): carries the chosen PPS over, checks its interval
//    (PCPPS-Intv and the per-input PPSa/b-sci bits), delays it by PPSDLY
//    clocks and from it generates BPPS (period ppslen+1 clocks) and BTICK
//    (period ticklen+1, restarted at every BPPS). Both counters keep running
//    if the PPS stops; a delayed PPS re-aligns them.
//
// Timing: a PPS (T bit) on the chosen input reaches pps_sys three or four
// sclk clocks later; BPPS and BTICK follow PPSDLY + 2 sclk clocks after
// pps_sys, as one-clock pulses. The PPSDLY delay counter holds one PPS at a
// time. The clock multiplexer is a plain combinational one: a switch can
// shorten one BCLK cycle, and the specification leaves the switching method
// open.
module ppscode_decoder
  import tfpga_pkg::*;
(
  input  logic        rst_n,
  input  logic        clk_a,
  input  logic        clk_b,
  input  logic        clk_x,
  input  logic        pc_a,
  input  logic        pc_b,
  input  logic        mcb_clk,
  input  logic        sclk,
  // settings (MCB domain unless stated)
  input  logic [26:0] ppsdly,      // sclk, quasi-static
  input  logic [26:0] ppslen,      // quasi-static
  input  logic [20:0] ticklen,     // sclk, quasi-static
  input  logic        man_sel,
  input  logic [1:0]  man_clk_sel,
  input  logic [1:0]  man_dat_sel,
  input  logic        sel_rst,
  input  logic        pcstate_wr,
  // outputs to the board
  output logic        opc_a,
  output logic        opc_b,
  output logic        oclk_a,
  output logic        oclk_b,
  output logic        bclk,
  output logic        bpps,
  output logic        btick,
  // status, MCB domain
  output src_e        clk_sel,
  output src_e        dat_sel,
  output logic [5:0]  sec_a, sec_b,
  output logic [7:0]  hop_a, hop_b,
  output logic        crc_a, crc_b,
  output logic        ovf_a, ovf_b,
  output logic        ici_a, ici_b,
  output logic        bad_int_a, bad_int_b,
  output logic [15:0] tog_a, tog_b, tog_s, tog_x,
  output logic        bad_a, bad_b, bad_s, bad_x,
  // status, sclk domain
  output logic        sci_a, sci_b,
  output logic        pcpps_intv,
  output logic        pps_sys
);
  // ---------------- receivers (input clock domains) ----------------
  logic       pps_a, pps_b;
  logic [5:0] sec_a_r, sec_b_r;
  logic [7:0] hop_a_r, hop_b_r;
  logic       crc_a_r, crc_b_r, ovf_a_r, ovf_b_r, ici_a_r, ici_b_r, bi_a_r, bi_b_r;

  ppscode_rx u_rx_a (.clk(clk_a), .rst_n, .din(pc_a), .ppslen, .dout(opc_a), .pps(pps_a),
                     .second(sec_a_r), .hop(hop_a_r), .crc_err(crc_a_r), .ovf(ovf_a_r),
                     .ici_err(ici_a_r), .bad_int(bi_a_r));
  ppscode_rx u_rx_b (.clk(clk_b), .rst_n, .din(pc_b), .ppslen, .dout(opc_b), .pps(pps_b),
                     .second(sec_b_r), .hop(hop_b_r), .crc_err(crc_b_r), .ovf(ovf_b_r),
                     .ici_err(ici_b_r), .bad_int(bi_b_r));
  assign oclk_a = clk_a;
  assign oclk_b = clk_b;

  // status of both receivers into the MCB domain (values change once a second)
  logic unused_a, unused_b;
  sync_bits #(.W(2*(6+8+5))) u_sync_rx (
    .dst_clk(mcb_clk), .rst_n,
    .d({sec_a_r, hop_a_r, crc_a_r, ovf_a_r, ici_a_r, bi_a_r, 1'b0,
        sec_b_r, hop_b_r, crc_b_r, ovf_b_r, ici_b_r, bi_b_r, 1'b0}),
    .q({sec_a, hop_a, crc_a, ovf_a, ici_a, bad_int_a, unused_a,
        sec_b, hop_b, crc_b, ovf_b, ici_b, bad_int_b, unused_b}));

  // ---------------- clock monitors (MCB domain) ----------------
  clk_monitor u_mon_a (.mon_clk(clk_a), .mcb_clk, .rst_n, .togcount(tog_a), .bad(bad_a));
  clk_monitor u_mon_b (.mon_clk(clk_b), .mcb_clk, .rst_n, .togcount(tog_b), .bad(bad_b));
  clk_monitor u_mon_s (.mon_clk(sclk),  .mcb_clk, .rst_n, .togcount(tog_s), .bad(bad_s));
  clk_monitor u_mon_x (.mon_clk(clk_x), .mcb_clk, .rst_n, .togcount(tog_x), .bad(bad_x));

  // ---------------- source selection (MCB domain) ----------------
  logic ok_a, ok_b, ok_x, x_lock;
  src_e dat_auto;
  assign ok_a = !bad_a && !bad_int_a;
  assign ok_b = !bad_b && !bad_int_b;
  assign ok_x = !bad_x;

  always_ff @(posedge mcb_clk or negedge rst_n) begin
    if (!rst_n) begin
      dat_auto <= SRC_A;
      x_lock   <= 1'b1;
    end else begin
      if (sel_rst) begin
        dat_auto <= ok_a ? SRC_A : (ok_b ? SRC_B : SRC_OFF);
      end else begin
        unique case (dat_auto)
          SRC_A:   if (!ok_a) dat_auto <= ok_b ? SRC_B : SRC_OFF;
          SRC_B:   if (!ok_b) dat_auto <= ok_a ? SRC_A : SRC_OFF;
          default: dat_auto <= ok_a ? SRC_A : (ok_b ? SRC_B : SRC_OFF);
        endcase
      end
      if (sel_rst || pcstate_wr) x_lock <= ok_x;
      else if (!ok_x)            x_lock <= 1'b0;
    end
  end

  always_comb begin
    if (man_sel) begin
      dat_sel = src_e'(man_dat_sel);
      clk_sel = src_e'(man_clk_sel);
    end else begin
      dat_sel = dat_auto;
      if (x_lock)                 clk_sel = SRC_X;
      else if (dat_auto == SRC_A) clk_sel = SRC_A;
      else if (dat_auto == SRC_B) clk_sel = SRC_B;
      else if (ok_x)              clk_sel = SRC_X;
      else                        clk_sel = SRC_OFF;
    end
  end

  // ---------------- board clock ----------------
  always_comb begin
    unique case (clk_sel)
      SRC_A:   bclk = clk_a;
      SRC_B:   bclk = clk_b;
      SRC_X:   bclk = clk_x;
      default: bclk = 1'b0;
    endcase
  end

  // ---------------- system clock domain ----------------
  logic pps_a_s, pps_b_s;
  pulse_sync u_ps_a (.src_clk(clk_a), .src_rst_n(rst_n), .src_pulse(pps_a),
                     .dst_clk(sclk), .dst_rst_n(rst_n), .dst_pulse(pps_a_s));
  pulse_sync u_ps_b (.src_clk(clk_b), .src_rst_n(rst_n), .src_pulse(pps_b),
                     .dst_clk(sclk), .dst_rst_n(rst_n), .dst_pulse(pps_b_s));

  logic [1:0] dat_sel_s;
  sync_bits #(.W(2)) u_sync_sel (.dst_clk(sclk), .rst_n, .d(dat_sel), .q(dat_sel_s));

  // interval of each input's PPS counted in system clocks
  logic [26:0] scnt_a, scnt_b;
  logic        sval_a, sval_b;
  always_ff @(posedge sclk or negedge rst_n) begin
    if (!rst_n) begin
      scnt_a <= '0; scnt_b <= '0;
      sval_a <= 1'b0; sval_b <= 1'b0;
      sci_a  <= 1'b0; sci_b  <= 1'b0;
    end else begin
      if (pps_a_s) begin
        scnt_a <= '0; sval_a <= 1'b1;
        sci_a  <= sval_a && (scnt_a != ppslen);
      end else if (scnt_a != '1) scnt_a <= scnt_a + 27'd1;
      if (pps_b_s) begin
        scnt_b <= '0; sval_b <= 1'b1;
        sci_b  <= sval_b && (scnt_b != ppslen);
      end else if (scnt_b != '1) scnt_b <= scnt_b + 27'd1;
    end
  end

  always_comb begin
    unique case (src_e'(dat_sel_s))
      SRC_A:   begin pps_sys = pps_a_s; pcpps_intv = sci_a; end
      SRC_B:   begin pps_sys = pps_b_s; pcpps_intv = sci_b; end
      default: begin pps_sys = 1'b0;    pcpps_intv = 1'b0;  end
    endcase
  end

  // PPS delay and BPPS/BTICK generation
  logic [26:0] dcnt, pcnt;
  logic [20:0] tcnt;
  logic        dact, fire, pps_ev, tick_ev;
  assign fire    = dact && (dcnt == '0);
  assign pps_ev  = fire || (pcnt == ppslen);
  assign tick_ev = pps_ev || (tcnt == ticklen);

  always_ff @(posedge sclk or negedge rst_n) begin
    if (!rst_n) begin
      dcnt  <= '0;
      dact  <= 1'b0;
      pcnt  <= '0;
      tcnt  <= '0;
      bpps  <= 1'b0;
      btick <= 1'b0;
    end else begin
      if (pps_sys) begin
        dcnt <= ppsdly;
        dact <= 1'b1;
      end else if (dact) begin
        if (dcnt == '0) dact <= 1'b0;
        else            dcnt <= dcnt - 27'd1;
      end
      pcnt  <= pps_ev  ? '0 : pcnt + 27'd1;
      tcnt  <= tick_ev ? '0 : tcnt + 21'd1;
      bpps  <= pps_ev;
      btick <= tick_ev;
    end
  end
endmodule
