// system_tick: the System Tick block.
//
// SPPS (1 Hz) and STICK (100 Hz) come back from the board buffers as the
// system timing for every FPGA. This block
//  - checks them (Tick Interval Check): the STICK period must be ticklen+1
//    clocks and the SPPS period ppslen+1 (STICK-Intv, SPPS-Intv), every SPPS
//    must start together with a STICK (STICK-Mis) and each pulse must be
//    PULSE_W clocks wide (STICK-Bad, SPPS-Bad). Errors are collected over a
//    tick interval and published at the internal tick, so that the interrupt
//    routine reads a whole interval's result;
//  - delays both by sysdly clocks (SYSDLY, 17 bits with SYSDLY_MS) to give
//    the internal tick and PPS (stick_int, spps_int), which time the
//    generators of the control outputs;
//  - counts internal ticks since the internal PPS (TCOUNT, 0-99);
//  - raises intr, the CMIB interrupt, intdly 64 MHz clocks (two system
//    clocks each) after the internal tick.
// What follows the specification: the checks, the two programmable delays
// and their units, the tick count. The one-clock pulse width and the
// single-tick-in-flight delay counters (delays shorter than a tick period)
// are this design's.
// Timing: 128 MHz system clock. The inputs are registered twice; stick_int
// is a one-clock pulse sysdly + 3 clocks after STICK rises; intr follows
// stick_int by 2*intdly + 2 clocks.
module system_tick #(
  parameter int PULSE_W = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        spps,
  input  logic        stick,
  input  logic [26:0] ppslen,
  input  logic [20:0] ticklen,
  input  logic [16:0] sysdly,
  input  logic [15:0] intdly,
  output logic        stick_rise,
  output logic        spps_rise,
  output logic        stick_int,
  output logic        spps_int,
  output logic [6:0]  tcount,
  output logic        intr,
  output logic        stick_intv,
  output logic        spps_intv,
  output logic        stick_mis,
  output logic        stick_bad,
  output logic        spps_bad
);
  logic        t1, t2, p1, p2;
  logic        t_fall, p_fall;
  logic [20:0] ticnt;
  logic [26:0] picnt;
  logic        tval, pval;
  logic [7:0]  twid, pwid;
  logic [16:0] dcnt;
  logic        dact, dpps;
  logic [16:0] icnt;
  logic        iact;
  logic        a_tintv, a_pintv, a_mis, a_tbad, a_pbad;
  logic        e_tintv, e_pintv, e_mis, e_tbad, e_pbad;

  assign stick_rise = t1 & ~t2;
  assign spps_rise  = p1 & ~p2;
  assign t_fall     = t2 & ~t1;
  assign p_fall     = p2 & ~p1;

  assign e_tintv = stick_rise && tval && (ticnt != ticklen);
  assign e_pintv = spps_rise  && pval && (picnt != ppslen);
  assign e_mis   = spps_rise  && !stick_rise;
  assign e_tbad  = t_fall && (twid != 8'(PULSE_W));
  assign e_pbad  = p_fall && (pwid != 8'(PULSE_W));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {t1, t2, p1, p2} <= '0;
      ticnt <= '0; picnt <= '0; tval <= 1'b0; pval <= 1'b0;
      twid  <= '0; pwid  <= '0;
      dcnt  <= '0; dact  <= 1'b0; dpps <= 1'b0;
      stick_int <= 1'b0; spps_int <= 1'b0;
      tcount <= '0;
      icnt  <= '0; iact <= 1'b0; intr <= 1'b0;
      {a_tintv, a_pintv, a_mis, a_tbad, a_pbad} <= '0;
      {stick_intv, spps_intv, stick_mis, stick_bad, spps_bad} <= '0;
    end else begin
      t1 <= stick; t2 <= t1;
      p1 <= spps;  p2 <= p1;
      // intervals
      if (stick_rise) begin ticnt <= '0; tval <= 1'b1; end
      else if (ticnt != '1) ticnt <= ticnt + 21'd1;
      if (spps_rise) begin picnt <= '0; pval <= 1'b1; end
      else if (picnt != '1) picnt <= picnt + 27'd1;
      // widths
      if (t1) twid <= t2 ? ((twid != '1) ? twid + 8'd1 : twid) : 8'd1;
      if (p1) pwid <= p2 ? ((pwid != '1) ? pwid + 8'd1 : pwid) : 8'd1;
      // SYSDLY
      stick_int <= 1'b0;
      spps_int  <= 1'b0;
      if (stick_rise) begin
        dcnt <= sysdly;
        dact <= 1'b1;
        dpps <= spps_rise;
      end else if (dact) begin
        if (dcnt == '0) begin
          dact      <= 1'b0;
          stick_int <= 1'b1;
          spps_int  <= dpps;
        end else dcnt <= dcnt - 17'd1;
      end
      // tick count
      if (stick_int) tcount <= spps_int ? 7'd0 : ((tcount == 7'd99) ? 7'd0 : tcount + 7'd1);
      // interrupt delay, 64 MHz units
      intr <= 1'b0;
      if (stick_int) begin
        icnt <= {intdly, 1'b0};
        iact <= 1'b1;
      end else if (iact) begin
        if (icnt == '0) begin
          iact <= 1'b0;
          intr <= 1'b1;
        end else icnt <= icnt - 17'd1;
      end
      // error collection, published at the internal tick
      if (stick_int) begin
        {stick_intv, spps_intv, stick_mis, stick_bad, spps_bad} <=
          {a_tintv | e_tintv, a_pintv | e_pintv, a_mis | e_mis, a_tbad | e_tbad, a_pbad | e_pbad};
        {a_tintv, a_pintv, a_mis, a_tbad, a_pbad} <= '0;
      end else begin
        a_tintv <= a_tintv | e_tintv;
        a_pintv <= a_pintv | e_pintv;
        a_mis   <= a_mis   | e_mis;
        a_tbad  <= a_tbad  | e_tbad;
        a_pbad  <= a_pbad  | e_pbad;
      end
    end
  end
endmodule
