// tb_timing_top: end-to-end test of the Timing FPGA at full size.
//
// The top keeps its default parameters: 16 DUMPTRIG generators, two with
// 32k-word memories, and a 4k-word PHASEMOD memory. The test shortens the
// second and the tick through the registers, as the CMIB may: PLEN = 9999
// and TLEN = 999 give 10000 and 1000 system clocks.
// The bench plays the board around the FPGA:
//  - clocks A, B and X run at 125 MHz, and the serializer clock at 8x;
//  - the system clock is BCLK fed straight back;
//  - STICK and SPPS are BTICK and BPPS fed straight back;
//  - PPSCODE A carries a frame every 10000 clocks with hop count 3.
// Checks, each counted:
//  1. DESIGNID reads 0110h;
//  2. BPPS comes every 10000 system clocks and BTICK every 1000;
//  3. the PPSCODE_A register shows hop count 3 and no CRC error;
//  4. TCOUNT advances by one per tick;
//  5. the tick interrupt sets INTRIND and pulses mcb_intr (INTR-En set);
//  6. a test pin set to the internal tick pulses once per tick;
//  7. a PHASEMOD frame written to PMPORT (start bit, one data word, CRC)
//     appears on the PHASEMOD lane of a sub-band's control word after the
//     next tick, with the right CRC;
//  8. a DUMPTRIG trigger written for generator 0 appears as a 1 on the
//     DUMPTRIG lane, in the same clock as the TIMECODE T bit, and
//     DTTRIGCNT then gives the clocks to the next tick;
//  9. the sync lane carries CONTROL TX-Bit, and the serial output repeats
//     each control word lane by lane;
// 10. a crossbar command to sub-band 20 sets the XBADDR address error;
// 11. RST-SW holds the system-clock logic in reset (seen on a test pin).
module tb_timing_top;
  import tfpga_pkg::*;
  logic rst_n = 1'b0, por_n = 1'b0;
  logic clk_a = 1'b0, clk_b = 1'b0, clk_x = 1'b0, clk_ser = 1'b0, mcb_clk = 1'b0;
  logic pc_a = 1'b1, pc_b = 1'b1;
  logic opc_a, opc_b, oclk_a, oclk_b, bclk, bpps, btick;
  logic sclk, spps, stick;
  logic pll_rst, pll_locked = 1'b1, tx_pll_locked = 1'b1;
  logic [NUM_SB-1:0][3:0] perr_a = '0, perr_b = '0;
  logic [NUM_SB-1:0] ptick_a = '0, psind_a = '0, ptick_b = '0, psind_b = '0;
  logic otick_a = 1'b0, otick_b = 1'b0;
  logic [NUM_SB-1:0] ctrl_ser;
  logic [NUM_SB-1:0][7:0] ctrl_word;
  logic [15:0] csrr;
  logic [7:0] mcb_addr = '0;
  logic [15:0] mcb_data_i = '0, mcb_data_o;
  logic mcb_data_oe, mcb_cs_n = 1'b1, mcb_rd_wr_n = 1'b1, mcb_intr;
  logic [3:0] testpin;
  int checks = 0, failures = 0;

  assign sclk  = bclk;
  assign stick = btick;
  assign spps  = bpps;

  timing_top dut (.*);

  // one source for the X clock and the 8x serializer clock
  initial forever begin
    for (int i = 0; i < 8; i++) begin #0.5 clk_ser = ~clk_ser; end
    clk_x = ~clk_x;
  end
  always #4 clk_a = ~clk_a;
  initial begin #1.7; forever #4 clk_b = ~clk_b; end
  always #15.36 mcb_clk = ~mcb_clk;

  initial begin
    #8_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string s);
    failures++;
    if (failures < 30) $display("%t: %s", $realtime, s);
  endtask

  // ---------------- MCB access ----------------
  task automatic wr(input logic [7:0] a, input logic [15:0] d);
    @(negedge mcb_clk);
    mcb_cs_n = 1'b0; mcb_rd_wr_n = 1'b0; mcb_addr = a; mcb_data_i = d;
    @(negedge mcb_clk);
    mcb_cs_n = 1'b1; mcb_rd_wr_n = 1'b1;
  endtask
  task automatic rd(input logic [7:0] a, output logic [15:0] d);
    @(negedge mcb_clk);
    mcb_cs_n = 1'b0; mcb_rd_wr_n = 1'b1; mcb_addr = a;
    @(negedge mcb_clk);
    d = mcb_data_o;
    mcb_cs_n = 1'b1;
  endtask

  // ---------------- PPSCODE A ----------------
  function automatic logic [22:0] make_frame(input logic [5:0] s, input logic [7:0] h);
    logic [22:0] f;
    logic [3:0] c = '0;
    f[0] = 1'b1; f[6:1] = s; f[10:7] = 4'b0101; f[18:11] = h;
    for (int i = 0; i <= 18; i++) c = crc4_step(c, f[i]);
    for (int i = 0; i < 4; i++) f[19 + i] = c[3 - i];
    return f;
  endfunction
  initial begin
    int n = 0, p;
    logic [22:0] f;
    forever begin
      @(negedge clk_a);
      p = n % 10000;
      if (p < 9976)       pc_a = ((9975 - p) % 2) != 0;
      else if (p == 9976) pc_a = 1'b0;
      else begin
        f = make_frame(6'((n / 10000) % 60), 8'd3);
        pc_a = f[p - 9977];
      end
      n++;
    end
  end
  // PPSCODE B is left as plain preamble
  always @(negedge clk_b) pc_b = ~pc_b;

  // ---------------- system clock monitors ----------------
  bit   mon_on = 0;
  int   ncyc = 0, last_pps = -1, last_tick = -1, n_pps = 0, n_tick = 0;
  int   tp_last = -1, n_tp = 0;
  logic tp_prev = 1'b0;
  bit   ser_on = 0;
  always @(negedge sclk) begin
    ncyc++;
    if (mon_on) begin
      if (bpps) begin
        if (last_pps >= 0) begin
          checks++;
          if (ncyc - last_pps != 10000) fail($sformatf("BPPS period %0d", ncyc - last_pps));
        end
        last_pps = ncyc; n_pps++;
      end
      if (btick) begin
        if (last_tick >= 0) begin
          checks++;
          if (ncyc - last_tick != 1000) fail($sformatf("BTICK period %0d", ncyc - last_tick));
        end
        last_tick = ncyc; n_tick++;
      end
      if (testpin[0] && !tp_prev) begin
        if (tp_last >= 0) begin
          checks++;
          if (ncyc - tp_last != 1000) fail($sformatf("test pin period %0d", ncyc - tp_last));
        end
        tp_last = ncyc; n_tp++;
      end
    end
    tp_prev = testpin[0];
  end

  // serial output against the control word of sub-band 7: record 200
  // words and the serial bits over the same time, then look for the one
  // latency at which every word appears lane by lane
  logic [7:0] words [200];
  logic       sbits [1700];
  int         n_ser = 0;
  initial begin
    wait (ser_on);
    @(posedge sclk);
    fork
      for (int i = 0; i < 200; i++) begin @(negedge sclk); words[i] = ctrl_word[7]; end
      for (int i = 0; i < 1700; i++) begin @(negedge clk_ser); sbits[i] = ctrl_ser[7]; end
    join
    for (int lat = 0; lat < 64 && n_ser == 0; lat++) begin
      bit ok;
      ok = 1;
      for (int i = 0; i < 200; i++)
        for (int l = 0; l < 8; l++)
          if (sbits[8 * i + lat + l] !== words[i][l]) ok = 0;
      if (ok) n_ser = 200;
    end
  end

  // capture a lane of sub-band 5's word for 40 clocks after the internal tick
  logic [39:0] v_tc;
  task automatic capture(input int lane, output logic [39:0] v);
    @(posedge testpin[0]);
    for (int i = 0; i < 40; i++) begin
      @(negedge sclk);
      v[i] = ctrl_word[5][lane];
      v_tc[i] = ctrl_word[5][1];
    end
  endtask

  initial begin
    logic [15:0] d, t0, t1;
    logic [39:0] v;
    repeat (4) @(negedge mcb_clk);
    por_n = 1'b1; rst_n = 1'b1;
    // 1
    rd(A_DESIGNID, d);
    checks++; if (d !== 16'h0110) fail($sformatf("DESIGNID %h", d));
    // short second and tick, PPSDLY 100, test pin 0 = internal tick
    wr(A_PLEN0, 16'd9999); wr(A_PLEN1, 16'd0);
    wr(A_TLEN0, 16'd999);  wr(A_TLEN1, 16'd0);
    wr(A_PPSDLY0, 16'd100);
    wr(A_TESTPIN0, 16'h0003);
    wr(A_CONTROL, 16'h0300);           // TX-Bit, INTR-En
    #600_000;                           // clock monitors settle, PPS locks
    // 2, 6, 9
    mon_on = 1; ser_on = 1;
    #300_000;
    ser_on = 0;
    checks += 3;
    if (n_pps < 2) fail("too few BPPS");
    if (n_tick < 20) fail("too few BTICK");
    if (n_tp < 20) fail("test pin quiet");
    checks++;
    if (ctrl_word[3][0] !== 1'b1) fail("sync lane not set");
    // 3
    rd(A_PPSCODE_A, d);
    checks++; if (d !== {8'd3, d[7:2], 2'b00}) fail($sformatf("PPSCODE_A %h", d));
    // 4, 5
    wr(A_INTRIND, 16'h0);
    rd(A_TCOUNT, t0);
    @(posedge testpin[0]);
    #2000;
    rd(A_TCOUNT, t1);
    checks++; if (t1 != ((t0 == 16'd99) ? 16'd0 : t0 + 16'd1)) fail($sformatf("TCOUNT %0d then %0d", t0, t1));
    rd(A_INTRIND, d);
    checks++; if (d !== 16'h1) fail("INTRIND not set");
    begin
      bit seen = 0;
      fork
        begin @(posedge mcb_intr); seen = 1; end
        #20_000;
      join_any
      disable fork;
      checks++; if (!seen) fail("no mcb_intr");
    end
    // 7: PHASEMOD frame
    begin
      logic [7:0] dat;
      logic [3:0] c;
      logic [12:0] fr;
      bit found;
      dat = 8'($urandom);
      c = '0;
      for (int i = 0; i < 8; i++) c = crc4_step(c, dat[i]);
      fr = {c[0], c[1], c[2], c[3], dat, 1'b0};    // bit 0 first
      wr(A_CONTROL, 16'h0308);                       // PM-Clr
      wr(A_CONTROL, 16'h0300);
      wr(A_PMPORT, {CMD_SBIT, 11'd0});
      wr(A_PMPORT, {CMD_DATA, 3'd7, dat});
      wr(A_PMPORT, {CMD_CRC, 11'd0});
      wr(A_PMPORT, {CMD_END, 11'd0});
      #500;
      wr(A_CONTROL, 16'h0310);                       // PM-En
      capture(4, v);
      found = 0;
      for (int o = 0; o < 6; o++) if (v[o +: 13] == fr) found = 1;
      checks++; if (!found) fail($sformatf("PHASEMOD frame %h not in %b", fr, v));
      wr(A_CONTROL, 16'h0300);
    end
    // 8: DUMPTRIG trigger on generator 0, sent to every sub-band
    begin
      bit found;
      wr(A_TCSTAMP2, 16'h4000);                      // TIMECODE T bit set
      wr(A_DTSELECT, 16'd0);
      wr(A_CONTROL, 16'h0320);                       // DT-Clr
      wr(A_CONTROL, 16'h0300);
      wr(A_DTPORT, {CMD_TRIG, 11'd0});
      wr(A_DTPORT, {CMD_END, 11'd0});
      #500;
      wr(A_CONTROL, 16'h0340);                       // DT-Arm
      capture(5, v);
      found = 0;
      for (int o = 0; o < 6; o++) if (v[o] && v[o + 1] && !v[o + 3] && v[o + 4] == v[o + 2]) found = 1;
      checks++; if (!found) fail($sformatf("no trigger in %b", v));
      // a list that starts with TRIG puts the trigger on the TIMECODE T bit,
      // which follows the TIMECODE start bit (two zeros in a row)
      begin
        int o;
        o = 1;
        while (o < 39 && !(v[o] && v[o - 1])) o++;   // preamble 1 then trigger 1
        checks++;
        if (o < 2 || v_tc[o] !== 1'b1 || v_tc[o - 1] !== 1'b0 || v_tc[o - 2] !== 1'b0)
          fail($sformatf("trigger at %0d, DT %b TIMECODE %b", o, v, v_tc));
      end
      wr(A_CONTROL, 16'h0300);
      @(posedge testpin[0]);
      #2000;
      rd(A_DTTRIGCNT0, d);
      checks++; if (d < 16'd990 || d > 16'd1000) fail($sformatf("DTTRIGCNT %0d", d));
    end
    // 10
    wr(A_XBADDR, 16'd20);
    wr(A_XBDATA, 16'h00FF);
    #2000;
    rd(A_XBADDR, d);
    checks++; if (d[14] !== 1'b1) fail($sformatf("XBADDR %h", d));
    // 11
    mon_on = 0;
    wr(A_TESTPIN0, 16'h0000);                        // pin 0 = system reset
    wr(A_CONTROL, 16'h0700);                         // RST-SW
    #1000;
    checks++; if (testpin[0] !== 1'b1) fail("RST-SW did not reset");
    wr(A_CONTROL, 16'h0300);
    #1000;
    checks++; if (testpin[0] !== 1'b0) fail("reset not released");
    checks++; if (n_ser != 200) fail("serial output does not repeat the control words");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
