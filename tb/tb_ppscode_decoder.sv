// tb_ppscode_decoder: self-checking test of the PPSCODE Decoder.
//
// Clocks A, B and X run at 128 MHz, and the MCB clock at 33 MHz. The
// system clock is BCLK fed straight back, as the board buffers would do.
// Both inputs carry valid PPSCODE with ppslen = 999, so a frame every 1000
// clocks. B's frames come about 300 clocks after A's. ticklen = 99 and
// ppsdly = 50.
// The test runs in phases and checks in each one:
//  1. all clocks good: DAT-Sel A, CLK-Sel X, and each BPPS comes
//     ppsdly + 4..10 clocks after an A frame;
//  2. clock A stopped: DAT-Sel B, and BPPS follows B;
//  3. clock A back: the choice stays B;
//  4. SEL-rst pulsed: back to A;
//  5. manual selection of data B and clock A: the selections follow, and
//     BCLK equals clock A;
//  6. automatic again with clock X stopped: CLK-Sel A, and BPPS follows A
//     on the new system clock.
// In every phase BPPS must come every 1000 system clocks, with exactly
// ten BTICKs between BPPS pulses. The hop count and second received on A
// must match what was sent.
module tb_ppscode_decoder;
  import tfpga_pkg::*;
  logic rst_n = 1'b0;
  logic clk_a = 1'b0, clk_b = 1'b0, clk_x = 1'b0, mcb_clk = 1'b0;
  logic run_a = 1'b1, run_x = 1'b1;
  logic pc_a = 1'b1, pc_b = 1'b1;
  logic sclk;
  logic [26:0] ppsdly = 27'd50, ppslen = 27'd999;
  logic [20:0] ticklen = 21'd99;
  logic man_sel = 1'b0, sel_rst = 1'b0, pcstate_wr = 1'b0;
  logic [1:0] man_clk_sel = 2'd0, man_dat_sel = 2'd0;
  logic opc_a, opc_b, oclk_a, oclk_b, bclk, bpps, btick;
  src_e clk_sel, dat_sel;
  logic [5:0] sec_a, sec_b;
  logic [7:0] hop_a, hop_b;
  logic crc_a, crc_b, ovf_a, ovf_b, ici_a, ici_b, bad_int_a, bad_int_b;
  logic [15:0] tog_a, tog_b, tog_s, tog_x;
  logic bad_a, bad_b, bad_s, bad_x, sci_a, sci_b, pcpps_intv, pps_sys;
  int checks = 0, failures = 0;

  assign sclk = bclk;
  ppscode_decoder dut (.*);

  always #3.906 if (run_a) clk_a = ~clk_a;
  initial begin #1.3; forever #3.906 clk_b = ~clk_b; end
  always #3.906 if (run_x) clk_x = ~clk_x;
  always #15 mcb_clk = ~mcb_clk;

  initial begin
    #3_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [22:0] make_frame(input logic [5:0] s, input logic [7:0] h);
    logic [22:0] f;
    logic [3:0] c = '0;
    f[0] = 1'b1;
    f[6:1] = s;
    f[10:7] = 4'b0101;
    f[18:11] = h;
    for (int i = 0; i <= 18; i++) c = crc4_step(c, f[i]);
    for (int i = 0; i < 4; i++) f[19 + i] = c[3 - i];
    return f;
  endfunction

  // one second of code: 976 preamble bits ending in 0, start bit, frame
  function automatic logic code_bit(input int n, input logic [7:0] h, output bit t);
    int p, s;
    logic [22:0] f;
    p = n % 1000;
    s = n / 1000;
    t = (p == 977);
    if (p < 976) return ((975 - p) % 2) != 0;
    if (p == 976) return 1'b0;
    f = make_frame(6'(s % 60), h);
    return f[p - 977];
  endfunction

  realtime t_a = -1.0, t_b = -1.0;
  initial begin
    int n = 0;
    bit t;
    forever begin
      @(negedge clk_a);
      pc_a = code_bit(n, 8'd5, t);
      if (t) t_a = $realtime;
      n++;
    end
  end
  initial begin
    int n = 700;
    bit t;
    forever begin
      @(negedge clk_b);
      pc_b = code_bit(n, 8'd9, t);
      if (t) t_b = $realtime;
      n++;
    end
  end

  // BPPS and BTICK monitor on the system clock
  bit   checking = 0;
  src_e exp_src;
  int   ncyc = 0, last_pps = -1, nticks = 0;
  always @(negedge sclk) begin
    ncyc++;
    if (btick) nticks++;
    if (bpps) begin
      if (checking) begin
        realtime tt, d;
        tt = (exp_src == SRC_A) ? t_a : t_b;
        d = $realtime - tt;
        checks++;
        if (d < (50 + 4) * 7.8125 || d > (50 + 10) * 7.8125) begin
          failures++;
          $display("%t: BPPS %0.1f ns after the frame of %s", $realtime, d, exp_src.name());
        end
        if (last_pps >= 0) begin
          checks += 2;
          if (ncyc - last_pps != 1000) begin
            failures++;
            $display("%t: BPPS period %0d", $realtime, ncyc - last_pps);
          end
          if (nticks != 10) begin
            failures++;
            $display("%t: %0d BTICKs in a second", $realtime, nticks);
          end
        end
        last_pps = ncyc;
      end
      nticks = 0;
    end
  end

  task automatic check_phase(input src_e d, input src_e c, input string what);
    checks += 2;
    if (dat_sel !== d) begin failures++; $display("%s: DAT-Sel %s", what, dat_sel.name()); end
    if (clk_sel !== c) begin failures++; $display("%s: CLK-Sel %s", what, clk_sel.name()); end
  endtask

  task automatic watch(input src_e s, input realtime len);
    exp_src = s;
    last_pps = -1;
    checking = 1;
    #(len);
    checking = 0;
  endtask

  initial begin
    #100 rst_n = 1'b1;
    #300_000;
    check_phase(SRC_A, SRC_X, "phase 1");
    checks += 2;
    if (hop_a !== 8'd5) begin failures++; $display("hop_a %0d", hop_a); end
    if (crc_a !== 1'b0) begin failures++; $display("crc_a set"); end
    watch(SRC_A, 100_000);
    run_a = 1'b0;
    #300_000;
    check_phase(SRC_B, SRC_X, "phase 2");
    watch(SRC_B, 100_000);
    run_a = 1'b1;
    #300_000;
    check_phase(SRC_B, SRC_X, "phase 3");
    watch(SRC_B, 50_000);
    @(negedge mcb_clk) sel_rst = 1'b1;
    @(negedge mcb_clk) sel_rst = 1'b0;
    #30_000;
    check_phase(SRC_A, SRC_X, "phase 4");
    watch(SRC_A, 50_000);
    man_sel = 1'b1; man_dat_sel = 2'(SRC_B); man_clk_sel = 2'(SRC_A);
    #1000;
    check_phase(SRC_B, SRC_A, "phase 5");
    for (int i = 0; i < 200; i++) begin
      #($urandom_range(1, 97) * 0.1);
      checks++;
      if (bclk !== clk_a) failures++;
    end
    man_sel = 1'b0;
    run_x = 1'b0;
    #300_000;
    check_phase(SRC_A, SRC_A, "phase 6");
    watch(SRC_A, 50_000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
