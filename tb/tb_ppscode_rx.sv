// tb_ppscode_rx: self-checking test of the PPSCODE receiver and repeater.
//
// The test builds a PPSCODE stream of 40 seconds. Each second is 100 clocks
// long, with ppslen set to 99. It holds alternating preamble ending in 0,
// the start bit 0 and the 23-bit frame: T, second, 1010, hop count and
// CRC-4. Hop counts are random, and include 255. Some frames get a corrupt
// CRC. One second is two clocks short. Eight bad frames in a row end the run.
// Checks:
//  - dout must equal the input delayed 18 clocks, with the hop count
//    incremented and the CRC recomputed, in every clock;
//  - pps must pulse one clock after each T bit, and at no other time;
//  - at each frame end, second, hop, ovf, crc_err and ici_err must match;
//  - bad_int must rise only after the eight bad frames.
// Inputs are driven and outputs compared at the falling edge.
module tb_ppscode_rx;
  import tfpga_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, din = 1'b1;
  logic [26:0] ppslen = 27'd99;
  logic dout, pps, crc_err, ovf, ici_err, bad_int;
  logic [5:0] second;
  logic [7:0] hop;
  int checks = 0, failures = 0;

  ppscode_rx dut (.*);
  always #4 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic in_s  [$];
  logic out_s [$];
  bit   t_at  [$];
  // per frame: index of the last bit, and expected status
  int   f_end [$];
  logic [5:0] f_sec [$];
  logic [7:0] f_hop [$];
  bit   f_crc [$], f_ici [$], f_bad [$];

  function automatic logic [22:0] make_frame(input logic [5:0] s, input logic [7:0] h,
                                             input bit corrupt);
    logic [22:0] f;
    logic [3:0] c = '0;
    f[0] = 1'b1;
    f[6:1] = s;
    f[10:7] = 4'b0101;           // bit 7 = 1, bit 8 = 0, bit 9 = 1, bit 10 = 0
    f[18:11] = h;
    for (int i = 0; i <= 18; i++) c = crc4_step(c, f[i]);
    if (corrupt) c = c ^ 4'b0100;
    for (int i = 0; i < 4; i++) f[19 + i] = c[3 - i];
    return f;
  endfunction

  initial begin
    int nbad = 0;
    bit prev_short = 0;
    for (int s = 0; s < 40; s++) begin
      logic [7:0] h;
      logic [22:0] fi, fo;
      bit bad, shrt;
      int L;
      h = (s % 7 == 3) ? 8'hFF : 8'($urandom_range(0, 20));
      bad = (s % 5 == 2) || (s >= 32);
      shrt = (s == 20);
      L = shrt ? 74 : 76;
      for (int j = 0; j < L; j++) begin
        in_s.push_back(((L - 1 - j) % 2) != 0);
        out_s.push_back(((L - 1 - j) % 2) != 0);
        t_at.push_back(0);
      end
      in_s.push_back(1'b0); out_s.push_back(1'b0); t_at.push_back(0);
      fi = make_frame(6'(s % 60), h, bad);
      fo = make_frame(6'(s % 60), h + 8'd1, 0);
      for (int i = 0; i < 23; i++) begin
        in_s.push_back(fi[i]); out_s.push_back(fo[i]); t_at.push_back(i == 0);
      end
      f_end.push_back(in_s.size() - 1);
      f_sec.push_back(6'(s % 60));
      f_hop.push_back(h);
      f_crc.push_back(bad);
      // the interval check needs a previous PPS; second 20 is 98 clocks
      f_ici.push_back(shrt);
      nbad = (bad || shrt) ? nbad + 1 : 0;
      f_bad.push_back(nbad >= 8);
    end
    for (int j = 0; j < 40; j++) begin
      in_s.push_back(j % 2 == 0); out_s.push_back(j % 2 == 0); t_at.push_back(0);
    end

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // the delay line starts at zero, so the first 18 outputs are not checked
    for (int m = 0; m < in_s.size(); m++) begin
      @(negedge clk);
      if (m >= 18) begin
        checks++;
        if (dout !== out_s[m - 18]) begin
          failures++;
          if (failures < 10) $display("dout at %0d: %0b expected %0b", m - 18, dout, out_s[m - 18]);
        end
      end
      if (m >= 1) begin
        checks++;
        if (pps !== t_at[m - 1]) begin
          failures++;
          if (failures < 10) $display("pps at %0d: %0b", m, pps);
        end
      end
      foreach (f_end[k]) if (m == f_end[k] + 2) begin
        checks += 5;
        if (second !== f_sec[k]) begin failures++; $display("frame %0d second %0d", k, second); end
        if (hop !== f_hop[k]) begin failures++; $display("frame %0d hop %0d", k, hop); end
        if (ovf !== (f_hop[k] == 8'hFF)) begin failures++; $display("frame %0d ovf", k); end
        if (crc_err !== f_crc[k]) begin failures++; $display("frame %0d crc_err %0b", k, crc_err); end
        if (k > 0 && ici_err !== f_ici[k]) begin failures++; $display("frame %0d ici_err %0b", k, ici_err); end
        if (k > 0) begin
          checks++;
          if (bad_int !== f_bad[k]) begin failures++; $display("frame %0d bad_int %0b", k, bad_int); end
        end
      end
      din = in_s[m];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
