// tb_system_tick: self-checking test of the System Tick block.
//
// The test drives 60 STICK pulses with ticklen = 49, so 50 clocks a tick.
// SPPS comes with every tenth tick, so ppslen = 499. Errors are planted:
//  - tick 15 comes 3 clocks early (STICK and SPPS interval);
//  - tick 25 is two clocks wide (STICK pulse width);
//  - SPPS also comes with tick 33 (SPPS interval);
//  - SPPS comes alone after the internal tick 45 (STICK-Mis and SPPS interval).
// The test works out from the pulse times when each error falls, and checks:
//  - stick_int is high in exactly the clocks sysdly + 3 after each STICK;
//  - intr is high in exactly the clocks 2*intdly + 2 after each stick_int;
//  - after each internal tick, the five error flags, spps_int and TCOUNT
//    must match.
// sysdly and intdly are random.
module tb_system_tick;
  logic clk = 1'b0, rst_n = 1'b0, spps = 1'b0, stick = 1'b0;
  logic [26:0] ppslen = 27'd499;
  logic [20:0] ticklen = 21'd49;
  logic [16:0] sysdly;
  logic [15:0] intdly;
  logic stick_rise, spps_rise, stick_int, spps_int, intr;
  logic stick_intv, spps_intv, stick_mis, stick_bad, spps_bad;
  logic [6:0] tcount;
  int checks = 0, failures = 0;

  system_tick dut (.*);
  always #4 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NT = 60, T0 = 20, NC = T0 + NT * 50 + 200;
  bit st_hi [NC], pp_hi [NC];
  int rise [NT];
  bit x_tintv [NT], x_pintv [NT], x_mis [NT], x_tbad [NT], x_pps [NT];
  bit is_si [NC], is_in [NC];
  int si_tick [NC];

  initial begin
    int c, last_pps, exp_tc;
    sysdly = 17'($urandom_range(4, 30));
    intdly = 16'($urandom_range(0, 9));
    last_pps = -1;
    c = T0;
    for (int k = 0; k < NT; k++) begin
      if (k == 15) c -= 3;
      rise[k] = c;
      st_hi[c] = 1;
      if (k == 25) st_hi[c + 1] = 1;
      x_tintv[k] = (k == 15);
      x_tbad[k]  = (k == 25);
      x_pps[k]   = (k % 10 == 0) || (k == 33);
      if (x_pps[k]) begin
        pp_hi[c] = 1;
        if (last_pps >= 0 && c - last_pps != 500) x_pintv[k] = 1;
        last_pps = c;
      end
      if (k == 45) begin
        pp_hi[c + int'(sysdly) + 12] = 1;
        last_pps = c + int'(sysdly) + 12;
        x_mis[k + 1] = 1;
        x_pintv[k + 1] = 1;
      end
      c += 50;
    end
    foreach (rise[k]) begin
      is_si[rise[k] + int'(sysdly) + 3] = 1;
      si_tick[rise[k] + int'(sysdly) + 3] = k;
      is_in[rise[k] + int'(sysdly) + 3 + 2 * int'(intdly) + 2] = 1;
    end

    exp_tc = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int m = 0; m < NC; m++) begin
      @(negedge clk);
      checks += 2;
      if (stick_int !== is_si[m]) begin
        failures++;
        if (failures < 10) $display("stick_int at %0d: %0b", m, stick_int);
      end
      if (intr !== is_in[m]) begin
        failures++;
        if (failures < 10) $display("intr at %0d: %0b", m, intr);
      end
      if (m > 0 && is_si[m - 1]) begin
        int k;
        k = si_tick[m - 1];
        exp_tc = x_pps[k] ? 0 : ((exp_tc == 99) ? 0 : exp_tc + 1);
        checks += 5;
        if (int'(tcount) != exp_tc) begin failures++; $display("tick %0d tcount %0d", k, tcount); end
        if (stick_intv !== x_tintv[k]) begin failures++; $display("tick %0d stick_intv", k); end
        if (spps_intv !== x_pintv[k]) begin failures++; $display("tick %0d spps_intv", k); end
        if (stick_mis !== x_mis[k]) begin failures++; $display("tick %0d stick_mis", k); end
        if (stick_bad !== x_tbad[k]) begin failures++; $display("tick %0d stick_bad", k); end
        checks++;
        if (spps_bad !== 1'b0) begin failures++; $display("tick %0d spps_bad", k); end
      end
      if (is_si[m]) begin
        checks++;
        if (spps_int !== x_pps[si_tick[m]]) begin failures++; $display("tick %0d spps_int", si_tick[m]); end
      end
      stick = st_hi[m];
      spps  = pp_hi[m];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
