// tb_interval_meter: self-checking test of the tick interval meter.
//
// Drives the measured tick (d) and the system tick (s) as one-clock pulses
// at random times with random half-clock flags, in each of the four SEL
// modes. A model here keeps the cycle number and half flag of the last
// start event. At every stop event it works out the interval in half clocks,
// 2*(stop cycle - start cycle) + stop half - start half, and compares it with
// count one clock later. A long gap at the end of each mode must saturate
// the count to all ones (the missing-tick indication). W is 12 to keep the
// saturation test short.
module tb_interval_meter;
  localparam int W = 12;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [1:0] sel = '0;
  logic d_pulse = 1'b0, d_half = 1'b0, s_pulse = 1'b0, s_half = 1'b0;
  logic [W-1:0] count;
  int checks = 0, failures = 0;

  interval_meter #(.W(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int  st_cyc;
  int  st_half;
  bit  started;

  task automatic step(input bit dp, input bit dh, input bit sp, input bit sh);
    bit start_ev, stop_ev, sth, sph;
    int exp_v;
    d_pulse = dp; d_half = dh; s_pulse = sp; s_half = sh;
    case (sel)
      2'b00: begin start_ev = dp; sth = dh; stop_ev = sp; sph = sh; end
      2'b01: begin start_ev = dp; sth = dh; stop_ev = dp; sph = dh; end
      2'b10: begin start_ev = sp; sth = sh; stop_ev = sp; sph = sh; end
      default: begin start_ev = sp; sth = sh; stop_ev = dp; sph = dh; end
    endcase
    exp_v = 2 * (cyc - st_cyc) + int'(sph) - st_half;
    if (exp_v > (1 << W) - 1) exp_v = (1 << W) - 1;
    @(posedge clk); #1;
    if (stop_ev && started) begin
      checks++;
      if (int'(count) != exp_v) begin
        failures++;
        $display("mode %0d: count %0d expected %0d", sel, count, exp_v);
      end
    end
    if (start_ev) begin st_cyc = cyc - 1; st_half = int'(sth); started = 1'b1; end
    d_pulse = 1'b0; s_pulse = 1'b0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int m = 0; m < 4; m++) begin
      sel = 2'(m);
      started = 1'b0;
      @(posedge clk); #1;
      for (int k = 0; k < 60; k++) begin
        repeat (int'($urandom_range(40))) step(1'b0, 1'b0, 1'b0, 1'b0);
        step($urandom_range(1) == 1, $urandom_range(1) == 1,
             $urandom_range(1) == 1, $urandom_range(1) == 1);
      end
      // a long gap, then both events: the count saturates
      repeat (2100) step(1'b0, 1'b0, 1'b0, 1'b0);
      step(1'b1, 1'b0, 1'b1, 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
