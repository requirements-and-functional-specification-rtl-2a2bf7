// tb_clk_monitor: self-checking test of the clock toggle monitor.
//
// Runs the monitored clock at 128 MHz, then at 100 MHz, then stopped, and
// the MCB clock at 33.3 MHz (30 ns). Over each 4091-cycle MCB window the
// count must be the number of monitored rising edges in the window, worked
// out here from the two periods (within 2 for the unknown phase and the
// synchronizer). The bad flag must follow the limits 0x3D50 to 0x3D70: good
// at 128 MHz (about 0x3D5D), bad at 100 MHz and when stopped.
module tb_clk_monitor;
  logic mon_clk = 1'b0, mcb_clk = 1'b0, rst_n = 1'b0;
  logic [15:0] togcount;
  logic bad;
  int checks = 0, failures = 0;
  realtime half = 3.906;
  bit  run_mon = 1'b1;

  clk_monitor dut (.*);
  always #15 mcb_clk = ~mcb_clk;
  always begin
    #(half);
    if (run_mon) mon_clk = ~mon_clk;
  end

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_windows(input int expected, input bit exp_bad);
    int diff;
    // skip the window in flight and the one that spans the change
    repeat (2 * 4091 + 10) @(posedge mcb_clk);
    for (int w = 0; w < 2; w++) begin
      repeat (4091) @(posedge mcb_clk);
      checks += 2;
      diff = int'(togcount) - expected;
      if (diff > 2 || diff < -2) begin
        failures++;
        $display("togcount %0d expected %0d", togcount, expected);
      end
      if (bad !== exp_bad) failures++;
    end
  endtask

  initial begin
    repeat (3) @(posedge mcb_clk);
    rst_n = 1'b1;
    check_windows(4091 * 30 * 1000 / 7812, 1'b0);
    half = 5.0;
    check_windows(4091 * 30 / 10, 1'b1);
    run_mon = 1'b0;
    check_windows(0, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
