// tb_dt_switch: self-checking test of the DUMPTRIG switch.
//
// Gives every one of the 18 outputs a random generator number (including
// numbers with no generator behind them, which must give 0), drives random
// generator bits and checks each output, one clock later, against the
// selected input. NUM_DT is 12 here so that unused numbers 12-15 occur.
module tb_dt_switch;
  import tfpga_pkg::*;
  localparam int NUM_DT = 12;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [NUM_DT-1:0] dt_in = '0;
  logic [NUM_SB-1:0][3:0] sel = '0;
  logic [NUM_SB-1:0] dt_out;
  int checks = 0, failures = 0;

  dt_switch #(.NUM_DT(NUM_DT)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NUM_DT-1:0] din;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 400; k++) begin
      if (k % 20 == 0)
        for (int i = 0; i < NUM_SB; i++) sel[i] = 4'($urandom_range(15));
      din = NUM_DT'($urandom);
      dt_in = din;
      @(posedge clk); #1;
      for (int i = 0; i < NUM_SB; i++) begin
        checks++;
        if (dt_out[i] !== ((int'(sel[i]) < NUM_DT) ? din[sel[i]] : 1'b0)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
