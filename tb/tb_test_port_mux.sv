// tb_test_port_mux: self-checking test of the test pin multiplexer.
//
// Sets all four 6-bit addresses at random and drives a random 64-bit signal
// vector; each pin must show the addressed bit without a clock (the test
// pins are unregistered).
module tb_test_port_mux;
  logic [63:0] sig = '0;
  logic [3:0][5:0] sel = '0;
  logic [3:0] tp;
  int checks = 0, failures = 0;

  test_port_mux dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 500; k++) begin
      sig = {$urandom, $urandom};
      for (int p = 0; p < 4; p++) sel[p] = 6'($urandom);
      #1;
      for (int p = 0; p < 4; p++) begin
        checks++;
        if (tp[p] !== sig[sel[p]]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
