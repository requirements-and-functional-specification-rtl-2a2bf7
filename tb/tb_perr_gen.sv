// tb_perr_gen: self-checking test of the Phase Error Generator.
//
// Every PERR input of both basebands holds a constant nibble, so each
// synchronizer delivers that nibble twice as its 8-bit phase error. In each
// of 12 rounds the test picks random PESWCFG input selections (some out of
// range, which must give 0) and a random TPESEL pair. It then applies an
// internal tick. Checks:
//  - TPEOUT holds {phase error B, phase error A} of the selected inputs;
//  - each of the 18 PHASERR streams carries the 16 phase-error bits of its
//    selected A and B inputs, LSB first, within its first 40 bits after
//    the tick.
module tb_perr_gen;
  import tfpga_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [NUM_SB-1:0][3:0] perr_a, perr_b;
  logic [NUM_SB-1:0] ptick_a = '0, psind_a = '0, ptick_b = '0, psind_b = '0;
  logic [NUM_SB-1:0] clksel_a = '0, clksel_b = '0;
  logic [2:0] bsel_a = '0, bsel_b = '0;
  logic [NUM_SB-1:0][4:0] swcfg_a, swcfg_b;
  logic [4:0] ptsel_a = '0, ptsel_b = '0, tpesel_a = '0, tpesel_b = '0;
  logic [1:0] ptmode_a = '0, ptmode_b = '0;
  logic stick = 1'b0, stick_ref = 1'b0, err_inject = 1'b0;
  logic [NUM_SB-1:0] phaserr, phaserr_f, sind_err_a, sind_err_b;
  logic [NUM_SB-1:0][3:0] crc_a, crc_b;
  logic [21:0] ptickcnt_a, ptickcnt_b;
  logic [15:0] tpeout;
  logic ptick_int_a, ptick_int_b;
  int checks = 0, failures = 0;

  perr_gen dut (.*);
  always #4 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] pe_of(input logic [NUM_SB-1:0][3:0] p, input logic [4:0] s);
    return (s < 5'(NUM_SB)) ? {p[s], p[s]} : 8'd0;
  endfunction

  initial begin
    logic [39:0] cap [NUM_SB];
    for (int i = 0; i < NUM_SB; i++) begin
      perr_a[i] = 4'($urandom); perr_b[i] = 4'($urandom);
      swcfg_a[i] = 5'(i); swcfg_b[i] = 5'(i);
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 12; r++) begin
      for (int i = 0; i < NUM_SB; i++) begin
        swcfg_a[i] = 5'($urandom_range(0, 19));
        swcfg_b[i] = 5'($urandom_range(0, 19));
      end
      tpesel_a = 5'($urandom_range(0, 19));
      tpesel_b = 5'($urandom_range(0, 19));
      repeat (30) @(negedge clk);
      stick = 1'b1; stick_ref = 1'b1;
      @(negedge clk);
      stick = 1'b0; stick_ref = 1'b0;
      checks++;
      if (tpeout !== {pe_of(perr_b, tpesel_b), pe_of(perr_a, tpesel_a)}) begin
        failures++;
        $display("round %0d TPEOUT %h", r, tpeout);
      end
      for (int k = 0; k < 40; k++) begin
        for (int i = 0; i < NUM_SB; i++) cap[i][k] = phaserr[i];
        @(negedge clk);
      end
      for (int i = 0; i < NUM_SB; i++) begin
        logic [15:0] want;
        bit found;
        want = {pe_of(perr_b, swcfg_b[i]), pe_of(perr_a, swcfg_a[i])};
        found = 0;
        for (int o = 0; o <= 24; o++) if (cap[i][o +: 16] == want) found = 1;
        checks++;
        if (!found) begin
          failures++;
          $display("round %0d output %0d: %h not in %b", r, i, want, cap[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
