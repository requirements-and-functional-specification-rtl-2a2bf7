// tb_crc4_inserter: self-checking test of the CRC-4 inserter.
//
// Sends random frames (a start bit, 1-40 random payload bits, four
// placeholder bits marked as the CRC slot) and checks, bit by bit one clock
// later, that the payload passes unchanged and that the four CRC bits equal
// a reference computed here by polynomial long division by x^4+x+1 (MSB
// first, zero start). Every other frame is sent with err_inject set, and the
// CRC bits must then be inverted. frame_out must cover the payload and the
// CRC slot.
module tb_crc4_inserter;
  import tfpga_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic bit_in = 1'b0, frame_start = 1'b0, in_frame = 1'b0, crc_slot = 1'b0, err_inject = 1'b0;
  logic bit_out, frame_out;
  int checks = 0, failures = 0;

  crc4_inserter dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference CRC: remainder of payload * x^4 divided by x^4 + x + 1.
  function automatic logic [3:0] ref_crc(input logic [63:0] m, input int n);
    logic [67:0] r;
    r = '0;
    for (int i = 0; i < n; i++) r[67 - i] = m[i];
    for (int i = 0; i < n; i++)
      if (r[67 - i]) r[67 - i -: 5] = r[67 - i -: 5] ^ 5'b10011;
    return r[67 - n -: 4];
  endfunction

  task automatic send(input logic fs, input logic fr, input logic cs, input logic b,
                      input logic exp_frame, input logic exp_bit, input logic check_bit);
    bit_in = b; frame_start = fs; in_frame = fr; crc_slot = cs;
    @(posedge clk); #1;
    checks++;
    if (frame_out !== exp_frame) failures++;
    if (check_bit) begin
      checks++;
      if (bit_out !== exp_bit) begin
        failures++;
        $display("bit mismatch exp %0b got %0b", exp_bit, bit_out);
      end
    end
  endtask

  initial begin
    logic [63:0] m;
    logic [3:0]  c;
    int n;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    for (int f = 0; f < 60; f++) begin
      n = 1 + int'($urandom_range(39));
      m = {$urandom, $urandom};
      err_inject = f[0];
      c = ref_crc(m, n) ^ {4{err_inject}};
      send(1'b1, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b1);
      for (int i = 0; i < n; i++) send(1'b0, 1'b1, 1'b0, m[i], 1'b1, m[i], 1'b1);
      for (int i = 3; i >= 0; i--) send(1'b0, 1'b0, 1'b1, 1'b0, 1'b1, c[i], 1'b1);
      repeat (int'($urandom_range(3))) send(1'b0, 1'b0, 1'b0, 1'b1, 1'b0, 1'b1, 1'b1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
