// tb_xb_cmd_gen: self-checking test of the Crossbar Board command generator.
//
// Sends random 16-bit commands to random sub-band numbers. On the addressed
// COMMAND lane the test looks for the frame: a start bit 0 where the
// preamble (seen on the other lanes) is 1, then command bits 0-15, then the
// CRC-4 of those 16 bits. The CRC is computed here by long division, and
// is inverted when err_inject is set. All other lanes must carry the
// alternating preamble throughout. busy must be high from the start strobe
// to the end of the frame. A sub-band number above 17 must raise addr_err
// and send nothing.
module tb_xb_cmd_gen;
  import tfpga_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic stick = 1'b0, start = 1'b0, err_inject = 1'b0;
  logic [4:0] addr = '0;
  logic [15:0] data = '0;
  logic [NUM_SB-1:0] cmd;
  logic cmd_frame, busy, addr_err;
  int checks = 0, failures = 0;

  xb_cmd_gen dut (.*);
  always #5 clk = ~clk;

  initial begin
    #3_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [3:0] ref_crc(input logic [15:0] m);
    logic [19:0] r;
    for (int i = 0; i < 16; i++) r[19 - i] = m[i];
    r[3:0] = '0;
    for (int i = 19; i >= 4; i--)
      if (r[i]) r[i -: 5] = r[i -: 5] ^ 5'b10011;
    return r[3:0];
  endfunction

  // the preamble reference: any lane other than a
  function automatic int other(input int a);
    return (a == 0) ? 1 : 0;
  endfunction

  initial begin
    logic prev;
    logic [15:0] got;
    logic [3:0] c;
    int a, n;
    bit found;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk); stick = 1'b1;
    @(negedge clk); stick = 1'b0;
    repeat (4) @(negedge clk);
    for (int k = 0; k < 60; k++) begin
      a = (k % 10 == 9) ? ((k % 20 == 9) ? 18 : 18 + int'($urandom_range(13))) : int'($urandom_range(17));
      addr = 5'(a);
      data = 16'($urandom);
      err_inject = (k % 4 == 1);
      @(negedge clk);
      checks++;
      if (addr_err !== (a > 17)) failures++;
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      if (a > 17) begin
        repeat (30) begin
          @(negedge clk);
          checks += 2;
          if (busy) failures++;
          if (cmd !== {NUM_SB{cmd[0]}}) failures++;
        end
        continue;
      end
      // wait for the start bit on lane a
      found = 1'b0;
      for (n = 0; n < 6 && !found; n++) begin
        checks++;
        if (!busy) failures++;
        @(negedge clk);
        if (cmd[a] !== cmd[other(a)]) begin
          found = 1'b1;
          checks++;
          if (!(cmd[a] === 1'b0 && cmd[other(a)] === 1'b1)) failures++;
        end
      end
      checks++;
      if (!found) begin failures++; continue; end
      for (int i = 0; i < 16; i++) begin
        prev = cmd[other(a)];
        @(negedge clk);
        got[i] = cmd[a];
        checks += 2;
        if (cmd[other(a)] === prev) failures++;   // preamble alternates
        if (!busy) failures++;
      end
      for (int i = 3; i >= 0; i--) begin
        @(negedge clk);
        c[i] = cmd[a];
      end
      checks += 2;
      if (got !== data) begin failures++; $display("data %h expected %h", got, data); end
      if (c !== (ref_crc(data) ^ {4{err_inject}})) failures++;
      repeat (3) @(negedge clk);
      checks += 2;
      if (busy) failures++;
      if (cmd !== {NUM_SB{cmd[0]}}) failures++;
      repeat (int'($urandom_range(10))) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
