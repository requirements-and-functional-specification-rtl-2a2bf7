// tb_perr_format: self-checking test of the PHASERR frame formatter.
//
// Drives new random 8-bit phase errors A and B every clock and the internal
// tick (stick) at random times, sometimes in the middle of a frame. The
// formatter must send back-to-back 20-bit frames: A bits 0-7, B bits 0-7,
// then the CRC-4 of those 16 bits, MSB first. A frame starts at every tick
// and otherwise 20 clocks after the previous one; pe_f marks its first bit.
// The test records the inputs at every clock edge and rebuilds each
// expected frame from the inputs at its start edge. The CRC is computed here
// by polynomial long division. It then checks every output bit one clock
// after the edge that sends it. CRC bits sent while err_inject is set must
// be inverted.
module tb_perr_format;
  logic clk = 1'b0, rst_n = 1'b0;
  logic stick = 1'b0, err_inject = 1'b0;
  logic [7:0] pe_a = '0, pe_b = '0;
  logic pe_bit, pe_f;
  int checks = 0, failures = 0;

  perr_format dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [3:0] ref_crc(input logic [15:0] m);
    logic [19:0] r;
    r = {m[0], m[1], m[2], m[3], m[4], m[5], m[6], m[7],
         m[8], m[9], m[10], m[11], m[12], m[13], m[14], m[15], 4'b0};
    for (int i = 19; i >= 4; i--)
      if (r[i]) r[i -: 5] = r[i -: 5] ^ 5'b10011;
    return r[3:0];
  endfunction

  logic [15:0] frame_data;
  logic [19:0] frame_bits;
  int  fs = -1000, pos;
  bit  run = 1'b0;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    run = 1'b1;
    for (int c = 0; c < 3000; c++) begin
      pe_a = 8'($urandom);
      pe_b = 8'($urandom);
      stick = ($urandom_range(99) == 0);
      if (c % 500 == 0) err_inject = ~err_inject;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: the frame in flight and the position of the next output bit.
  int  cyc = 0;
  bit  started = 1'b0;
  logic exp_bit, exp_f;
  bit   chk = 1'b0;
  // outputs, half a clock after the edge, show the bit chosen at that edge
  always @(negedge clk) begin
    if (chk) begin
      checks += 2;
      if (pe_bit !== exp_bit) failures++;
      if (pe_f   !== exp_f)   failures++;
    end
  end
  always @(posedge clk) begin
    if (run) begin
      // choose the bit this edge sends
      chk = started;
      if (started) begin
        exp_f   = (pos == 0);
        exp_bit = frame_bits[pos] ^ (pos >= 16 && err_inject);
        pos++;
      end
      if (stick || (started && pos == 20)) begin
        frame_data = {pe_b, pe_a};
        frame_bits = {ref_crc(frame_data), frame_data};
        frame_bits = {frame_bits[16], frame_bits[17], frame_bits[18], frame_bits[19], frame_data};
        pos = 0;
        started = 1'b1;
      end
      cyc++;
    end
  end
endmodule
