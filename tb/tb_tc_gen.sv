// tb_tc_gen: self-checking test of the time code generator.
//
// Applies an internal tick every 60-90 clocks and reads back each TIMECODE
// frame from tc_bit. The frame is the start bit 0 in the tick clock, then
// 47 field bits, T, C, EPOCH, TCOUNT and SCOUNT, each LSB first, then the
// CRC-4 of the 47 field bits. The CRC is computed here by long division.
// Manual mode: random TCSTAMP values are set before each tick and must be
// sent unchanged. Auto mode: PPS comes with every fifth tick. T must be 1
// exactly then. TCOUNT must count ticks since the PPS. SCOUNT must take the
// written value at the first PPS after the load strobe, then count one per
// PPS. The read-back outputs must match what was sent. Frames sent with
// err_inject must have an inverted CRC.
module tb_tc_gen;
  logic clk = 1'b0, rst_n = 1'b0;
  logic stick = 1'b0, spps = 1'b0, auto_mode = 1'b0, reg_t = 1'b0, reg_c = 1'b0;
  logic [2:0] reg_epoch = '0;
  logic [9:0] reg_tcount = '0;
  logic [31:0] reg_scount = '0;
  logic load = 1'b0, err_inject = 1'b0;
  logic tc_bit, tc_frame, cur_t;
  logic [9:0] cur_tcount;
  logic [31:0] cur_scount;
  int checks = 0, failures = 0;

  tc_gen dut (.*);
  always #5 clk = ~clk;

  initial begin
    #3_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [3:0] ref_crc(input logic [46:0] m);
    logic [50:0] r;
    for (int i = 0; i < 47; i++) r[50 - i] = m[i];
    r[3:0] = '0;
    for (int i = 50; i >= 4; i--)
      if (r[i]) r[i -: 5] = r[i -: 5] ^ 5'b10011;
    return r[3:0];
  endfunction

  // one tick: returns the 47 field bits; checks start bit, flag and CRC
  task automatic tick(input bit pps, output logic [46:0] f);
    logic [3:0] c;
    @(negedge clk);
    stick = 1'b1; spps = pps;
    @(negedge clk);
    stick = 1'b0; spps = 1'b0;
    checks++;
    if (tc_bit !== 1'b0) failures++;
    for (int i = 0; i < 47; i++) begin
      @(negedge clk);
      f[i] = tc_bit;
      checks++;
      if (tc_frame !== 1'b1) failures++;
    end
    for (int i = 3; i >= 0; i--) begin
      @(negedge clk);
      c[i] = tc_bit;
    end
    checks++;
    if (c !== (ref_crc(f) ^ {4{err_inject}})) begin
      failures++;
      $display("crc %h expected %h", c, ref_crc(f) ^ {4{err_inject}});
    end
    repeat (5 + int'($urandom_range(30))) @(negedge clk);
    checks++;
    if (tc_frame !== 1'b0) failures++;
  endtask

  initial begin
    logic [46:0] f, e;
    logic [31:0] sc;
    logic [9:0]  tcn;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // manual mode
    for (int k = 0; k < 30; k++) begin
      @(negedge clk);
      reg_t = 1'($urandom); reg_c = 1'($urandom); reg_epoch = 3'($urandom);
      reg_tcount = 10'($urandom); reg_scount = $urandom;
      err_inject = (k % 7 == 3);
      e = {reg_scount, reg_tcount, reg_epoch, reg_c, reg_t};
      tick(1'b0, f);
      checks++;
      if (f !== e) begin failures++; $display("manual frame %h expected %h", f, e); end
    end
    // automatic mode
    err_inject = 1'b0;
    @(negedge clk);
    auto_mode = 1'b1;
    reg_c = 1'b1; reg_epoch = 3'd2; reg_scount = 32'd1000;
    load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    sc = 32'd1000;
    tcn = '0;
    for (int k = 0; k < 40; k++) begin
      bit pps;
      pps = (k % 5 == 0);
      if (pps) begin
        tcn = '0;
        if (k > 0) sc = sc + 32'd1;
      end else tcn = tcn + 10'd1;
      tick(pps, f);
      e = {sc, tcn, 3'd2, 1'b1, pps};
      checks += 3;
      if (f !== e) begin failures++; $display("auto frame %h expected %h", f, e); end
      if (cur_scount !== sc || cur_tcount !== tcn) failures++;
      if (cur_t !== pps) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
