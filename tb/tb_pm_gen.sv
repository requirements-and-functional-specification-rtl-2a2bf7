// tb_pm_gen: self-checking test of the PHASEMOD generator.
//
// Each round clears the generator, writes an instruction list through the
// write port, enables it and applies an internal tick. The round-0 list is
// the two-frame example of the specification: SBIT, 12 DATA bytes, CRC,
// NOP 7, SBIT, 12 DATA bytes, CRC, END. The data is random. The test builds
// the bit stream it expects directly from the instruction list: preamble
// 1 in the first clock after the tick, alternating; the start bit 0;
// width+1 data bits, LSB first; the CRC-4 of the frame's data bits, found
// here by long division; and NOP preamble. It compares the stream bit for
// bit from the tick on. Later rounds use random widths and NOP lengths,
// which can misplace a start bit, and an illegal command. STATUS4-type
// errors, published at the next tick, must match what the list contains:
// start bit against preamble, illegal command. PMWADDR and PMRADDR must
// hold the write address and the END address. err_inject must invert the
// CRC.
module tb_pm_gen;
  import tfpga_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic clr = 1'b0, en = 1'b0, stick = 1'b0, wr_en = 1'b0, err_inject = 1'b0;
  logic [15:0] wr_data = '0;
  logic pm_bit, pm_frame;
  gen_state_e state_o;
  logic [11:0] waddr_end, raddr_end;
  logic err_cmd, err_frame, err_sbit, err_wr, err_rd;
  int checks = 0, failures = 0;

  pm_gen #(.DEPTH(4096)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] prog [$];
  logic        exp_s [$];

  function automatic logic [15:0] ins(input cmd_e c, input logic [10:0] v);
    return {c, v};
  endfunction

  function automatic logic [3:0] crc_of(input logic b [$]);
    logic [3:0] r = '0;
    foreach (b[i]) begin
      logic top;
      top = r[3] ^ b[i];
      r = {r[2:0], 1'b0} ^ (top ? 4'b0011 : 4'b0000);
    end
    return r;
  endfunction

  // Expected stream; returns whether a start bit was misplaced or a
  // command was illegal.
  task automatic expect_stream(output bit e_sbit, output bit e_cmd);
    logic fb [$];
    int k;
    logic [3:0] c;
    e_sbit = 0; e_cmd = 0;
    exp_s.delete();
    k = 1;                                  // clock index after the tick
    foreach (prog[i]) begin
      cmd_e cm;
      cm = cmd_e'(prog[i][15:11]);
      case (cm)
        CMD_SBIT: begin
          if (k % 2 == 0) e_sbit = 1;
          exp_s.push_back(1'b0); k++; fb.delete();
        end
        CMD_DATA: for (int j = 0; j <= int'(prog[i][10:8]); j++) begin
          exp_s.push_back(prog[i][j]); fb.push_back(prog[i][j]); k++;
        end
        CMD_CRC: begin
          c = crc_of(fb) ^ {4{err_inject}};
          for (int j = 3; j >= 0; j--) begin exp_s.push_back(c[j]); k++; end
        end
        CMD_NOP: for (int j = 0; j < int'(prog[i][10:0]); j++) begin
          exp_s.push_back(k % 2 == 1); k++;
        end
        CMD_END: break;
        default: begin e_cmd = 1; break; end
      endcase
    end
    for (int j = 0; j < 20; j++) begin exp_s.push_back(k % 2 == 1); k++; end
  endtask

  task automatic tick();
    @(negedge clk); stick = 1'b1;
    @(negedge clk); stick = 1'b0;
  endtask

  task automatic run_round(input int end_addr, input bit exp_end);
    bit es, ec;
    @(negedge clk); clr = 1'b1; en = 1'b0;
    @(negedge clk); clr = 1'b0;
    foreach (prog[i]) begin
      @(negedge clk); wr_en = 1'b1; wr_data = prog[i];
    end
    @(negedge clk); wr_en = 1'b0; en = 1'b1;
    expect_stream(es, ec);
    tick();
    // now just after the tick edge; the stream starts one clock later
    foreach (exp_s[i]) begin
      @(negedge clk);
      checks++;
      if (pm_bit !== exp_s[i]) begin
        failures++;
        if (failures < 10) $display("bit %0d: %0b expected %0b", i, pm_bit, exp_s[i]);
      end
    end
    repeat (20) @(negedge clk);
    en = 1'b0;
    if (exp_end) begin
      checks += 2;
      if (int'(waddr_end) != prog.size()) failures++;
      if (int'(raddr_end) != end_addr) failures++;
    end
    tick();                                 // publishes the errors
    checks += 3;
    if (err_sbit !== es) begin failures++; $display("err_sbit %0b expected %0b", err_sbit, es); end
    if (err_cmd  !== ec) begin failures++; $display("err_cmd %0b expected %0b", err_cmd, ec); end
    if (err_frame !== 1'b0) failures++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // round 0: the specification's two-frame example
    for (int f = 0; f < 2; f++) begin
      prog.push_back(ins(CMD_SBIT, 11'd0));
      for (int j = 0; j < 12; j++) prog.push_back({CMD_DATA, 3'd7, 8'($urandom)});
      prog.push_back(ins(CMD_CRC, 11'd0));
      if (f == 0) prog.push_back(ins(CMD_NOP, 11'd7));
    end
    prog.push_back(ins(CMD_END, 11'd0));
    run_round(prog.size() - 1, 1'b1);
    // random rounds
    for (int r = 0; r < 12; r++) begin
      prog.delete();
      err_inject = (r % 3 == 1);
      for (int f = 0; f < 3; f++) begin
        if (f > 0 || r % 2 == 1) prog.push_back(ins(CMD_NOP, 11'($urandom_range(1, 9))));
        prog.push_back(ins(CMD_SBIT, 11'd0));
        for (int j = 0; j < 1 + int'($urandom_range(5)); j++)
          prog.push_back({CMD_DATA, 3'($urandom), 8'($urandom)});
        prog.push_back(ins(CMD_CRC, 11'd0));
      end
      if (r % 4 == 3) prog.push_back(ins(CMD_NOPL, 11'd1));   // illegal here
      prog.push_back(ins(CMD_END, 11'd0));
      run_round(prog.size() - 1, r % 4 != 3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
