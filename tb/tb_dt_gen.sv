// tb_dt_gen: self-checking test of a DUMPTRIG generator.
//
// Each round clears the generator, writes an instruction list, arms it and
// applies an internal tick. The test builds the expected bit stream from
// the list. After the tick the preamble is 0 in the first clock and then
// alternates. TRIG sends a 1. SBIT sends a 0 and restarts the CRC. DATA
// sends width+1 bits, LSB first. CRC sends the CRC-4 of the frame's data
// bits, computed here by long division. NOP n sends n preamble bits and
// NOPL n sends n*2048. It compares the stream bit for bit. The lists mix
// legal and misplaced triggers and start bits, and NOPL. One round has no
// END, so the reader runs into the write address. One has an illegal
// command. The errors published at the next tick must match: trigger
// position, start-bit position, RAM read meeting write, illegal command.
// DTTRIGCNT must give the clocks from the last trigger to the tick, and
// DTWADDR the write address. A last round streams a 721-word list
// through the 256-word memory while writing ahead of the reader, so both
// addresses wrap. DEPTH is 256 to keep the test short.
module tb_dt_gen;
  import tfpga_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic clr = 1'b0, arm = 1'b0, stick = 1'b0, wr_en = 1'b0, err_inject = 1'b0;
  logic [15:0] wr_data = '0;
  logic dt_bit, dt_frame, trig_o;
  gen_state_e state_o;
  logic [14:0] waddr_tick, raddr_tick;
  logic [20:0] trigcnt;
  logic err_cmd, err_trig, err_sbit, err_ram;
  int checks = 0, failures = 0;

  dt_gen #(.DEPTH(256)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] prog [$];
  logic        exp_s [$];
  int          last_trig;
  int          start_k [$];   // clock after the tick at which each instruction starts

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

  // preamble in clock k after the tick (k = 1 is the first)
  function automatic logic pre_at(input int k);
    return (k % 2 == 0);
  endfunction

  task automatic expect_stream(output bit e_trig, output bit e_sbit, output bit e_cmd,
                               output bit ended);
    logic fb [$];
    int k;
    logic [3:0] c;
    e_trig = 0; e_sbit = 0; e_cmd = 0; ended = 0;
    exp_s.delete();
    start_k.delete();
    last_trig = -1;
    k = 1;
    foreach (prog[i]) begin
      cmd_e cm;
      cm = cmd_e'(prog[i][15:11]);
      if (ended) break;
      start_k.push_back(k);
      case (cm)
        CMD_TRIG: begin
          if (pre_at(k)) e_trig = 1;
          last_trig = k;
          exp_s.push_back(1'b1); k++;
        end
        CMD_SBIT: begin
          if (!pre_at(k)) e_sbit = 1;
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
          exp_s.push_back(pre_at(k)); k++;
        end
        CMD_NOPL: for (int j = 0; j < 2048 * int'(prog[i][10:0]); j++) begin
          exp_s.push_back(pre_at(k)); k++;
        end
        CMD_END: ended = 1;
        default: begin e_cmd = 1; ended = 1; end
      endcase
    end
    if (ended)
      for (int j = 0; j < 20; j++) begin exp_s.push_back(pre_at(k)); k++; end
  endtask

  task automatic run_round(input bit exp_ram);
    bit et, es, ec, ended;
    int k;
    @(negedge clk); clr = 1'b1; arm = 1'b0;
    @(negedge clk); clr = 1'b0;
    foreach (prog[i]) begin
      @(negedge clk); wr_en = 1'b1; wr_data = prog[i];
    end
    @(negedge clk); wr_en = 1'b0; arm = 1'b1;
    expect_stream(et, es, ec, ended);
    @(negedge clk); stick = 1'b1;
    @(negedge clk); stick = 1'b0;
    k = 0;
    foreach (exp_s[i]) begin
      @(negedge clk);
      k++;
      checks++;
      if (dt_bit !== exp_s[i]) begin
        failures++;
        if (failures < 10) $display("bit %0d: %0b expected %0b", i, dt_bit, exp_s[i]);
      end
    end
    repeat (10) @(negedge clk);
    k += 10;
    arm = 1'b0;
    @(negedge clk); stick = 1'b1;
    @(negedge clk); stick = 1'b0;
    k += 1;
    checks += 6;
    if (err_trig !== et) begin failures++; $display("err_trig %0b expected %0b", err_trig, et); end
    if (err_sbit !== es) begin failures++; $display("err_sbit %0b expected %0b", err_sbit, es); end
    if (err_cmd  !== ec) begin failures++; $display("err_cmd %0b expected %0b", err_cmd, ec); end
    if (err_ram  !== exp_ram) begin failures++; $display("err_ram %0b expected %0b", err_ram, exp_ram); end
    if (int'(waddr_tick) != prog.size()) failures++;
    // the trigger was decoded in clock last_trig after the first tick; the
    // second tick came k clocks after that first tick
    if (last_trig > 0 && int'(trigcnt) != k + 1 - last_trig) begin
      failures++;
      $display("trigcnt %0d expected %0d", trigcnt, k + 1 - last_trig);
    end
  endtask

  // Streaming: the generator is armed with the first 200 words of a long
  // list. The rest is written while it runs, each word about 100 clocks
  // before it is read, so the write address wraps the 256-word memory
  // several times and the reader never meets the writer.
  task automatic run_stream();
    bit et, es, ec, ended;
    int nfirst;
    nfirst = 200;
    @(negedge clk); clr = 1'b1; arm = 1'b0;
    @(negedge clk); clr = 1'b0;
    for (int i = 0; i < nfirst; i++) begin
      @(negedge clk); wr_en = 1'b1; wr_data = prog[i];
    end
    @(negedge clk); wr_en = 1'b0; arm = 1'b1;
    expect_stream(et, es, ec, ended);
    @(negedge clk); stick = 1'b1;
    @(negedge clk); stick = 1'b0;
    fork
      begin
        int j, c;
        j = nfirst;
        c = 0;
        while (j < prog.size()) begin
          @(negedge clk);
          c++;
          wr_en = 1'b0;
          if (start_k[j] - 100 <= c) begin
            wr_en = 1'b1; wr_data = prog[j]; j++;
          end
        end
        @(negedge clk) wr_en = 1'b0;
      end
      foreach (exp_s[i]) begin
        @(negedge clk);
        checks++;
        if (dt_bit !== exp_s[i]) begin
          failures++;
          if (failures < 10) $display("stream bit %0d: %0b expected %0b", i, dt_bit, exp_s[i]);
        end
      end
    join
    arm = 1'b0;
    @(negedge clk); stick = 1'b1;
    @(negedge clk); stick = 1'b0;
    checks += 5;
    if (err_ram !== 1'b0) begin failures++; $display("stream: err_ram"); end
    if (err_trig !== 1'b0 || err_sbit !== 1'b0 || err_cmd !== 1'b0) begin failures++; $display("stream: errors"); end
    if (int'(waddr_tick) != prog.size() % 256) begin failures++; $display("stream: waddr %0d", waddr_tick); end
    if (int'(raddr_tick) != (prog.size() - 1) % 256) begin failures++; $display("stream: raddr %0d", raddr_tick); end
    if (prog.size() < 700) failures++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 10; r++) begin
      prog.delete();
      err_inject = (r % 3 == 2);
      for (int f = 0; f < 2 + int'($urandom_range(1)); f++) begin
        prog.push_back(ins(CMD_TRIG, 11'd0));
        prog.push_back(ins(CMD_NOP, 11'($urandom_range(1, 8))));
        prog.push_back(ins(CMD_SBIT, 11'd0));
        for (int j = 0; j < 1 + int'($urandom_range(4)); j++)
          prog.push_back({CMD_DATA, 3'($urandom), 8'($urandom)});
        prog.push_back(ins(CMD_CRC, 11'd0));
        prog.push_back(ins(CMD_NOP, 11'($urandom_range(1, 8))));
      end
      if (r == 4) prog.push_back(ins(CMD_NOPL, 11'd1));
      if (r == 6) prog.push_back(16'hF800);            // reserved command
      if (r != 8) prog.push_back(ins(CMD_END, 11'd0));
      else        prog.push_back(ins(CMD_NOP, 11'd2));  // no END: reader meets writer
      run_round(r == 8);
    end
    // streaming list: trigger frames with the preamble parity kept right
    prog.delete();
    err_inject = 1'b0;
    begin
      int k;
      k = 1;
      while (prog.size() < 720) begin
        int n;
        prog.push_back(ins(CMD_TRIG, 11'd0)); k++;
        n = 2 * int'($urandom_range(1, 6));
        prog.push_back(ins(CMD_NOP, 11'(n))); k += n;
        prog.push_back(ins(CMD_SBIT, 11'd0)); k++;
        for (int j = 0; j < 1 + int'($urandom_range(2)); j++) begin
          logic [2:0] w;
          w = 3'($urandom);
          prog.push_back({CMD_DATA, w, 8'($urandom)}); k += int'(w) + 1;
        end
        prog.push_back(ins(CMD_CRC, 11'd0)); k += 4;
        n = 2 * int'($urandom_range(1, 8)) + ((k % 2 == 0) ? 1 : 0);
        prog.push_back(ins(CMD_NOP, 11'(n))); k += n;
      end
      prog.push_back(ins(CMD_END, 11'd0));
    end
    run_stream();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
