// tb_ctrl_serializer: self-checking test of the sub-band control serializer.
//
// Runs clk at 125 MHz (8 ns) and clk_ser at exactly eight times that, in
// phase, as one PLL would give them. Random control bits go in every clk
// cycle. The test checks that word_o carries them in the lane order sync,
// TIMECODE, COMMAND, PHASERR, PHASEMOD, DUMPTRIG, 0, 0, one clock after
// they were applied. It then checks that ser_o sends every word, lane 0
// first, one lane per clk_ser cycle, with no gaps or repeats. The serial
// latency is found from the first words and must then hold for all of them.
module tb_ctrl_serializer;
  logic clk = 1'b0, clk_ser = 1'b0, rst_n = 1'b0;
  logic sync_bit = 1'b1, tc = 1'b0, cmd = 1'b0, pe = 1'b0, pm = 1'b0, dt = 1'b0;
  logic [7:0] word_o;
  logic ser_o;
  int checks = 0, failures = 0;

  ctrl_serializer dut (.*);
  always #4 clk = ~clk;
  always #0.5 clk_ser = ~clk_ser;

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int N = 400;
  logic [7:0] words [N];
  logic       sbits [8 * N + 64];
  int scyc = 0;
  bit rec = 1'b0;
  int wstart;

  always @(negedge clk_ser) begin
    if (rec && scyc < 8 * N + 64) sbits[scyc] = ser_o;
    if (rec) scyc++;
  end

  initial begin
    int best, lat;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (4) @(posedge clk);
    @(negedge clk);
    rec = 1'b1;
    for (int w = 0; w < N; w++) begin
      logic [7:0] e;
      {sync_bit, tc, cmd, pe, pm, dt} = {$urandom_range(7) != 0, 5'($urandom)};
      e = {2'b00, dt, pm, pe, cmd, tc, sync_bit};
      @(negedge clk);
      words[w] = word_o;
      checks++;
      if (word_o !== e) failures++;
    end
    repeat (4) @(negedge clk);
    // the word applied first was loaded at the rising edge 4 ns into the
    // recording; find the serial latency from the first 8 words
    lat = -1;
    for (int l = 0; l < 40 && lat < 0; l++) begin
      best = 1;
      for (int w = 0; w < 8; w++)
        for (int i = 0; i < 8; i++)
          if (sbits[8 * w + l + i] !== words[w][i]) best = 0;
      if (best == 1) lat = l;
    end
    checks++;
    if (lat < 0) begin
      failures++;
      $display("no serial alignment found");
    end else begin
      for (int w = 0; w < N; w++)
        for (int i = 0; i < 8; i++) begin
          checks++;
          if (sbits[8 * w + lat + i] !== words[w][i]) failures++;
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
