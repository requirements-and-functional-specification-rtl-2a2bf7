// tb_perr_sync: self-checking test of the phase error input synchronizer.
//
// Sends random 8-bit phase errors as DDR nibbles, LS nibble first, with
// random PTICK and PSIND. It does so first with the LS nibble on the rising
// edge (clk_sel = 0), then on the falling edge (clk_sel = 1). For each
// sample it checks that pe, tick and sind come out whole, with the latency
// the edge choice gives: one clock after the MS nibble is caught. It also
// checks that sind_err flags a tick without PSIND. A pulse on stick every
// 37 clocks closes a CRC window. The CRC latched there must equal a CRC-4
// computed here by long division over the selected bit line of every
// sample sent out since the previous stick, LS half then MS half of each
// sample. The line choice (bsel) changes between windows and includes
// PSIND in place of line 0.
module tb_perr_sync;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0] perr = '0;
  logic ptick = 1'b0, psind = 1'b0, clk_sel = 1'b0, stick = 1'b0;
  logic [2:0] bsel = '0;
  logic [7:0] pe;
  logic tick, tick_rise, sind, sind_err;
  logic [3:0] crc;
  int checks = 0, failures = 0;

  perr_sync dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic [9:0] smp [0:4095];   // {psind, ptick, pe}
  int lat = 1;
  bit mon = 1'b0;

  // bit stream of the selected line, both halves, since the last stick
  logic bits [$];
  logic [2:0] bsel_w;

  function automatic logic [3:0] ref_crc();
    logic [3:0] r = '0;
    // long division, MSB first, zero start: same as shifting in each bit
    // and reducing by x^4 + x + 1 whenever the x^4 term appears
    foreach (bits[i]) begin
      logic top;
      top = r[3] ^ bits[i];
      r = {r[2:0], 1'b0};
      if (top) r = r ^ 4'b0011;
    end
    return r;
  endfunction

  always @(negedge clk) begin
    if (mon) begin
      logic [9:0] s;
      s = smp[(cyc - lat) & 4095];
      checks += 4;
      if (pe !== s[7:0])     begin failures++; $display("pe %h exp %h", pe, s[7:0]); end
      if (tick !== s[8])     failures++;
      if (sind !== s[9])     failures++;
      if (sind_err !== (s[8] & ~s[9])) failures++;
    end
  end

  // CRC reference, worked at the falling edge: pe then shows the sample
  // loaded at the last rising edge, and stick still has the value that edge
  // sampled.
  bit crc_on = 1'b0, first = 1'b1;
  always @(negedge clk) begin
    if (crc_on) begin
      logic [9:0] s;
      logic [3:0] lo, hi;
      s  = smp[(cyc - lat) & 4095];
      lo = s[3:0]; hi = s[7:4];
      if (stick) begin
        if (!first) begin
          automatic logic [3:0] e = ref_crc();
          checks++;
          if (crc !== e) begin failures++; $display("crc %h exp %h", crc, e); end
        end
        first = 1'b0;
        bits.delete();
        bsel_w = bsel;
      end
      if (bsel_w[2] && bsel_w[1:0] == 2'd0) begin bits.push_back(s[9]); bits.push_back(s[9]); end
      else begin bits.push_back(lo[bsel_w[1:0]]); bits.push_back(hi[bsel_w[1:0]]); end
    end
  end

  task automatic run_mode(input bit sel);
    clk_sel = sel;
    lat = sel ? 2 : 1;
    for (int n = 0; n < 600; n++) begin
      logic [9:0] s;
      int k;
      s = {($urandom_range(3) != 0), ($urandom_range(7) == 0), 8'($urandom)};
      if (!sel) begin
        @(negedge clk); #1;
        k = cyc + 1;
        perr = s[3:0]; ptick = s[8]; psind = s[9];
        smp[k & 4095] = s;
        stick = (k % 37 == 0);
        if (k % 37 == 0) bsel = 3'($urandom);
        @(posedge clk); #1;
        perr = s[7:4];
      end else begin
        @(posedge clk); #1;
        k = cyc;
        perr = s[3:0]; ptick = s[8]; psind = s[9];
        smp[k & 4095] = s;
        @(negedge clk); #1;
        perr = s[7:4];
        stick = ((k + 2) % 37 == 0);
        if ((k + 2) % 37 == 0) bsel = 3'($urandom);
      end
      if (n == 4) begin mon = 1'b1; end
      if (n == 40) crc_on = 1'b1;
    end
    mon = 1'b0;
    crc_on = 1'b0;
    first = 1'b1;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_mode(1'b0);
    run_mode(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
