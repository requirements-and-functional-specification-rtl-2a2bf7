// clk_monitor: checks that a 128 MHz clock is toggling at the right rate.
//
// A 16-bit counter runs on the monitored clock and is passed to the MCB
// clock domain in Gray code through two flops. Every WINDOW (4091) MCB clocks
// the MCB side takes the difference from the previous window: that is the
// toggle count (TOGCOUNT), nominally about 15709 (0x3D5D) for 128 MHz against
// a 33 MHz MCB clock. The clock is declared bad when the count is below LO
// (0x3D50) or above HI (0x3D70); a stopped clock gives 0. The numbers are the
// specification's. bad reads 0 until the first window has ended.
module clk_monitor #(
  parameter int          WINDOW = 4091,
  parameter logic [15:0] LO     = 16'h3D50,
  parameter logic [15:0] HI     = 16'h3D70
) (
  input  logic        mon_clk,
  input  logic        mcb_clk,
  input  logic        rst_n,
  output logic [15:0] togcount,
  output logic        bad
);
  logic [15:0] bin, gray;
  always_ff @(posedge mon_clk or negedge rst_n) begin
    if (!rst_n) begin
      bin  <= '0;
      gray <= '0;
    end else begin
      bin  <= bin + 16'd1;
      gray <= (bin + 16'd1) ^ ((bin + 16'd1) >> 1);
    end
  end

  logic [15:0] g1, g2, now, last;
  logic [12:0] wcnt;
  always_comb begin
    for (int i = 0; i < 16; i++) now[i] = ^(g2 >> i);
  end

  always_ff @(posedge mcb_clk or negedge rst_n) begin
    if (!rst_n) begin
      g1       <= '0;
      g2       <= '0;
      last     <= '0;
      wcnt     <= '0;
      togcount <= '0;
      bad      <= 1'b0;
    end else begin
      g1 <= gray;
      g2 <= g1;
      if (wcnt == 13'(WINDOW - 1)) begin
        wcnt     <= '0;
        togcount <= now - last;
        bad      <= ((now - last) < LO) || ((now - last) > HI);
        last     <= now;
      end else begin
        wcnt <= wcnt + 13'd1;
      end
    end
  end
endmodule
