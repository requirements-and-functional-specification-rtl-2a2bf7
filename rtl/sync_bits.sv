// sync_bits: two-flop synchronizer for a bundle of slowly changing bits.
// Each bit is synchronized on its own, so a multi-bit value is only safe to
// use when it is held steady for several destination clocks around the
// moment it is read (register settings, values captured at a tick). The
// output lags the input by two dst_clk cycles. Reset clears both stages.
module sync_bits #(
  parameter int W = 1
) (
  input  logic         dst_clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] s1;
  always_ff @(posedge dst_clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= '0;
      q  <= '0;
    end else begin
      s1 <= d;
      q  <= s1;
    end
  end
endmodule
