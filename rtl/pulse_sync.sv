// pulse_sync: carries single-cycle events from one clock domain to another.
// Each source pulse flips a toggle flop; the destination synchronizes the
// toggle with two flops and emits a one-cycle pulse for every change it
// sees. Events must be spaced by at least three destination clocks (the
// fastest use here is an MCB write at up to 33 MHz into the 128 MHz domain).
// Latency is two to three destination clocks.
module pulse_sync (
  input  logic src_clk,
  input  logic src_rst_n,
  input  logic src_pulse,
  input  logic dst_clk,
  input  logic dst_rst_n,
  output logic dst_pulse
);
  logic tog;
  logic s1, s2, s3;
  always_ff @(posedge src_clk or negedge src_rst_n) begin
    if (!src_rst_n) tog <= 1'b0;
    else if (src_pulse) tog <= ~tog;
  end
  always_ff @(posedge dst_clk or negedge dst_rst_n) begin
    if (!dst_rst_n) begin
      s1 <= 1'b0; s2 <= 1'b0; s3 <= 1'b0;
    end else begin
      s1 <= tog; s2 <= s1; s3 <= s2;
    end
  end
  assign dst_pulse = s2 ^ s3;
endmodule
