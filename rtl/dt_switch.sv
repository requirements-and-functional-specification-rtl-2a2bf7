// dt_switch: connects the DUMPTRIG generators to the 18 sub-band outputs.
//
// Output i carries the stream of generator sel[i] (DTSWITCH registers, four
// bits per output), so one generator can feed any number of outputs. A
// select that names a generator that is not built gives a constant 0. The
// outputs are registered, adding one clock of latency to every DUMPTRIG
// stream.
module dt_switch
  import tfpga_pkg::*;
#(
  parameter int NUM_DT = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [NUM_DT-1:0]       dt_in,
  input  logic [NUM_SB-1:0][3:0]  sel,
  output logic [NUM_SB-1:0]       dt_out
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dt_out <= '0;
    else begin
      for (int i = 0; i < NUM_SB; i++)
        dt_out[i] <= (int'(sel[i]) < NUM_DT) ? dt_in[sel[i]] : 1'b0;
    end
  end
endmodule
