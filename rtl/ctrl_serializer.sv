// ctrl_serializer: serializer for one sub-band control output (CTRL_BB).
//
// Every 128 MHz clock it forms an 8-bit word from the five control streams
// of the sub-band and a synchronization bit, and shifts the word out, lane 0
// first, on the 8x (1.024 GHz) serializer clock:
//   lane 0  sync bit (CONTROL TX-Bit, normally 1, used by the receiver to
//           find the word boundary)
//   lane 1  TIMECODE   lane 2  COMMAND   lane 3  PHASERR
//   lane 4  PHASEMOD   lane 5  DUMPTRIG  lanes 6, 7  0
// The specification takes this function from the FPGA's source-synchronous
// serializer and says one unused input carries the sync pattern; the lane
// order is this design's. The fast side finds the word boundary by watching
// a flag that the 128 MHz side flips every clock, so the two clocks must
// come from the same PLL with clk_ser exactly eight times clk.
// Timing: word_o is registered in the 128 MHz domain; its lane 0 appears on
// ser_o three to four clk_ser cycles after word_o changes and each lane
// lasts one clk_ser cycle.
module ctrl_serializer (
  input  logic       clk,
  input  logic       clk_ser,
  input  logic       rst_n,
  input  logic       sync_bit,
  input  logic       tc,
  input  logic       cmd,
  input  logic       pe,
  input  logic       pm,
  input  logic       dt,
  output logic [7:0] word_o,
  output logic       ser_o
);
  logic tog;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word_o <= '0;
      tog    <= 1'b0;
    end else begin
      word_o <= {2'b00, dt, pm, pe, cmd, tc, sync_bit};
      tog    <= ~tog;
    end
  end

  logic       t1, t2;
  logic [7:0] sh;
  always_ff @(posedge clk_ser or negedge rst_n) begin
    if (!rst_n) begin
      t1    <= 1'b0;
      t2    <= 1'b0;
      sh    <= '0;
      ser_o <= 1'b0;
    end else begin
      t1 <= tog;
      t2 <= t1;
      if (t1 != t2) begin
        sh    <= {1'b0, word_o[7:1]};
        ser_o <= word_o[0];
      end else begin
        sh    <= {1'b0, sh[7:1]};
        ser_o <= sh[0];
      end
    end
  end
endmodule
