// test_port_mux: routes internal signals to the four test pins.
//
// Each of the four test pins has a 6-bit address (TESTPIN0/1 registers) that
// picks one of 64 internal signals. The top gathers those signals into one
// 64-bit vector, laid out as in the address table of the test pin
// registers; addresses with no signal there are tied to zero by the top.
// Following the document, the selection is unregistered: the pins follow
// their signals combinationally, so the four pins agree in time only to a
// few nanoseconds. The select inputs come from another clock domain and
// are quasi-static, so they need no synchronizer here.
module test_port_mux #(
  parameter int unsigned NUM_PINS = 4
) (
  input  logic [63:0]               sig,
  input  logic [NUM_PINS-1:0][5:0]  sel,
  output logic [NUM_PINS-1:0]       tp
);

  always_comb begin
    for (int p = 0; p < NUM_PINS; p++)
      tp[p] = sig[sel[p]];
  end

endmodule
