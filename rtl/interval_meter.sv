// interval_meter: measures the time between two tick signals in units of
// half a 128 MHz clock (256 MHz clocks), as the PTICKCNT, TIMOUT and PPSCNT
// registers report it.
//
// Each tick arrives as a one-clock pulse plus a bit saying in which half of
// the clock it was caught (0 = rising edge, 1 = falling edge). sel picks the
// pair of events, as printed for the registers:
//   00 d-tick to s-tick   01 d-tick to d-tick
//   10 s-tick to s-tick   11 s-tick to d-tick
// (d-tick: the measured input tick; s-tick: the system tick). A running count
// advances by two every clock from the start event; at the stop event
// count = running count + stop half - start half. A count that reaches its
// maximum sticks there (all ones), which flags a missing tick, as the
// specification describes for TIMOUT. The count is updated at every stop
// event and held in between.
module interval_meter #(
  parameter int W = 22
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [1:0]   sel,
  input  logic         d_pulse,
  input  logic         d_half,
  input  logic         s_pulse,
  input  logic         s_half,
  output logic [W-1:0] count
);
  logic         start_ev, stop_ev, start_half, stop_half;
  logic [W-1:0] run;
  logic         hs, running;

  always_comb begin
    unique case (sel)
      2'b00: begin start_ev = d_pulse; start_half = d_half; stop_ev = s_pulse; stop_half = s_half; end
      2'b01: begin start_ev = d_pulse; start_half = d_half; stop_ev = d_pulse; stop_half = d_half; end
      2'b10: begin start_ev = s_pulse; start_half = s_half; stop_ev = s_pulse; stop_half = s_half; end
      default: begin start_ev = s_pulse; start_half = s_half; stop_ev = d_pulse; stop_half = d_half; end
    endcase
  end

  localparam logic [W-1:0] MAXV = '1;
  logic [W:0] result;
  assign result = {1'b0, run} + {{W{1'b0}}, stop_half} - {{W{1'b0}}, hs};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run     <= '0;
      hs      <= 1'b0;
      running <= 1'b0;
      count   <= '0;
    end else begin
      if (stop_ev && running)
        count <= (run == MAXV || result[W]) ? MAXV : result[W-1:0];
      if (start_ev) begin
        run     <= W'(2);
        hs      <= start_half;
        running <= 1'b1;
      end else if (running) begin
        run <= (run >= MAXV - W'(2)) ? MAXV : run + W'(2);
      end
    end
  end
endmodule
