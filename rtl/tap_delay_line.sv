// Tap delay line (the shift-register unit of the DA filter).
//
// Holds the TAPS most recent input samples in parallel form: taps[0] is the newest sample
// x[n], taps[TAPS-1] the oldest, x[n-TAPS+1]. On a clock edge with in_valid high every sample
// moves one place down the line and x_in enters at taps[0]; otherwise the line holds. All
// taps are visible at once because the filter is fully parallel: it reads every bit of every
// sample in the same clock instead of shifting the bits out serially. out_valid is in_valid
// delayed by one clock, so it is high in the clock where taps holds a new window. The line
// clears to zero in reset (synchronous, active-low rst_n); the reset value and the valid flag
// are this design's own choice.
module tap_delay_line #(
  parameter int TAPS = 70,
  parameter int W    = 13
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] x_in,
  output logic                out_valid,
  output logic signed [W-1:0] taps [TAPS]
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < TAPS; i++) taps[i] <= '0;
      out_valid <= 1'b0;
    end else begin
      if (in_valid) begin
        taps[0] <= x_in;
        for (int i = 1; i < TAPS; i++) taps[i] <= taps[i-1];
      end
      out_valid <= in_valid;
    end
  end

endmodule
