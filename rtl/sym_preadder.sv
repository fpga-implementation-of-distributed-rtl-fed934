// Symmetric pre-adder.
//
// A linear-phase FIR filter of even length TAPS has h[k] = h[TAPS-1-k], so the two samples
// that meet the same coefficient can be added first:
//     y = sum_{k<TAPS/2} h[k] * (x[n-k] + x[n-TAPS+1+k]).
// This halves the number of DA taps (70 to 35 in the reference filter) at the price of one
// extra bit in each operand: pair[k] = taps[k] + taps[TAPS-1-k] is W+1 bits wide, so the DA
// stage that follows has W+1 bit slices. With PIPE = 1 the sums are registered (one clock of
// latency, reset to zero by the synchronous active-low rst_n); with PIPE = 0 they are
// combinational. in_valid is carried alongside with the same latency. The fold to 35 taps
// follows the reference design; the register, the reset and the valid flag are this design's
// own choice.
module sym_preadder #(
  parameter int TAPS = 70,
  parameter int W    = 13,
  parameter bit PIPE = 1'b1,
  localparam int HALF = TAPS / 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] taps [TAPS],
  output logic                out_valid,
  output logic signed [W:0]   pair [HALF]
);

  logic signed [W:0] sum [HALF];

  always_comb begin
    for (int k = 0; k < HALF; k++) sum[k] = (W+1)'(taps[k]) + (W+1)'(taps[TAPS-1-k]);
  end

  if (PIPE) begin : g_reg
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        for (int k = 0; k < HALF; k++) pair[k] <= '0;
        out_valid <= 1'b0;
      end else begin
        pair      <= sum;
        out_valid <= in_valid;
      end
    end
  end else begin : g_comb
    assign pair      = sum;
    assign out_valid = in_valid;
  end

  initial assert (TAPS % 2 == 0) else $error("sym_preadder: TAPS must be even");

endmodule
