// 70-tap linear-phase low-pass FIR filter in full-parallel distributed arithmetic (DA).
//
// The filter computes y[n] = sum_{k<TAPS} h[k] x[n-k] without a single multiplier. It takes
// one 13-bit sample per clock and returns one result per clock. The datapath, from input to
// output:
//   1. tap_delay_line keeps the last TAPS samples in parallel.
//   2. sym_preadder adds the sample pairs that share a coefficient (h[k] = h[TAPS-1-k]),
//      which turns the 70 taps into 35, each operand 14 bits wide.
//   3. The 35 pairs are cut into NG = 7 groups of GROUP_TAPS = 5. Each group is a
//      da_group: one 5-input DA-LUT unit (a 16-word LUT for four taps, plus a 2:1
//      multiplexer and an adder for the fifth) per bit slice of the operands, 14 copies,
//      followed by a shift-and-add tree.
//   4. adder_tree adds the 7 group results.
// Every stage is pipelined when PIPE = 1 (the default). Without pipelining (PIPE = 0) the
// only register is the delay line.
//
// Interface: x_in is a two's-complement sample taken in any clock with x_valid high. y is the
// full-precision filter output, OUT_W = 32 bits, nothing rounded or dropped; y_valid marks
// it. Timing: y and y_valid follow the x_valid clock by LATENCY clocks, 10 with PIPE = 1
// (delay line 1, pre-adder 1, DA-LUT register 1, 14-input tree 4, 7-input tree 3) and 1
// with PIPE = 0. Reset is synchronous and active low and clears every register. Two
// concurrent assertions state this timing rule: a result exactly LATENCY clocks after each
// accepted sample, and none without one.
//
// Follows the reference design: 70 taps, 13-bit input, 12-bit coefficients, the symmetric
// fold to 35 taps, 7 groups of 5-tap DA-LUT units built from a 4-input LUT with a multiplexer
// and an adder, the full-parallel copy per bit slice, and pipeline registers. This design's
// own choices: the coefficient values (see da_fir_pkg), 14 rather than 13 bit-slice copies
// (the pre-added pairs are 14 bits wide), the full-precision output width, the valid flags,
// the adder-tree shape and the position of the pipeline registers.
module da_fir70 #(
  parameter int TAPS       = da_fir_pkg::TAPS,
  parameter int IN_W       = da_fir_pkg::IN_W,
  parameter int COEF_W     = da_fir_pkg::COEF_W,
  parameter int GROUP_TAPS = da_fir_pkg::GROUP_TAPS,
  parameter int LUT_IN     = da_fir_pkg::LUT_IN,
  parameter bit PIPE       = 1'b1,
  parameter logic [TAPS/2-1:0][COEF_W-1:0] COEFS = da_fir_pkg::H_PROTO,
  localparam int HALF     = TAPS / 2,
  localparam int NG       = HALF / GROUP_TAPS,
  localparam int B        = IN_W + 1,
  localparam int GROUP_W  = COEF_W + $clog2(GROUP_TAPS) + B,
  localparam int OUT_W    = GROUP_W + $clog2(NG),
  localparam int LATENCY  = 1 + (PIPE ? 2 + $clog2(B) + $clog2(NG) : 0)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    x_valid,
  input  logic signed [IN_W-1:0]  x_in,
  output logic                    y_valid,
  output logic signed [OUT_W-1:0] y
);

  logic signed [IN_W-1:0]    taps [TAPS];
  logic                      taps_vld;
  logic signed [B-1:0]       pair [HALF];
  logic                      pair_vld;
  logic signed [OUT_W-1:0]   group_y [NG];
  logic                      group_vld [NG];

  tap_delay_line #(
    .TAPS(TAPS),
    .W   (IN_W)
  ) u_line (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (x_valid),
    .x_in     (x_in),
    .out_valid(taps_vld),
    .taps     (taps)
  );

  sym_preadder #(
    .TAPS(TAPS),
    .W   (IN_W),
    .PIPE(PIPE)
  ) u_fold (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (taps_vld),
    .taps     (taps),
    .out_valid(pair_vld),
    .pair     (pair)
  );

  for (genvar g = 0; g < NG; g++) begin : g_group
    logic signed [B-1:0]       gx [GROUP_TAPS];
    logic signed [GROUP_W-1:0] gy;

    for (genvar k = 0; k < GROUP_TAPS; k++) begin : g_op
      assign gx[k] = pair[g*GROUP_TAPS + k];
    end

    da_group #(
      .N_TAPS(GROUP_TAPS),
      .LUT_IN(LUT_IN),
      .B     (B),
      .COEF_W(COEF_W),
      .PIPE  (PIPE),
      .COEFS (COEFS[g*GROUP_TAPS +: GROUP_TAPS])
    ) u_group (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (pair_vld),
      .x        (gx),
      .out_valid(group_vld[g]),
      .y        (gy)
    );

    assign group_y[g] = OUT_W'(gy);
  end

  adder_tree #(
    .N_IN(NG),
    .W   (OUT_W),
    .PIPE(PIPE)
  ) u_total (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (group_vld[0]),
    .in_data  (group_y),
    .out_valid(y_valid),
    .sum      (y)
  );

  // Pipeline rule: every accepted sample produces exactly one result, LATENCY clocks later.
  a_latency: assert property (@(posedge clk) disable iff (!rst_n)
                              x_valid |-> ##LATENCY y_valid)
    else $error("da_fir70: result missing LATENCY clocks after a sample");
  a_no_spurious: assert property (@(posedge clk) disable iff (!rst_n)
                                  y_valid |-> $past(x_valid, LATENCY))
    else $error("da_fir70: result without a sample LATENCY clocks before");

  initial begin
    assert (HALF % GROUP_TAPS == 0)
      else $error("da_fir70: TAPS/2 must be a multiple of GROUP_TAPS");
    assert (LUT_IN <= GROUP_TAPS)
      else $error("da_fir70: LUT_IN must not exceed GROUP_TAPS");
  end

endmodule
