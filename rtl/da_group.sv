// Full-parallel DA sub-filter: the inner product of N_TAPS operands with N_TAPS constant
// coefficients, one result per clock.
//
// Distributed arithmetic writes each B-bit two's-complement operand as
//     x[k] = -2^(B-1) x_{B-1}[k] + sum_{b<B-1} 2^b x_b[k],
// so the inner product becomes
//     y = -2^(B-1) f(x_{B-1}) + sum_{b<B-1} 2^b f(x_b),   f(x_b) = sum_k c[k] x_b[k].
// A bit-serial DA filter evaluates one f(x_b) per clock with one DA-LUT unit and a scaling
// accumulator. Here the DA-LUT unit is copied once per bit position (B copies, all sharing
// the same constant table) so that all f(x_b) are formed in the same clock; each copy is
// addressed by bit b of every operand. The partial products are weighted by 2^b (the sign
// slice negated) and summed by a pipelined adder tree, so a new result leaves every clock.
//
// Interface: x holds the N_TAPS operands (B bits each; in the filter these are the pre-added
// sample pairs), in_valid marks a new set. y is GROUP_W bits, wide enough for any coefficient
// set. Timing with PIPE = 1: one register after the DA-LUT units, then LEVELS adder-tree
// registers, LATENCY = 1 + ceil(log2(B)) clocks (5 for B = 14); with PIPE = 0 the sub-filter
// is combinational. Registers reset to zero through the synchronous active-low rst_n.
// The 5-tap group, its DA-LUT unit and the copy per bit slice follow the reference design;
// the register placement, the adder-tree shape and B = 14 slices (one per bit of the
// pre-added operands, where the reference counts 13 input bits) are this design's choice.
module da_group #(
  parameter int N_TAPS = 5,
  parameter int LUT_IN = 4,
  parameter int B      = 14,
  parameter int COEF_W = 12,
  parameter bit PIPE   = 1'b1,
  parameter logic [N_TAPS-1:0][COEF_W-1:0] COEFS = '0,
  localparam int PP_W    = COEF_W + $clog2(N_TAPS),
  localparam int GROUP_W = PP_W + B,
  localparam int LATENCY = PIPE ? 1 + $clog2(B) : 0
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic signed [B-1:0]       x [N_TAPS],
  output logic                      out_valid,
  output logic signed [GROUP_W-1:0] y
);

  logic signed [PP_W-1:0]    pp   [B];
  logic signed [GROUP_W-1:0] term [B];
  logic signed [GROUP_W-1:0] term_q [B];
  logic                      term_vld;

  // One DA-LUT unit per bit slice; slice b is addressed by bit b of every operand.
  for (genvar b = 0; b < B; b++) begin : g_slice
    logic [N_TAPS-1:0] addr;
    for (genvar k = 0; k < N_TAPS; k++) begin : g_addr
      assign addr[k] = x[k][b];
    end

    da_lut_unit #(
      .N_TAPS(N_TAPS),
      .LUT_IN(LUT_IN),
      .COEF_W(COEF_W),
      .COEFS (COEFS)
    ) u_lut (
      .addr(addr),
      .pp  (pp[b])
    );

    // Weight 2^b; the sign slice carries weight -2^(B-1).
    if (b == B - 1) begin : g_sign
      assign term[b] = -(GROUP_W'(pp[b]) <<< b);
    end else begin : g_mag
      assign term[b] = GROUP_W'(pp[b]) <<< b;
    end
  end

  if (PIPE) begin : g_reg
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        for (int b = 0; b < B; b++) term_q[b] <= '0;
        term_vld <= 1'b0;
      end else begin
        term_q   <= term;
        term_vld <= in_valid;
      end
    end
  end else begin : g_comb
    assign term_q   = term;
    assign term_vld = in_valid;
  end

  adder_tree #(
    .N_IN(B),
    .W   (GROUP_W),
    .PIPE(PIPE)
  ) u_sum (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (term_vld),
    .in_data  (term_q),
    .out_valid(out_valid),
    .sum      (y)
  );

endmodule
