// Pipelined binary adder tree.
//
// Sums N_IN signed W-bit operands into one W-bit result (the caller sizes W so that the sum
// cannot overflow). The operands are added in pairs, level by level; a level with an odd
// count passes its last operand on unchanged. There are LEVELS = ceil(log2(N_IN)) levels.
// With PIPE = 1 every level ends in a register, so the tree accepts new operands every clock
// and the sum appears LATENCY = LEVELS clocks later; a valid flag travels alongside. With
// PIPE = 0 the tree is combinational and LATENCY = 0. The pipelined form is the one the
// filter uses by default; the combinational form is kept to compare the two, as the reference
// design does. Pipeline registers reset to zero (synchronous, active-low rst_n), which is this
// design's own choice.
module adder_tree #(
  parameter int N_IN = 14,
  parameter int W    = 29,
  parameter bit PIPE = 1'b1,
  localparam int LEVELS  = (N_IN > 1) ? $clog2(N_IN) : 0,
  localparam int LATENCY = PIPE ? LEVELS : 0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_data [N_IN],
  output logic                out_valid,
  output logic signed [W-1:0] sum
);

  // Number of operands left after level l.
  function automatic int count_at(input int l);
    int c;
    c = N_IN;
    for (int i = 0; i < l; i++) c = (c + 1) / 2;
    return c;
  endfunction

  logic signed [W-1:0] lvl [LEVELS+1][N_IN];
  logic                vld [LEVELS+1];

  assign lvl[0] = in_data;
  assign vld[0] = in_valid;

  for (genvar l = 1; l <= LEVELS; l++) begin : g_level
    localparam int CPREV = count_at(l - 1);
    localparam int CNOW  = count_at(l);
    logic signed [W-1:0] nxt [N_IN];

    always_comb begin
      for (int i = 0; i < N_IN; i++) begin
        if (i < CNOW) begin
          if (2 * i + 1 < CPREV) nxt[i] = lvl[l-1][2*i] + lvl[l-1][2*i+1];
          else                   nxt[i] = lvl[l-1][2*i];
        end else begin
          nxt[i] = '0;
        end
      end
    end

    if (PIPE) begin : g_reg
      always_ff @(posedge clk) begin
        if (!rst_n) begin
          for (int i = 0; i < N_IN; i++) lvl[l][i] <= '0;
          vld[l] <= 1'b0;
        end else begin
          lvl[l] <= nxt;
          vld[l] <= vld[l-1];
        end
      end
    end else begin : g_comb
      assign lvl[l] = nxt;
      assign vld[l] = vld[l-1];
    end
  end

  assign sum       = lvl[LEVELS][0];
  assign out_valid = vld[LEVELS];

endmodule
