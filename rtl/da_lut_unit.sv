// DA-LUT unit: the partial-product generator of distributed arithmetic.
//
// For one bit position b of N_TAPS input words, the unit returns
//     pp = sum_k c[k] * x_b[k]
// where x_b[k] is bit b of the k-th input word (the address bit addr[k]) and c[k] is the
// coefficient of that tap. This is the term f(h, x_b) of the DA expansion of an inner product.
//
// How it works: the low LUT_IN address bits index a small table holding every sum of the
// first LUT_IN coefficients (2**LUT_IN words, filled at elaboration time from COEFS). Each of
// the remaining N_TAPS-LUT_IN address bits drives a 2:1 multiplexer that selects either zero
// or its coefficient, and an adder adds that to the table output. This is the table-halving
// step of the reduced-LUT DA unit: the half of a full table where the top address bit is 1
// equals the other half plus that bit's coefficient, so the table shrinks by half for each
// multiplexer-and-adder pair. The default, five taps with a 4-input LUT, is the unit of the
// reference 70-tap filter; LUT_IN = 0 gives the fully LUT-less form (multiplexers and adders
// only) and LUT_IN = N_TAPS the original full table.
//
// Interface: addr[k] is the address bit of tap k; COEFS[k] holds the two's-complement
// coefficient of tap k; pp is the signed partial product, PP_W bits wide so that no sum
// overflows. The unit is purely combinational; the caller places pipeline registers.
module da_lut_unit #(
  parameter int N_TAPS = 5,
  parameter int LUT_IN = 4,
  parameter int COEF_W = 12,
  parameter logic [N_TAPS-1:0][COEF_W-1:0] COEFS = '0,
  localparam int PP_W = COEF_W + $clog2(N_TAPS)
) (
  input  logic [N_TAPS-1:0]     addr,
  output logic signed [PP_W-1:0] pp
);

  localparam int WORDS = 2 ** LUT_IN;

  // Table word i: sum of the coefficients of the taps whose bit is set in i.
  function automatic logic signed [PP_W-1:0] lut_word(input int i);
    logic signed [PP_W-1:0] acc;
    acc = '0;
    for (int k = 0; k < LUT_IN; k++) begin
      if (((i >> k) & 1) != 0) acc += PP_W'($signed(COEFS[k]));
    end
    return acc;
  endfunction

  logic signed [PP_W-1:0] lut [WORDS];

  for (genvar i = 0; i < WORDS; i++) begin : g_lut
    assign lut[i] = lut_word(i);
  end

  // LUT read, then one multiplexer and adder per tap beyond the LUT.
  localparam int AW = (LUT_IN > 0) ? LUT_IN : 1;
  logic [AW-1:0] lut_addr;
  assign lut_addr = (LUT_IN > 0) ? addr[AW-1:0] : '0;

  always_comb begin
    logic signed [PP_W-1:0] acc;
    acc = lut[lut_addr];
    for (int k = LUT_IN; k < N_TAPS; k++) begin
      acc += addr[k] ? PP_W'($signed(COEFS[k])) : '0;
    end
    pp = acc;
  end

endmodule
