// Shared constants and types of the 70-tap distributed-arithmetic (DA) low-pass FIR filter.
//
// The filter is a linear-phase low-pass with 70 taps, 13-bit two's-complement input samples
// and 12-bit two's-complement coefficients, running at one input sample per clock
// (the target sample rate is 40 MHz). Because the impulse response is symmetric,
// h[k] = h[69-k], only the first 35 coefficients are stored; the filter adds the two samples
// that share a coefficient before the DA stage, so every DA bit slice works on 14-bit sums.
// The 35 coefficient pairs are split into 7 groups of 5 taps, each served by a 5-input
// DA-LUT unit (a 16-word LUT for four of the taps plus a 2:1 multiplexer and an adder for the
// fifth).
//
// The coefficient set below is an equiripple (Parks-McClellan) low-pass for a 40 MHz sample
// rate with its pass band up to 2 MHz and its stop band from 4 MHz, scaled so that the largest
// tap is 2047 and rounded to integers. The pass-band edge and the sample rate follow the
// reference design; the stop-band edge and the scaling are this design's own choice.
package da_fir_pkg;

  localparam int IN_W       = 13;            // input sample precision
  localparam int COEF_W     = 12;            // coefficient precision
  localparam int TAPS       = 70;            // filter length
  localparam int HALF_TAPS  = TAPS / 2;      // distinct coefficients of the symmetric filter
  localparam int GROUP_TAPS = 5;             // taps served by one DA-LUT unit
  localparam int LUT_IN     = 4;             // address bits served by the LUT of that unit

  typedef logic [HALF_TAPS-1:0][COEF_W-1:0] half_coefs_t;

  // First half of the prototype impulse response, h[0] .. h[34]; h[69-k] = h[k].
  function automatic half_coefs_t proto_coefs();
    half_coefs_t h;
    h[0] = -12'sd7;
    h[1] = 12'sd0;
    h[2] = 12'sd3;
    h[3] = 12'sd9;
    h[4] = 12'sd14;
    h[5] = 12'sd18;
    h[6] = 12'sd18;
    h[7] = 12'sd12;
    h[8] = -12'sd1;
    h[9] = -12'sd20;
    h[10] = -12'sd39;
    h[11] = -12'sd55;
    h[12] = -12'sd61;
    h[13] = -12'sd51;
    h[14] = -12'sd22;
    h[15] = 12'sd21;
    h[16] = 12'sd73;
    h[17] = 12'sd122;
    h[18] = 12'sd151;
    h[19] = 12'sd149;
    h[20] = 12'sd105;
    h[21] = 12'sd21;
    h[22] = -12'sd95;
    h[23] = -12'sd220;
    h[24] = -12'sd325;
    h[25] = -12'sd375;
    h[26] = -12'sd342;
    h[27] = -12'sd203;
    h[28] = 12'sd45;
    h[29] = 12'sd389;
    h[30] = 12'sd795;
    h[31] = 12'sd1217;
    h[32] = 12'sd1600;
    h[33] = 12'sd1890;
    h[34] = 12'sd2047;
    return h;
  endfunction

  localparam half_coefs_t H_PROTO = proto_coefs();

endpackage
