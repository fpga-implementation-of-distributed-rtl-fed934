// Testbench of the da_fir70 variants the design can be built in.
//
// Three filters with the prototype coefficients run side by side on the same random input
// (with full-scale runs and gaps in x_valid):
//   - PIPE = 0: no pipeline registers after the delay line, LATENCY = 1;
//   - LUT_IN = 0: LUT-less DA-LUT units (multiplexers and adders only), pipelined;
//   - LUT_IN = 5: the original full 32-word table per 5-tap group, pipelined;
//   - a 32-tap (31st-order) low-pass loaded into the default 70-tap filter: its 16 distinct
//     coefficients sit at h[19..34] (and mirrored at h[35..50]), the other taps are zero, so
//     the response stays symmetric and only gains 19 samples of delay.
// Each output is compared with the direct-form reference, and each filter's latency from
// x_valid to y_valid is checked.
module tb_da_fir70_variants;
  localparam int TAPS = 70, IN_W = 13, OUT_W = 32;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                    x_valid;
  logic signed [IN_W-1:0]  x_in;
  logic                    v [4];
  logic signed [OUT_W-1:0] y [4];
  localparam int LAT [4] = '{1, 10, 10, 10};

  // first half of a 32-tap equiripple low-pass (pass band to 2 MHz, stop band from 5 MHz at
  // 40 MHz, largest tap 2047)
  localparam int H32 [16] = '{44, 71, 71, 65, -2, -91, -208, -288, -302, -185, 73, 470, 949,
                              1434, 1826, 2047};
  function automatic logic [TAPS/2-1:0][11:0] coefs32();
    logic [TAPS/2-1:0][11:0] c;
    c = '0;
    for (int k = 0; k < 16; k++) c[19 + k] = 12'(H32[k]);
    return c;
  endfunction

  da_fir70 #(.PIPE(1'b0))  u_nopipe  (.clk, .rst_n, .x_valid, .x_in, .y_valid(v[0]), .y(y[0]));
  da_fir70 #(.LUT_IN(0))   u_lutless (.clk, .rst_n, .x_valid, .x_in, .y_valid(v[1]), .y(y[1]));
  da_fir70 #(.LUT_IN(5))   u_fulllut (.clk, .rst_n, .x_valid, .x_in, .y_valid(v[2]), .y(y[2]));
  da_fir70 #(.COEFS(coefs32())) u_32tap (.clk, .rst_n, .x_valid, .x_in, .y_valid(v[3]), .y(y[3]));

  int h [TAPS];
  int h32 [TAPS];
  int hist [TAPS];
  longint exp_hist [$];  // expected result per clock (valid or not), newest at the back
  longint exp32_hist [$];
  bit     vld_hist [$];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < TAPS / 2; k++) begin
      h[k] = int'($signed(da_fir_pkg::H_PROTO[k]));
      h[TAPS-1-k] = h[k];
    end
    foreach (h32[k]) h32[k] = 0;
    for (int k = 0; k < 16; k++) begin
      h32[19 + k] = H32[k];
      h32[TAPS-20-k] = H32[k];
    end
    foreach (hist[i]) hist[i] = 0;
    x_valid = 0; x_in = '0;
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      longint e, e32;
      int s;
      x_valid = ($urandom % 6) != 0;
      case ((t / 100) % 4)
        1: s = -4096;
        2: s = 4095;
        default: s = $signed(IN_W'($urandom));
      endcase
      x_in = IN_W'(s);
      if (x_valid) begin
        for (int i = TAPS - 1; i > 0; i--) hist[i] = hist[i-1];
        hist[0] = s;
      end
      e = 0; e32 = 0;
      for (int k = 0; k < TAPS; k++) begin
        e   += longint'(h[k]) * longint'(hist[k]);
        e32 += longint'(h32[k]) * longint'(hist[k]);
      end
      exp_hist.push_back(e);
      exp32_hist.push_back(e32);
      vld_hist.push_back(x_valid);
      if (exp_hist.size() > 16) begin
        void'(exp_hist.pop_front()); void'(exp32_hist.pop_front()); void'(vld_hist.pop_front());
      end
      @(posedge clk);
      #1;
      // now each filter shows the result of the sample given LAT-1 clocks before this one
      for (int f = 0; f < 4; f++) begin
        int idx;
        longint ef;
        idx = exp_hist.size() - LAT[f];
        if (idx >= 0 && t > 12) begin
          ef = (f == 3) ? exp32_hist[idx] : exp_hist[idx];
          checks++;
          if (v[f] != vld_hist[idx] || (v[f] && longint'(y[f]) != ef)) begin
            failures++;
            $display("t=%0d variant %0d y=%0d v=%0b expected %0d v=%0b", t, f, y[f], v[f],
                     ef, vld_hist[idx]);
          end
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
