// Self-checking testbench of da_lut_unit.
//
// Three units with the same five coefficients (mixed signs, including the most negative
// 12-bit value) are built: the reduced-LUT form of the filter (4-input LUT plus one
// multiplexer and adder), the LUT-less form (multiplexers and adders only) and the full
// 32-word table. All 32 addresses are applied and each output is compared with the sum of
// the selected coefficients, computed here directly.
module tb_da_lut_unit;
  localparam int N = 5;
  localparam int CW = 12;
  localparam int PW = CW + $clog2(N);
  localparam logic [N-1:0][CW-1:0] C = {12'sd2047, -12'sd2048, 12'sd375, -12'sd7, 12'sd1217};

  int checks = 0, failures = 0;
  logic [N-1:0] addr;
  logic signed [PW-1:0] pp_red, pp_less, pp_full;

  da_lut_unit #(.N_TAPS(N), .LUT_IN(4), .COEF_W(CW), .COEFS(C)) u_red  (.addr(addr), .pp(pp_red));
  da_lut_unit #(.N_TAPS(N), .LUT_IN(0), .COEF_W(CW), .COEFS(C)) u_less (.addr(addr), .pp(pp_less));
  da_lut_unit #(.N_TAPS(N), .LUT_IN(5), .COEF_W(CW), .COEFS(C)) u_full (.addr(addr), .pp(pp_full));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 2 ** N; a++) begin
      int expect_v;
      addr = N'(a);
      #1;
      expect_v = 0;
      for (int k = 0; k < N; k++) if (a[k]) expect_v += int'($signed(C[k]));
      checks += 3;
      if (int'(pp_red) != expect_v) begin
        failures++; $display("reduced LUT addr=%b got %0d expected %0d", addr, pp_red, expect_v);
      end
      if (int'(pp_less) != expect_v) begin
        failures++; $display("LUT-less addr=%b got %0d expected %0d", addr, pp_less, expect_v);
      end
      if (int'(pp_full) != expect_v) begin
        failures++; $display("full LUT addr=%b got %0d expected %0d", addr, pp_full, expect_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
