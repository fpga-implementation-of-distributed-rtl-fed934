// Self-checking testbench of sym_preadder at the filter's size (70 taps of 13 bits).
//
// Random windows, including the extreme values that need the extra output bit, are applied
// every clock. The registered pre-adder must return taps[k] + taps[69-k] one clock later;
// a combinational instance must return it at once.
module tb_sym_preadder;
  localparam int TAPS = 70, W = 13, HALF = TAPS / 2;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, ov_p, ov_c;
  logic signed [W-1:0] taps [TAPS];
  logic signed [W:0]   pair_p [HALF];
  logic signed [W:0]   pair_c [HALF];
  int exp_prev [HALF];
  bit v_prev;

  sym_preadder #(.TAPS(TAPS), .W(W), .PIPE(1'b1)) u_p (.clk, .rst_n, .in_valid, .taps,
                                                      .out_valid(ov_p), .pair(pair_p));
  sym_preadder #(.TAPS(TAPS), .W(W), .PIPE(1'b0)) u_c (.clk, .rst_n, .in_valid, .taps,
                                                      .out_valid(ov_c), .pair(pair_c));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0;
    foreach (taps[i]) taps[i] = '0;
    v_prev = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      int e [HALF];
      in_valid = ($urandom % 4) != 0;
      case (t % 5)
        0: foreach (taps[i]) taps[i] = -13'sd4096;
        1: foreach (taps[i]) taps[i] = 13'sd4095;
        default: foreach (taps[i]) taps[i] = W'($urandom);
      endcase
      for (int k = 0; k < HALF; k++) e[k] = int'(taps[k]) + int'(taps[TAPS-1-k]);
      #1;
      for (int k = 0; k < HALF; k++) begin
        checks++;
        if (int'(pair_c[k]) != e[k]) begin
          failures++; $display("t=%0d comb pair %0d = %0d expected %0d", t, k, pair_c[k], e[k]);
        end
      end
      @(posedge clk);
      #1;
      if (t > 0) begin
        checks++;
        if (ov_p != in_valid) begin failures++; $display("t=%0d out_valid", t); end
        for (int k = 0; k < HALF; k++) begin
          checks++;
          if (int'(pair_p[k]) != e[k]) begin
            failures++; $display("t=%0d reg pair %0d = %0d expected %0d", t, k, pair_p[k], e[k]);
          end
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
