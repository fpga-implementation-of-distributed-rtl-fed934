// Self-checking testbench of tap_delay_line at the filter's size (70 taps of 13 bits).
//
// Random samples are shifted in with random gaps in in_valid; a software copy of the line is
// kept and every tap is compared with it after each clock, together with out_valid, which
// must follow in_valid by one clock.
module tb_tap_delay_line;
  localparam int TAPS = 70, W = 13;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, out_valid;
  logic signed [W-1:0] x_in;
  logic signed [W-1:0] taps [TAPS];
  logic signed [W-1:0] model [TAPS];

  tap_delay_line #(.TAPS(TAPS), .W(W)) dut (.clk, .rst_n, .in_valid, .x_in, .out_valid, .taps);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; x_in = '0;
    foreach (model[i]) model[i] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      logic v;
      v = ($urandom % 3) != 0;
      in_valid = v;
      x_in = W'($urandom);
      @(posedge clk);
      if (v) begin
        for (int i = TAPS - 1; i > 0; i--) model[i] = model[i-1];
        model[0] = x_in;
      end
      @(negedge clk);
      checks++;
      if (out_valid != v) begin failures++; $display("t=%0d out_valid %0b", t, out_valid); end
      for (int i = 0; i < TAPS; i++) begin
        checks++;
        if (taps[i] != model[i]) begin
          failures++; $display("t=%0d tap %0d = %0d expected %0d", t, i, taps[i], model[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
