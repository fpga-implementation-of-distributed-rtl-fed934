// Self-checking testbench of da_group, the full-parallel 5-tap DA sub-filter.
//
// The sub-filter holding the five largest prototype coefficients (h[30..34]) is built twice:
// pipelined, where each result must appear LATENCY = 5 clocks after its operands, one per
// clock, and combinational, where it must appear at once. Operands are random 14-bit values,
// with runs of the most negative and most positive values to exercise the sign bit slice
// and the widest sums. Expected results are plain multiply-and-add sums.
module tb_da_group;
  localparam int N = 5, B = 14, CW = 12;
  localparam int GW = CW + $clog2(N) + B;
  localparam int LAT = 1 + $clog2(B);
  localparam logic [N-1:0][CW-1:0] C = da_fir_pkg::H_PROTO[30 +: 5];

  int checks = 0, failures = 0, sign_slice_hits = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, ov_p, ov_c;
  logic signed [B-1:0]  x [N];
  logic signed [GW-1:0] y_p, y_c;

  da_group #(.N_TAPS(N), .LUT_IN(4), .B(B), .COEF_W(CW), .PIPE(1'b1), .COEFS(C)) u_p
    (.clk, .rst_n, .in_valid, .x, .out_valid(ov_p), .y(y_p));
  da_group #(.N_TAPS(N), .LUT_IN(4), .B(B), .COEF_W(CW), .PIPE(1'b0), .COEFS(C)) u_c
    (.clk, .rst_n, .in_valid, .x, .out_valid(ov_c), .y(y_c));

  longint exp_q [$];
  bit     vld_q [$];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0;
    foreach (x[i]) x[i] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < LAT; i++) begin exp_q.push_back(0); vld_q.push_back(0); end
    for (int t = 0; t < 3000; t++) begin
      longint e;
      // operands for this clock
      in_valid = ($urandom % 5) != 0;
      e = 0;
      foreach (x[k]) begin
        case (t % 7)
          0: x[k] = -14'sd8192;
          1: x[k] = 14'sd8190;
          default: x[k] = B'($urandom);
        endcase
        if (x[k] < 0) sign_slice_hits++;
        e += longint'(x[k]) * longint'($signed(C[k]));
      end
      #1;
      checks++;
      if (longint'(y_c) != e || ov_c != in_valid) begin
        failures++; $display("t=%0d combinational y=%0d expected %0d", t, y_c, e);
      end
      exp_q.push_back(e); vld_q.push_back(in_valid);
      @(posedge clk);
      #1;
      // y_p now holds the result of the operands applied LAT-1 clocks before this one
      void'(exp_q.pop_front()); void'(vld_q.pop_front());
      if (t >= LAT) begin
        checks++;
        if (ov_p != vld_q[0] || (vld_q[0] && longint'(y_p) != exp_q[0])) begin
          failures++;
          $display("t=%0d pipelined y=%0d valid=%0b expected %0d valid=%0b", t, y_p, ov_p, exp_q[0], vld_q[0]);
        end
      end
      @(negedge clk);
    end
    checks++;
    if (sign_slice_hits == 0) begin failures++; $display("sign slice never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
