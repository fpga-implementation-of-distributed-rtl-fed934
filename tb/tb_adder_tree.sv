// Self-checking testbench of adder_tree.
//
// A pipelined 7-input tree (odd count, so one operand skips a level) and a combinational
// 14-input tree are fed random signed operands every clock, with gaps in in_valid. The
// pipelined sum must appear exactly LATENCY = 3 clocks later with out_valid set; the
// combinational sum must be correct in the same clock.
module tb_adder_tree;
  localparam int W = 24;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic               v7, v7_out, v14_out;
  logic signed [W-1:0] d7 [7];
  logic signed [W-1:0] d14 [14];
  logic signed [W-1:0] s7, s14;

  adder_tree #(.N_IN(7),  .W(W), .PIPE(1'b1)) u_p (.clk, .rst_n, .in_valid(v7), .in_data(d7),
                                                   .out_valid(v7_out), .sum(s7));
  adder_tree #(.N_IN(14), .W(W), .PIPE(1'b0)) u_c (.clk, .rst_n, .in_valid(v7), .in_data(d14),
                                                   .out_valid(v14_out), .sum(s14));

  longint exp_q [$];
  bit     vld_q [$];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    v7 = 0;
    foreach (d7[i]) d7[i] = '0;
    foreach (d14[i]) d14[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3; i++) begin vld_q.push_back(0); exp_q.push_back(0); end
    for (int t = 0; t < 2000; t++) begin
      longint e7, e14;
      @(negedge clk);
      // outputs of the pipelined tree for the operands applied 3 clocks ago
      if (vld_q[0]) begin
        checks++;
        if (!v7_out || longint'(s7) != exp_q[0]) begin
          failures++; $display("t=%0d pipelined sum %0d valid %0b expected %0d", t, s7, v7_out, exp_q[0]);
        end
      end else if (t > 3) begin
        checks++;
        if (v7_out) begin failures++; $display("t=%0d spurious out_valid", t); end
      end
      void'(vld_q.pop_front()); void'(exp_q.pop_front());
      v7 = ($urandom % 4) != 0;
      e7 = 0; e14 = 0;
      foreach (d7[i]) begin d7[i] = W'($signed(20'($urandom))); e7 += longint'(d7[i]); end
      foreach (d14[i]) begin d14[i] = W'($signed(19'($urandom))); e14 += longint'(d14[i]); end
      if (t == 0) foreach (d7[i]) begin d7[i] = -(1 <<< 19); end
      if (t == 0) e7 = -7 * (1 <<< 19);
      vld_q.push_back(v7); exp_q.push_back(e7);
      #1;
      checks++;
      if (longint'(s14) != e14 || v14_out != v7) begin
        failures++; $display("t=%0d combinational sum %0d expected %0d", t, s14, e14);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
