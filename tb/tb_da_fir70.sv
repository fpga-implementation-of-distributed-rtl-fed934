// End-to-end, full-size testbench of da_fir70 (every parameter at its default).
//
// The filter is fed four input phases and every output is compared with a direct-form
// reference, y[n] = sum_k h[k] x[n-k], computed here by ordinary multiplication from the
// 70-tap prototype:
//   1. an impulse (the output must reproduce the 70 coefficients, then zeros);
//   2. the demodulation test signal: a 2 MHz-wide signal on a 9 MHz carrier, sampled at
//      40 MHz, multiplied by cos(2 pi n f0/fs) and quantised to 13 bits; besides the exact
//      comparison, the filtered output must match the ideal baseband signal times the
//      filter's DC gain to within 3 % of full scale, which shows the 18 MHz image is removed;
//   3. full-scale positive and negative runs, the largest sums the datapath must carry;
//   4. random samples with random gaps in x_valid (the pipeline holds no state per sample, so
//      results must still follow their sample by exactly LATENCY clocks).
// Counted mechanisms, each of which must occur: back-to-back results (one per clock),
// input gaps, negative pre-added operands (sign bit slice), a set fifth-tap bit of a group
// (the multiplexer and adder beside the 4-input LUT), and the extreme operand -8192.
module tb_da_fir70;
  localparam int TAPS = 70, IN_W = 13, OUT_W = 32, LAT = 10;
  localparam real PI = 3.14159265358979;
  localparam real FS = 40.0e6, F0 = 9.0e6;

  int checks = 0, failures = 0;
  int n_back_to_back = 0, n_gaps = 0, n_sign = 0, n_fifth = 0, n_extreme = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                    x_valid, y_valid;
  logic signed [IN_W-1:0]  x_in;
  logic signed [OUT_W-1:0] y;

  da_fir70 dut (.clk, .rst_n, .x_valid, .x_in, .y_valid, .y);

  int h [TAPS];
  int hist [TAPS];          // reference copy of the delay line
  longint exp_q [$];        // expected output per accepted sample
  real    base_q [$];       // ideal baseband value per accepted sample (phase 2), else NaN flag
  bit     base_v [$];
  int     cycle = 0, last_out_cycle = -10, accepted = 0, produced = 0;
  int     max_err_pct10 = 0;
  longint dc_gain;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the 2 MHz-wide message: tones at 0.15, 0.45 and 0.9 MHz
  function automatic real baseband(input real t);
    return 900.0 * $cos(2.0 * PI * 0.15e6 * t) + 600.0 * $sin(2.0 * PI * 0.45e6 * t)
         + 450.0 * $cos(2.0 * PI * 0.9e6 * t + 0.3);
  endfunction

  // one accepted sample: update the reference and queue the expected result
  task automatic push_sample(input int s, input bit has_base, input real base);
    longint e;
    for (int i = TAPS - 1; i > 0; i--) hist[i] = hist[i-1];
    hist[0] = s;
    e = 0;
    for (int k = 0; k < TAPS; k++) e += longint'(h[k]) * longint'(hist[k]);
    exp_q.push_back(e);
    base_v.push_back(has_base);
    base_q.push_back(base);
    accepted++;
  endtask

  task automatic send(input int s, input bit has_base = 0, input real base = 0.0);
    @(negedge clk);
    x_valid = 1;
    x_in = IN_W'(s);
    @(posedge clk);
    push_sample(s, has_base, base);
  endtask

  task automatic gap(input int n);
    @(negedge clk);
    x_valid = 0;
    x_in = IN_W'($urandom);
    repeat (n) @(posedge clk);
    n_gaps++;
  endtask

  // output checker and mechanism counters
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && y_valid) begin
      longint e;
      checks++;
      produced++;
      if (exp_q.size() == 0) begin
        failures++; $display("cycle %0d: output with no sample pending", cycle);
      end else begin
        e = exp_q.pop_front();
        if (longint'(y) != e) begin
          failures++; $display("cycle %0d: y=%0d expected %0d", cycle, y, e);
        end
        if (base_v.pop_front()) begin
          real b, err;
          b = base_q.pop_front();
          err = (real'(y) / real'(dc_gain) - b) / 4096.0 * 1000.0;
          if (err < 0) err = -err;
          if (int'(err) > max_err_pct10) max_err_pct10 = int'(err);
        end else void'(base_q.pop_front());
      end
      if (last_out_cycle == cycle - 1) n_back_to_back++;
      last_out_cycle <= cycle;
    end
    if (rst_n && dut.pair_vld) begin
      for (int k = 0; k < TAPS / 2; k++) begin
        if (dut.pair[k] < 0) n_sign++;
        if (dut.pair[k] == -14'sd8192) n_extreme++;
        if (k % 5 == 4 && dut.pair[k] != 0) n_fifth++;
      end
    end
  end

  // latency check: a lone sample after an idle stretch must come out exactly LAT clocks later
  task automatic check_latency();
    int t0;
    gap(LAT + 4);
    @(negedge clk);
    x_valid = 1; x_in = 13'sd100;
    t0 = cycle;
    @(posedge clk);
    push_sample(100, 0, 0.0);
    @(negedge clk);
    x_valid = 0;
    while (!y_valid && cycle - t0 < 4 * LAT) @(negedge clk);
    checks++;
    if (cycle - t0 != LAT) begin
      failures++; $display("latency %0d clocks, expected %0d", cycle - t0, LAT);
    end
  endtask

  initial begin
    for (int k = 0; k < TAPS / 2; k++) begin
      h[k] = int'($signed(da_fir_pkg::H_PROTO[k]));
      h[TAPS-1-k] = h[k];
    end
    dc_gain = 0;
    foreach (h[k]) dc_gain += h[k];
    foreach (hist[i]) hist[i] = 0;
    x_valid = 0; x_in = '0;
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // 1. impulse
    send(1);
    repeat (TAPS + 5) send(0);
    check_latency();
    repeat (TAPS) send(0);

    // 2. demodulation test signal: the message on a 9 MHz carrier, mixed back down by
    //    cos(2 pi n f0 / fs); the gain of 2 restores the message amplitude
    for (int n = 0; n < 1500; n++) begin
      real t, rf, mixed;
      t  = real'(n) / FS;
      rf = baseband(t) * $cos(2.0 * PI * F0 * t);
      mixed = 2.0 * rf * $cos(2.0 * PI * F0 * t);   // = bb + bb * cos(2 pi 2 f0 t)
      // the linear-phase filter delays by (TAPS-1)/2 samples
      send(int'($floor(mixed + 0.5)), n >= TAPS + 20, baseband(t - real'(TAPS - 1) / 2.0 / FS));
    end

    // 3. full-scale runs
    repeat (TAPS + 10) send(-4096);
    repeat (TAPS + 10) send(4095);
    for (int n = 0; n < TAPS + 10; n++) send((n % 2) ? 4095 : -4096);

    // 4. random samples with gaps
    for (int n = 0; n < 1500; n++) begin
      send($signed(IN_W'($urandom)));
      if ($urandom % 8 == 0) gap(1 + $urandom % 3);
    end

    gap(LAT + 4);
    checks++;
    if (exp_q.size() != 0 || produced != accepted) begin
      failures++; $display("accepted %0d samples but produced %0d results", accepted, produced);
    end
    checks++;
    if (max_err_pct10 > 30) begin
      failures++; $display("baseband error %0d per mille of full scale", max_err_pct10);
    end
    $display("mechanisms: back_to_back=%0d gaps=%0d sign_slice=%0d fifth_tap=%0d extreme=%0d",
             n_back_to_back, n_gaps, n_sign, n_fifth, n_extreme);
    $display("demodulated baseband worst error %0d per mille of full scale", max_err_pct10);
    checks++; if (n_back_to_back == 0) begin failures++; $display("no back-to-back results"); end
    checks++; if (n_gaps == 0)         begin failures++; $display("no input gaps"); end
    checks++; if (n_sign == 0)         begin failures++; $display("no negative operands"); end
    checks++; if (n_fifth == 0)        begin failures++; $display("fifth tap never used"); end
    checks++; if (n_extreme == 0)      begin failures++; $display("extreme operand never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
