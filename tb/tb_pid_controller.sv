// tb_pid_controller: checks the PID duty against a reference model.
// The model works in units of 2^-9 of a period: P = E*KP*2^5,
// I = S*KI, D = dE*KD (the gain words carry 3 fraction bits and were
// scaled by 2, 64 and 64), S saturates to [-2048, 2047], dE to the 10-bit
// range; a negative sum gives 0, a sum of one period or more 1023, else
// twice the sum. Runs use the design's constants KP=000.010, KI=011.111,
// KD=001.101 and random ones, with small errors, ramps and large errors
// that saturate the integral and both duty limits. The enable is pulsed
// once every few clocks, and d must not change between pulses.
`timescale 1ns/1ps
module tb_pid_controller;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic signed [9:0] error = '0;
  logic signed [5:0] kp = 6'sb000010, ki = 6'sb011111, kd = 6'sb001101;
  logic [9:0] d;
  logic sat_int, sat_hi, sat_lo;
  int checks = 0, failures = 0;
  int n_int = 0, n_hi = 0, n_lo = 0, n_mid = 0;

  always #2.5 clk = ~clk;

  pid_controller dut (.clk, .rst_n, .en, .error, .kp, .ki, .kd, .d, .sat_int, .sat_hi, .sat_lo);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int s_m = 0, e_m = 0;

  task automatic sample(input int e);
    int s_new, de, sum, exp_d;
    bit clip;
    logic [9:0] d_before;
    s_new = s_m + e;
    clip = 1'b0;
    if (s_new > 2047)  begin s_new = 2047;  clip = 1'b1; end
    if (s_new < -2048) begin s_new = -2048; clip = 1'b1; end
    de = e - e_m;
    if (de > 511)  de = 511;
    if (de < -512) de = -512;
    sum = e * int'(kp) * 32 + s_new * int'(ki) + de * int'(kd);
    if (sum < 0)        exp_d = 0;
    else if (sum >= 512) exp_d = 1023;
    else                exp_d = 2 * sum;
    s_m = s_new;
    e_m = e;
    // idle clocks: output must hold
    d_before = d;
    repeat (3) begin
      @(negedge clk);
      check(d == d_before, "d holds without enable");
    end
    error = 10'(e);
    en = 1'b1;
    @(negedge clk);
    en = 1'b0;
    error = 10'($urandom);      // ignored without enable
    check(d == 10'(exp_d), "duty value");
    check(sat_int == clip, "integral saturation flag");
    check(sat_hi == (sum >= 512), "upper clamp flag");
    check(sat_lo == (sum < 0), "lower clamp flag");
    n_int += int'(clip);
    n_hi  += int'(sum >= 512);
    n_lo  += int'(sum < 0);
    n_mid += int'(sum >= 0 && sum < 512);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    check(d == '0, "reset value");
    rst_n = 1'b1;
    @(negedge clk);
    // design constants: small errors around zero
    for (int i = 0; i < 200; i++) sample(int'($urandom_range(6)) - 3);
    // ramp
    for (int i = -20; i <= 20; i++) sample(i);
    // large positive error: integral and upper clamp saturate
    for (int i = 0; i < 12; i++) sample(400);
    // large negative error: integral unwinds and saturates low
    for (int i = 0; i < 20; i++) sample(-500);
    // step errors that exercise the derivative limit
    sample(511); sample(-512); sample(511); sample(0);
    // random gains and errors
    for (int g = 0; g < 30; g++) begin
      kp = 6'($urandom); ki = 6'($urandom); kd = 6'($urandom);
      for (int i = 0; i < 40; i++) sample(int'($urandom_range(1023)) - 512);
      for (int i = 0; i < 20; i++) sample(int'($urandom_range(16)) - 8);
    end
    check(n_int > 0 && n_hi > 0 && n_lo > 0 && n_mid > 0, "all result ranges reached");
    $display("saturations: integral=%0d high=%0d low=%0d in-range=%0d", n_int, n_hi, n_lo, n_mid);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
