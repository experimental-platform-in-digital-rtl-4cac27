// tb_dpwm: checks the four-phase DPWM at its full size (10-bit duty, 256
// slots, 4 phases) on the serial outputs, sampled once per 1.25 ns bit.
// For each (duty, SEPARACION) setting, over one steady 1024-bit period:
//   - pwm_hi[p] holds exactly d ones in one pulse (none when d[9:2] = 0);
//   - phase p's pulse starts 256*p bits after phase 0's (90 degree steps);
//   - pwm_lo[p] holds 4*(256 - d[9:2] - 2*sep) ones and falls 4*sep bits
//     before pwm_hi[p] rises;
//   - with sep >= 1 the two waves of a phase are never high together.
// A duty change presented at a random time must produce only whole pulses
// of the old or the new width on every phase.
`timescale 1ns/1ps
module tb_dpwm;
  localparam int NP = 4, PER = 1024;
  logic clk = 1'b0, clk_ser = 1'b1, rst_n = 1'b0;
  logic [9:0] duty = '0;
  logic       duty_load = 1'b0;
  logic [7:0] sep = '0;
  logic [NP-1:0] pwm_hi, pwm_lo;
  logic [7:0] count;
  int checks = 0, failures = 0;

  always #2.5   clk     = ~clk;
  always #0.625 clk_ser = ~clk_ser;

  dpwm #(.NPHASE(NP), .CNT_W(8), .DUTY_W(10)) dut (
    .clk, .clk_ser, .rst_n, .duty, .duty_load, .sep, .pwm_hi, .pwm_lo, .count
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s d=%0d sep=%0d at %0t", what, duty, sep, $time);
    end
  endtask

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int MAXB = 8 * PER;
  bit hi_bits [NP][MAXB];
  bit lo_bits [NP][MAXB];
  int nrec = 0, want = 0;

  always @(negedge clk_ser) if (nrec < want) begin
    for (int p = 0; p < NP; p++) begin
      hi_bits[p][nrec] = pwm_hi[p];
      lo_bits[p][nrec] = pwm_lo[p];
    end
    nrec++;
  end

  task automatic record(input int n);
    nrec = 0;
    want = n;
    wait (nrec == n);
    want = 0;
  endtask

  task automatic load_duty(input int d);
    @(negedge clk);
    duty = 10'(d);
    duty_load = 1'b1;
    @(negedge clk);
    duty_load = 1'b0;
  endtask

  // position (circular) of the single rising edge of a wave, -1 if none
  function automatic int rise_pos(input int p, input bit lo);
    int pos = -1;
    for (int i = 0; i < PER; i++) begin
      bit cur  = lo ? lo_bits[p][i] : hi_bits[p][i];
      bit prev = lo ? lo_bits[p][(i + PER - 1) % PER] : hi_bits[p][(i + PER - 1) % PER];
      if (cur && !prev) pos = (pos == -1) ? i : -2;
    end
    return pos;
  endfunction

  function automatic int fall_pos(input int p);
    int pos = -1;
    for (int i = 0; i < PER; i++)
      if (!lo_bits[p][i] && lo_bits[p][(i + PER - 1) % PER]) pos = i;
    return pos;
  endfunction

  task automatic steady(input int d, input int s);
    int v, ones_hi, ones_lo, exp_lo, r0, rp, overlap, lf;
    v = d / 4;
    sep = 8'(s);
    load_duty(d);
    repeat (3 * 256) @(negedge clk);
    record(PER);
    r0 = rise_pos(0, 1'b0);
    for (int p = 0; p < NP; p++) begin
      ones_hi = 0; ones_lo = 0; overlap = 0;
      for (int i = 0; i < PER; i++) begin
        ones_hi += int'(hi_bits[p][i]);
        ones_lo += int'(lo_bits[p][i]);
        overlap += int'(hi_bits[p][i] && lo_bits[p][i]);
      end
      check(ones_hi == ((v > 0) ? d : 0), "direct wave width");
      exp_lo = 4 * (256 - v - 2 * s);
      if (exp_lo < 0) exp_lo = 0;
      check(ones_lo == exp_lo, "inverse wave width");
      if (s > 0) check(overlap == 0, "no overlap with dead time");
      rp = rise_pos(p, 1'b0);
      if (v > 0 && v < 256) begin
        check(rp >= 0, "one direct pulse per period");
        check(rp == (r0 + 256 * p) % PER, "phase shift of 90 degrees");
        if (exp_lo > 0) begin
          lf = fall_pos(p);
          check((rp - lf + PER) % PER == 4 * s, "guard before the direct pulse");
        end
      end
    end
  endtask

  // runs of ones on phase p inside the recording, the first and last cut off
  task automatic check_runs(input int p, input int n, input int w_old, input int w_new);
    int run, nruns;
    bit started;
    run = 0; nruns = 0; started = 1'b0;
    for (int i = 1; i < n; i++) begin
      if (!hi_bits[p][i - 1] && hi_bits[p][i]) begin started = 1'b1; run = 0; end
      if (hi_bits[p][i]) run++;
      if (started && hi_bits[p][i - 1] && !hi_bits[p][i]) begin
        check(run == w_old || run == w_new, "whole pulses across a duty change");
        nruns++;
      end
    end
    check(nruns >= 5, "pulses seen across a duty change");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    steady(512, 2);
    steady(675, 1);     // fine bits 3
    steady(133, 4);     // fine bits 1
    steady(1023, 1);
    steady(0, 3);
    steady(3, 1);       // coarse part zero
    steady(4, 0);
    steady(802, 30);
    steady(300, 200);   // guard swallows the inverse wave
    for (int k = 0; k < 4; k++) steady(int'($urandom_range(1023)), int'($urandom_range(1, 20)));
    // duty change at a random moment
    for (int k = 0; k < 3; k++) begin
      int d_old, d_new;
      d_old = 200 + 100 * k + k;
      d_new = 600 - 50 * k + 2;
      steady(d_old, 2);
      fork
        record(8 * PER);
        begin
          repeat (256 + int'($urandom_range(255))) @(negedge clk);
          load_duty(d_new);
        end
      join
      for (int p = 0; p < NP; p++) check_runs(p, 8 * PER, d_old, d_new);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
