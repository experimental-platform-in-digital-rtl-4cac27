// tb_dcdc_ctrl_top: end-to-end test of the controller at full size.
//
// The switch outputs are low-active; the bench inverts them when sampling
// and checks they are high (switches off) during reset.
// Open loop: a duty sweep from 0.1 to 0.9 in 11 steps is run on the
// multiphase outputs; every phase's direct and inverse wave widths, the
// 90 degree phase steps and the dead time are checked on the 1.25 ns serial
// outputs, and the dynamic-load word must reach the switch port.
// Closed loop: an averaged single-phase buck (5 V in, 3.3 V target, first
// order lag per PWM period, 0.1 ohm source resistance) and an A/D model
// (16 codes per volt of error, two's complement, clamped to 10 bits) close
// the loop around the PID. At every CK_DPWM edge the duty the controller
// hands to the DPWM is compared with a reference PID computed here from the
// error the A/D presented at the mid-period CLK_ADC edge. The A/D error is
// then forced high and low to saturate the integral and both duty clamps,
// and a load step from 49.9 to 1.5 ohm (the 00000001 and 00100000 load
// words) must be regulated back to within 0.15 V of 3.3 V.
// The four A/D measurement channels carry the model's output voltage
// (100 codes/V), load current (50 codes/A) and two fixed levels; every
// published average must equal the mean of the 16 readings the bench
// presented at the CLK_ADC edges of that block.
// Each mechanism (mode switch, fine-adjust bits in use, dead time, phase
// shift, duty hand-over, integral saturation, upper and lower clamps, load
// switching) is counted, and one that never happened is a failure.
`timescale 1ns/1ps
module tb_dcdc_ctrl_top;
  import dcdc_pkg::*;
  localparam int NP = 4, PER = 1024;

  logic clk = 1'b0, clk_ser = 1'b1, rst_n = 1'b0;
  loop_mode_t mode = MODE_OPEN_LOOP;
  logic [9:0] duty_ol = 10'd100;
  logic signed [5:0] kp = 6'sb000010, ki = 6'sb011111, kd = 6'sb001101;
  logic [7:0] sep = 8'd2;
  logic signed [9:0] adc_error = '0;
  logic [7:0] load_word = 8'b0000_0001, load_sw;
  logic [NP-1:0] pwm_hi, pwm_lo;
  logic clk_adc, ce_pid, ck_dpwm;
  logic [9:0] duty_now;
  logic pid_sat_int, pid_sat_hi, pid_sat_lo;
  logic signed [9:0] adc_meas [NADC];
  logic signed [9:0] adc_avg  [NADC];
  logic adc_avg_valid;
  int checks = 0, failures = 0;

  always #2.5   clk     = ~clk;
  always #0.625 clk_ser = ~clk_ser;

  dcdc_ctrl_top dut (
    .clk, .clk_ser, .rst_n, .mode, .duty_ol, .kp, .ki, .kd, .sep, .adc_error,
    .load_word, .load_sw, .pwm_hi, .pwm_lo, .clk_adc, .ce_pid, .ck_dpwm,
    .duty_now, .adc_meas, .adc_avg, .adc_avg_valid,
    .pid_sat_int, .pid_sat_hi, .pid_sat_lo
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- counters
  int n_mode_switch = 0, n_fine = 0, n_dead = 0, n_phase = 0, n_handover = 0;
  int n_sat_int = 0, n_sat_hi = 0, n_sat_lo = 0, n_load = 0, n_open = 0;
  int n_avg = 0;

  // ------------------------------------------------------- serial recording
  bit hi_bits [NP][PER];
  bit lo_bits [NP][PER];
  int nrec = 0, want = 0;

  always @(negedge clk_ser) if (nrec < want) begin
    for (int p = 0; p < NP; p++) begin
      hi_bits[p][nrec] = !pwm_hi[p];   // switch outputs are low-active
      lo_bits[p][nrec] = !pwm_lo[p];
    end
    nrec++;
  end

  task automatic record_period();
    nrec = 0;
    want = PER;
    wait (nrec == PER);
    want = 0;
  endtask

  function automatic int first_rise(input int p);
    for (int i = 0; i < PER; i++)
      if (hi_bits[p][i] && !hi_bits[p][(i + PER - 1) % PER]) return i;
    return -1;
  endfunction

  // check one steady open-loop period of duty d
  task automatic check_waves(input int d, input int s);
    int v, ones_hi, ones_lo, exp_lo, r0, overlap;
    v = d / 4;
    r0 = -1;
    record_period();
    for (int p = 0; p < NP; p++) begin
      ones_hi = 0; ones_lo = 0; overlap = 0;
      for (int i = 0; i < PER; i++) begin
        ones_hi += int'(hi_bits[p][i]);
        ones_lo += int'(lo_bits[p][i]);
        overlap += int'(hi_bits[p][i] && lo_bits[p][i]);
      end
      check(ones_hi == ((v > 0) ? d : 0), "direct width");
      exp_lo = 4 * (256 - v - 2 * s);
      if (exp_lo < 0) exp_lo = 0;
      check(ones_lo == exp_lo, "inverse width");
      check(overlap == 0, "switches never on together");
      if (p == 0) r0 = first_rise(0);
      else if (v > 0) begin
        check(first_rise(p) == (r0 + 256 * p) % PER, "phase shift");
        n_phase++;
      end
    end
    if (d % 4 != 0) n_fine++;
    if (s > 0 && exp_lo > 0) n_dead++;
  endtask

  // -------------------------------------------------------- reference PID
  int s_m = 0, e_m = 0, exp_d = 0;
  bit exp_int, exp_hi, exp_lo_f;

  function automatic void pid_model(input int e);
    int s_new, de, sum;
    s_new = s_m + e;
    exp_int = 1'b0;
    if (s_new > 2047)  begin s_new = 2047;  exp_int = 1'b1; end
    if (s_new < -2048) begin s_new = -2048; exp_int = 1'b1; end
    de = e - e_m;
    if (de > 511)  de = 511;
    if (de < -512) de = -512;
    sum = e * int'(kp) * 32 + s_new * int'(ki) + de * int'(kd);
    exp_hi   = (sum >= 512);
    exp_lo_f = (sum < 0);
    exp_d = exp_lo_f ? 0 : exp_hi ? 1023 : 2 * sum;
    s_m = s_new;
    e_m = e;
  endfunction

  // the PID samples the error on every mid-period CLK_ADC edge, in either
  // mode; mirror that so the model's state stays in step
  bit adc_q = 1'b0, ck_q = 1'b0;
  always @(negedge clk) begin
    if (rst_n && clk_adc && !adc_q && ce_pid) pid_model(int'(adc_error));
    adc_q = clk_adc;
  end

  // ----------------------------------------------- A/D averages, reference
  int avg_sum [NADC];
  int avg_n = 0;
  int avg_exp [NADC];
  bit adc_q2 = 1'b0;
  initial foreach (avg_sum[c]) avg_sum[c] = 0;
  always @(negedge clk) begin
    if (rst_n && adc_avg_valid) begin
      foreach (adc_avg[c]) check(int'(adc_avg[c]) == avg_exp[c], "A/D average");
      n_avg++;
    end
    if (rst_n && clk_adc && !adc_q2) begin
      foreach (adc_meas[c]) avg_sum[c] += int'(adc_meas[c]);
      avg_n++;
      if (avg_n == 16) begin
        foreach (avg_sum[c]) begin
          avg_exp[c] = (avg_sum[c] >= 0) ? avg_sum[c] / 16 : -((-avg_sum[c] + 15) / 16);
          avg_sum[c] = 0;
        end
        avg_n = 0;
      end
    end
    adc_q2 = clk_adc;
  end

  // ------------------------------------------------------------ buck model
  real vo = 0.0, r_load = 49.9;
  real VIN = 5.0, VREF = 3.3, RS = 0.1, A = 0.05, K_ADC = 16.0;
  bit  plant_on = 1'b0;
  int  forced_err = 0;
  int  periods = 0;

  function automatic real load_ohms(input logic [7:0] w);
    real r [8] = '{49.9, 40.0, 20.0, 10.0, 5.0, 1.5, 0.33333, 0.03};
    real g = 0.0;
    for (int b = 0; b < 8; b++) if (w[b]) g += 1.0 / r[b];
    return (g > 0.0) ? 1.0 / g : 1.0e6;
  endfunction

  function automatic int adc_code(input real verr);
    int c = int'($rtoi(verr * K_ADC + ((verr >= 0.0) ? 0.5 : -0.5)));
    if (c > 511)  c = 511;
    if (c < -512) c = -512;
    return c;
  endfunction

  // once per PWM period, at the CK_DPWM edge: check the hand-over, then
  // advance the converter and present the next A/D error
  always @(negedge clk) begin
    if (rst_n && ck_dpwm && !ck_q) begin
      periods++;
      if (mode == MODE_CLOSED_LOOP) begin
        check(duty_now == 10'(exp_d), "PID duty at CK_DPWM");
        check(pid_sat_int == exp_int && pid_sat_hi == exp_hi && pid_sat_lo == exp_lo_f,
              "PID saturation flags");
        n_handover++;
        n_sat_int += int'(pid_sat_int);
        n_sat_hi  += int'(pid_sat_hi);
        n_sat_lo  += int'(pid_sat_lo);
      end else begin
        check(duty_now == duty_ol, "open-loop duty at CK_DPWM");
        n_open++;
      end
      r_load = load_ohms(load_sw);
      vo = vo + A * (VIN * real'(duty_now) / 1024.0 * r_load / (r_load + RS) - vo);
      adc_error = plant_on ? 10'(adc_code(VREF - vo)) : 10'(forced_err);
      adc_meas[0] = 10'($rtoi(vo * 100.0));
      adc_meas[1] = 10'($rtoi(vo / r_load * 50.0));
      adc_meas[2] = 10'(periods % 7 - 300);
      adc_meas[3] = 10'(-(periods % 5) + 200);
    end
    ck_q = ck_dpwm;
  end

  task automatic wait_periods(input int n);
    int start = periods;
    wait (periods >= start + n);
  endtask

  task automatic set_mode(input loop_mode_t m);
    if (m != mode) n_mode_switch++;
    mode = m;
  endtask

  task automatic set_load(input logic [7:0] w);
    load_word = w;
    @(negedge clk);
    @(negedge clk);
    check(load_sw == w, "load word reaches the switches");
    n_load++;
  endtask

  // ------------------------------------------------------------- sequence
  initial begin
    real err_max;
    foreach (adc_meas[c]) adc_meas[c] = '0;
    repeat (4) @(negedge clk);
    check(pwm_hi == '1 && pwm_lo == '1, "switches off in reset");
    rst_n = 1'b1;

    // open loop: duty sweep 0.1 .. 0.9 in 11 samples, 4 phases
    set_load(8'b0000_0001);
    for (int k = 0; k < 11; k++) begin
      int d = int'($rtoi((0.1 + 0.08 * k) * 1024.0 + 0.5));
      sep = 8'(1 + k % 3);
      duty_ol = 10'(d);
      wait_periods(3);
      check_waves(d, int'(sep));
    end

    // closed loop: forced errors saturate the integral and both clamps
    sep = 8'd2;
    forced_err = 400;
    plant_on = 1'b0;
    set_mode(MODE_CLOSED_LOOP);
    wait_periods(12);
    forced_err = -500;
    wait_periods(14);
    set_mode(MODE_OPEN_LOOP);
    duty_ol = 10'd0;
    wait_periods(3);

    // closed loop around the buck model from 0 V
    vo = 0.0;
    plant_on = 1'b1;
    set_mode(MODE_CLOSED_LOOP);
    wait_periods(250);
    check(vo > VREF - 0.15 && vo < VREF + 0.15, "regulated at light load");
    $display("light load: vo=%0.3f V duty=%0d", vo, duty_now);
    check_waves(int'(duty_now), 2);

    // load step 49.9 ohm -> 1.5 ohm
    set_load(8'b0010_0000);
    wait_periods(300);
    check(vo > VREF - 0.15 && vo < VREF + 0.15, "regulated after the load step");
    $display("after load step: vo=%0.3f V duty=%0d", vo, duty_now);

    $display("mechanisms: mode_switch=%0d open_periods=%0d handover=%0d fine=%0d dead_time=%0d phase=%0d sat_int=%0d sat_hi=%0d sat_lo=%0d load=%0d averages=%0d",
             n_mode_switch, n_open, n_handover, n_fine, n_dead, n_phase, n_sat_int, n_sat_hi, n_sat_lo, n_load, n_avg);
    check(n_mode_switch > 0, "mode switch happened");
    check(n_open > 0, "open-loop periods happened");
    check(n_handover > 0, "PID hand-over happened");
    check(n_fine > 0, "fine adjustment used");
    check(n_dead > 0, "dead time used");
    check(n_phase > 0, "phase shift seen");
    check(n_sat_int > 0, "integral saturation happened");
    check(n_sat_hi > 0, "upper duty clamp happened");
    check(n_sat_lo > 0, "lower duty clamp happened");
    check(n_load > 1, "load switching happened");
    check(n_avg > 10, "A/D averages published");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
