// tb_workload_multiphase: the four-phase 12 V to 1.5 V operating point.
// The top runs open loop at duty 0.125 (128/1024) with a dead time of two
// slots. Over two steady periods of the 1.25 ns serial outputs:
//   - each phase's high-side switch is on for 128 bits per period;
//   - no two high-side switches are ever on together (duty below 1/4);
//   - the high-side turn-on events of all phases together come every 256
//     bits, four times the switching frequency;
//   - each phase's low-side switch is on for 4*(256-32-4) bits and never
//     together with its own high-side switch.
// Outputs are low-active and are inverted when sampled.
`timescale 1ns/1ps
module tb_workload_multiphase;
  import dcdc_pkg::*;
  localparam int NP = 4, PER = 1024, NB = 2 * PER;

  logic clk = 1'b0, clk_ser = 1'b1, rst_n = 1'b0;
  logic [9:0] duty_ol = 10'd128;
  logic [7:0] sep = 8'd2, load_sw;
  logic [NP-1:0] pwm_hi, pwm_lo;
  logic clk_adc, ce_pid, ck_dpwm, sat_i, sat_h, sat_l;
  logic [9:0] duty_now;
  logic signed [9:0] adc_meas [NADC];
  logic signed [9:0] adc_avg  [NADC];
  logic adc_avg_valid;
  int checks = 0, failures = 0;

  always #2.5   clk     = ~clk;
  always #0.625 clk_ser = ~clk_ser;

  dcdc_ctrl_top dut (
    .clk, .clk_ser, .rst_n, .mode(MODE_OPEN_LOOP), .duty_ol,
    .kp(6'sd2), .ki(6'sd31), .kd(6'sd13), .sep, .adc_error(10'sd0),
    .load_word(8'h01), .load_sw, .pwm_hi, .pwm_lo, .clk_adc, .ce_pid,
    .ck_dpwm, .duty_now, .adc_meas, .adc_avg, .adc_avg_valid, .pid_sat_int(sat_i), .pid_sat_hi(sat_h), .pid_sat_lo(sat_l)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit hi [NP][NB];
  bit lo [NP][NB];
  int nrec = 0, want = 0;

  always @(negedge clk_ser) if (nrec < want) begin
    for (int p = 0; p < NP; p++) begin
      hi[p][nrec] = !pwm_hi[p];
      lo[p][nrec] = !pwm_lo[p];
    end
    nrec++;
  end

  initial begin
    int on_hi [NP];
    int on_lo [NP];
    int rises [$];
    int n_on;
    foreach (adc_meas[c]) adc_meas[c] = 10'(c * 50);
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    repeat (5 * 256) @(negedge clk);      // hand-over and all phases settled
    want = NB;
    wait (nrec == NB);
    for (int p = 0; p < NP; p++) begin on_hi[p] = 0; on_lo[p] = 0; end
    for (int i = 0; i < NB; i++) begin
      n_on = 0;
      for (int p = 0; p < NP; p++) begin
        on_hi[p] += int'(hi[p][i]);
        on_lo[p] += int'(lo[p][i]);
        n_on += int'(hi[p][i]);
        if (hi[p][i] && lo[p][i]) check(1'b0, "high and low side on together");
        if (i > 0 && hi[p][i] && !hi[p][i - 1]) rises.push_back(i);
      end
      check(n_on <= 1, "at most one high-side switch on");
    end
    for (int p = 0; p < NP; p++) begin
      check(on_hi[p] == 2 * 128, "high-side on time, duty 0.125");
      check(on_lo[p] == 2 * 4 * (256 - 32 - 4), "low-side on time");
    end
    check(rises.size() >= 7, "turn-on events seen");
    for (int k = 1; k < rises.size(); k++)
      check(rises[k] - rises[k - 1] == 256, "combined turn-on every 320 ns");
    check(duty_now == 10'd128, "duty handed over");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
