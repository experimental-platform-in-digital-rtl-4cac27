// tb_aux_clock_gen: checks CLK_ADC, CE_PID, CK_DPWM and the three strobes.
// A counter in the bench drives the block as the PWM counter would. Checked:
// CLK_ADC rises every 128 clocks (640 ns) with one rising edge at slot 0 and
// one at mid-period; CE_PID is high at the mid-period CLK_ADC edge and low
// at the period-start one; CK_DPWM rises 32 clocks (160 ns) before the
// period ends and is low again at the period start; adc_sample fires at
// every CLK_ADC rising edge, pid_sample and dpwm_load once per period.
`timescale 1ns/1ps
module tb_aux_clock_gen;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] count = '0;
  logic clk_adc, ce_pid, ck_dpwm, adc_sample, pid_sample, dpwm_load;
  int checks = 0, failures = 0;

  always #2.5 clk = ~clk;

  aux_clock_gen #(.CNT_W(8), .CKDPWM_LEAD(32)) dut (
    .clk, .rst_n, .count, .clk_adc, .ce_pid, .ck_dpwm, .adc_sample, .pid_sample, .dpwm_load
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t, last_adc_rise, n_adc, n_ck, n_pid, n_load;
    int slot;          // slot the outputs currently describe
    bit adc_q, ck_q;
    repeat (2) @(negedge clk);
    check({clk_adc, ce_pid, ck_dpwm, adc_sample, pid_sample, dpwm_load} == '0, "reset values");
    rst_n = 1'b1;
    last_adc_rise = -1; n_adc = 0; n_ck = 0; n_pid = 0; n_load = 0;
    adc_q = 1'b0; ck_q = 1'b0;
    for (t = 0; t < 256 * 6; t++) begin
      count = 8'(t);
      @(negedge clk);
      slot = t % 256;
      if (clk_adc && !adc_q) begin
        n_adc++;
        check(slot == 0 || slot == 128, "CLK_ADC rising position");
        if (last_adc_rise >= 0) check(t - last_adc_rise == 128, "CLK_ADC period 640 ns");
        last_adc_rise = t;
        check(ce_pid == (slot == 128), "CE_PID only at the mid-period edge");
      end
      if (ck_dpwm && !ck_q) begin
        n_ck++;
        check(slot == 256 - 32, "CK_DPWM rises 160 ns before period end");
      end
      if (slot == 0 && t > 0) check(!ck_dpwm, "CK_DPWM low at period start");
      check(adc_sample == (clk_adc && !adc_q), "adc_sample strobe");
      check(pid_sample == (clk_adc && !adc_q && ce_pid), "pid_sample strobe");
      check(dpwm_load == (ck_dpwm && !ck_q), "dpwm_load strobe");
      n_pid  += int'(pid_sample);
      n_load += int'(dpwm_load);
      adc_q = clk_adc;
      ck_q  = ck_dpwm;
    end
    check(n_ck == 6 && n_pid == 6 && n_load == 6, "one strobe per period");
    check(n_adc >= 11, "two CLK_ADC edges per period");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
