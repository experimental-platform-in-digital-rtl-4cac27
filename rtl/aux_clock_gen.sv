// aux_clock_gen: auxiliary clocks of the closed loop, decoded from the
// PWM slot counter.
//
//   clk_adc   clock of the A/D converters and the PID, period half a PWM
//             period (640 ns); it rises at slot 0 and at the middle slot.
//   ce_pid    enable of the PID: high around the middle of the period so
//             that only the mid-period rising edge of clk_adc updates the
//             PID; here it is high for slots [1/4, 3/4) of the period.
//   ck_dpwm   period of one PWM period, rising CKDPWM_LEAD slots (160 ns)
//             before the period ends and falling at the period end; its
//             rising edge hands the PID result to the DPWM.
//
// The period, the 160 ns lead and the role of each signal follow the design;
// the exact window of ce_pid and the low time of ck_dpwm are this
// implementation's choices. All outputs are registered, one clock after the
// counter. Two single-clock strobes serve logic inside the same clock
// domain: adc_sample is high in every clock where clk_adc rises,
// pid_sample only in the one where it rises with ce_pid high, and dpwm_load
// in the clock where ck_dpwm rises.
module aux_clock_gen #(
  parameter int unsigned CNT_W       = 8,
  parameter int unsigned CKDPWM_LEAD = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [CNT_W-1:0] count,
  output logic             clk_adc,
  output logic             ce_pid,
  output logic             ck_dpwm,
  output logic             adc_sample,
  output logic             pid_sample,
  output logic             dpwm_load
);
  localparam int unsigned PERIOD = 1 << CNT_W;
  localparam logic [CNT_W-1:0] QTR     = CNT_W'(PERIOD / 4);
  localparam logic [CNT_W-1:0] HALF    = CNT_W'(PERIOD / 2);
  localparam logic [CNT_W-1:0] THREEQ  = CNT_W'(3 * PERIOD / 4);
  localparam logic [CNT_W-1:0] CK_RISE = CNT_W'(PERIOD - CKDPWM_LEAD);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clk_adc    <= 1'b0;
      ce_pid     <= 1'b0;
      ck_dpwm    <= 1'b0;
      adc_sample <= 1'b0;
      pid_sample <= 1'b0;
      dpwm_load  <= 1'b0;
    end else begin
      clk_adc    <= ~count[CNT_W-2];
      ce_pid     <= (count >= QTR) && (count < THREEQ);
      ck_dpwm    <= (count >= CK_RISE);
      adc_sample <= (count == '0) || (count == HALF);
      pid_sample <= (count == HALF);
      dpwm_load  <= (count == CK_RISE);
    end
  end
endmodule
