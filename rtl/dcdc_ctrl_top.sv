// dcdc_ctrl_top: FPGA controller of the DC-DC converter test platform.
//
// The controller drives the switches of a single-phase or four-phase buck
// converter and closes the output-voltage loop:
//   - dpwm turns a 10-bit duty into four phase-shifted direct waves
//     (pwm_hi) and four inverse waves with a dead time of 'sep' slots
//     (pwm_lo), 1.25 ns resolution in a 1.28 us period. A single-phase
//     converter uses phase 0.
//   - aux_clock_gen derives clk_adc (640 ns) for the A/D converters and the
//     PID, ce_pid, and ck_dpwm, which rises 160 ns before each period ends.
//   - pid_controller takes the A/D error word once per PWM period, at the
//     mid-period clk_adc edge enabled by ce_pid, and computes a new duty.
//   - In closed-loop mode the PID duty, in open-loop mode the duty_ol port,
//     is handed to dpwm at the ck_dpwm edge and takes effect at the next
//     period start of each phase.
//   - adc_averager averages the readings of the board's four A/D
//     converters over blocks of 2^AVG_LOG2 CLK_ADC samples, for reporting
//     output voltage and current.
//   - The 8-bit dynamic-load word is registered and driven to the load's
//     MOSFET switches (load_sw).
// The blocks and the signal timing follow the design; the mode port, the
// registered load word, the averaging block length and the choice of a
// separate error input for the loop are this implementation's. The switches are driven low-active, as on the
// board: with ACTIVE_LOW set, pwm_hi and pwm_lo are low while a switch is
// on and high (off) in reset; clear it for active-high waves.
//
// Clocks: clk 200 MHz (5 ns slots), clk_ser 800 MHz in phase with clk; both
// come from the board PLL. Reset is asynchronous and active low.
module dcdc_ctrl_top
  import dcdc_pkg::*;
#(
  parameter int unsigned PHASES     = NPHASE,
  parameter bit          ACTIVE_LOW = 1'b1,  // switch drive level at the pins
  parameter int unsigned AVG_LOG2   = 4      // A/D samples per average: 16
) (
  input  logic                    clk,
  input  logic                    clk_ser,
  input  logic                    rst_n,
  input  loop_mode_t              mode,
  input  logic [DUTY_W-1:0]       duty_ol,
  input  logic signed [K_W-1:0]   kp,
  input  logic signed [K_W-1:0]   ki,
  input  logic signed [K_W-1:0]   kd,
  input  logic [CNT_W-1:0]        sep,
  input  logic signed [ERR_W-1:0] adc_error,
  input  logic signed [ADC_W-1:0] adc_meas [NADC],
  input  logic [LOAD_W-1:0]       load_word,
  output logic [LOAD_W-1:0]       load_sw,
  output logic [PHASES-1:0]       pwm_hi,
  output logic [PHASES-1:0]       pwm_lo,
  output logic                    clk_adc,
  output logic                    ce_pid,
  output logic                    ck_dpwm,
  output logic [DUTY_W-1:0]       duty_now,
  output logic signed [ADC_W-1:0] adc_avg [NADC],
  output logic                    adc_avg_valid,
  output logic                    pid_sat_int,
  output logic                    pid_sat_hi,
  output logic                    pid_sat_lo
);
  logic [CNT_W-1:0]  count;
  logic              adc_sample, pid_sample, dpwm_load;
  logic [DUTY_W-1:0] pid_d;
  logic [PHASES-1:0] wave_hi, wave_lo;

  aux_clock_gen #(.CNT_W(CNT_W), .CKDPWM_LEAD(32)) u_aux (
    .clk, .rst_n, .count, .clk_adc, .ce_pid, .ck_dpwm, .adc_sample, .pid_sample,
    .dpwm_load
  );

  pid_controller #(
    .ERR_W(ERR_W), .S_W(S_W), .K_W(K_W), .K_FRAC(K_FRAC),
    .SHIFT_P(1), .SHIFT_I(6), .SHIFT_D(6), .DUTY_W(DUTY_W)
  ) u_pid (
    .clk, .rst_n, .en(pid_sample), .error(adc_error), .kp, .ki, .kd,
    .d(pid_d), .sat_int(pid_sat_int), .sat_hi(pid_sat_hi), .sat_lo(pid_sat_lo)
  );

  assign duty_now = (mode == MODE_CLOSED_LOOP) ? pid_d : duty_ol;

  dpwm #(.NPHASE(PHASES), .CNT_W(CNT_W), .DUTY_W(DUTY_W)) u_dpwm (
    .clk, .clk_ser, .rst_n, .duty(duty_now), .duty_load(dpwm_load), .sep,
    .pwm_hi(wave_hi), .pwm_lo(wave_lo), .count
  );

  assign pwm_hi = wave_hi ^ {PHASES{ACTIVE_LOW}};
  assign pwm_lo = wave_lo ^ {PHASES{ACTIVE_LOW}};

  adc_averager #(.NCH(NADC), .ADC_W(ADC_W), .AVG_LOG2(AVG_LOG2)) u_avg (
    .clk, .rst_n, .sample(adc_sample), .din(adc_meas), .avg(adc_avg),
    .valid(adc_avg_valid)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) load_sw <= '0;
    else        load_sw <= load_word;
  end
endmodule
