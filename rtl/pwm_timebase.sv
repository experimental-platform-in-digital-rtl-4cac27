// pwm_timebase: the PWM counter and its phase-shifted copies.
//
// A free-running CNT_W-bit counter advances once per slot (5 ns at 200 MHz),
// so one wrap is one PWM period of 2^CNT_W slots (1.28 us). For a multiphase
// converter, NPHASE-1 further counters run a fixed fraction of a period
// behind it: count[p] equals count[0] - p*2^CNT_W/NPHASE, which for four
// phases gives the 90, 180 and 270 degree shifts. The shifted counters are
// registers loaded from the main counter's next value plus the offset, as
// the main counter drives the shifted ones; the subtraction (a lag, not a
// lead) is this implementation's choice.
//
// Interface: count[p] is the slot index seen by phase p; wrap[p] is high in
// the last slot of phase p's period (count[p] == all ones). Reset is
// asynchronous, active low, and starts count[0] at zero.
module pwm_timebase #(
  parameter int unsigned CNT_W  = 8,
  parameter int unsigned NPHASE = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic [CNT_W-1:0] count [NPHASE],
  output logic             wrap  [NPHASE]
);
  localparam logic [CNT_W-1:0] STEP = CNT_W'((1 << CNT_W) / NPHASE);

  logic [CNT_W-1:0] base_next;
  assign base_next = count[0] + 1'b1;

  for (genvar p = 0; p < NPHASE; p++) begin : g_phase
    localparam logic [CNT_W-1:0] OFFS = CNT_W'(p * STEP);
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) count[p] <= '0 - OFFS;
      else        count[p] <= base_next - OFFS;
    end
    assign wrap[p] = &count[p];
  end
endmodule
