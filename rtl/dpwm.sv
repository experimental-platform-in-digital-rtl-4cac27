// dpwm: four-phase digital PWM with 1.25 ns resolution and inverse waves.
//
// A 10-bit duty d drives every phase of a multiphase buck converter. Each
// phase p has its own slot counter, shifted by p quarter periods (90, 180,
// 270 degrees), and from it builds two waves:
//   pwm_hi[p]  the direct wave for the high-side switch: a coarse pulse of
//              d[9:2] slots (5 ns each) from the thickness comparator,
//              stretched by d[1:0] bits of 1.25 ns in the fine-adjust
//              serializer word; width d * 1.25 ns of a 1.28 us period.
//   pwm_lo[p]  the inverse wave for the low-side switch: high while the
//              direct coarse wave is low, shortened by 'sep' slots on each
//              side (dead time, 5 ns resolution).
// Both waves leave through 4:1 serializers so they have the same latency.
// The structure (counter, comparators, flip-flop and multiplexers,
// serializer, shifted counters) follows the design. This implementation's
// choices: a duty presented with duty_load is held in a pending register and
// each phase starts using it at its own next period start, so no phase ever
// sees a duty change in mid-period; sep is used as presented. The inverse
// wave must be kept clear of the fine-adjust slot by the user: with sep = 0
// and d[1:0] != 0 the two waves of a phase overlap by up to three bits.
//
// Clocks: clk is the 200 MHz slot clock, clk_ser the 800 MHz bit clock in
// phase with it. count is phase 0's slot counter for the auxiliary clocks.
module dpwm #(
  parameter int unsigned NPHASE = 4,
  parameter int unsigned CNT_W  = 8,
  parameter int unsigned DUTY_W = 10
) (
  input  logic              clk,
  input  logic              clk_ser,
  input  logic              rst_n,
  input  logic [DUTY_W-1:0] duty,
  input  logic              duty_load,
  input  logic [CNT_W-1:0]  sep,
  output logic [NPHASE-1:0] pwm_hi,
  output logic [NPHASE-1:0] pwm_lo,
  output logic [CNT_W-1:0]  count
);
  localparam int unsigned FINE_W = DUTY_W - CNT_W;
  localparam int unsigned SER_W  = 1 << FINE_W;

  logic [CNT_W-1:0]  cnt  [NPHASE];
  logic              wrap [NPHASE];
  logic [DUTY_W-1:0] pending;

  pwm_timebase #(.CNT_W(CNT_W), .NPHASE(NPHASE)) u_timebase (
    .clk, .rst_n, .count(cnt), .wrap
  );
  assign count = cnt[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         pending <= '0;
    else if (duty_load) pending <= duty;
  end

  for (genvar p = 0; p < NPHASE; p++) begin : g_ph
    logic [DUTY_W-1:0] active;
    logic              c1, c1_inv;
    logic [SER_W-1:0]  word_hi, word_lo;
    logic [FINE_W-1:0] fine_q;   // fine bits aligned with the registered c1

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        active <= '0;
        fine_q <= '0;
      end else begin
        if (wrap[p]) active <= pending;
        fine_q <= active[FINE_W-1:0];
      end
    end

    thick_comparator #(.CNT_W(CNT_W)) u_cmp (
      .clk, .rst_n, .count(cnt[p]), .valor(active[DUTY_W-1:FINE_W]), .c1
    );

    inverse_comparator #(.CNT_W(CNT_W)) u_inv (
      .clk, .rst_n, .count(cnt[p]), .valor(active[DUTY_W-1:FINE_W]),
      .sep, .c1_inv
    );

    fine_adjust #(.SER_W(SER_W), .FINE_W(FINE_W)) u_fine (
      .clk, .rst_n, .c1, .fine(fine_q), .word(word_hi)
    );

    // delay the inverse wave by the fine-adjust register so both align
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) word_lo <= '0;
      else        word_lo <= {SER_W{c1_inv}};
    end

    lvds_serializer #(.W(SER_W)) u_ser_hi (
      .clk, .clk_ser, .rst_n, .tx_in(word_hi), .tx_out(pwm_hi[p])
    );
    lvds_serializer #(.W(SER_W)) u_ser_lo (
      .clk, .clk_ser, .rst_n, .tx_in(word_lo), .tx_out(pwm_lo[p])
    );
  end
endmodule
