// pid_controller: discrete PID that turns the A/D error into a duty cycle.
//
//   S[n] = sat12(S[n-1] + E[n])
//   D[n] = KP*E[n] + KI*S[n] + KD*(E[n] - E[n-1])
//
// E is the 10-bit two's-complement error, S the integral saturated to
// [-2048, 2047]. The gains are 6-bit <sign><2 int>.<3 frac> words that hold
// the real gain multiplied by 2^SHIFT_P, 2^SHIFT_I and 2^SHIFT_D (1, 6, 6),
// so small gains keep their precision. Each product therefore has
// 3+SHIFT fraction bits: P is <12>.<4>, I <9>.<9>, D <7>.<9>. All three are
// aligned to 9 fraction bits, sign-extended to <12>.<9> and added into a
// <14>.<9> sum. The sum is a duty in units of one full period: negative
// gives D = 0, an integer part of 1 or more gives D = 1023, otherwise D is
// the 9 fraction bits with a 0 appended as the LSB.
// All of this follows the design. This implementation's choices: the error
// difference is saturated to the 10-bit range so the derivative product
// keeps its 16-bit size; the registers (S, E[n-1], D) update on a
// single-clock enable rather than on a separate clock; reset clears them.
//
// Timing: on a clock with en high, error is sampled and d holds D[n] from
// the next clock on. The sat_* outputs flag, for that same sample, whether
// the integral or the duty clamp saturated.
module pid_controller #(
  parameter int unsigned ERR_W   = 10,
  parameter int unsigned S_W     = 12,
  parameter int unsigned K_W     = 6,
  parameter int unsigned K_FRAC  = 3,
  parameter int unsigned SHIFT_P = 1,
  parameter int unsigned SHIFT_I = 6,
  parameter int unsigned SHIFT_D = 6,
  parameter int unsigned DUTY_W  = 10
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic signed [ERR_W-1:0] error,
  input  logic signed [K_W-1:0]   kp,
  input  logic signed [K_W-1:0]   ki,
  input  logic signed [K_W-1:0]   kd,
  output logic        [DUTY_W-1:0] d,
  output logic                    sat_int,
  output logic                    sat_hi,
  output logic                    sat_lo
);
  localparam int unsigned FRAC_P = K_FRAC + SHIFT_P;
  localparam int unsigned FRAC_I = K_FRAC + SHIFT_I;
  localparam int unsigned FRAC_D = K_FRAC + SHIFT_D;
  localparam int unsigned FRAC   = (FRAC_P > FRAC_I) ?
                                   ((FRAC_P > FRAC_D) ? FRAC_P : FRAC_D) :
                                   ((FRAC_I > FRAC_D) ? FRAC_I : FRAC_D);
  localparam int unsigned INT_W  = S_W;          // integer bits of each term
  localparam int unsigned TERM_W = INT_W + FRAC; // <12>.<9>
  localparam int unsigned SUM_W  = TERM_W + 2;   // <14>.<9>

  localparam logic signed [S_W:0]   S_MAX = (S_W+1)'((1 << (S_W-1)) - 1);
  localparam logic signed [S_W:0]   S_MIN = -(S_W+1)'(1 << (S_W-1));
  localparam logic signed [ERR_W:0] E_MAX = (ERR_W+1)'((1 << (ERR_W-1)) - 1);
  localparam logic signed [ERR_W:0] E_MIN = -(ERR_W+1)'(1 << (ERR_W-1));

  logic signed [S_W-1:0]   s_q;
  logic signed [ERR_W-1:0] e_q;

  // integral term
  logic signed [S_W:0]     s_wide;
  logic signed [S_W-1:0]   s_next;
  logic                    s_clip;
  // derivative difference
  logic signed [ERR_W:0]   de_wide;
  logic signed [ERR_W-1:0] de;
  // products
  logic signed [ERR_W+K_W-1:0] p_prod, d_prod;
  logic signed [S_W+K_W-1:0]   i_prod;
  // aligned terms and sum
  logic signed [SUM_W-1:0] p_al, i_al, d_al, sum;
  logic        [DUTY_W-1:0] d_next;
  logic                     hi, lo;

  always_comb begin
    s_wide = (S_W+1)'(s_q) + (S_W+1)'(error);
    s_clip = 1'b0;
    if (s_wide > S_MAX)      begin s_next = S_MAX[S_W-1:0]; s_clip = 1'b1; end
    else if (s_wide < S_MIN) begin s_next = S_MIN[S_W-1:0]; s_clip = 1'b1; end
    else                           s_next = s_wide[S_W-1:0];

    de_wide = (ERR_W+1)'(error) - (ERR_W+1)'(e_q);
    if (de_wide > E_MAX)      de = E_MAX[ERR_W-1:0];
    else if (de_wide < E_MIN) de = E_MIN[ERR_W-1:0];
    else                      de = de_wide[ERR_W-1:0];

    p_prod = error  * kp;
    i_prod = s_next * ki;
    d_prod = de     * kd;

    p_al = SUM_W'(p_prod) <<< (FRAC - FRAC_P);
    i_al = SUM_W'(i_prod) <<< (FRAC - FRAC_I);
    d_al = SUM_W'(d_prod) <<< (FRAC - FRAC_D);
    sum  = p_al + i_al + d_al;

    lo = sum[SUM_W-1];
    hi = !lo && (sum[SUM_W-1:FRAC] != '0);
    if (lo)      d_next = '0;
    else if (hi) d_next = '1;
    else         d_next = DUTY_W'({sum[FRAC-1:0], 1'b0});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_q     <= '0;
      e_q     <= '0;
      d       <= '0;
      sat_int <= 1'b0;
      sat_hi  <= 1'b0;
      sat_lo  <= 1'b0;
    end else if (en) begin
      s_q     <= s_next;
      e_q     <= error;
      d       <= d_next;
      sat_int <= s_clip;
      sat_hi  <= hi;
      sat_lo  <= lo;
    end
  end
endmodule
