// dcdc_pkg: sizes and types shared by the DC-DC converter controller.
//
// One PWM period is 256 slots of 5 ns (1.28 us); a slot is split by a 4:1
// serializer into four 1.25 ns bits, giving a 10-bit duty cycle (8 coarse
// bits select the slot, 2 fine bits the bit inside it). The PID works on a
// 10-bit two's-complement error, a 12-bit saturated integral and 6-bit gains
// in the sign/2-integer/3-fraction format. These numbers follow the design;
// the type names are this implementation's own.
package dcdc_pkg;
  localparam int unsigned CNT_W  = 8;   // coarse counter: 256 slots per period
  localparam int unsigned DUTY_W = 10;  // duty word d[9:0]
  localparam int unsigned SER_W  = 4;   // bits per slot after serialization
  localparam int unsigned FINE_W = 2;   // duty LSBs resolved inside a slot
  localparam int unsigned NPHASE = 4;   // phases of the multiphase buck
  localparam int unsigned ERR_W  = 10;  // A/D error word
  localparam int unsigned ADC_W  = 10;  // A/D converter word
  localparam int unsigned NADC   = 4;   // A/D converters on the board
  localparam int unsigned S_W    = 12;  // integral accumulator
  localparam int unsigned K_W    = 6;   // PID gain: <sign><2 int>.<3 frac>
  localparam int unsigned K_FRAC = 3;
  localparam int unsigned LOAD_W = 8;   // dynamic load switch word

  typedef logic        [DUTY_W-1:0] duty_t;
  typedef logic signed [ERR_W-1:0]  err_t;
  typedef logic signed [K_W-1:0]    gain_t;

  typedef enum logic {
    MODE_OPEN_LOOP   = 1'b0,  // duty taken from the duty_ol port
    MODE_CLOSED_LOOP = 1'b1   // duty taken from the PID
  } loop_mode_t;
endpackage
