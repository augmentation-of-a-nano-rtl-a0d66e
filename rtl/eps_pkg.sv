// eps_pkg: types, scalings and helpers shared by the EPS controller fabric.
//
// The analogue front end delivers one frame of six 12-bit codes per sample
// sequence. Current codes come from the current monitors across 50 mOhm sense
// resistors at 250 uA per LSB, so the 12-bit range ends at 4095 x 250 uA =
// 1.02375 A, the measuring range the current monitors are set up for.
// Voltage codes come from the bipolar prescalers set to their +/-15 V range;
// this design reads them as unsigned codes of 7.5 mV per LSB (30.72 V / 4096),
// negative readings clamped to zero by the analogue side. That scaling is this
// design's own reading of the prescaler, not a number given with the design.
//
// PWM values are 7 bits wide because seven MSS GPIOs fed the PWM modules.
package eps_pkg;

  localparam int unsigned ADC_W       = 12;
  localparam int unsigned DUTY_W      = 7;
  localparam int unsigned VOLT_LSB_UV = 7500;  // microvolts per voltage code
  localparam int unsigned CURR_LSB_UA = 250;   // microamps per current code

  typedef logic [ADC_W-1:0]  adc_code_t;
  typedef logic [DUTY_W-1:0] duty_t;

  // One complete sample sequence of the analogue front end.
  typedef struct packed {
    adc_code_t solar_v;  // solar array voltage (prescaler)
    adc_code_t mppt_i;   // MPPT converter output current (current monitor 3)
    adc_code_t bat_v;    // battery voltage (prescaler)
    adc_code_t bat_i;    // battery charge/discharge current (current monitor 2)
    adc_code_t bus33_v;  // 3.3 V distribution bus (prescaler)
    adc_code_t bus5_v;   // 5 V distribution bus (prescaler)
  } adc_frame_t;

  // State of the LTC4054 charger as read from its CHRG pin.
  typedef enum logic [1:0] {
    CHG_UNKNOWN  = 2'd0,  // no probe finished since reset
    CHG_CHARGING = 2'd1,  // strong pull-down: charge cycle running
    CHG_STANDBY  = 2'd2,  // weak pull-down: powered, not charging
    CHG_SHUTDOWN = 2'd3   // high impedance: input under-voltage lockout
  } chg_status_e;

  // One-clock pulses marking what the controllers did, for monitoring.
  typedef struct packed {
    logic charge_start;  // Charge went 0 -> 1
    logic charge_stop;   // Charge went 1 -> 0
    logic mppt_update;   // a tracking update ran
    logic mppt_up;       // tracker raised the duty
    logic mppt_down;     // tracker lowered the duty
    logic clamp_5v;      // 5 V regulator hit a duty limit
    logic clamp_3v3;     // 3.3 V regulator hit a duty limit
    logic chrg_probe;    // charger status refreshed
    logic telem_line;    // a telemetry line was sent
  } eps_events_t;

  // Nearest voltage code for a value in millivolts.
  function automatic adc_code_t mv_to_vcode(input int unsigned mv);
    return adc_code_t'((mv * 1000 + VOLT_LSB_UV / 2) / VOLT_LSB_UV);
  endfunction

  // Nearest duty value for a duty cycle given in tenths of a percent,
  // scaled to 2^DUTY_W - 1 the way the GPIO values were worked out.
  function automatic duty_t permille_to_duty(input int unsigned permille);
    return duty_t'((permille * ((1 << DUTY_W) - 1) + 500) / 1000);
  endfunction

  // Binary (0..9999) to four BCD digits by shift-and-add-3.
  function automatic logic [15:0] bin_to_bcd4(input logic [13:0] bin);
    logic [15:0] bcd;
    bcd = '0;
    for (int i = 13; i >= 0; i--) begin
      for (int d = 0; d < 4; d++)
        if (bcd[4*d +: 4] > 4'd4) bcd[4*d +: 4] = bcd[4*d +: 4] + 4'd3;
      bcd = {bcd[14:0], bin[i]};
    end
    return bcd;
  endfunction

endpackage
