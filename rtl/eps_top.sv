// eps_top: FPGA-fabric controller of a 1-U CubeSat electronic power system.
//
// The power system has a 1s3p solar array feeding a boost converter (the MPPT
// stage) up to the 4.2 V battery node, an LTC4054 CC-CV charger for a single
// Li-ion cell, and two distribution converters: a boost to 5 V and a buck to
// 3.3 V. The FPGA measures voltages and currents through its analogue front
// end and drives the three converter gates and the charger enable. This top
// holds all of that control in fabric logic:
//
//   charge_ctrl    Charge = 1 when the array delivers current and the battery
//                  is below 4.05 V; Charge = 0 when it reaches 4.2 V.
//   po_mppt        perturb-and-observe tracking of the array's maximum power
//                  point while Charge = 1 and the MPPT switch is on; otherwise
//                  the default duty for 3.88 V -> 4.2 V.
//   bus_regulator  x2, proportional control of the 5 V and 3.3 V buses.
//   pwm_gen        x3, 7-bit PWMs at clk/128 (234 kHz at 30 MHz).
//   chrg_status    reads the charger's CHRG pin through the 800k/2k network.
//   telemetry_fmt + uart_tx  one ASCII housekeeping line per second, 9600 8N1.
//
// Interface: clk is the 30 MHz fabric clock, rst_n an asynchronous active-low
// reset. adc carries one frame of the analogue front end (see eps_pkg for the
// code scaling) and adc_valid pulses for one clock when a new frame is there,
// every 47.067 us with the sample sequence of the original design. mppt_switch
// is the MPPT mode switch the microcontroller drove on its GPIO 7. The
// controllers act one clock after adc_valid; the PWM outputs follow their duty
// one clock later within the running 128-clock period. events carries
// one-clock pulses of what the controllers did (eps_pkg::eps_events_t). The
// battery current in the frame is measured but not used by any controller.
//
// What the original design did in microcontroller firmware (the tracker, the
// charge decision and the telemetry) is done here in logic; the converters,
// charger, analogue front end and clock generator stay outside.
module eps_top
  import eps_pkg::*;
#(
  parameter int unsigned CLK_HZ              = 30_000_000,
  parameter int unsigned MPPT_UPDATE_FRAMES  = 85,
  parameter duty_t       MPPT_DUTY_DEFAULT   = permille_to_duty(76),
  parameter duty_t       BUS5_DUTY_NOM       = permille_to_duty(160),
  parameter duty_t       BUS33_DUTY_NOM      = permille_to_duty(785),
  parameter int unsigned CHRG_SETTLE_CYCLES  = 1024,
  parameter int unsigned TELEM_PERIOD_CYCLES = 30_000_000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  adc_frame_t  adc,
  input  logic        adc_valid,
  input  logic        mppt_switch,
  input  logic        chrg_in,
  input  logic [31:0] rtc_date_bcd,
  input  logic [23:0] rtc_time_bcd,
  output logic        pwm_out,
  output logic        pwm_5v_out,
  output logic        pwm_3_3v_out,
  output logic        chg_en,
  output logic        chrg_out,
  output logic        chrg_oe,
  output logic        charge,
  output logic        mppt_active,
  output duty_t       duty_mppt,
  output duty_t       duty_5v,
  output duty_t       duty_3v3,
  output chg_status_e chg_status,
  output logic        uart_txd,
  output eps_events_t events
);

  logic       chg_start, chg_stop;
  logic       mppt_update, mppt_up, mppt_down;
  logic       clamp_5v, clamp_3v3;
  logic       chrg_status_valid;
  logic       tx_valid, tx_ready, frame_done;
  logic [7:0] tx_data;

  charge_ctrl #(
    .V_START (mv_to_vcode(4050)),
    .V_STOP  (mv_to_vcode(4200)),
    .I_MIN   ('0)
  ) u_charge (
    .clk, .rst_n,
    .sample_valid (adc_valid),
    .solar_i      (adc.mppt_i),
    .bat_v        (adc.bat_v),
    .charge       (charge),
    .start        (chg_start),
    .stop         (chg_stop)
  );

  assign chg_en      = charge;

  assign events = '{charge_start: chg_start, charge_stop: chg_stop,
                    mppt_update: mppt_update, mppt_up: mppt_up, mppt_down: mppt_down,
                    clamp_5v: clamp_5v, clamp_3v3: clamp_3v3,
                    chrg_probe: chrg_status_valid, telem_line: frame_done};
  assign mppt_active = charge && mppt_switch;

  po_mppt #(
    .UPDATE_FRAMES (MPPT_UPDATE_FRAMES),
    .DUTY_INIT     (MPPT_DUTY_DEFAULT)
  ) u_mppt (
    .clk, .rst_n,
    .sample_valid (adc_valid),
    .enable       (mppt_active),
    .v_in         (adc.solar_v),
    .i_in         (adc.mppt_i),
    .duty         (duty_mppt),
    .update       (mppt_update),
    .step_up      (mppt_up),
    .step_down    (mppt_down)
  );

  bus_regulator #(
    .VREF     (mv_to_vcode(5000)),
    .DUTY_NOM (BUS5_DUTY_NOM)
  ) u_reg_5v (
    .clk, .rst_n,
    .sample_valid (adc_valid),
    .v_bus        (adc.bus5_v),
    .duty         (duty_5v),
    .clamped      (clamp_5v)
  );

  bus_regulator #(
    .VREF     (mv_to_vcode(3300)),
    .DUTY_NOM (BUS33_DUTY_NOM)
  ) u_reg_3v3 (
    .clk, .rst_n,
    .sample_valid (adc_valid),
    .v_bus        (adc.bus33_v),
    .duty         (duty_3v3),
    .clamped      (clamp_3v3)
  );

  pwm_gen #(.WIDTH(DUTY_W)) u_pwm_mppt (.clk, .rst_n, .duty(duty_mppt), .pwm_o(pwm_out));
  pwm_gen #(.WIDTH(DUTY_W)) u_pwm_5v   (.clk, .rst_n, .duty(duty_5v),   .pwm_o(pwm_5v_out));
  pwm_gen #(.WIDTH(DUTY_W)) u_pwm_3v3  (.clk, .rst_n, .duty(duty_3v3),  .pwm_o(pwm_3_3v_out));

  chrg_status #(
    .SETTLE_CYCLES (CHRG_SETTLE_CYCLES)
  ) u_chrg (
    .clk, .rst_n,
    .chrg_in,
    .chrg_out,
    .chrg_oe,
    .status       (chg_status),
    .status_valid (chrg_status_valid)
  );

  telemetry_fmt #(
    .PERIOD_CYCLES (TELEM_PERIOD_CYCLES)
  ) u_telem (
    .clk, .rst_n,
    .date_bcd   (rtc_date_bcd),
    .time_bcd   (rtc_time_bcd),
    .bat_v      (adc.bat_v),
    .charge     (charge),
    .solar_v    (adc.solar_v),
    .solar_i    (adc.mppt_i),
    .bus33_v    (adc.bus33_v),
    .bus5_v     (adc.bus5_v),
    .tx_valid,
    .tx_data,
    .tx_ready,
    .frame_done
  );

  uart_tx #(
    .CLK_HZ (CLK_HZ),
    .BAUD   (9600)
  ) u_uart (
    .clk, .rst_n,
    .valid (tx_valid),
    .data  (tx_data),
    .ready (tx_ready),
    .txd   (uart_txd)
  );

endmodule
