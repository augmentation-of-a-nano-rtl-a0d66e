// tb_eps_top: end-to-end test of the EPS controller at its default settings.
//
// The fabric runs at 30 MHz with every parameter at its default. The
// testbench stands in for the analogue side: every 1412 clocks (47.067 us, one
// sample sequence) it presents a frame worked out from the controller's own
// outputs:
//   solar array + MPPT stage  current = k x D codes, voltage = 600 - D^2 / c
//                             codes, so power peaks at D = sqrt(200 c):
//                             bright sun k = 40, c = 18 (peak at D = 60),
//                             dim sun k = 15, c = 8 (peak at D = 40),
//                             eclipse: no current;
//   5 V boost   Vout = 560 x 128 / (128 - (D + 1)) - 3 codes (4.2 V input);
//   3.3 V buck  Vout = 560 x (D + 1) / 128 - 2 codes;
//   battery     voltage set by the test phase;
//   charger     CHRG strongly pulled down while enabled and below 4.2 V,
//               weakly when powered but idle, released in eclipse.
// Phases: charge start in bright sun and tracking to the peak; a drop to dim
// sun and tracking to the new peak (both within the 347 ms worst case the
// hardware showed); the MPPT switch turned off and on; a short on the 5 V bus
// (regulator clamps, then recovers); battery full at 4.2 V (charge stops,
// default duty); 4.1 V (no restart); eclipse at 4.0 V (no start, charger in
// lockout); sun back (restart). Throughout it decodes the 9600-baud line and
// checks the telemetry line sent after one second against the frame it was
// built from. Every mechanism is counted and must occur at least once.
module tb_eps_top;
  import eps_pkg::*;

  localparam int FRAME   = 1412;       // clocks per sample sequence
  localparam int UPDATE  = 85;         // frames per tracking update
  localparam int BIT_CLK = 3125;       // clocks per UART bit

  logic        clk = 1'b0, rst_n = 1'b0;
  adc_frame_t  adc;
  logic        adc_valid = 1'b0, mppt_switch = 1'b1, chrg_in;
  logic        pwm_out, pwm_5v_out, pwm_3_3v_out, chg_en, chrg_out, chrg_oe;
  logic        charge, mppt_active, uart_txd;
  duty_t       duty_mppt, duty_5v, duty_3v3;
  chg_status_e chg_status;
  eps_events_t events;

  eps_top dut (
    .clk, .rst_n, .adc, .adc_valid, .mppt_switch, .chrg_in,
    .rtc_date_bcd(32'h12042013), .rtc_time_bcd(24'h145943),
    .pwm_out, .pwm_5v_out, .pwm_3_3v_out, .chg_en, .chrg_out, .chrg_oe,
    .charge, .mppt_active, .duty_mppt, .duty_5v, .duty_3v3, .chg_status,
    .uart_txd, .events);

  always #16.667ns clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // ---------------- plant -------------------------------------------------
  typedef enum {SUN_BRIGHT, SUN_DIM, ECLIPSE} sun_e;
  sun_e sun = SUN_BRIGHT;
  int   bat_mv = 4000;
  bit   short_5v = 1'b0;
  longint clocks = 0, frames = 0;

  function automatic int pv_k();  return sun == SUN_BRIGHT ? 40 : sun == SUN_DIM ? 15 : 0; endfunction
  function automatic int pv_i(input int d); return pv_k() * d; endfunction
  function automatic int pv_v(input int d);
    int v = (sun == SUN_BRIGHT) ? 600 - (d * d) / 18 : (sun == SUN_DIM) ? 600 - (d * d) / 8 : 600;
    return v < 0 ? 0 : v;
  endfunction

  always @(posedge clk) clocks++;

  initial begin
    adc = '0;
    forever begin
      repeat (FRAME - 1) @(negedge clk);
      adc.solar_v = adc_code_t'(pv_v(int'(duty_mppt)));
      adc.mppt_i  = adc_code_t'(pv_i(int'(duty_mppt)));
      adc.bat_v   = adc_code_t'((bat_mv * 2 + 7) / 15);
      adc.bat_i   = '0;
      adc.bus5_v  = short_5v ? '0 : adc_code_t'((560 * 128) / (128 - (int'(duty_5v) + 1)) - 3);
      adc.bus33_v = adc_code_t'((560 * (int'(duty_3v3) + 1)) / 128 - 2);
      adc_valid = 1'b1;
      @(negedge clk);
      adc_valid = 1'b0;
      frames++;
    end
  end

  // CHRG node through the 800k / 2k network.
  always_comb begin
    if (sun == ECLIPSE)                 chrg_in = 1'b1;                  // lockout
    else if (chg_en && bat_mv < 4200)   chrg_in = 1'b0;                  // charging
    else                                chrg_in = chrg_oe && chrg_out;   // standby
  end

  // ---------------- mechanism counters ------------------------------------
  int n_start = 0, n_stop = 0, n_up = 0, n_down = 0, n_clamp5 = 0, n_clamp33 = 0;
  int n_probe_chg = 0, n_probe_stby = 0, n_probe_off = 0, n_lines = 0, n_mode_off = 0;
  always @(posedge clk) begin
    if (events.charge_start) n_start++;
    if (events.charge_stop)  n_stop++;
    if (events.mppt_up)      n_up++;
    if (events.mppt_down)    n_down++;
    if (events.clamp_5v)     n_clamp5++;
    if (events.clamp_3v3)    n_clamp33++;
    if (events.telem_line)   n_lines++;
    if (events.chrg_probe) begin
      // status is registered with the pulse; read it in the next clock
      fork begin
        @(posedge clk);
        case (chg_status)
          CHG_CHARGING: n_probe_chg++;
          CHG_STANDBY:  n_probe_stby++;
          CHG_SHUTDOWN: n_probe_off++;
          default: ;
        endcase
      end join_none
    end
  end

  // ---------------- UART receiver and telemetry check ---------------------
  string  line = "", expect_line = "";
  int     lines_checked = 0;

  function automatic string volts(input int code);
    int cv = (code * 3 + 2) / 4;
    if (cv > 999) cv = 999;
    return $sformatf("%0d.%02d", cv / 100, cv % 100);
  endfunction
  function automatic string milli(input longint m);
    if (m > 9999) m = 9999;
    return $sformatf("%0d.%03d", m / 1000, m % 1000);
  endfunction

  initial begin
    byte unsigned b;
    forever begin
      @(negedge uart_txd);
      if (line.len() == 0) begin
        // the snapshot was taken one clock before the first start bit
        expect_line = {"12042013:145943:", volts(int'(adc.bat_v)), ":", charge ? "1" : "0", ":",
                       volts(int'(adc.solar_v)), ":", milli((longint'(adc.mppt_i) + 2) / 4), ":",
                       milli((longint'(adc.solar_v) * longint'(adc.mppt_i) * 15 + 4000) / 8000), ":",
                       volts(int'(adc.bus33_v)), ":", volts(int'(adc.bus5_v)), "\r\n"};
      end
      repeat (BIT_CLK / 2) @(posedge clk);
      check(uart_txd == 1'b0, "UART start bit");
      for (int i = 0; i < 8; i++) begin
        repeat (BIT_CLK) @(posedge clk);
        b[i] = uart_txd;
      end
      repeat (BIT_CLK) @(posedge clk);
      check(uart_txd == 1'b1, "UART stop bit");
      line = {line, string'(b)};
      if (b == 8'h0A) begin
        check(line == expect_line, $sformatf("telemetry line\n  got %s  exp %s", line, expect_line));
        check(line.len() == 51, "telemetry line length");
        $display("telemetry: %s", line.substr(0, line.len() - 3));
        lines_checked++;
        line = "";
      end
    end
  end

  // ---------------- helpers ------------------------------------------------
  task automatic wait_frames(input int n);
    longint f0 = frames;
    while (frames < f0 + n) @(posedge clk);
  endtask

  // Frames until the tracking duty stays within 2 of target for 20 updates.
  task automatic track_to(input int target, input int max_frames, output int took);
    longint f0 = frames;
    int stable = 0;
    took = -1;
    while (frames < f0 + max_frames) begin
      @(posedge clk);
      if (events.mppt_update) begin
        if (int'(duty_mppt) >= target - 2 && int'(duty_mppt) <= target + 2) begin
          if (stable == 0) took = int'(frames - f0);
          stable++;
          if (stable == 20) break;
        end else begin
          stable = 0;
          took = -1;
        end
      end
    end
    if (stable < 20) took = -1;
  endtask

  function automatic real frames_ms(input int f); return real'(f) * FRAME / 30.0e3; endfunction

  // ---------------- phases --------------------------------------------------
  initial begin
    int took, highs;
    repeat (5) @(negedge clk);
    rst_n = 1'b1;

    // Bright sun, battery at 4.0 V: charging starts, tracking climbs to D = 60.
    wait_frames(3);
    check(charge && chg_en && mppt_active, "charge starts in sun below 4.05 V");
    track_to(60, 200 * UPDATE, took);
    check(took >= 0, "tracker reaches the bright-sun peak");
    $display("bright sun: peak reached after %0.1f ms", frames_ms(took));
    check(took >= 0 && frames_ms(took) < 347.0, "bright-sun tracking within 347 ms");
    check(chg_status == CHG_CHARGING, "CHRG reads charging");
    // PWM output against the duty: (D+1) high clocks in 128.
    @(negedge clk);
    highs = 0;
    repeat (128 * 4) begin
      @(negedge clk);
      if (pwm_out) highs++;
    end
    check(highs == 4 * (int'(duty_mppt) + 1),
          $sformatf("MPPT PWM: %0d high clocks in 4 periods for duty %0d", highs, duty_mppt));
    check(int'(duty_5v) >= 18 && int'(duty_5v) <= 22, $sformatf("5 V duty %0d near 0.16 x 127", duty_5v));
    check(int'(duty_3v3) >= 98 && int'(duty_3v3) <= 103, $sformatf("3.3 V duty %0d near 0.785 x 127", duty_3v3));
    check(int'(adc.bus5_v) >= 660 && int'(adc.bus5_v) <= 673, $sformatf("5 V bus %0d within 1 %%", adc.bus5_v));
    check(int'(adc.bus33_v) >= 434 && int'(adc.bus33_v) <= 446, $sformatf("3.3 V bus %0d within 1 %%", adc.bus33_v));

    // Dim sun: the peak moves to D = 40.
    sun = SUN_DIM;
    track_to(40, 200 * UPDATE, took);
    check(took >= 0, "tracker reaches the dim-sun peak");
    $display("dim sun: peak reached after %0.1f ms", frames_ms(took));
    check(took >= 0 && frames_ms(took) < 347.0, "dim-sun tracking within 347 ms");

    // MPPT switch off: default duty, back on: tracking resumes.
    mppt_switch = 1'b0;
    wait_frames(UPDATE + 2);
    check(!mppt_active && duty_mppt == permille_to_duty(76), "switch off: default duty");
    if (!mppt_active && duty_mppt == 7'd10) n_mode_off++;
    mppt_switch = 1'b1;
    sun = SUN_BRIGHT;
    wait_frames(UPDATE * 10);
    check(int'(duty_mppt) > 10, "switch on: tracking resumes");

    // Short on the 5 V bus: the regulator hits its limit, then recovers.
    short_5v = 1'b1;
    wait_frames(3);
    check(duty_5v == 7'd127 || int'(duty_5v) > 60, "shorted 5 V bus drives the duty up");
    short_5v = 1'b0;
    wait_frames(200);
    check(int'(adc.bus5_v) >= 660 && int'(adc.bus5_v) <= 673, $sformatf("5 V bus recovers to %0d", adc.bus5_v));

    // Battery full: charge stops, tracking stops, charger idles.
    bat_mv = 4200;
    wait_frames(2);
    check(!charge && !chg_en, "charge stops at 4.2 V");
    wait_frames(UPDATE + 2);
    check(duty_mppt == 7'd10, "tracking stopped: default duty");
    wait_frames(3);
    check(chg_status == CHG_STANDBY, "CHRG reads standby");

    // 4.1 V: no restart (hysteresis).
    bat_mv = 4100;
    wait_frames(UPDATE * 2);
    check(!charge, "no restart at 4.1 V");

    // Eclipse at 4.0 V: no current, no start; charger in lockout.
    sun = ECLIPSE;
    bat_mv = 4000;
    wait_frames(UPDATE * 2);
    check(!charge, "no charge start in eclipse");
    check(chg_status == CHG_SHUTDOWN, "CHRG reads lockout in eclipse");

    // Sun again: restart.
    sun = SUN_BRIGHT;
    wait_frames(3);
    check(charge, "charge restarts in sun below 4.05 V");

    // Wait for the telemetry line sent after one second.
    while (lines_checked < 1 && clocks < 36_000_000) @(posedge clk);
    check(lines_checked >= 1, "a telemetry line was received");

    // Every mechanism must have happened.
    check(n_start >= 2,       $sformatf("charge starts: %0d", n_start));
    check(n_stop >= 1,        $sformatf("charge stops: %0d", n_stop));
    check(n_up > 0,           $sformatf("tracker steps up: %0d", n_up));
    check(n_down > 0,         $sformatf("tracker steps down: %0d", n_down));
    check(n_mode_off > 0,     $sformatf("MPPT mode switch-offs: %0d", n_mode_off));
    check(n_clamp5 > 0,       $sformatf("5 V regulator clamps: %0d", n_clamp5));
    check(n_probe_chg > 0,    $sformatf("CHRG charging reads: %0d", n_probe_chg));
    check(n_probe_stby > 0,   $sformatf("CHRG standby reads: %0d", n_probe_stby));
    check(n_probe_off > 0,    $sformatf("CHRG lockout reads: %0d", n_probe_off));
    check(n_lines > 0,        $sformatf("telemetry lines: %0d", n_lines));
    $display("counts: start %0d stop %0d up %0d down %0d mode-off %0d clamp5 %0d clamp33 %0d chrg %0d/%0d/%0d lines %0d",
             n_start, n_stop, n_up, n_down, n_mode_off, n_clamp5, n_clamp33, n_probe_chg, n_probe_stby, n_probe_off, n_lines);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
