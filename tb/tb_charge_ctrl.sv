// tb_charge_ctrl: self-checking test of the 4.05 V / 4.2 V charge decision.
//
// Directed steps walk one charge cycle (start below 4.05 V in the sun, keep
// charging through an eclipse and up to 4.19 V, stop at 4.2 V, no restart
// at 4.1 V or without solar current), then random frames near the thresholds
// are compared with an independent model. Values change only on frames: the
// test also offers measurements without the valid strobe and expects no
// change, and checks the start/stop pulses.
module tb_charge_ctrl;
  import eps_pkg::*;

  logic      clk = 1'b0, rst_n = 1'b0, sample_valid = 1'b0;
  adc_code_t solar_i = '0, bat_v = '0;
  logic      charge, start, stop;
  int        checks = 0, failures = 0;
  bit        model = 1'b0;
  int        starts = 0, stops = 0;

  charge_ctrl dut (.clk, .rst_n, .sample_valid, .solar_i, .bat_v, .charge, .start, .stop);

  always #5ns clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // Voltage in millivolts to code, worked out here at 7.5 mV per code.
  function automatic adc_code_t mv(input int m); return adc_code_t'((m * 2 + 7) / 15); endfunction

  task automatic frame(input int i, input adc_code_t v, input bit strobe);
    bit was;
    @(negedge clk);
    solar_i = adc_code_t'(i);
    bat_v   = v;
    sample_valid = strobe;
    was = model;
    if (strobe) begin
      if (!model && i > 0 && int'(v) < 540) model = 1'b1;
      else if (model && int'(v) >= 560) model = 1'b0;
    end
    @(negedge clk);
    sample_valid = 1'b0;
    check(charge == model, $sformatf("i=%0d v=%0d strobe=%0d: charge %0d, model %0d", i, v, strobe, charge, model));
    check(start == (!was && model), "start pulse");
    check(stop == (was && !model), "stop pulse");
    if (start) starts++;
    if (stop) stops++;
    @(negedge clk);
    check(!start && !stop, "pulses last one clock");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    check(charge == 1'b0, "Charge is 0 in reset");
    rst_n = 1'b1;
    check(mv(4050) == 12'd540 && mv(4200) == 12'd560, "threshold codes");

    frame(0, mv(3900), 1'b1);    check(!charge, "no sun: no charge");
    frame(400, mv(4100), 1'b1);  check(!charge, "sun but battery above 4.05 V");
    frame(400, mv(4000), 1'b0);  check(!charge, "no change without a frame");
    frame(400, mv(4000), 1'b1);  check(charge, "sun and battery at 4.0 V: charge");
    frame(0, mv(4100), 1'b1);    check(charge, "eclipse during a cycle keeps charging");
    frame(400, mv(4190), 1'b1);  check(charge, "4.19 V keeps charging");
    frame(400, mv(4200), 1'b0);  check(charge, "4.2 V without a frame: no change");
    frame(400, mv(4200), 1'b1);  check(!charge, "4.2 V stops the cycle");
    frame(400, mv(4100), 1'b1);  check(!charge, "4.1 V: no restart");
    frame(1, mv(4040), 1'b1);    check(charge, "4.04 V with 1 LSB of current restarts");

    for (int k = 0; k < 3000; k++)
      frame($urandom_range(0, 3) == 0 ? 0 : int'($urandom_range(1, 4095)),
            adc_code_t'($urandom_range(520, 580)), $urandom_range(0, 3) != 0);

    check(starts > 10 && stops > 10, $sformatf("%0d starts, %0d stops", starts, stops));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
