// tb_bus_regulator: self-checking test of the proportional bus controllers.
//
// Two regulators, set up as in the top (5 V: reference code 667, nominal duty
// 20; 3.3 V: reference 440, nominal 100), get
//   1. random bus voltages, compared with duty = clamp(nominal +
//      floor((ref - v) / 16)) worked out here, clamped pulse included;
//   2. a closed loop with ideal converter models from a 4.2 V (code 560)
//      input, boost Vout = Vin*128/(128-(D+1)), buck Vout = Vin*(D+1)/128,
//      minus a load drop; after settling each bus must stay within 1 % of its
//      nominal voltage, the band the hardware held (4.95..5.05 V and
//      3.25..3.35 V, codes 660..673 and 434..446).
module tb_bus_regulator;
  import eps_pkg::*;

  logic      clk = 1'b0, rst_n = 1'b0, sample_valid = 1'b0;
  adc_code_t v5 = '0, v33 = '0;
  duty_t     d5, d33;
  logic      c5, c33;
  int        checks = 0, failures = 0, clamps = 0;

  bus_regulator #(.VREF(12'd667), .DUTY_NOM(7'd20))  dut5  (.clk, .rst_n, .sample_valid, .v_bus(v5),  .duty(d5),  .clamped(c5));
  bus_regulator #(.VREF(12'd440), .DUTY_NOM(7'd100)) dut33 (.clk, .rst_n, .sample_valid, .v_bus(v33), .duty(d33), .clamped(c33));

  always #5ns clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic int floor_div16(input int x);
    return (x >= 0) ? x / 16 : -((-x + 15) / 16);
  endfunction

  function automatic int model(input int vref, input int nom, input int v, output bit clamp);
    int t = nom + floor_div16(vref - v);
    clamp = (t < 0) || (t > 127);
    return (t < 0) ? 0 : (t > 127) ? 127 : t;
  endfunction

  task automatic frame(input int a, input int b);
    @(negedge clk);
    v5 = adc_code_t'(a);
    v33 = adc_code_t'(b);
    sample_valid = 1'b1;
    @(negedge clk);
    sample_valid = 1'b0;
  endtask

  initial begin
    int e5, e33, drop, v;
    bit k5, k33;
    repeat (3) @(negedge clk);
    check(d5 == 7'd20 && d33 == 7'd100, "reset duty is the nominal duty");
    rst_n = 1'b1;

    // 1. Random bus voltages.
    for (int k = 0; k < 3000; k++) begin
      int a, b;
      a = (k % 10 == 0) ? int'($urandom_range(0, 4095)) : int'($urandom_range(600, 740));
      b = (k % 10 == 0) ? int'($urandom_range(0, 4095)) : int'($urandom_range(380, 500));
      frame(a, b);
      e5  = model(667, 20, a, k5);
      e33 = model(440, 100, b, k33);
      check(int'(d5) == e5, $sformatf("5 V: v=%0d duty %0d, expected %0d", a, d5, e5));
      check(int'(d33) == e33, $sformatf("3.3 V: v=%0d duty %0d, expected %0d", b, d33, e33));
      check(c5 == k5 && c33 == k33, "clamped pulse");
      if (c5 || c33) clamps++;
    end
    check(clamps > 0, "limits were reached");

    // 2. Closed loop, several load drops.
    for (int step = 0; step < 4; step++) begin
      int lo5 = 667, hi5 = 667, lo33 = 440, hi33 = 440;
      drop = step * 2;
      for (int k = 0; k < 200; k++) begin
        int a, b;
        a = (560 * 128) / (128 - (int'(d5) + 1)) - drop;
        b = (560 * (int'(d33) + 1)) / 128 - drop;
        if (k >= 100) begin
          if (a < lo5) lo5 = a;
          if (a > hi5) hi5 = a;
          if (b < lo33) lo33 = b;
          if (b > hi33) hi33 = b;
        end
        frame(a, b);
      end
      // 1 % of 5 V = 50 mV = 6.7 codes; 1 % of 3.3 V = 33 mV = 4.4 codes.
      check(lo5 >= 660 && hi5 <= 673, $sformatf("5 V bus drop %0d settles in %0d..%0d", drop, lo5, hi5));
      check(lo33 >= 434 && hi33 <= 446, $sformatf("3.3 V bus drop %0d settles in %0d..%0d", drop, lo33, hi33));
    end

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
