// tb_telemetry_fmt: self-checking test of the telemetry line builder.
//
// The formatter runs with a 3000-clock period and a consumer that takes bytes
// with random stalls. For each line the testbench builds the expected text
// itself from the codes, in real arithmetic (volts = code x 7.5 mV,
// amps = code x 250 uA, watts = V x I, rounded to the printed digits and
// saturated at 9.99 / 9.999), and compares it byte for byte. The first line
// uses measurements that come closest to the example line
// "12042013:145943:4.01:1:3.68:0.653:2.403:3.43:4.94" (power reads 2.405, as
// it is formed from the unrounded 3.6825 V, not the printed 3.68); the second
// reproduces a daylight reading of 4.18 V, 3.81 V, 667 mA, 2.541 W, 3.37 V and
// 5.03 V exactly; later lines use random
// codes, some large enough to saturate. It also checks the 51-byte length,
// the frame_done pulse, and that a line starts every period.
module tb_telemetry_fmt;
  import eps_pkg::*;

  localparam int PERIOD = 3000;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [31:0] date_bcd = 32'h12042013;
  logic [23:0] time_bcd = 24'h145943;
  adc_code_t   bat_v, solar_v, solar_i, bus33_v, bus5_v;
  logic        charge;
  logic        tx_valid, tx_ready = 1'b0, frame_done;
  logic [7:0]  tx_data;
  int          checks = 0, failures = 0;

  telemetry_fmt #(.PERIOD_CYCLES(PERIOD)) dut (
    .clk, .rst_n, .date_bcd, .time_bcd, .bat_v, .charge, .solar_v, .solar_i,
    .bus33_v, .bus5_v, .tx_valid, .tx_data, .tx_ready, .frame_done);

  always #5ns clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic string volts(input int code);
    int cv = int'($floor(real'(code) * 7.5 / 10.0 + 0.5));
    if (cv > 999) cv = 999;
    return $sformatf("%0d.%02d", cv / 100, cv % 100);
  endfunction

  function automatic string milli(input int m);
    if (m > 9999) m = 9999;
    return $sformatf("%0d.%03d", m / 1000, m % 1000);
  endfunction

  function automatic string expected_line();
    int ma = int'($floor(real'(solar_i) * 0.25 + 0.5));
    int mw = int'($floor(real'(solar_v) * 7.5e-3 * real'(solar_i) * 0.25 + 0.5));
    return {$sformatf("%08h:%06h:", date_bcd, time_bcd), volts(bat_v), ":", charge ? "1" : "0", ":",
            volts(solar_v), ":", milli(ma), ":", milli(mw), ":", volts(bus33_v), ":", volts(bus5_v),
            "\r\n"};
  endfunction

  // Random stalls on the consumer side; data must hold while not taken.
  always @(negedge clk) tx_ready <= ($urandom_range(0, 3) != 0);

  int     lines = 0, clocks = 0, first_byte_t = -1;
  string  got = "", exp = "";
  int     done_pulses = 0;

  always @(posedge clk) begin
    clocks++;
    if (frame_done) done_pulses++;
  end

  task automatic set_inputs(input int k);
    if (k == 0) begin
      // 4.01 V, 3.68 V, 0.653 A, 3.43 V, 4.94 V in codes of 7.5 mV / 250 uA
      bat_v = 12'd535; charge = 1'b1; solar_v = 12'd491; solar_i = 12'd2612;
      bus33_v = 12'd457; bus5_v = 12'd659;
    end else if (k == 1) begin
      // a daylight reading: 4.18 V, 3.81 V, 0.667 A (2.541 W), 3.37 V, 5.03 V
      bat_v = 12'd557; charge = 1'b1; solar_v = 12'd508; solar_i = 12'd2668;
      bus33_v = 12'd449; bus5_v = 12'd671;
    end else begin
      bat_v   = adc_code_t'($urandom_range(0, 1400));
      solar_v = adc_code_t'((k % 4 == 0) ? $urandom_range(0, 4095) : $urandom_range(400, 700));
      solar_i = adc_code_t'($urandom_range(0, 4095));
      bus33_v = adc_code_t'($urandom_range(0, 1400));
      bus5_v  = adc_code_t'($urandom_range(0, 1400));
      charge  = 1'($urandom);
      date_bcd = 32'h03102026;
      time_bcd = 24'($urandom_range(0, 9)) << 20 | 24'h5959;
    end
  endtask

  initial begin
    int start_t, prev_start;
    prev_start = -1;
    set_inputs(0);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 12; k++) begin
      // inputs are sampled when the line starts; hold them until then
      @(posedge clk iff tx_valid);
      start_t = clocks;
      if (prev_start >= 0) check(start_t - prev_start == PERIOD, $sformatf("line %0d starts %0d clocks after the last", k, start_t - prev_start));
      prev_start = start_t;
      exp = expected_line();
      if (k == 0) check(exp == "12042013:145943:4.01:1:3.68:0.653:2.405:3.43:4.94\r\n", "example line worked out");
      if (k == 1) check(exp == "12042013:145943:4.18:1:3.81:0.667:2.541:3.37:5.03\r\n", "daylight line worked out");
      got = "";
      set_inputs(k + 1);  // changing inputs mid-line must not disturb it
      while (got.len() < 51) begin
        if (tx_valid && tx_ready) got = {got, string'(tx_data)};
        @(posedge clk);
      end
      check(got == exp, $sformatf("line %0d:\n  got %s\n  exp %s", k, got, exp));
      @(negedge clk);
      check(!tx_valid, "line is 51 bytes");
      check(done_pulses == k + 1, "one frame_done per line");
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
