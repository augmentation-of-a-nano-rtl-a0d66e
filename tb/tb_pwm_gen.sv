// tb_pwm_gen: self-checking test of the 7-bit counter PWM.
//
// For the duty values 0, 32, 64, 95, 127 (0/25/50/75/100 % settings) and a
// set of random values it counts the high clocks over whole 128-clock
// periods and expects duty+1 of them; it checks that the output repeats
// every 128 clocks (234.4 kHz at 30 MHz) and that the first compare after
// reset is made against the reset count of 63.
module tb_pwm_gen;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [6:0] duty = '0;
  logic       pwm_o;
  int         checks = 0, failures = 0;

  pwm_gen dut (.clk, .rst_n, .duty, .pwm_o);

  always #16.667ns clk = ~clk;  // 30 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // High clocks seen over n whole periods, sampled between clock edges.
  task automatic count_high(input int periods, output int highs);
    highs = 0;
    repeat (periods * 128) begin
      @(negedge clk);
      if (pwm_o) highs++;
    end
  endtask

  task automatic do_reset(input logic [6:0] d);
    rst_n = 1'b0;
    duty  = d;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
  endtask

  initial begin
    int highs, first_rise, second_rise, t;
    logic prev;
    logic [6:0] v;
    // Reset phase: first compare is against count 63.
    do_reset(7'd63);
    @(negedge clk);
    check(pwm_o == 1'b1, "duty 63 against reset count 63 should be high");
    do_reset(7'd62);
    @(negedge clk);
    check(pwm_o == 1'b0, "duty 62 against reset count 63 should be low");

    for (int k = 0; k < 25; k++) begin
      case (k)
        0: v = 7'd0;   1: v = 7'd32;  2: v = 7'd64;  3: v = 7'd95;  4: v = 7'd127;
        5: v = 7'd20;  6: v = 7'd100;
        default: v = 7'($urandom_range(0, 127));
      endcase
      @(negedge clk);
      duty = v;
      repeat (256) @(negedge clk);  // let one full period pass with the new value
      count_high(2, highs);
      check(highs == 2 * (int'(v) + 1),
            $sformatf("duty %0d: %0d high clocks in 2 periods, expected %0d", v, highs, 2 * (int'(v) + 1)));
      if (v != 7'd127) begin
        // Period: spacing of two rising edges.
        first_rise = -1; second_rise = -1; t = 0; prev = pwm_o;
        while (second_rise < 0 && t < 400) begin
          @(negedge clk);
          t++;
          if (pwm_o && !prev) begin
            if (first_rise < 0) first_rise = t; else second_rise = t;
          end
          prev = pwm_o;
        end
        check(second_rise - first_rise == 128,
              $sformatf("duty %0d: period %0d clocks, expected 128", v, second_rise - first_rise));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
