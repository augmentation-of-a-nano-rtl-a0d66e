// tb_po_mppt: self-checking test of the perturb-and-observe tracker.
//
// Two trackers run side by side, updating every 4 frames: one with the full
// duty range, one with narrow limits (8..12) so refused steps happen. The
// testbench keeps its own model of the decision table (dP, dI same sign ->
// +1, opposite -> -1, either zero -> hold, no step onto a limit, default
// duty while disabled) and compares the duty after every frame. Stimulus:
//   1. disabled: duty must stay at the default 10;
//   2. enabled on a synthetic solar array whose current rises with duty and
//      whose voltage falls as duty^2, so power peaks at duty 60; the duty must
//      climb from 10 and then dither within +/-2 of 60;
//   3. random voltages and currents, with random enable.
// It also checks that update pulses come exactly every 4th frame.
module tb_po_mppt;
  import eps_pkg::*;

  localparam int N = 4;

  logic      clk = 1'b0, rst_n = 1'b0;
  logic      sample_valid = 1'b0, enable = 1'b0;
  adc_code_t v_in = '0, i_in = '0;
  duty_t     duty_a, duty_b;
  logic      upd_a, up_a, dn_a, upd_b, up_b, dn_b;
  int        checks = 0, failures = 0;

  po_mppt #(.UPDATE_FRAMES(N)) dut_a (
    .clk, .rst_n, .sample_valid, .enable, .v_in, .i_in,
    .duty(duty_a), .update(upd_a), .step_up(up_a), .step_down(dn_a));

  po_mppt #(.UPDATE_FRAMES(N), .DUTY_MIN(8), .DUTY_MAX(12)) dut_b (
    .clk, .rst_n, .sample_valid, .enable, .v_in, .i_in,
    .duty(duty_b), .update(upd_b), .step_up(up_b), .step_down(dn_b));

  always #5ns clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // Reference model state.
  typedef struct {
    int d, pold, iold, cnt, lo, hi;
  } ref_t;
  ref_t ra, rb;
  int   updates_seen = 0, frames = 0, ups = 0, downs = 0, refused_b = 0;

  function automatic void ref_step(ref ref_t r, input int v, input int i, input bit en);
    int p, nd;
    r.cnt++;
    if (r.cnt < N) return;
    r.cnt = 0;
    p = v * i;
    if (!en) r.d = 10;
    else if (p != r.pold && i != r.iold) begin
      nd = ((p > r.pold) == (i > r.iold)) ? r.d + 1 : r.d - 1;
      if (nd < r.hi && nd > r.lo) r.d = nd;
    end
    r.pold = p;
    r.iold = i;
  endfunction

  // Synthetic array: I = 40*D codes, V = 600 - D^2/18 codes, peak at D = 60.
  function automatic int pv_i(input int d); return 40 * d; endfunction
  function automatic int pv_v(input int d); return 600 - (d * d) / 18; endfunction

  task automatic frame(input int v, input int i, input bit en);
    @(negedge clk);
    v_in = adc_code_t'(v);
    i_in = adc_code_t'(i);
    enable = en;
    sample_valid = 1'b1;
    @(negedge clk);
    sample_valid = 1'b0;
    frames++;
    ref_step(ra, v, i, en);
    ref_step(rb, v, i, en);
    if (upd_a) updates_seen++;
    if (up_a) ups++;
    if (dn_a) downs++;
    check(int'(duty_a) == ra.d, $sformatf("frame %0d: duty_a %0d, model %0d", frames, duty_a, ra.d));
    check(int'(duty_b) == rb.d, $sformatf("frame %0d: duty_b %0d, model %0d", frames, duty_b, rb.d));
    repeat (2) @(negedge clk);
  endtask

  initial begin
    int maxdev;
    ra = '{d: 10, pold: 0, iold: 0, cnt: 0, lo: 0, hi: 127};
    rb = '{d: 10, pold: 0, iold: 0, cnt: 0, lo: 8, hi: 12};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // 1. Disabled.
    for (int k = 0; k < 40; k++) frame(int'($urandom_range(0, 4095)), int'($urandom_range(0, 4095)), 1'b0);
    check(duty_a == 7'd10, "disabled tracker left the default duty");

    // 2. Tracking on the synthetic array (one update per N frames).
    for (int k = 0; k < 120 * N; k++) frame(pv_v(int'(duty_a)), pv_i(int'(duty_a)), 1'b1);
    maxdev = 0;
    for (int k = 0; k < 40 * N; k++) begin
      frame(pv_v(int'(duty_a)), pv_i(int'(duty_a)), 1'b1);
      if ((int'(duty_a) - 60) > maxdev) maxdev = int'(duty_a) - 60;
      if ((60 - int'(duty_a)) > maxdev) maxdev = 60 - int'(duty_a);
    end
    check(maxdev <= 2, $sformatf("tracker dithers %0d LSB away from the peak at 60", maxdev));
    check(updates_seen == (120 + 40) * N / N, $sformatf("%0d updates while enabled, expected 160", updates_seen));

    // 3. Random measurements and enables.
    for (int k = 0; k < 4000; k++)
      frame(int'($urandom_range(0, 4095)), int'($urandom_range(0, 4095)), ($urandom_range(0, 9) != 0));

    check(ups > 0 && downs > 0, $sformatf("steps up %0d, down %0d: both directions must occur", ups, downs));
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
