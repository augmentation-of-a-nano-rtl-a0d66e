// tb_chrg_status: self-checking test of the CHRG pin probe.
//
// A model of the pin network stands in for the board: the charger pulls the
// node down strongly while charging, weakly (about 20 uA, 16 V across the
// 800 k pull-up, so low when released but high once the 2 k drive is on) when
// idle, and not at all in lockout. The test holds each charger state for
// several probes and checks that the decoded status follows, that status is
// CHG_UNKNOWN until the first probe ends, that the drive is enabled half of
// the time in blocks of SETTLE_CYCLES and that status_valid comes every
// 2 x SETTLE_CYCLES clocks.
module tb_chrg_status;
  import eps_pkg::*;

  localparam int S = 16;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        chrg_out, chrg_oe, status_valid;
  chg_status_e status;
  chg_status_e charger = CHG_CHARGING;   // the state the model charger is in
  logic        chrg_in;
  int          checks = 0, failures = 0;

  chrg_status #(.SETTLE_CYCLES(S)) dut (.clk, .rst_n, .chrg_in, .chrg_out, .chrg_oe, .status, .status_valid);

  always #5ns clk = ~clk;

  // Node level: the 2 k drive beats the weak pull-down but not the strong one.
  always_comb begin
    if (charger == CHG_CHARGING)     chrg_in = 1'b0;
    else if (charger == CHG_STANDBY) chrg_in = chrg_oe && chrg_out;
    else                             chrg_in = 1'b1;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  int oe_clocks = 0, clocks = 0, last_valid = -1, valids = 0;

  always @(posedge clk) if (rst_n) begin
    clocks++;
    if (chrg_oe) oe_clocks++;
    check(!chrg_oe || chrg_out, "drive is high whenever enabled");
    if (status_valid) begin
      if (last_valid >= 0) check(clocks - last_valid == 2 * S, $sformatf("probe interval %0d", clocks - last_valid));
      last_valid = clocks;
      valids++;
    end
  end

  initial begin
    chg_status_e seq [6] = '{CHG_CHARGING, CHG_STANDBY, CHG_SHUTDOWN, CHG_STANDBY, CHG_CHARGING, CHG_SHUTDOWN};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(status == CHG_UNKNOWN, "unknown before the first probe");
    for (int r = 0; r < 3; r++)
      foreach (seq[k]) begin
        // change the charger right after a probe, then let two probes pass
        @(posedge clk iff status_valid);
        @(negedge clk);
        charger = seq[k];
        @(posedge clk iff status_valid);
        @(posedge clk iff status_valid);
        @(negedge clk);
        check(status == seq[k], $sformatf("charger %s read as %s", seq[k].name(), status.name()));
      end
    check(oe_clocks * 2 >= clocks - 2 && oe_clocks * 2 <= clocks + 2 * S,
          $sformatf("drive enabled %0d of %0d clocks", oe_clocks, clocks));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
