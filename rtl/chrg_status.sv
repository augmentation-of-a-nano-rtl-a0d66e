// chrg_status: reads the charger's CHRG status pin through two resistors.
//
// The LTC4054 CHRG pin is open drain with three states: a strong pull-down
// while a charge cycle runs, a weak (about 20 uA) pull-down when the charger is
// powered but idle, and high impedance in under-voltage lockout. The board ties
// the CHRG node to the supply through 800 kOhm and to an FPGA output through
// 2 kOhm, and feeds the node back to an FPGA input. This block probes in two
// phases of SETTLE_CYCLES each:
//   1. released (chrg_oe = 0): only the 800 k pull-up acts, so any pull-down,
//      weak or strong, reads low; high impedance reads high;
//   2. driven high (chrg_oe = 1, chrg_out = 1): the 2 k drive overcomes the
//      weak pull-down, so only the strong pull-down reads low.
// The input is sampled at the end of each phase and decoded as
//   phase 2 low                 -> CHG_CHARGING
//   phase 1 low, phase 2 high   -> CHG_STANDBY
//   phase 1 high, phase 2 high  -> CHG_SHUTDOWN
// and the probe repeats for as long as the block runs.
//
// The resistor network and "drive the output high, then read the CHRG pin"
// follow the design; the released phase and the three-way decode are taken
// from the charger's documented CHRG behaviour, and the settling time (34 us
// at 30 MHz, many 800 k x pin-capacitance time constants) is this design's
// choice.
//
// Interface: chrg_in is asynchronous and double-registered here. status is
// registered; status_valid pulses once per full probe (2 x SETTLE_CYCLES
// clocks) when it is refreshed. status is CHG_UNKNOWN until the first probe
// completes.
module chrg_status
  import eps_pkg::*;
#(
  parameter int unsigned SETTLE_CYCLES = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        chrg_in,
  output logic        chrg_out,
  output logic        chrg_oe,
  output chg_status_e status,
  output logic        status_valid
);

  localparam int unsigned CW = $clog2(SETTLE_CYCLES + 1);

  typedef enum logic {PH_RELEASE, PH_DRIVE} phase_e;

  phase_e        phase;
  logic [CW-1:0] timer;
  logic [1:0]    sync;
  logic          released_level;

  assign chrg_out = 1'b1;
  assign chrg_oe  = (phase == PH_DRIVE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync <= 2'b11;
    else        sync <= {sync[0], chrg_in};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase          <= PH_RELEASE;
      timer          <= '0;
      released_level <= 1'b1;
      status         <= CHG_UNKNOWN;
      status_valid   <= 1'b0;
    end else begin
      status_valid <= 1'b0;
      if (timer != CW'(SETTLE_CYCLES - 1)) begin
        timer <= timer + 1'b1;
      end else begin
        timer <= '0;
        if (phase == PH_RELEASE) begin
          released_level <= sync[1];
          phase          <= PH_DRIVE;
        end else begin
          phase        <= PH_RELEASE;
          status_valid <= 1'b1;
          if (!sync[1])            status <= CHG_CHARGING;
          else if (!released_level) status <= CHG_STANDBY;
          else                     status <= CHG_SHUTDOWN;
        end
      end
    end
  end

endmodule
