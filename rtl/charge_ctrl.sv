// charge_ctrl: battery charge decision with 4.05 V / 4.2 V hysteresis.
//
// The Charge variable starts at 0. On each analogue sample frame:
//   Charge = 0: it becomes 1 when the solar current is above I_MIN (the array
//               sees the sun) and the battery is below V_START (4.05 V, about
//               10 % depth of discharge);
//   Charge = 1: it stays 1, whatever the solar current does, until the battery
//               reaches V_STOP (4.2 V), then returns to 0.
// Charge enables the LTC4054 charger and gates the maximum power point
// tracker, so tracking stops once the battery is full and restarts when it has
// sagged back below 4.05 V.
//
// Thresholds are voltage codes (7.5 mV per LSB: 540 = 4.05 V, 560 = 4.2 V).
// The two voltages, the zero-current test and the latching of Charge follow
// the design's charge algorithm; stopping at "reaches 4.2 V" (>=) rather than
// "above 4.2 V" is this design's reading, as a CC-CV charger holds the cell at
// exactly 4.2 V.
//
// Interface: sample_valid is a one-clock strobe; charge is registered and
// changes one clock after it, with a one-clock start or stop pulse.
module charge_ctrl
  import eps_pkg::*;
#(
  parameter adc_code_t V_START = 12'd540,
  parameter adc_code_t V_STOP  = 12'd560,
  parameter adc_code_t I_MIN   = 12'd0
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      sample_valid,
  input  adc_code_t solar_i,
  input  adc_code_t bat_v,
  output logic      charge,
  output logic      start,
  output logic      stop
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      charge <= 1'b0;
      start  <= 1'b0;
      stop   <= 1'b0;
    end else begin
      start <= 1'b0;
      stop  <= 1'b0;
      if (sample_valid) begin
        if (!charge && solar_i > I_MIN && bat_v < V_START) begin
          charge <= 1'b1;
          start  <= 1'b1;
        end else if (charge && bat_v >= V_STOP) begin
          charge <= 1'b0;
          stop   <= 1'b1;
        end
      end
    end
  end

endmodule
