// bus_regulator: proportional output-voltage controller for one distribution
// converter (5 V boost or 3.3 V buck).
//
// On every analogue sample frame the measured bus voltage is compared with
// VREF and the duty is set to
//     duty = DUTY_NOM + (KP_NUM * (VREF - v_bus)) >>> KP_SHIFT
// limited to DUTY_MIN..DUTY_MAX. DUTY_NOM is the open-loop duty of the
// converter (0.16 for the 4.2 V to 5 V boost, 0.785 for the 4.2 V to 3.3 V
// buck, times 127), so the proportional term only corrects for load and
// losses. Both converter types raise their output with duty, so one error sign
// serves both.
//
// That the buses are held by a proportional controller on the measured output
// voltage, and the two nominal duties, follow the design; the gain (one duty
// LSB per 16 codes, i.e. per 120 mV of error), the per-frame update and the
// limits are this design's choices. A larger gain makes the 5 V loop, whose
// output moves about 6 codes per duty LSB, settle into a limit cycle wider
// than 1 % when the converter responds within one frame.
//
// Interface: sample_valid is a one-clock strobe with v_bus valid; duty is
// registered and changes one clock later, clamped pulses if the limit was hit.
// In reset duty is DUTY_NOM.
module bus_regulator
  import eps_pkg::*;
#(
  parameter adc_code_t   VREF     = 12'd667,
  parameter duty_t       DUTY_NOM = 7'd20,
  parameter int unsigned KP_NUM   = 1,
  parameter int unsigned KP_SHIFT = 4,
  parameter duty_t       DUTY_MIN = 7'd0,
  parameter duty_t       DUTY_MAX = 7'd127
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      sample_valid,
  input  adc_code_t v_bus,
  output duty_t     duty,
  output logic      clamped
);

  localparam int unsigned EW = ADC_W + 12;  // error times gain, signed

  logic signed [EW-1:0] err, corr, target;
  duty_t                next_duty;
  logic                 hit_limit;

  always_comb begin
    err    = EW'(signed'({1'b0, VREF})) - EW'(signed'({1'b0, v_bus}));
    corr   = (err * signed'(EW'(KP_NUM))) >>> KP_SHIFT;
    target = EW'(signed'({1'b0, DUTY_NOM})) + corr;
    if (target < EW'(signed'({1'b0, DUTY_MIN}))) begin
      next_duty = DUTY_MIN;
      hit_limit = 1'b1;
    end else if (target > EW'(signed'({1'b0, DUTY_MAX}))) begin
      next_duty = DUTY_MAX;
      hit_limit = 1'b1;
    end else begin
      next_duty = duty_t'(target);
      hit_limit = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      duty    <= DUTY_NOM;
      clamped <= 1'b0;
    end else begin
      clamped <= 1'b0;
      if (sample_valid) begin
        duty    <= next_duty;
        clamped <= hit_limit;
      end
    end
  end

endmodule
