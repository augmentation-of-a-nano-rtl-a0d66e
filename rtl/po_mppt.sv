// po_mppt: perturb-and-observe maximum power point tracker.
//
// Every UPDATE_FRAMES analogue sample frames the tracker takes the solar array
// voltage and the converter current, forms P = V x I and compares P and I
// with the values of the previous update:
//   dP > 0 and dI > 0  -> duty + DELTA_D  (raise module current)
//   dP < 0 and dI < 0  -> duty + DELTA_D
//   dP > 0 and dI < 0  -> duty - DELTA_D  (lower module current)
//   dP < 0 and dI > 0  -> duty - DELTA_D
// dP = 0 or dI = 0 leaves the duty alone. A step that would land on or beyond
// DUTY_MIN or DUTY_MAX is refused and the old duty kept. Power and current are
// stored on every update, so the next comparison is always against the last
// measurement. With enable low the duty sits at DUTY_INIT, the duty worked out
// for the converter to deliver 4.2 V from 3.88 V; tracking starts from there.
//
// The decision table and the refusal at the limits follow the design's
// algorithm; the update interval (85 frames of 47.067 us, about 4 ms), the
// one-LSB step and the limits are this design's choices.
//
// Interface: sample_valid is a one-clock strobe with v_in/i_in valid. duty is
// registered and changes one clock after the strobe that completes an update;
// update, step_up and step_down pulse in that same clock.
module po_mppt
  import eps_pkg::*;
#(
  parameter int unsigned UPDATE_FRAMES = 85,
  parameter int unsigned DUTY_INIT     = 10,
  parameter int unsigned DUTY_MIN      = 0,
  parameter int unsigned DUTY_MAX      = 127,
  parameter int unsigned DELTA_D       = 1
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      sample_valid,
  input  logic      enable,
  input  adc_code_t v_in,
  input  adc_code_t i_in,
  output duty_t     duty,
  output logic      update,
  output logic      step_up,
  output logic      step_down
);

  localparam int unsigned PW = 2 * ADC_W;
  localparam int unsigned CW = (UPDATE_FRAMES > 1) ? $clog2(UPDATE_FRAMES) : 1;

  logic [CW-1:0]  frame_cnt;
  logic           do_update;
  logic [PW-1:0]  p_now, p_old;
  adc_code_t      i_old;
  logic           dp_pos, dp_neg, di_pos, di_neg;
  logic           want_up, want_down;
  logic [DUTY_W:0] d_up, d_down;  // one extra bit so limits are checked without wrap

  assign do_update = sample_valid && (frame_cnt == CW'(UPDATE_FRAMES - 1));

  always_comb begin
    p_now     = PW'(v_in) * PW'(i_in);
    dp_pos    = p_now > p_old;
    dp_neg    = p_now < p_old;
    di_pos    = i_in > i_old;
    di_neg    = i_in < i_old;
    want_up   = (dp_pos && di_pos) || (dp_neg && di_neg);
    want_down = (dp_pos && di_neg) || (dp_neg && di_pos);
    d_up      = {1'b0, duty} + (DUTY_W + 1)'(DELTA_D);
    d_down    = {1'b0, duty} - (DUTY_W + 1)'(DELTA_D);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame_cnt <= '0;
      p_old     <= '0;
      i_old     <= '0;
      duty      <= duty_t'(DUTY_INIT);
      update    <= 1'b0;
      step_up   <= 1'b0;
      step_down <= 1'b0;
    end else begin
      update    <= 1'b0;
      step_up   <= 1'b0;
      step_down <= 1'b0;
      if (sample_valid)
        frame_cnt <= do_update ? '0 : frame_cnt + 1'b1;
      if (do_update) begin
        p_old  <= p_now;
        i_old  <= i_in;
        update <= enable;
        if (!enable) begin
          duty <= duty_t'(DUTY_INIT);
        end else if (want_up) begin
          // d_up >= DELTA_D, so only the upper limit can be crossed
          if (d_up < (DUTY_W + 1)'(DUTY_MAX)) begin
            duty    <= d_up[DUTY_W-1:0];
            step_up <= 1'b1;
          end
        end else if (want_down) begin
          if (!d_down[DUTY_W] && d_down > (DUTY_W + 1)'(DUTY_MIN)) begin
            duty      <= d_down[DUTY_W-1:0];
            step_down <= 1'b1;
          end
        end
      end
    end
  end

endmodule
