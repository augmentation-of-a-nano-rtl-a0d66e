// pwm_gen: counter-compare pulse-width modulator for one dc-dc converter gate.
//
// A WIDTH-bit counter runs freely and wraps every 2^WIDTH clocks; the output
// is registered high whenever the duty value is at or above the counter. A duty
// value v therefore gives (v+1)/2^WIDTH high time: 0 gives one clock in 128,
// 127 keeps the output high. With the 7-bit default and a 30 MHz clock the
// period is 128 clocks, 4.27 us, 234.4 kHz.
//
// Interface: clk, rst_n (asynchronous, active low), duty (sampled every
// clock, no handshake), pwm_o. In reset the output is low and the counter is
// loaded with RESET_COUNT. pwm_o reflects the comparison one clock later.
//
// The 7-bit width, the free-running counter, the compare rule and the reset
// value of 63 follow the described PWM module; the treatment of equality (high)
// is read from the measured duty cycles (20 -> 16.4 %, 100 -> 78.9 %).
module pwm_gen #(
  parameter int unsigned WIDTH       = 7,
  parameter int unsigned RESET_COUNT = 63
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] duty,
  output logic             pwm_o
);

  logic [WIDTH-1:0] count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) count <= WIDTH'(RESET_COUNT);
    else        count <= count + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pwm_o <= 1'b0;
    else        pwm_o <= (duty >= count);
  end

endmodule
