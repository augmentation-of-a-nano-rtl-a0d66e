// uart_tx: asynchronous serial transmitter for the telemetry line.
//
// Sends each byte as one start bit (0), eight data bits LSB first and one stop
// bit (1), with no parity and no flow control: the 9600 8N1 setting the
// ground terminal expects. A bit lasts round(CLK_HZ / BAUD) clocks, 3125 at
// 30 MHz. The line idles high.
//
// Interface: valid/ready handshake. A byte is taken in the clock where valid
// and ready are both high; ready is high while the transmitter is idle and in
// the last clock of a stop bit, so the next byte follows without a gap. data must stay
// stable while valid is high and ready low. A byte takes 10 bit times.
//
// The frame format and baud rate follow the design's terminal settings; the
// transmitter itself is this design's own (the original used the
// microcontroller's hard UART).
module uart_tx #(
  parameter int unsigned CLK_HZ = 30_000_000,
  parameter int unsigned BAUD   = 9600
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       valid,
  input  logic [7:0] data,
  output logic       ready,
  output logic       txd
);

  localparam int unsigned DIV = (CLK_HZ + BAUD / 2) / BAUD;
  localparam int unsigned CW  = $clog2(DIV);

  logic [CW-1:0] bit_timer;
  logic [3:0]    bit_idx;    // 0 start, 1..8 data, 9 stop
  logic [8:0]    shreg;      // data bits then stop bit
  logic          busy;

  logic last_tick;  // final clock of the stop bit

  assign last_tick = busy && bit_idx == 4'd9 && bit_timer == CW'(DIV - 1);
  assign ready     = !busy || last_tick;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      txd       <= 1'b1;
      bit_timer <= '0;
      bit_idx   <= '0;
      shreg     <= '1;
    end else if (ready) begin
      // idle, or the stop bit ends now: start the next byte if there is one
      busy <= valid;
      txd  <= !valid;
      if (valid) begin
        shreg     <= {1'b1, data};
        bit_timer <= '0;
        bit_idx   <= '0;
      end
    end else if (bit_timer != CW'(DIV - 1)) begin
      bit_timer <= bit_timer + 1'b1;
    end else begin
      bit_timer <= '0;
      bit_idx   <= bit_idx + 1'b1;
      txd       <= shreg[0];
      shreg     <= {1'b1, shreg[8:1]};
    end
  end

  // The byte on offer may not change until it has been taken.
  property p_stable_until_taken;
    @(posedge clk) disable iff (!rst_n)
      (valid && !ready) |=> (valid && $stable(data));
  endproperty
  a_stable_until_taken: assert property (p_stable_until_taken);

endmodule
