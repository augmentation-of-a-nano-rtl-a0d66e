// tb_uart_tx: self-checking test of the 8N1 serial transmitter.
//
// A fast instance (10 clocks per bit) sends 300 random bytes, offered back to
// back and with random gaps; a receiver written here finds each start bit,
// samples mid-bit, and checks the data, the stop bit and that back-to-back
// bytes start exactly 10 bit times apart. A second instance with the default
// 30 MHz / 9600 baud setting sends one byte, and its bit time must be 3125
// clocks.
module tb_uart_tx;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       valid = 1'b0, valid_d = 1'b0;
  logic [7:0] data = '0, data_d = 8'h55;
  logic       ready, txd, ready_d, txd_d;
  int         checks = 0, failures = 0;

  localparam int BIT = 10;

  uart_tx #(.CLK_HZ(1_000_000), .BAUD(100_000)) dut (.clk, .rst_n, .valid, .data, .ready, .txd);
  uart_tx dut_default (.clk, .rst_n, .valid(valid_d), .data(data_d), .ready(ready_d), .txd(txd_d));

  always #5ns clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  byte unsigned sent[$];
  int           received = 0, last_start = -1000, clocks = 0, back_to_back = 0;

  always @(posedge clk) clocks++;

  // Producer: offer bytes, hold them until taken.
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 300; k++) begin
      if (k % 3 == 0) repeat ($urandom_range(0, 3 * BIT)) @(negedge clk);
      data  = 8'($urandom);
      valid = 1'b1;
      @(posedge clk iff ready);
      sent.push_back(data);
      @(negedge clk);
      valid = 1'b0;
    end
  end

  // Receiver for the fast instance.
  initial begin
    byte unsigned b, exp;
    int start_t;
    @(posedge rst_n);
    forever begin
      @(negedge txd);
      start_t = clocks;
      if (start_t - last_start == 10 * BIT) back_to_back++;
      else check(start_t - last_start > 10 * BIT, $sformatf("start bit %0d clocks after the last", start_t - last_start));
      last_start = start_t;
      repeat (BIT / 2) @(posedge clk);
      check(txd == 1'b0, "start bit low at mid-bit");
      for (int i = 0; i < 8; i++) begin
        repeat (BIT) @(posedge clk);
        b[i] = txd;
      end
      repeat (BIT) @(posedge clk);
      check(txd == 1'b1, "stop bit high");
      exp = sent.pop_front();
      check(b == exp, $sformatf("byte %0d: got %02x, sent %02x", received, b, exp));
      received++;
      if (received == 300) begin
        check(back_to_back > 50, $sformatf("%0d back-to-back bytes", back_to_back));
        // Default-rate instance: one byte, measure the start bit length.
        @(negedge clk);
        valid_d = 1'b1;
        @(posedge clk iff ready_d);
        @(negedge clk);
        valid_d = 1'b0;
        @(negedge txd_d);
        start_t = clocks;
        @(posedge txd_d);
        check(clocks - start_t == 3125, $sformatf("default bit time %0d clocks, expected 3125", clocks - start_t));
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
