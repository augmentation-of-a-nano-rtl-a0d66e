// telemetry_fmt: periodic ASCII housekeeping line for the ground terminal.
//
// Every PERIOD_CYCLES clocks (one second at 30 MHz) the block takes a snapshot
// of the measurements, converts them to decimal and streams one line, byte by
// byte, to a serial transmitter:
//
//   DDMMYYYY:HHMMSS:B.BB:C:S.SS:I.III:P.PPP:T.TT:F.FF<CR><LF>
//
//   B.BB   battery voltage, volts       C      Charge variable, 0 or 1
//   S.SS   solar array voltage, volts   I.III  solar array current, amps
//   P.PPP  solar power S x I, watts     T.TT   3.3 V bus, F.FF 5 V bus, volts
//
// for example 12042013:145943:4.01:1:3.68:0.653:2.403:3.43:4.94, 51 bytes
// with CR LF. Voltage codes (7.5 mV) become hundredths of a volt as
// (3 x code + 2) / 4, current codes (250 uA) become milliamps as
// (code + 2) / 4, and power in milliwatts is (15 x V x I + 4000) / 8000 from
// the two codes; all round to nearest and saturate at the largest value the
// field can print. Binary to BCD is shift-and-add-3 (eps_pkg::bin_to_bcd4).
//
// The field order, separators and number of decimals follow the design's
// telemetry string; the rate, the rounding, the saturation and the CR LF
// ending are this design's choices. Date and time arrive as BCD from the
// microcontroller's real-time clock.
//
// Interface: tx_valid/tx_data/tx_ready is a valid/ready byte stream
// (tx_data is stable until taken). The snapshot is taken in the clock the
// period counter wraps, if no line is still being sent; frame_done pulses in
// the clock after the last byte is taken. The first line starts PERIOD_CYCLES
// clocks after reset.
module telemetry_fmt
  import eps_pkg::*;
#(
  parameter int unsigned PERIOD_CYCLES = 30_000_000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] date_bcd,
  input  logic [23:0] time_bcd,
  input  adc_code_t   bat_v,
  input  logic        charge,
  input  adc_code_t   solar_v,
  input  adc_code_t   solar_i,
  input  adc_code_t   bus33_v,
  input  adc_code_t   bus5_v,
  output logic        tx_valid,
  output logic [7:0]  tx_data,
  input  logic        tx_ready,
  output logic        frame_done
);

  localparam int unsigned LINE_LEN = 51;
  localparam int unsigned PW       = $clog2(PERIOD_CYCLES);

  typedef struct packed {
    logic [31:0] date;
    logic [23:0] tod;
    logic [11:0] bat;   // three BCD digits, hundredths of a volt
    logic        chg;
    logic [11:0] sv;
    logic [15:0] si;    // four BCD digits, milliamps
    logic [15:0] pw;    // four BCD digits, milliwatts
    logic [11:0] b33;
    logic [11:0] b5;
  } snapshot_t;

  snapshot_t   snap, snap_next;
  logic [PW-1:0] period_cnt;
  logic [5:0]  idx;

  // Hundredths of a volt, saturated at 9.99 V.
  function automatic logic [11:0] volts_bcd(input adc_code_t code);
    logic [13:0] cv;
    logic [15:0] bcd;
    cv  = (14'(code) * 14'd3 + 14'd2) >> 2;
    if (cv > 14'd999) cv = 14'd999;
    bcd = bin_to_bcd4(cv);
    return bcd[11:0];
  endfunction

  function automatic logic [7:0] digit(input logic [3:0] d);
    return 8'h30 + {4'h0, d};
  endfunction

  always_comb begin
    logic [27:0] mw;
    logic [13:0] ma;
    mw = (28'(solar_v) * 28'(solar_i) * 28'd15 + 28'd4000) / 28'd8000;
    if (mw > 28'd9999) mw = 28'd9999;
    ma = (14'(solar_i) + 14'd2) >> 2;
    snap_next.date = date_bcd;
    snap_next.tod  = time_bcd;
    snap_next.bat  = volts_bcd(bat_v);
    snap_next.chg  = charge;
    snap_next.sv   = volts_bcd(solar_v);
    snap_next.si   = bin_to_bcd4(ma);
    snap_next.pw   = bin_to_bcd4(mw[13:0]);
    snap_next.b33  = volts_bcd(bus33_v);
    snap_next.b5   = volts_bcd(bus5_v);
  end

  // Character at each position of the line.
  always_comb begin
    tx_data = 8'h3A;  // ':'
    case (idx)
      6'd0, 6'd1, 6'd2, 6'd3, 6'd4, 6'd5, 6'd6, 6'd7:
        tx_data = digit(snap.date[31 - 4 * idx[2:0] -: 4]);
      6'd9:  tx_data = digit(snap.tod[23:20]);
      6'd10: tx_data = digit(snap.tod[19:16]);
      6'd11: tx_data = digit(snap.tod[15:12]);
      6'd12: tx_data = digit(snap.tod[11:8]);
      6'd13: tx_data = digit(snap.tod[7:4]);
      6'd14: tx_data = digit(snap.tod[3:0]);
      6'd16: tx_data = digit(snap.bat[11:8]);
      6'd18: tx_data = digit(snap.bat[7:4]);
      6'd19: tx_data = digit(snap.bat[3:0]);
      6'd21: tx_data = snap.chg ? 8'h31 : 8'h30;
      6'd23: tx_data = digit(snap.sv[11:8]);
      6'd25: tx_data = digit(snap.sv[7:4]);
      6'd26: tx_data = digit(snap.sv[3:0]);
      6'd28: tx_data = digit(snap.si[15:12]);
      6'd30: tx_data = digit(snap.si[11:8]);
      6'd31: tx_data = digit(snap.si[7:4]);
      6'd32: tx_data = digit(snap.si[3:0]);
      6'd34: tx_data = digit(snap.pw[15:12]);
      6'd36: tx_data = digit(snap.pw[11:8]);
      6'd37: tx_data = digit(snap.pw[7:4]);
      6'd38: tx_data = digit(snap.pw[3:0]);
      6'd40: tx_data = digit(snap.b33[11:8]);
      6'd42: tx_data = digit(snap.b33[7:4]);
      6'd43: tx_data = digit(snap.b33[3:0]);
      6'd45: tx_data = digit(snap.b5[11:8]);
      6'd47: tx_data = digit(snap.b5[7:4]);
      6'd48: tx_data = digit(snap.b5[3:0]);
      6'd17, 6'd24, 6'd29, 6'd35, 6'd41, 6'd46: tx_data = 8'h2E;  // '.'
      6'd49: tx_data = 8'h0D;
      6'd50: tx_data = 8'h0A;
      default: tx_data = 8'h3A;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      period_cnt <= '0;
      idx        <= '0;
      tx_valid   <= 1'b0;
      frame_done <= 1'b0;
      snap       <= '0;
    end else begin
      frame_done <= 1'b0;
      period_cnt <= (period_cnt == PW'(PERIOD_CYCLES - 1)) ? '0 : period_cnt + 1'b1;
      if (!tx_valid) begin
        if (period_cnt == PW'(PERIOD_CYCLES - 1)) begin
          snap     <= snap_next;
          idx      <= '0;
          tx_valid <= 1'b1;
        end
      end else if (tx_ready) begin
        if (idx == 6'(LINE_LEN - 1)) begin
          tx_valid   <= 1'b0;
          frame_done <= 1'b1;
        end else begin
          idx <= idx + 1'b1;
        end
      end
    end
  end

endmodule
