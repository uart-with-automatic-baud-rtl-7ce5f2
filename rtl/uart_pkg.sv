// uart_pkg: types and constants shared by the auto-baud UART.
//
// baud_e names the ten line rates the UART can transmit at (110 to 38400 baud).
// baud_value() returns a rate in baud and baud_divisor() the number of system
// clocks per 16x oversampling tick, rounded to the nearest integer; at 50 MHz this
// gives 81 for 38400 baud and 326 for 9600 baud.
//
// Rate detection sends a carriage return (8'h0D, 8 data bits, no parity, 1 stop
// bit) and receives it with a receiver fixed at 9600 baud. A slower or faster
// sender makes the receiver read a different byte. The receiver reads data bit
// k (k = 1..8 counting the start bit as 0) at sample 7 of its bit, about
// (k + 7.5/16) * T9600 after the start edge. With R the sender's bit time over
// T9600, that point lies in sender bit floor((k + 7.5/16) / R). The result is
// 0xFE at 38400, 0xF2 at 19200, 0x0D at 9600, 0xE6 at 4800, 0x78 at 2400 and
// 0x80 at 1200 baud, and decode_pattern() inverts it. The 0x78 at 2400 baud is
// the value quoted for this scheme. At 600 baud and slower every rate reads as
// 0x00, so only 1200..38400 baud can be told apart. The table and the rounding
// are this design's own working-out.
package uart_pkg;

  typedef enum logic [3:0] {
    BAUD_110   = 4'd0,
    BAUD_150   = 4'd1,
    BAUD_300   = 4'd2,
    BAUD_600   = 4'd3,
    BAUD_1200  = 4'd4,
    BAUD_2400  = 4'd5,
    BAUD_4800  = 4'd6,
    BAUD_9600  = 4'd7,
    BAUD_19200 = 4'd8,
    BAUD_38400 = 4'd9
  } baud_e;

  localparam int unsigned DIV_W = 16;   // divisors from 1 to 65535
  localparam int unsigned DATA_BITS = 8;

  function automatic int unsigned baud_value(baud_e b);
    case (b)
      BAUD_110:   return 110;
      BAUD_150:   return 150;
      BAUD_300:   return 300;
      BAUD_600:   return 600;
      BAUD_1200:  return 1200;
      BAUD_2400:  return 2400;
      BAUD_4800:  return 4800;
      BAUD_19200: return 19200;
      BAUD_38400: return 38400;
      default:    return 9600;
    endcase
  endfunction

  // Clocks per 16x tick, rounded to nearest, clamped to 1..65535.
  function automatic logic [DIV_W-1:0] baud_divisor(int unsigned clk_hz, int unsigned baud);
    longint unsigned d;
    d = (longint'(clk_hz) + 8 * longint'(baud)) / (16 * longint'(baud));
    if (d < 1) d = 1;
    if (d > 65535) d = 65535;
    return DIV_W'(d);
  endfunction

  typedef logic [9:0][DIV_W-1:0] div_table_t;

  // Divisor of every baud_e rate, indexed by its code; evaluated at elaboration.
  function automatic div_table_t divisor_table(int unsigned clk_hz);
    div_table_t t;
    for (int i = 0; i < 10; i++) t[i] = baud_divisor(clk_hz, baud_value(baud_e'(i)));
    return t;
  endfunction

  // Rate of a sender whose 8'h0D the 9600-baud receiver read as p. Valid for
  // 1200 baud and faster. At 19200 baud the sample points fall on the sender's
  // bit edges, so both readings, 0xF2 and 0xF9, are accepted.
  function automatic logic decode_pattern(input logic [7:0] p, output baud_e b);
    logic ok;
    ok = 1'b1;
    case (p)
      8'hFE:        b = BAUD_38400;
      8'hF2, 8'hF9: b = BAUD_19200;
      8'h0D:        b = BAUD_9600;
      8'hE6:        b = BAUD_4800;
      8'h78:        b = BAUD_2400;
      8'h80:        b = BAUD_1200;
      default: begin
        b  = BAUD_9600;
        ok = 1'b0;
      end
    endcase
    return ok;
  endfunction

endpackage
