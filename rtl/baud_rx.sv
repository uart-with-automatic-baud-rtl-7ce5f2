// baud_rx: turns the detection word into a receive rate and generates the 16x
// tick (baud_clkbk) for the rate-adjusted receiver.
//
// When baud_load pulses, dout holds the byte that the 9600-baud receiver made of
// the carriage-return detection character. This block looks that byte up among
// the patterns of the detectable rates (uart_pkg::decode_pattern): 0xFE is
// 38400, 0xF2 or 0xF9 is 19200, 0x0D is 9600, 0xE6 is 4800, 0x78 is 2400 and
// 0x80 is 1200 baud.
// The matching rate is stored in baud_sel and baud_ok is set. A byte that
// matches none selects 9600 baud and clears baud_ok. A modulus counter then divides clk by round(CLK_HZ / (16 * rate)).
// It runs only while baud_lo is high, so no baud_clkbk tick is produced before
// the receiver has entered normal mode.
//
// Timing: baud_sel and baud_ok are valid the clock after baud_load. The first tick comes one
// divisor period after baud_lo rises. reset is synchronous and active high and
// selects 9600 baud.
//
// Deriving the rate from how the 9600-baud receiver misreads 0x0D follows the
// source design, and so does the 2400-baud value 0x78. The other table entries
// and the 9600-baud fallback were worked out for this design.
module baud_rx
  import uart_pkg::*;
#(
  parameter int unsigned CLK_HZ = 50_000_000
) (
  input  logic       clk,
  input  logic       reset,
  input  logic [7:0] dout,
  input  logic       baud_load,
  input  logic       baud_lo,
  output logic       baud_clkbk,
  output baud_e      baud_sel,
  output logic       baud_ok
);

  baud_e            decoded;
  logic             known;
  logic [DIV_W-1:0] div;
  logic [DIV_W-1:0] cnt;

  always_comb known = decode_pattern(dout, decoded);

  localparam div_table_t DIVS = divisor_table(CLK_HZ);

  always_comb div = DIVS[baud_sel];

  always_ff @(posedge clk) begin
    if (reset) begin
      baud_sel   <= BAUD_9600;
      baud_ok    <= 1'b0;
      cnt        <= '0;
      baud_clkbk <= 1'b0;
    end else begin
      if (baud_load) begin
        baud_sel <= decoded;
        baud_ok  <= known;
      end
      if (!baud_lo) begin
        cnt        <= div - 1'b1;
        baud_clkbk <= 1'b0;
      end else if (cnt == '0) begin
        cnt        <= div - 1'b1;
        baud_clkbk <= 1'b1;
      end else begin
        cnt        <= cnt - 1'b1;
        baud_clkbk <= 1'b0;
      end
    end
  end

endmodule
