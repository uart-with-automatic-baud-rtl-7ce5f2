// rx_baud_generator9600: fixed 16x oversampling tick (baud_clk22) for the
// rate-detecting receiver.
//
// The detecting receiver always listens at 9600 baud, so this generator has a
// fixed modulus round(CLK_HZ / (16 * BAUD)), 326 clocks at 50 MHz. A down-counter
// reloads with it and emits a one-clock pulse on baud_clk22 when it expires.
// reset is synchronous and active high; the first tick comes one period after
// reset is released.
//
// The fixed 9600-baud receive rate follows the source design; the rounding and
// the enable-pulse form of the tick are this design's choices.
module rx_baud_generator9600
  import uart_pkg::*;
#(
  parameter int unsigned CLK_HZ = 50_000_000,
  parameter int unsigned BAUD   = 9600
) (
  input  logic clk,
  input  logic reset,
  output logic baud_clk22
);

  localparam logic [DIV_W-1:0] DIV = baud_divisor(CLK_HZ, BAUD);

  logic [DIV_W-1:0] cnt;

  always_ff @(posedge clk) begin
    if (reset) begin
      cnt        <= DIV - 1'b1;
      baud_clk22 <= 1'b0;
    end else if (cnt == '0) begin
      cnt        <= DIV - 1'b1;
      baud_clk22 <= 1'b1;
    end else begin
      cnt        <= cnt - 1'b1;
      baud_clk22 <= 1'b0;
    end
  end

endmodule
