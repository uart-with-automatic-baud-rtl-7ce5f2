// tx_baud_generator: 16x oversampling tick for the transmitter (baud_clk2).
//
// A down-counting modulus counter reloads with the divisor of the selected rate,
// round(CLK_HZ / (16 * baud)), and emits a one-clock pulse on baud_clk2 each time
// it expires. At 50 MHz and 38400 baud the divisor is 81, so ticks are 81 clocks
// apart; at 9600 baud they are 326 clocks apart.
//
// Interface: baud_sel picks one of the ten rates of uart_pkg::baud_e and may change
// at any time; the new divisor takes effect at the next reload. reset is
// synchronous and active high; the first tick comes one divisor period after
// reset is released.
//
// The divisor value and the 16x tick follow the source design. The tick is
// an enable pulse rather than a divided clock, and the rate is a run-time input;
// both are choices of this design.
module tx_baud_generator
  import uart_pkg::*;
#(
  parameter int unsigned CLK_HZ = 50_000_000
) (
  input  logic  clk,
  input  logic  reset,
  input  baud_e baud_sel,
  output logic  baud_clk2
);

  logic [DIV_W-1:0] div;
  logic [DIV_W-1:0] cnt;

  localparam div_table_t DIVS = divisor_table(CLK_HZ);

  always_comb div = DIVS[baud_sel];

  always_ff @(posedge clk) begin
    if (reset) begin
      cnt       <= div - 1'b1;
      baud_clk2 <= 1'b0;
    end else if (cnt == '0) begin
      cnt       <= div - 1'b1;
      baud_clk2 <= 1'b1;
    end else begin
      cnt       <= cnt - 1'b1;
      baud_clk2 <= 1'b0;
    end
  end

endmodule
