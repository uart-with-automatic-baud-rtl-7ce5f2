// rx_book: 16x oversampling UART receiver (8 data bits, no parity, 1 stop bit).
//
// The receiver looks at rx only on s_tick, a pulse at 16 times the baud rate.
// In idle it waits for a tick at which rx is low. That tick is sample 0 of the
// start bit, and a 4-bit counter then numbers the 16 samples of every bit.
// Each bit is read at sample 7, its 8th sample, which is the middle of the bit
// to within one tick. With SUPER_SAMPLE = 1 the bit is instead the majority of
// samples 6, 7 and 8, so a one-tick spike at the middle of a bit is rejected.
// The start bit is not checked again at its middle: rate detection relies on
// the receiver running through a whole frame even when the sender's start bit
// is shorter than half a receiver bit. Data bits are shifted in LSB first. At the middle of the stop bit
// the byte is copied to dout, rx_done_tick is pulsed for one clock and the
// receiver returns to idle. The stop bit's value is not checked.
//
// Timing: rx_done_tick comes 9.5 bit times after the start edge (152 ticks,
// plus up to one tick of detection delay, plus one more tick with
// SUPER_SAMPLE). reset is synchronous and active high.
//
// The 16x oversampling, the mid-bit sampling point and the 7/8/9 super-sampling
// points follow the source design. The majority vote and ending the frame at the middle of the stop bit are choices of this
// design.
module rx_book
  import uart_pkg::*;
#(
  parameter bit SUPER_SAMPLE = 1'b0
) (
  input  logic       clk,
  input  logic       reset,
  input  logic       rx,
  input  logic       s_tick,
  output logic [7:0] dout,
  output logic       rx_done_tick
);

  typedef enum logic [1:0] {RX_IDLE, RX_START, RX_DATA, RX_STOP} rx_state_e;

  // Sample index at which a bit's value is decided.
  localparam logic [3:0] DECIDE = SUPER_SAMPLE ? 4'd8 : 4'd7;

  rx_state_e  state;
  logic [3:0] s;      // sample index within the bit
  logic [2:0] n;      // data bit index
  logic [7:0] b;      // shift register
  logic       r6, r7; // rx at samples 6 and 7
  logic       bitval;

  // Value of the current bit at sample DECIDE.
  always_comb begin
    if (SUPER_SAMPLE) bitval = (r6 & r7) | (r6 & rx) | (r7 & rx);
    else              bitval = rx;
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      state        <= RX_IDLE;
      s            <= '0;
      n            <= '0;
      b            <= '0;
      r6           <= 1'b1;
      r7           <= 1'b1;
      dout         <= '0;
      rx_done_tick <= 1'b0;
    end else begin
      rx_done_tick <= 1'b0;
      if (s_tick) begin
        if (s == 4'd6) r6 <= rx;
        if (s == 4'd7) r7 <= rx;
        unique case (state)
          RX_IDLE: begin
            if (!rx) begin
              state <= RX_START;
              s     <= 4'd1;   // this tick was sample 0
            end
          end
          RX_START: begin
            s <= s + 1'b1;
            if (s == 4'd15) begin
              state <= RX_DATA;
              n     <= '0;
            end
          end
          RX_DATA: begin
            s <= s + 1'b1;
            if (s == DECIDE) b <= {bitval, b[7:1]};
            if (s == 4'd15) begin
              if (n == 3'(DATA_BITS - 1)) state <= RX_STOP;
              else                        n     <= n + 1'b1;
            end
          end
          RX_STOP: begin
            s <= s + 1'b1;
            if (s == DECIDE) begin
              state        <= RX_IDLE;
              s            <= '0;
              dout         <= b;
              rx_done_tick <= 1'b1;
            end
          end
        endcase
      end
    end
  end

endmodule
