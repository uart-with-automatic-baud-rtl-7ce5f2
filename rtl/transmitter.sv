// transmitter: UART transmitter with a transmit hold register and a transmit
// shift register, sending 8 data bits, no parity and 1 stop bit.
//
// A write (wr high for one clock) copies din into the transmit hold register thr
// and sets txdatardy. When the line is idle and txdatardy is set, the next
// baud_clk2 tick moves thr into the transmit shift register tsr and clears
// txdatardy, so the following byte can be written while this one is being sent.
// The frame is then shifted out on tx: a start bit (0), the eight data bits LSB
// first, and a stop bit (1). Every bit lasts exactly 16 baud_clk2 ticks. tx is
// high when idle.
//
// Timing: tx_done_tick is high for one clock at the end of the stop bit. A frame
// takes 160 ticks. If txdatardy is set at that point, the next start bit begins
// at once, so frames can run back to back with no idle time. A write while
// txdatardy is set overwrites thr. reset is synchronous and active high.
//
// The thr/tsr/txdatardy structure, the frame format and the 16x tick follow
// the source design. The write strobe, starting frames on a tick and
// overwrite-on-full are choices of this design.
module transmitter
  import uart_pkg::*;
(
  input  logic       clk,
  input  logic       reset,
  input  logic [7:0] din,
  input  logic       wr,
  input  logic       baud_clk2,
  output logic       tx,
  output logic       txdatardy,
  output logic       tx_done_tick
);

  typedef enum logic [1:0] {TX_IDLE, TX_START, TX_DATA, TX_STOP} tx_state_e;

  tx_state_e  state;
  logic [7:0] thr;
  logic [7:0] tsr;
  logic [3:0] s;      // tick within the bit, 0..15
  logic [2:0] n;      // data bit index

  always_ff @(posedge clk) begin
    if (reset) begin
      state        <= TX_IDLE;
      thr          <= '0;
      tsr          <= '0;
      txdatardy    <= 1'b0;
      s            <= '0;
      n            <= '0;
      tx           <= 1'b1;
      tx_done_tick <= 1'b0;
    end else begin
      tx_done_tick <= 1'b0;
      if (wr) begin
        thr       <= din;
        txdatardy <= 1'b1;
      end
      if (baud_clk2) begin
        unique case (state)
          TX_IDLE: begin
            if (txdatardy) begin
              tsr       <= thr;
              txdatardy <= wr;   // a write in this very clock refills thr
              state     <= TX_START;
              s         <= '0;
              tx        <= 1'b0;
            end
          end
          TX_START: begin
            if (s == 4'd15) begin
              s     <= '0;
              n     <= '0;
              state <= TX_DATA;
              tx    <= tsr[0];
            end else s <= s + 1'b1;
          end
          TX_DATA: begin
            if (s == 4'd15) begin
              s <= '0;
              if (n == 3'(DATA_BITS - 1)) begin
                state <= TX_STOP;
                tx    <= 1'b1;
              end else begin
                n   <= n + 1'b1;
                tsr <= {1'b0, tsr[7:1]};
                tx  <= tsr[1];
              end
            end else s <= s + 1'b1;
          end
          TX_STOP: begin
            if (s == 4'd15) begin
              s            <= '0;
              tx_done_tick <= 1'b1;
              if (txdatardy) begin      // next frame follows directly
                tsr       <= thr;
                txdatardy <= wr;
                state     <= TX_START;
                tx        <= 1'b0;
              end else begin
                state     <= TX_IDLE;
              end
            end else s <= s + 1'b1;
          end
        endcase
      end
    end
  end

  // The line is high whenever no frame is in progress.
  a_idle_high: assert property (@(posedge clk) disable iff (reset)
                                (state == TX_IDLE) |-> tx);

endmodule
