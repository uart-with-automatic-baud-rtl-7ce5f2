// receiver: rate-detecting UART receiver, fixed at 9600 baud.
//
// It has two modes. In detection mode (baud_lo = 0) it waits for the first
// word. The sender transmits a carriage return (8'h0D) at its own rate. This
// receiver reads it at 9600 baud, and the byte it gets identifies the sender's
// rate (see uart_pkg::decode_pattern). When that word is complete, dout holds it and
// baud_load is pulsed for one clock so that baud_rx can latch it. The receiver
// then waits until the line has been high for SETTLE_BITS whole bit times at
// 9600 baud. Only then does it raise baud_lo and enter normal mode. The wait
// matters at a slow sender rate: the detection frame is still on the line after
// the 9600-baud receiver has finished with it, and the rate-adjusted receiver
// must not start inside that leftover frame. In normal mode the receiver keeps
// receiving at 9600 baud and reports every word on dout/rx_done_tick.
//
// Interface: baud_clk22 is the 16x tick at 9600 baud; rx must be synchronous
// to clk. baud_lo stays high until reset, which is synchronous and active high
// and returns the receiver to detection mode.
//
// The two modes, the fixed 9600-baud rate and detection on the first word
// follow the source design. The settle wait and its length are choices of this
// design: SETTLE_BITS = 20 exceeds the longest high run inside a 0x0D frame sent
// at 1200 baud (two bits, 16 bit times at 9600).
module receiver
  import uart_pkg::*;
#(
  parameter int unsigned SETTLE_BITS  = 20,
  parameter bit          SUPER_SAMPLE = 1'b0
) (
  input  logic       clk,
  input  logic       reset,
  input  logic       rx,
  input  logic       baud_clk22,
  output logic [7:0] dout,
  output logic       rx_done_tick,
  output logic       baud_load,
  output logic       baud_lo
);

  typedef enum logic [1:0] {M_DETECT, M_SETTLE, M_NORMAL} mode_e;

  localparam int unsigned SETTLE_TICKS = 16 * SETTLE_BITS;
  localparam int unsigned CNT_W        = $clog2(SETTLE_TICKS + 1);

  mode_e            mode;
  logic [CNT_W-1:0] idle_cnt;

  rx_book #(.SUPER_SAMPLE(SUPER_SAMPLE)) u_core (
    .clk         (clk),
    .reset       (reset),
    .rx          (rx),
    .s_tick      (baud_clk22),
    .dout        (dout),
    .rx_done_tick(rx_done_tick)
  );

  always_ff @(posedge clk) begin
    if (reset) begin
      mode      <= M_DETECT;
      idle_cnt  <= '0;
      baud_load <= 1'b0;
    end else begin
      baud_load <= 1'b0;
      unique case (mode)
        M_DETECT: begin
          if (rx_done_tick) begin
            baud_load <= 1'b1;
            idle_cnt  <= '0;
            mode      <= M_SETTLE;
          end
        end
        M_SETTLE: begin
          if (baud_clk22) begin
            if (!rx)                                       idle_cnt <= '0;
            else if (idle_cnt == CNT_W'(SETTLE_TICKS - 1)) mode     <= M_NORMAL;
            else                                           idle_cnt <= idle_cnt + 1'b1;
          end
        end
        default: ;
      endcase
    end
  end

  always_comb baud_lo = (mode == M_NORMAL);

endmodule
