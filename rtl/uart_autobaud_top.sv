// uart_autobaud_top: UART with automatic baud-rate detection and a frequency
// divider.
//
// The transmitter (auto_baud_tx) sends bytes written on din/wr at the rate
// chosen by tx_baud_sel, clocked by its own 16x tick generator (baud_gen_tx).
// The line goes to two receivers. auto_baud_rx always listens at 9600 baud
// (tick from baud_gen_rx). The first word after reset must be a carriage return
// (8'h0D). The byte auto_baud_rx makes of it is passed with baud_load to
// rx_baud, which turns it into the sender's rate. Once the line has settled,
// auto_baud_rx raises baud_lo. rx_baud then runs a 16x tick generator
// (baud_clkbk) at the detected rate for the second receiver (UART_rx_book).
// That receiver delivers every later word correctly on RX_out. dout and
// rx_done_tick show what the 9600-baud receiver reads, which is only the sent
// data when the sender runs at 9600 baud. clk_gen divides clk by 2, 4, 8 and 3
// onto baud_clk1..baud_clk4.
//
// With LOOPBACK = 1 the transmitter's output drives both receivers inside the
// design. With LOOPBACK = 0 the receivers listen to the rx pin through a
// two-flip-flop synchronizer. tx always carries the transmitter's output.
// SUPER_SAMPLE = 1 makes both receivers decide each bit by a majority of three
// samples around its middle instead of a single sample (see rx_book).
//
// Timing: all logic runs on clk (50 MHz by default); reset is synchronous and
// active high. Detection takes one frame of the sender plus SETTLE_BITS idle
// bit times at 9600 baud. The sender must leave the line idle that long after
// the detection word, which baud_lo reports. Rates from 1200 to 38400 baud are
// detected.
//
// The block structure and instance names follow the source design. The write
// strobe, the run-time transmit rate, LOOPBACK and the rx synchronizer are
// choices of this design.
module uart_autobaud_top
  import uart_pkg::*;
#(
  parameter int unsigned CLK_HZ   = 50_000_000,
  parameter bit          LOOPBACK = 1'b1,
  parameter bit          SUPER_SAMPLE = 1'b0
) (
  input  logic       clk,
  input  logic       reset,
  input  logic [7:0] din,
  input  logic       wr,
  input  baud_e      tx_baud_sel,
  input  logic       rx,
  output logic       tx,
  output logic       txdatardy,
  output logic [7:0] dout,
  output logic       rx_done_tick,
  output logic [7:0] RX_out,
  output logic       rx_done_tick_bk,
  output logic       tx_done_tick,
  output logic       baud_lo,
  output baud_e      baud_sel,
  output logic       baud_ok,
  output logic       baud_clk1,
  output logic       baud_clk2a,
  output logic       baud_clk3,
  output logic       baud_clk4
);

  logic baud_clk2;    // 16x tick, transmit rate
  logic baud_clk22;   // 16x tick, 9600 baud
  logic baud_clkbk;   // 16x tick, detected rate
  logic baud_load;
  logic rx_line;
  logic [1:0] rx_sync;

  always_ff @(posedge clk) begin
    if (reset) rx_sync <= 2'b11;
    else       rx_sync <= {rx_sync[0], rx};
  end

  always_comb rx_line = LOOPBACK ? tx : rx_sync[1];

  tx_baud_generator #(.CLK_HZ(CLK_HZ)) baud_gen_tx (
    .clk      (clk),
    .reset    (reset),
    .baud_sel (tx_baud_sel),
    .baud_clk2(baud_clk2)
  );

  transmitter auto_baud_tx (
    .clk         (clk),
    .reset       (reset),
    .din         (din),
    .wr          (wr),
    .baud_clk2   (baud_clk2),
    .tx          (tx),
    .txdatardy   (txdatardy),
    .tx_done_tick(tx_done_tick)
  );

  rx_baud_generator9600 #(.CLK_HZ(CLK_HZ)) baud_gen_rx (
    .clk       (clk),
    .reset     (reset),
    .baud_clk22(baud_clk22)
  );

  receiver #(.SUPER_SAMPLE(SUPER_SAMPLE)) auto_baud_rx (
    .clk         (clk),
    .reset       (reset),
    .rx          (rx_line),
    .baud_clk22  (baud_clk22),
    .dout        (dout),
    .rx_done_tick(rx_done_tick),
    .baud_load   (baud_load),
    .baud_lo     (baud_lo)
  );

  baud_rx #(.CLK_HZ(CLK_HZ)) rx_baud (
    .clk       (clk),
    .reset     (reset),
    .dout      (dout),
    .baud_load (baud_load),
    .baud_lo   (baud_lo),
    .baud_clkbk(baud_clkbk),
    .baud_sel  (baud_sel),
    .baud_ok   (baud_ok)
  );

  rx_book #(.SUPER_SAMPLE(SUPER_SAMPLE)) UART_rx_book (
    .clk         (clk),
    .reset       (reset),
    .rx          (rx_line),
    .s_tick      (baud_clkbk),
    .dout        (RX_out),
    .rx_done_tick(rx_done_tick_bk)
  );

  fdivider clk_gen (
    .clk       (clk),
    .reset     (reset),
    .baud_clk1 (baud_clk1),
    .baud_clk2a(baud_clk2a),
    .baud_clk3 (baud_clk3),
    .baud_clk4 (baud_clk4)
  );

endmodule
