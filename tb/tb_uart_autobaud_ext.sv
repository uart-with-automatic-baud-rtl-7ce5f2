// tb_uart_autobaud_ext: the auto-baud UART receiving from its rx pin
// (LOOPBACK = 0) with super sampling on (SUPER_SAMPLE = 1).
//
// A serial model in this testbench, independent of the design's transmitter,
// sends 8N1 frames at exactly 50e6 / 4800 clocks per bit. That is slightly off
// the design's 4800-baud divisor, as a real sender would be. It first sends the
// carriage return, waits for baud_lo and checks that 4800 baud was detected.
// It then sends eight random bytes. Each has a spike a third of a tick wide at
// the middle of one data bit, and all must arrive on RX_out. The design's own
// tx pin must stay idle, since nothing is written. A watchdog ends the run as
// failed.
`timescale 1ns/1ps
module tb_uart_autobaud_ext;
  import uart_pkg::*;

  localparam int BITCLK = 50_000_000 / 4800;   // 10416 clocks per bit
  localparam int SPIKE  = 651 / 3;             // a third of a 4800-baud tick

  logic       clk = 1'b0;
  logic       reset = 1'b1;
  logic       rx = 1'b1;
  logic       tx, txdatardy, rx_done_tick, rx_done_tick_bk, tx_done_tick, baud_lo, baud_ok;
  logic [7:0] dout, RX_out;
  baud_e      baud_sel;
  logic       baud_clk1, baud_clk2a, baud_clk3, baud_clk4;
  int         checks = 0, failures = 0;
  logic [7:0] got [$];
  int         spikes = 0;

  always #10 clk = ~clk;

  uart_autobaud_top #(.LOOPBACK(1'b0), .SUPER_SAMPLE(1'b1)) dut (
    .clk(clk), .reset(reset), .din(8'h00), .wr(1'b0), .tx_baud_sel(BAUD_9600), .rx(rx),
    .tx(tx), .txdatardy(txdatardy), .dout(dout), .rx_done_tick(rx_done_tick),
    .RX_out(RX_out), .rx_done_tick_bk(rx_done_tick_bk), .tx_done_tick(tx_done_tick),
    .baud_lo(baud_lo), .baud_sel(baud_sel), .baud_ok(baud_ok),
    .baud_clk1(baud_clk1), .baud_clk2a(baud_clk2a), .baud_clk3(baud_clk3), .baud_clk4(baud_clk4));

  always @(posedge clk) if (rx_done_tick_bk) got.push_back(RX_out);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // One frame; spike_bit in 0..7 inverts that data bit around its middle.
  task automatic send(input logic [7:0] b, input int spike_bit);
    logic [9:0] frame;
    frame = {1'b1, b, 1'b0};
    for (int k = 0; k < 10; k++) begin
      rx = frame[k];
      if (spike_bit >= 0 && k == spike_bit + 1) begin
        repeat (BITCLK / 2 - SPIKE / 2) @(negedge clk);
        rx = ~frame[k];
        repeat (SPIKE) @(negedge clk);
        rx = frame[k];
        repeat (BITCLK - BITCLK / 2 - SPIKE / 2 - SPIKE) @(negedge clk);
        spikes++;
      end else begin
        repeat (BITCLK) @(negedge clk);
      end
    end
    rx = 1'b1;
  endtask

  initial begin
    logic [7:0] data [8];
    repeat (5) @(negedge clk);
    reset = 1'b0;
    repeat (1000) @(negedge clk);
    send(8'h0D, -1);
    while (!baud_lo) @(negedge clk);
    check(baud_sel == BAUD_4800 && baud_ok, $sformatf("detected %s ok %b", baud_sel.name(), baud_ok));
    for (int i = 0; i < 8; i++) begin
      data[i] = 8'($urandom);
      send(data[i], i);
    end
    repeat (2 * BITCLK) @(negedge clk);
    check(got.size() == 8, $sformatf("%0d words received, expected 8", got.size()));
    for (int i = 0; i < 8 && i < got.size(); i++)
      check(got[i] == data[i], $sformatf("word %0d: %02h, expected %02h", i, got[i], data[i]));
    check(spikes == 8, "spikes not sent");
    check(tx == 1'b1 && !txdatardy, "transmitter not idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
