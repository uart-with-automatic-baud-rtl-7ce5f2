// tb_uart_autobaud_top: end-to-end test of the auto-baud UART at its default
// parameters (50 MHz clock, internal loopback).
//
// For each transmit rate from 38400 down to 1200 baud the testbench resets the
// design, selects the rate on tx_baud_sel and writes the carriage return
// 8'h0D. It then waits for baud_lo. It checks that:
//   - the detected rate (baud_sel) equals the transmit rate and baud_ok is set;
//   - baud_lo rose only after the line had been idle for 20 bit times at 9600
//     baud (the settle wait);
//   - three further bytes, written back to back as soon as the hold register
//     frees, arrive in order on RX_out with one rx_done_tick_bk each;
//   - tx_done_tick fired once per frame, and back-to-back frames left no gap;
//   - at 9600 baud the fixed-rate receiver's dout carries the same bytes;
//   - the 9600-baud receiver read the detection character as 0x0D when sent
//     at 9600 baud and as 0x78 when sent at 2400 baud.
// It also sends the detection character at 600 baud, which the design cannot
// tell apart from slower rates: baud_ok must stay clear and 9600 be selected.
// Finally the four divided clocks must toggle at f/2, f/4, f/8 and f/3.
// Each mechanism is counted, and one that never happened counts as a failure.
// A watchdog ends the run as failed.
`timescale 1ns/1ps
module tb_uart_autobaud_top;
  import uart_pkg::*;

  localparam int CLK_HZ = 50_000_000;
  localparam int T9600  = 16 * ((CLK_HZ + 8 * 9600) / (16 * 9600));  // clocks per bit

  logic       clk = 1'b0;
  logic       reset = 1'b1;
  logic [7:0] din = '0;
  logic       wr = 1'b0;
  baud_e      tx_baud_sel = BAUD_9600;
  logic       rx = 1'b1;
  logic       tx, txdatardy, rx_done_tick, rx_done_tick_bk, tx_done_tick, baud_lo, baud_ok;
  logic [7:0] dout, RX_out;
  baud_e      baud_sel;
  logic       baud_clk1, baud_clk2a, baud_clk3, baud_clk4;

  int checks = 0, failures = 0;
  int cyc = 0;

  // mechanism counters
  int n_detect = 0, n_fallback = 0, n_settle = 0, n_b2b = 0, n_rx_bk = 0, n_rx_9600 = 0;
  int n_tx_done = 0;
  int e1 = 0, e2 = 0, e3 = 0, e4 = 0;   // divided-clock edges

  always #10 clk = ~clk;

  uart_autobaud_top dut (
    .clk(clk), .reset(reset), .din(din), .wr(wr), .tx_baud_sel(tx_baud_sel), .rx(rx),
    .tx(tx), .txdatardy(txdatardy), .dout(dout), .rx_done_tick(rx_done_tick),
    .RX_out(RX_out), .rx_done_tick_bk(rx_done_tick_bk), .tx_done_tick(tx_done_tick),
    .baud_lo(baud_lo), .baud_sel(baud_sel), .baud_ok(baud_ok),
    .baud_clk1(baud_clk1), .baud_clk2a(baud_clk2a), .baud_clk3(baud_clk3), .baud_clk4(baud_clk4));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Line activity and received words.
  int         t_last_edge = 0;
  int         t_lock = -1;
  logic       tx_q = 1'b1;
  logic [7:0] det_word = '0;   // dout at the baud_load pulse
  logic [7:0] got_bk [$];
  logic [7:0] got_9600 [$];

  always @(posedge clk) begin
    cyc  <= cyc + 1;
    tx_q <= tx;
    if (tx != tx_q) t_last_edge <= cyc;
    // a start bit that begins on the clock the previous stop bit ends
    if (tx_q && !tx && tx_done_tick) n_b2b <= n_b2b + 1;
    if (tx_done_tick) n_tx_done <= n_tx_done + 1;
    if (rx_done_tick_bk) got_bk.push_back(RX_out);
    if (rx_done_tick)    got_9600.push_back(dout);
    if (dut.baud_load)   det_word <= dout;
  end

  always @(posedge baud_lo) t_lock = cyc;

  task automatic write_byte(input logic [7:0] b);
    @(negedge clk);
    din = b; wr = 1'b1;
    @(negedge clk);
    wr = 1'b0;
  endtask

  // Reset, send 0x0D at rate r, wait for baud_lo. Returns 1 if it locked.
  task automatic detect(input baud_e r, output bit locked);
    int limit;
    @(negedge clk) reset = 1'b1;
    tx_baud_sel = r;
    repeat (4) @(negedge clk);
    reset = 1'b0;
    t_lock = -1;
    repeat (T9600) @(negedge clk);
    write_byte(8'h0D);
    limit = cyc + 12 * 16 * baud_divisor(CLK_HZ, baud_value(r)) + 40 * T9600;
    while (!baud_lo && cyc < limit) @(negedge clk);
    locked = baud_lo;
    // 320 idle ticks; the first may come up to one tick after the last edge,
    // or, for a fast sender, after the 9600-baud receiver has finished its
    // word, at most 9.5 bit times after the last edge
    if (locked && t_lock - t_last_edge >= 20 * T9600 - T9600 / 16) n_settle++;
    check(locked && t_lock - t_last_edge >= 20 * T9600 - T9600 / 16
          && t_lock - t_last_edge <= 30 * T9600,
          $sformatf("%s: lock at %0d clocks after the last line edge, expected %0d to %0d",
                    r.name(), t_lock - t_last_edge, 20 * T9600 - T9600 / 16, 30 * T9600));
  endtask

  baud_e rates [6] = '{BAUD_38400, BAUD_19200, BAUD_9600, BAUD_4800, BAUD_2400, BAUD_1200};

  initial begin
    bit         locked;
    logic [7:0] data [3];
    int         nd, frame_clks;
    repeat (5) @(negedge clk);
    foreach (rates[i]) begin
      detect(rates[i], locked);
      check(baud_sel == rates[i] && baud_ok,
            $sformatf("detected %s ok %b, sent at %s", baud_sel.name(), baud_ok, rates[i].name()));
      if (baud_sel == rates[i] && baud_ok) n_detect++;
      // the byte the 9600-baud receiver made of 0x0D: 0x0D itself at 9600,
      // 0x78 at 2400 baud
      if (rates[i] == BAUD_9600)
        check(det_word == 8'h0D, $sformatf("9600: detection word read as %02h, expected 0D", det_word));
      if (rates[i] == BAUD_2400)
        check(det_word == 8'h78, $sformatf("2400: detection word read as %02h, expected 78", det_word));
      got_bk.delete();
      got_9600.delete();
      nd = n_tx_done;
      for (int k = 0; k < 3; k++) begin
        data[k] = 8'($urandom);
        write_byte(data[k]);
        while (txdatardy) @(negedge clk);
      end
      frame_clks = 10 * 16 * baud_divisor(CLK_HZ, baud_value(rates[i]));
      repeat (2 * frame_clks + frame_clks / 2) @(negedge clk);
      check(n_tx_done == nd + 3, $sformatf("%s: %0d tx_done_tick pulses, expected 3",
                                           rates[i].name(), n_tx_done - nd));
      check(got_bk.size() == 3, $sformatf("%s: %0d words on RX_out, expected 3",
                                          rates[i].name(), got_bk.size()));
      for (int k = 0; k < 3; k++) begin
        if (k < got_bk.size()) begin
          check(got_bk[k] == data[k], $sformatf("%s: RX_out word %0d = %02h, expected %02h",
                                               rates[i].name(), k, got_bk[k], data[k]));
          if (got_bk[k] == data[k]) n_rx_bk++;
        end
      end
      if (rates[i] == BAUD_9600) begin
        check(got_9600.size() == 3, "9600: dout word count");
        for (int k = 0; k < 3 && k < got_9600.size(); k++) begin
          check(got_9600[k] == data[k], $sformatf("9600: dout word %0d = %02h, expected %02h",
                                                 k, got_9600[k], data[k]));
          if (got_9600[k] == data[k]) n_rx_9600++;
        end
      end
    end
    // 600 baud: not distinguishable, falls back to 9600 with baud_ok clear
    detect(BAUD_600, locked);
    check(baud_sel == BAUD_9600 && !baud_ok,
          $sformatf("600 baud: selected %s ok %b, expected BAUD_9600 ok 0", baud_sel.name(), baud_ok));
    if (baud_sel == BAUD_9600 && !baud_ok) n_fallback++;
    // divided clocks
    begin
      fork
        begin : count
          fork
            forever @(posedge baud_clk1)  e1++;
            forever @(posedge baud_clk2a) e2++;
            forever @(posedge baud_clk3)  e3++;
            forever @(posedge baud_clk4)  e4++;
          join_none
          repeat (240) @(posedge clk);
          disable fork;
        end
      join
      check(e1 inside {[119:121]} && e2 inside {[59:61]} && e3 inside {[29:31]} && e4 inside {[79:81]},
            $sformatf("divided clocks: %0d %0d %0d %0d edges in 240 clocks", e1, e2, e3, e4));
    end
    check(n_detect == 6,   $sformatf("rate detected %0d of 6 times", n_detect));
    check(n_settle >= 7,   $sformatf("settle wait seen %0d times", n_settle));
    check(n_b2b == 12,      $sformatf("%0d of 12 back-to-back frames", n_b2b));
    check(n_rx_bk == 18,   $sformatf("%0d of 18 words received at the detected rate", n_rx_bk));
    check(n_rx_9600 == 3,  "9600-baud receiver did not deliver the data");
    check(n_fallback == 1, "fallback to 9600 never happened");
    $display("mechanisms: detect=%0d settle=%0d back_to_back=%0d rx_bk=%0d rx_9600=%0d fallback=%0d tx_done=%0d",
             n_detect, n_settle, n_b2b, n_rx_bk, n_rx_9600, n_fallback, n_tx_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
