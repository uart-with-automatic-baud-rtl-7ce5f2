// tb_rx_book: checks the 16x oversampling receiver, with and without super
// sampling.
//
// Two receivers, one with SUPER_SAMPLE = 0 and one with SUPER_SAMPLE = 1, share
// one serial line and one tick, a pulse every D clocks made here. The line
// driver works in units of ticks: it changes the line just after a tick, so the
// receiver's sample i of bit b falls on a known tick. The test covers:
//   - random bytes: both receivers deliver each byte once, and rx_done_tick
//     comes 9.5 bit times after the start edge (152 ticks, one more tick with
//     super sampling);
//   - a one-tick spike on sample 7 of a data bit: the single-sample receiver
//     takes the wrong bit, the super-sampling one the right bit;
//   - a sender 3 % fast and 3 % slow, driven in clock units: bytes still correct.
// A watchdog ends the run as failed.
`timescale 1ns/1ps
module tb_rx_book;
  localparam int D = 4;

  logic       clk = 1'b0;
  logic       reset = 1'b1;
  logic       rx = 1'b1;
  logic       s_tick = 1'b0;
  logic [7:0] dout_p, dout_s;
  logic       done_p, done_s;
  int         checks = 0, failures = 0;
  int         tickcnt = 0;
  int         ticks = 0;
  int         n_done_p = 0, n_done_s = 0;
  int         t_done_p = 0, t_done_s = 0;

  always #10 clk = ~clk;

  always @(posedge clk) begin
    tickcnt <= (tickcnt == D - 1) ? 0 : tickcnt + 1;
    s_tick  <= (tickcnt == D - 1);
    if (s_tick) ticks <= ticks + 1;
    if (done_p) begin n_done_p <= n_done_p + 1; t_done_p <= ticks; end
    if (done_s) begin n_done_s <= n_done_s + 1; t_done_s <= ticks; end
  end

  rx_book #(.SUPER_SAMPLE(1'b0)) dut_p (.clk(clk), .reset(reset), .rx(rx), .s_tick(s_tick),
                                        .dout(dout_p), .rx_done_tick(done_p));
  rx_book #(.SUPER_SAMPLE(1'b1)) dut_s (.clk(clk), .reset(reset), .rx(rx), .s_tick(s_tick),
                                        .dout(dout_s), .rx_done_tick(done_s));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Wait for the next tick and return just after it.
  task automatic after_tick();
    do @(posedge clk); while (!s_tick);
    @(negedge clk);
  endtask

  // Send one frame in tick units. spike_bit >= 0 inverts the line during
  // sample 7 of that data bit only. Returns the tick count at the start edge.
  task automatic send_ticks(input logic [7:0] b, input int spike_bit, output int t0);
    logic [9:0] frame;
    frame = {1'b1, b, 1'b0};
    after_tick();
    t0 = ticks;
    for (int k = 0; k < 10; k++) begin
      rx = frame[k];
      for (int i = 0; i < 16; i++) begin
        // sample i of bit k is taken on the tick after the (i)th wait here
        if (spike_bit >= 0 && k - 1 == spike_bit && i == 7) rx = ~frame[k];
        if (spike_bit >= 0 && k - 1 == spike_bit && i == 8) rx = frame[k];
        after_tick();
      end
    end
    rx = 1'b1;
  endtask

  // Send one frame with an arbitrary bit length in clocks.
  task automatic send_clocks(input logic [7:0] b, input int clocks_per_bit);
    logic [9:0] frame;
    frame = {1'b1, b, 1'b0};
    @(negedge clk);
    for (int k = 0; k < 10; k++) begin
      rx = frame[k];
      repeat (clocks_per_bit) @(negedge clk);
    end
    rx = 1'b1;
  endtask

  task automatic idle(input int bits);
    repeat (bits * 16 * D) @(posedge clk);
  endtask

  initial begin
    int t0, np, ns;
    logic [7:0] b;
    repeat (5) @(posedge clk);
    reset = 1'b0;
    idle(2);
    // random bytes
    for (int i = 0; i < 12; i++) begin
      b = (i == 0) ? 8'h0D : (i == 1) ? 8'h00 : (i == 2) ? 8'hFF : 8'($urandom);
      np = n_done_p; ns = n_done_s;
      send_ticks(b, -1, t0);
      idle(1);
      check(n_done_p == np + 1 && n_done_s == ns + 1, "word count");
      check(dout_p == b, $sformatf("plain: got %02h expected %02h", dout_p, b));
      check(dout_s == b, $sformatf("super: got %02h expected %02h", dout_s, b));
      // detection tick = t0 + 1 is sample 0; stop-bit sample 7 is 9*16 + 7 later
      check(t_done_p == t0 + 1 + 9 * 16 + 7, $sformatf("plain done at tick %0d, expected %0d",
                                                      t_done_p - t0, 1 + 9 * 16 + 7));
      check(t_done_s == t0 + 1 + 9 * 16 + 8, $sformatf("super done at tick %0d, expected %0d",
                                                      t_done_s - t0, 1 + 9 * 16 + 8));
    end
    // spike at the middle of data bit 3
    b = 8'h5A;
    send_ticks(b, 3, t0);
    idle(1);
    check(dout_p == (b ^ 8'h08), $sformatf("plain with spike: got %02h expected %02h", dout_p, b ^ 8'h08));
    check(dout_s == b, $sformatf("super with spike: got %02h expected %02h", dout_s, b));
    // sender 3 % fast and 3 % slow
    for (int i = 0; i < 4; i++) begin
      b = 8'($urandom);
      send_clocks(b, (i % 2 == 0) ? (16 * D * 97) / 100 : (16 * D * 103) / 100);
      idle(2);
      check(dout_p == b && dout_s == b,
            $sformatf("rate offset: got %02h/%02h expected %02h", dout_p, dout_s, b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40 * 16 * D * 12) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
