// tb_transmitter: checks the serial frames the transmitter puts on tx.
//
// A local tick generator pulses baud_clk2 every D clocks. A monitor on the
// falling clock edge waits for a start bit. It samples tx at the middle of each
// of the ten bits, 16*D clocks apart, and compares start, data (LSB first) and
// stop with the bytes the writer sent. It also checks that tx_done_tick comes
// exactly 160*D clocks after the start edge. The writer sends single bytes with
// idle time between them, then back-to-back bytes written as soon as
// txdatardy clears; those frames must follow each other with no idle time. A
// watchdog ends the run as failed.
`timescale 1ns/1ps
module tb_transmitter;
  localparam int D = 4;           // clocks per tick
  localparam int BIT = 16 * D;    // clocks per bit

  logic       clk = 1'b0;
  logic       reset = 1'b1;
  logic [7:0] din = '0;
  logic       wr = 1'b0;
  logic       baud_clk2 = 1'b0;
  logic       tx, txdatardy, tx_done_tick;
  int         checks = 0, failures = 0;
  int         cyc = 0;
  int         tickcnt = 0;
  logic [7:0] sent [$];
  int         frames = 0, back_to_back = 0;

  always #10 clk = ~clk;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    tickcnt <= (tickcnt == D - 1) ? 0 : tickcnt + 1;
    baud_clk2 <= (tickcnt == D - 1);
  end

  transmitter dut (.clk(clk), .reset(reset), .din(din), .wr(wr), .baud_clk2(baud_clk2),
                   .tx(tx), .txdatardy(txdatardy), .tx_done_tick(tx_done_tick));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic write_byte(input logic [7:0] b);
    @(negedge clk);
    din = b; wr = 1'b1;
    sent.push_back(b);
    @(negedge clk);
    wr = 1'b0;
  endtask

  // Frame monitor: after each frame it looks at tx on the same clock edge, so
  // a start bit that follows the stop bit directly is caught at once.
  initial begin
    int t_start, t_prev_end;
    logic [7:0] got, exp_b;
    t_prev_end = -1;
    @(negedge clk);
    forever begin
      while (reset || tx) @(negedge clk);
      t_start = cyc;
      if (t_start == t_prev_end) back_to_back++;
      got = '0;
      for (int k = 0; k < 10; k++) begin
        while (cyc < t_start + k * BIT + BIT / 2) @(negedge clk);
        if (k == 0)      check(tx == 1'b0, "start bit not low at its middle");
        else if (k == 9) check(tx == 1'b1, "stop bit not high");
        else             got[k-1] = tx;
      end
      exp_b = (sent.size() > 0) ? sent.pop_front() : 8'h00;
      check(got == exp_b, $sformatf("frame %0d: got %02h expected %02h", frames, got, exp_b));
      while (!tx_done_tick && cyc < t_start + 10 * BIT + 4) @(negedge clk);
      check(tx_done_tick && cyc == t_start + 10 * BIT,
            $sformatf("tx_done_tick %0d clocks after the start edge, expected %0d",
                      cyc - t_start, 10 * BIT));
      frames++;
      t_prev_end = cyc;
    end
  end

  initial begin
    repeat (5) @(posedge clk);
    @(negedge clk) reset = 1'b0;
    check(tx == 1'b1, "line not idle high after reset");
    // isolated bytes
    for (int i = 0; i < 4; i++) begin
      write_byte((i == 0) ? 8'h0D : 8'($urandom));
      check(txdatardy == 1'b1, "txdatardy not set by a write");
      repeat (12 * BIT) @(posedge clk);
      check(txdatardy == 1'b0, "txdatardy still set after the frame");
    end
    // back-to-back bytes: write each one as soon as thr is free
    for (int i = 0; i < 6; i++) begin
      write_byte(8'($urandom));
      do @(negedge clk); while (txdatardy);
    end
    repeat (22 * BIT) @(posedge clk);
    check(frames == 10, $sformatf("%0d frames seen, expected 10", frames));
    check(back_to_back >= 4, $sformatf("only %0d back-to-back frames", back_to_back));
    check(tx == 1'b1, "line not idle at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40 * 10 * BIT) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
