// tb_receiver: checks rate detection in the 9600-baud receiver.
//
// A tick is made here every D clocks, so one receiver bit time Trx is 16*D
// clocks. For bit lengths of 0.25, 0.5, 1, 2, 4 and 8 Trx (38400 down to 1200
// baud relative to 9600) the testbench resets the receiver and sends the
// carriage return 8'h0D. It then checks:
//   - baud_load pulses exactly once, and dout then holds the byte predicted by
//     sampling the frame at (k + 7.5/16) * Trx, computed here from the bit times;
//   - baud_lo stays low until the line has been high for 20 bit times after the
//     word. Expected rise: max(9.5, 9 * ratio) + 20 Trx after the start edge,
//     within two ticks;
//   - in normal mode a further word gives rx_done_tick and dout but no
//     baud_load, and baud_lo stays high.
// A watchdog ends the run as failed.
`timescale 1ns/1ps
module tb_receiver;
  localparam int D    = 4;
  localparam int TRX  = 16 * D;

  logic       clk = 1'b0;
  logic       reset = 1'b1;
  logic       rx = 1'b1;
  logic       baud_clk22 = 1'b0;
  logic [7:0] dout;
  logic       rx_done_tick, baud_load, baud_lo;
  int         checks = 0, failures = 0;
  int         tickcnt = 0, cyc = 0;
  int         n_load = 0, n_done = 0, t_lock = -1;
  logic [7:0] load_val;

  always #10 clk = ~clk;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    tickcnt    <= (tickcnt == D - 1) ? 0 : tickcnt + 1;
    baud_clk22 <= (tickcnt == D - 1);
    if (baud_load) begin n_load <= n_load + 1; load_val <= dout; end
    if (rx_done_tick) n_done <= n_done + 1;
  end

  always @(posedge baud_lo) t_lock = cyc;

  receiver dut (.clk(clk), .reset(reset), .rx(rx), .baud_clk22(baud_clk22), .dout(dout),
                .rx_done_tick(rx_done_tick), .baud_load(baud_load), .baud_lo(baud_lo));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send(input logic [7:0] b, input int clocks_per_bit, output int t0);
    logic [9:0] frame;
    frame = {1'b1, b, 1'b0};
    @(negedge clk);
    t0 = cyc;
    for (int k = 0; k < 10; k++) begin
      rx = frame[k];
      repeat (clocks_per_bit) @(negedge clk);
    end
    rx = 1'b1;
  endtask

  // Byte read from a frame of bit length p clocks when data bit k is sampled
  // about (k + 7.5/16) * Trx after the start edge.
  function automatic logic [7:0] predict(input logic [7:0] b, input int p);
    logic [7:0] r;
    logic [9:0] frame;
    int j;
    frame = {1'b1, b, 1'b0};
    for (int k = 1; k <= 8; k++) begin
      j = ((32 * k + 15) * TRX) / (32 * p);
      r[k-1] = (j <= 9) ? frame[j] : 1'b1;
    end
    return r;
  endfunction

  int periods [6] = '{TRX / 4, TRX / 2, TRX, 2 * TRX, 4 * TRX, 8 * TRX};

  initial begin
    int t0, p, nl, nd, exp_lock;
    logic [7:0] exp_b;
    for (int i = 0; i < 6; i++) begin
      p = periods[i];
      reset = 1'b1;
      repeat (3) @(posedge clk);
      reset = 1'b0;
      repeat (3 * TRX) @(posedge clk);
      t_lock = -1;
      nl = n_load;
      check(!baud_lo, "baud_lo set after reset");
      send(8'h0D, p, t0);
      // wait for lock
      while (!baud_lo && cyc < t0 + 120 * TRX) @(posedge clk);
      exp_b = predict(8'h0D, p);
      check(n_load == nl + 1, $sformatf("bit length %0d: %0d baud_load pulses", p, n_load - nl));
      check(load_val == exp_b, $sformatf("bit length %0d: detection word %02h, expected %02h",
                                         p, load_val, exp_b));
      // 2 * exp_lock in half bit times: max(19, 18 * ratio) + 40
      exp_lock = t0 + ((19 * TRX > 18 * p) ? (19 * TRX) / 2 : 9 * p) + 20 * TRX;
      check(baud_lo && t_lock >= exp_lock - 2 * D && t_lock <= exp_lock + 2 * D,
            $sformatf("bit length %0d: baud_lo at %0d, expected %0d", p, t_lock - t0, exp_lock - t0));
      // normal mode
      nl = n_load; nd = n_done;
      send(8'h55, TRX, t0);
      repeat (TRX) @(posedge clk);
      check(n_done == nd + 1 && dout == 8'h55, $sformatf("normal mode word %02h", dout));
      check(n_load == nl && baud_lo, "normal mode disturbed");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6 * 200 * TRX) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
