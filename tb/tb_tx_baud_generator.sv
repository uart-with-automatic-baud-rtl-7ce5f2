// tb_tx_baud_generator: checks the spacing of the transmit 16x tick.
//
// For every rate of uart_pkg::baud_e the generator runs at the 50 MHz default.
// The testbench measures the clocks between consecutive baud_clk2 pulses and
// compares them with round(50e6 / (16 * baud)), worked out here from the
// integer rate, and with 81 for 38400 baud. It also checks that each tick lasts
// exactly one clock. A watchdog ends the run as failed.
`timescale 1ns/1ps
module tb_tx_baud_generator;
  import uart_pkg::*;

  logic  clk = 1'b0;
  logic  reset = 1'b1;
  baud_e baud_sel = BAUD_9600;
  logic  baud_clk2;
  int    checks = 0, failures = 0;

  always #10 clk = ~clk;

  tx_baud_generator dut (.clk(clk), .reset(reset), .baud_sel(baud_sel), .baud_clk2(baud_clk2));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Expected clocks per tick, computed independently of the package.
  function automatic int expected(int baud);
    return (50_000_000 + 8 * baud) / (16 * baud);
  endfunction

  int rates [10] = '{110, 150, 300, 600, 1200, 2400, 4800, 9600, 19200, 38400};

  initial begin
    int t0, t1, cyc;
    for (int r = 0; r < 10; r++) begin
      reset    = 1'b1;
      baud_sel = baud_e'(r);
      repeat (3) @(posedge clk);
      reset = 1'b0;
      cyc = 0;
      // first tick, then two tick-to-tick spacings
      while (!baud_clk2) begin @(posedge clk); cyc++; end
      for (int k = 0; k < 2; k++) begin
        @(posedge clk); cyc = 1;
        check(!baud_clk2, $sformatf("rate %0d: tick wider than one clock", rates[r]));
        while (!baud_clk2) begin @(posedge clk); cyc++; end
        check(cyc == expected(rates[r]),
              $sformatf("rate %0d: spacing %0d, expected %0d", rates[r], cyc, expected(rates[r])));
      end
    end
    baud_sel = BAUD_38400;
    reset = 1'b1; repeat (2) @(posedge clk); reset = 1'b0;
    while (!baud_clk2) @(posedge clk);
    @(posedge clk); cyc = 1;
    while (!baud_clk2) begin @(posedge clk); cyc++; end
    check(cyc == 81, $sformatf("38400 baud divisor %0d, expected 81", cyc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
