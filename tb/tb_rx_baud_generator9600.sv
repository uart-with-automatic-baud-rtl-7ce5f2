// tb_rx_baud_generator9600: checks that the receive tick comes every
// round(50e6 / (16 * 9600)) = 326 clocks and lasts one clock, and that reset
// restarts the count. A watchdog ends the run as failed.
`timescale 1ns/1ps
module tb_rx_baud_generator9600;
  logic clk = 1'b0;
  logic reset = 1'b1;
  logic baud_clk22;
  int   checks = 0, failures = 0;

  always #10 clk = ~clk;

  rx_baud_generator9600 dut (.clk(clk), .reset(reset), .baud_clk22(baud_clk22));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int cyc;
    repeat (3) @(posedge clk);
    reset = 1'b0;
    cyc = 0;
    while (!baud_clk22) begin @(posedge clk); cyc++; end
    check(cyc == 326, $sformatf("first tick after %0d clocks, expected 326", cyc));
    for (int k = 0; k < 5; k++) begin
      @(posedge clk); cyc = 1;
      check(!baud_clk22, "tick wider than one clock");
      while (!baud_clk22) begin @(posedge clk); cyc++; end
      check(cyc == 326, $sformatf("spacing %0d, expected 326", cyc));
    end
    // reset in the middle of a period restarts it
    repeat (100) @(posedge clk);
    reset = 1'b1; @(posedge clk); reset = 1'b0;
    cyc = 0;
    while (!baud_clk22) begin @(posedge clk); cyc++; end
    check(cyc == 326, $sformatf("after reset %0d clocks, expected 326", cyc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
