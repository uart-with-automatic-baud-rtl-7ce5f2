// tb_baud_rx: checks the pattern-to-rate decoding and the detected-rate tick.
//
// For each detection byte the testbench resets the block, presents the byte on
// dout with a baud_load pulse, and checks baud_sel and baud_ok against a table
// written out here. It then checks that no baud_clkbk tick appears while
// baud_lo is low. After baud_lo rises, the first tick must come one divisor
// after it and the following ones one divisor apart. The divisor,
// round(50e6 / (16 * baud)), is worked out here from the integer rate.
// A watchdog ends the run as failed.
`timescale 1ns/1ps
module tb_baud_rx;
  import uart_pkg::*;

  logic       clk = 1'b0;
  logic       reset = 1'b1;
  logic [7:0] dout = '0;
  logic       baud_load = 1'b0;
  logic       baud_lo = 1'b0;
  logic       baud_clkbk, baud_ok;
  baud_e      baud_sel;
  int         checks = 0, failures = 0;

  always #10 clk = ~clk;

  baud_rx dut (.clk(clk), .reset(reset), .dout(dout), .baud_load(baud_load), .baud_lo(baud_lo),
               .baud_clkbk(baud_clkbk), .baud_sel(baud_sel), .baud_ok(baud_ok));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [7:0] pat  [9] = '{8'hFE, 8'hF2, 8'hF9, 8'h0D, 8'hE6, 8'h78, 8'h80, 8'h00, 8'h55};
  int         rate [9] = '{38400, 19200, 19200, 9600, 4800, 2400, 1200, 9600, 9600};
  baud_e      code [9] = '{BAUD_38400, BAUD_19200, BAUD_19200, BAUD_9600, BAUD_4800,
                           BAUD_2400, BAUD_1200, BAUD_9600, BAUD_9600};
  bit         ok   [9] = '{1, 1, 1, 1, 1, 1, 1, 0, 0};

  initial begin
    int cyc, div, seen;
    for (int i = 0; i < 9; i++) begin
      div = (50_000_000 + 8 * rate[i]) / (16 * rate[i]);
      @(negedge clk) reset = 1'b1; baud_lo = 1'b0;
      @(negedge clk) reset = 1'b0;
      dout = pat[i];
      baud_load = 1'b1;
      @(negedge clk) baud_load = 1'b0;
      dout = 8'h3C;   // later changes of dout must not matter
      check(baud_sel == code[i] && baud_ok == ok[i],
            $sformatf("pattern %02h: baud_sel %s ok %b, expected %s ok %b",
                      pat[i], baud_sel.name(), baud_ok, code[i].name(), ok[i]));
      seen = 0;
      repeat (3000) begin @(negedge clk); if (baud_clkbk) seen++; end
      check(seen == 0, "tick while baud_lo is low");
      baud_lo = 1'b1;
      cyc = 0;
      do begin @(negedge clk); cyc++; end while (!baud_clkbk);
      check(cyc == div, $sformatf("pattern %02h: first tick after %0d clocks, expected %0d",
                                  pat[i], cyc, div));
      for (int k = 0; k < 3; k++) begin
        cyc = 0;
        do begin @(negedge clk); cyc++; end while (!baud_clkbk);
        check(cyc == div, $sformatf("pattern %02h: tick spacing %0d, expected %0d", pat[i], cyc, div));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
