// tb_fdivider: checks the four divided clocks.
//
// With a 20 ns input clock, the testbench times the rising and falling edges
// of each output. baud_clk1, baud_clk2a, baud_clk3 and baud_clk4 must have
// periods of 40, 80, 160 and 60 ns (f/2, f/4, f/8, f/3) and high times of half
// their period, including the 30 ns high time of the divide-by-3 output. Outputs
// must stay low during reset. A watchdog ends the run as failed.
`timescale 1ns/1ps
module tb_fdivider;
  logic clk = 1'b0;
  logic reset = 1'b1;
  logic [3:0] q;
  int   checks = 0, failures = 0;

  always #10 clk = ~clk;

  fdivider dut (.clk(clk), .reset(reset), .baud_clk1(q[0]), .baud_clk2a(q[1]),
                .baud_clk3(q[2]), .baud_clk4(q[3]));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int ratio [4] = '{2, 4, 8, 3};
  realtime t_rise [4][$];
  realtime t_fall [4][$];

  for (genvar i = 0; i < 4; i++) begin : g_mon
    always @(posedge q[i]) if (!reset) t_rise[i].push_back($realtime);
    always @(negedge q[i]) if (!reset) t_fall[i].push_back($realtime);
  end

  initial begin
    repeat (4) @(posedge clk);
    check(q == 4'b0000, "outputs not low in reset");
    @(negedge clk) reset = 1'b0;
    repeat (100) @(posedge clk);
    for (int i = 0; i < 4; i++) begin
      realtime per, hi;
      check(t_rise[i].size() >= 10, $sformatf("output %0d: only %0d rising edges", i, t_rise[i].size()));
      for (int k = 2; k < 8; k++) begin
        per = t_rise[i][k+1] - t_rise[i][k];
        check(per == 20.0 * ratio[i], $sformatf("output %0d: period %0t, expected %0d ns",
                                                 i, per, 20 * ratio[i]));
      end
      // high time: first fall after rise k
      for (int k = 2; k < 6; k++) begin
        hi = -1;
        foreach (t_fall[i][m]) if (hi < 0 && t_fall[i][m] > t_rise[i][k]) hi = t_fall[i][m] - t_rise[i][k];
        check(hi == 10.0 * ratio[i], $sformatf("output %0d: high time %0t, expected %0d ns",
                                                i, hi, 10 * ratio[i]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
