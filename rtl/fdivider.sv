// fdivider: frequency divider producing four lower clocks from clk, for
// circuits attached to the UART that need a slower clock.
//
// Four clk_divider instances give baud_clk1 = clk/2, baud_clk2a = clk/4,
// baud_clk3 = clk/8 and baud_clk4 = clk/3, all with 50 % duty cycle. Each one is
// built from flip-flops: a small counter, plus for the odd ratio a flip-flop on
// the falling edge. The ratios are parameters.
//
// reset is synchronous and active high and holds all outputs low. The outputs
// are free-running from the clock after reset is released.
//
// The four outputs and their ratios 2, 4, 8 and 3 follow the source design.
// The counter form and the 50 % duty cycle of the odd ratio are choices of this
// design.
module fdivider #(
  parameter int unsigned N1 = 2,
  parameter int unsigned N2 = 4,
  parameter int unsigned N3 = 8,
  parameter int unsigned N4 = 3
) (
  input  logic clk,
  input  logic reset,
  output logic baud_clk1,
  output logic baud_clk2a,
  output logic baud_clk3,
  output logic baud_clk4
);

  clk_divider #(.N(N1)) u_div1 (.clk(clk), .reset(reset), .clk_out(baud_clk1));
  clk_divider #(.N(N2)) u_div2 (.clk(clk), .reset(reset), .clk_out(baud_clk2a));
  clk_divider #(.N(N3)) u_div3 (.clk(clk), .reset(reset), .clk_out(baud_clk3));
  clk_divider #(.N(N4)) u_div4 (.clk(clk), .reset(reset), .clk_out(baud_clk4));

endmodule
