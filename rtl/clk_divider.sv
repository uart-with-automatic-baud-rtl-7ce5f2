// clk_divider: divides clk by an integer N (N >= 2) with a 50 % duty cycle.
//
// A rising-edge counter runs through 0..N-1 and a flip-flop pos_q is high for
// the first ceil(N/2) counts. For even N, pos_q is the output. For odd N a
// second flip-flop copies pos_q on the falling edge. ANDing the two drops half a
// clock from the end of the high time, so the output is high for exactly N/2
// clocks. The output is a divided clock signal, meant to be brought out to
// other circuits, not to clock logic inside this design.
//
// reset is synchronous and active high and holds the output low. The first
// rising output edge follows one clock after reset is released (half a clock
// later for odd N).
module clk_divider #(
  parameter int unsigned N = 2
) (
  input  logic clk,
  input  logic reset,
  output logic clk_out
);

  localparam int unsigned W    = (N > 2) ? $clog2(N) : 1;
  localparam int unsigned HIGH = (N + 1) / 2;

  logic [W-1:0] cnt;
  logic [W-1:0] cnt_next;
  logic         pos_q;
  logic         neg_q;

  always_comb cnt_next = (cnt == W'(N - 1)) ? '0 : cnt + 1'b1;

  always_ff @(posedge clk) begin
    if (reset) begin
      cnt   <= W'(N - 1);
      pos_q <= 1'b0;
    end else begin
      cnt   <= cnt_next;
      pos_q <= (cnt_next < W'(HIGH));
    end
  end

  always_ff @(negedge clk) begin
    if (reset) neg_q <= 1'b0;
    else       neg_q <= pos_q;
  end

  always_comb clk_out = (N % 2 == 1) ? (pos_q & neg_q) : pos_q;

  initial assert (N >= 2) else $error("clk_divider: N must be at least 2");

endmodule
