// byte_clock_gen: clock select and local divide-by-4 byte clock generator.
//
// The 800 MHz output of the on-chip PLL's VCO is multiplexed with the scan
// clock before it enters the balanced clock tree, so in scan mode the scan
// clock is distributed with the same skew as the functional clock. At a tail
// of the tree a two-bit counter divides the tree clock by four to make the
// 200 MHz byte clock. The counter value (phase) is also brought out: serial
// link logic in the 800 MHz domain uses it to pass bytes to and from the byte
// clock domain half a byte period away from the byte clock's rising edge.
// byteclk is high for phases 0 and 1 and rises when the counter wraps to 0.
// On the chip there is one such counter per tree tail, all started together;
// here one instance can serve every block, which is this design's choice.
// The clock multiplexer is a plain combinational select. The counter has no
// reset: it runs from power-up, so the byte clock keeps toggling while the
// rest of the chip is held in reset, and its start value does not matter
// because every crossing between the two domains is timed by phase.
module byte_clock_gen (
  input  logic       vco_clk,    // 800 MHz from the PLL
  input  logic       scan_clk,   // scan clock
  input  logic       scan_mode,  // 1: distribute the scan clock
  output logic       tree_clk,   // clock entering the distribution tree
  output logic       byteclk,    // tree_clk divided by four
  output logic [1:0] phase       // position of tree_clk within byteclk
);

  logic [1:0] cnt;

  assign tree_clk = scan_mode ? scan_clk : vco_clk;

  always_ff @(posedge tree_clk) begin
    cnt <= cnt + 2'd1;
  end

  assign phase   = cnt;
  assign byteclk = ~cnt[1];

endmodule
