// div_clk: divides the 50 MHz board clock by two to make the 25 MHz
// processor clock.  A toggle flip-flop with a 50 % duty cycle.
//
// The divider keeps running while `reset` is high: every register of the
// core is reset synchronously on the divided clock, so stopping that clock
// during reset would keep the reset from ever reaching them.  `reset` is
// therefore accepted but not used.
module div_clk (
  input  logic clk,
  input  logic reset,
  output logic DClk
);
  always_ff @(posedge clk) DClk <= ~DClk;
endmodule
