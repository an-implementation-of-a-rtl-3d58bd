// divclk_uat: makes the 9.6 kHz bit clock of the serial transmitter from the
// 50 MHz board clock.
//
// A counter toggles DClk_UAT every HALF_PERIOD input cycles, so the output
// period is 2*HALF_PERIOD cycles: 2604 gives 50e6 / 5208 = 9600.6 Hz, within
// 0.01 % of 9600 baud.  The count HALF_PERIOD is derived here from the two
// clock frequencies; testbenches may shorten it.
module divclk_uat #(
  parameter int unsigned HALF_PERIOD = 2604
) (
  input  logic clk,
  input  logic reset,
  output logic DClk_UAT
);
  logic [$clog2(HALF_PERIOD+1)-1:0] cnt;

  always_ff @(posedge clk) begin
    if (reset) begin
      cnt      <= '0;
      DClk_UAT <= 1'b0;
    end else if (32'(cnt) == HALF_PERIOD - 1) begin
      cnt      <= '0;
      DClk_UAT <= ~DClk_UAT;
    end else begin
      cnt      <= cnt + 1'b1;
    end
  end
endmodule
