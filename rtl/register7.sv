// register7: the 8-bit condition code register (CCR).
//
// Loads reg_in (the output of mux_ccr) on a rising edge when load is high,
// otherwise holds.  Bit layout as on the H8/300: I(7) UI(6) H(5) U(4) N(3)
// Z(2) V(1) C(0).  Reset value: I set, the rest clear, as after an H8/300
// reset (this design's choice; the reset value is not specified).
module register7 (
  input  logic       clk,
  input  logic       reset,
  input  logic       load,
  input  logic [7:0] reg_in,
  output logic [7:0] reg_out
);
  always_ff @(posedge clk) begin
    if (reset)     reg_out <= 8'h80;
    else if (load) reg_out <= reg_in;
  end
endmodule
