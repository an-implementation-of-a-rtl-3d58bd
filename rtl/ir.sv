// ir: 16-bit instruction register.
//
// Loads the bridge word when loadir is high and holds the instruction for
// the controller until the next fetch.  It presents three views of the
// instruction: the whole word (reg_out), the low byte as immediate data
// (IMM_out) and the low byte zero-extended as an 8-bit absolute address
// H'0000..H'00FF (abs_out).  Synchronous active-high reset to 0 (NOP).
module ir (
  input  logic        clk,
  input  logic        reset,
  input  logic        loadir,
  input  logic [15:0] reg_in,
  output logic [15:0] abs_out,
  output logic [15:0] reg_out,
  output logic [7:0]  IMM_out
);
  always_ff @(posedge clk) begin
    if (reset)       reg_out <= '0;
    else if (loadir) reg_out <= reg_in;
  end
  assign IMM_out = reg_out[7:0];
  assign abs_out = {8'h00, reg_out[7:0]};
endmodule
