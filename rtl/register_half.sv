// register_half: one 8-bit half (R#H or R#L) of a 16-bit general register.
//
// Sixteen of these form the eight general registers R0..R7.  The two-bit
// load_sel code follows the general-register operation table: 01 loads the
// ALU byte result, 10 loads this half's byte of the ALU word result (bits
// 15:8 for a high half, 7:0 for a low half), 11 loads the accumulator
// (shift unit) output, 00 holds.  The HIGH parameter picks which byte of the
// word a half takes.  Synchronous active-high reset to 0.
module register_half
  import h8_pkg::*;
#(
  parameter bit HIGH = 1'b1
) (
  input  logic        clk,
  input  logic        reset,
  input  logic [1:0]  load_sel,
  input  logic [15:0] alu_W,
  input  logic [7:0]  alu_B,
  input  logic [7:0]  acc_in,
  output logic [7:0]  reg_out
);
  logic [7:0] word_byte;
  assign word_byte = HIGH ? alu_W[15:8] : alu_W[7:0];

  always_ff @(posedge clk) begin
    if (reset) reg_out <= '0;
    else begin
      unique case (load_sel)
        LR_ALUB: reg_out <= alu_B;
        LR_ALUW: reg_out <= word_byte;
        LR_ACC:  reg_out <= acc_in;
        default: ;
      endcase
    end
  end
endmodule
