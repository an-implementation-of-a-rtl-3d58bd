// register16: 16-bit loadable register used for the program counter (PC),
// the memory data register (MD) and the temporary register (tmp).
//
// Two data inputs, the bridge word and the ALU word, are selected by the
// two-bit load code: 00 holds, 01 loads the bridge word, 10 loads the ALU
// word, 11 holds.  The two sources follow the datapath figures; the code
// values are this design's choice.  Synchronous active-high reset to 0 (the
// PC starts at address 0).  The output changes on the rising clock edge.
module register16
  import h8_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  input  logic [1:0]  load,
  input  logic [15:0] bdg_in,
  input  logic [15:0] reg_in,
  output logic [15:0] reg_out
);
  always_ff @(posedge clk) begin
    if (reset)                reg_out <= '0;
    else if (load == LD_BDG)  reg_out <= bdg_in;
    else if (load == LD_ALU)  reg_out <= reg_in;
  end
endmodule
