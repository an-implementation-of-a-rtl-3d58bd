// md_concat: the concatenator, which builds a full memory word for a byte
// write.
//
// Memory is only written a word at a time, so a byte store merges the new
// byte from the ALU with the unchanged byte of the word already read into
// MD.  Load code 10 stores {alu_B, md_in[7:0]} (new high byte, even
// address), 11 stores {md_in[15:8], alu_B} (new low byte, odd address); the
// other codes hold.  The result is registered and goes to mux_md and mux_rd.
// Synchronous active-high reset to 0.
module md_concat
  import h8_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  input  logic [7:0]  alu_B,
  input  logic [15:0] md_in,
  input  logic [1:0]  load,
  output logic [15:0] reg_out
);
  always_ff @(posedge clk) begin
    if (reset)                reg_out <= '0;
    else if (load == CN_HIGH) reg_out <= {alu_B, md_in[7:0]};
    else if (load == CN_LOW)  reg_out <= {md_in[15:8], alu_B};
  end
endmodule
