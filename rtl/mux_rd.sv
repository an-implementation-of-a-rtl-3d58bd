// mux_rd: selects the ALU's destination-side operand (Rd; dport, dport_w).
//
// Combinational.  Codes 0..15 select a register half as a byte (2n =
// R(n)H, 2n+1 = R(n)L); 27 the CCR; 28 and 29 the high and low byte of MD;
// 30 the concatenator word.  These follow the multiplexer table.  This
// design adds 16..23 for the word registers R0..R7, 24 for the PC and 25
// for the whole MD word, which word arithmetic, branch targets and word
// loads need.  Byte selections give a zero-extended word; word selections
// give their low byte.  Unused codes give 0.
module mux_rd
  import h8_pkg::*;
(
  input  logic [4:0]      rd_sel,
  input  logic [7:0][7:0] rh,
  input  logic [7:0][7:0] rl,
  input  logic [7:0]      ccr,
  input  logic [15:0]     md_out,
  input  logic [15:0]     pc,
  input  logic [15:0]     cnct,
  output logic [7:0]      mux_B_out,
  output logic [15:0]     mux_W_out
);
  always_comb begin
    mux_W_out = 16'h0000;
    if (!rd_sel[4])
      mux_W_out = {8'h00, rd_sel[0] ? rl[rd_sel[3:1]] : rh[rd_sel[3:1]]};
    else if (rd_sel[3] == 1'b0)
      mux_W_out = {rh[rd_sel[2:0]], rl[rd_sel[2:0]]};
    else begin
      unique case (rd_sel)
        RD_PC:   mux_W_out = pc;
        RD_MD:   mux_W_out = md_out;
        RD_CCR:  mux_W_out = {8'h00, ccr};
        RD_MDH:  mux_W_out = {8'h00, md_out[15:8]};
        RD_MDL:  mux_W_out = {8'h00, md_out[7:0]};
        RD_CNCT: mux_W_out = cnct;
        default: mux_W_out = 16'h0000;
      endcase
    end
  end
  assign mux_B_out = mux_W_out[7:0];
endmodule
