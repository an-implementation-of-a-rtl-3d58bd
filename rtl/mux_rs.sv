// mux_rs: selects the ALU's source-side operand (Rs or immediate; sport,
// sport_w).
//
// Combinational.  Codes 0..15 select a register half as a byte, 16..23 the
// word registers R0..R7, 24 MA, 25 IR, 26 tmp, 27 the immediate byte from
// the IR and 28 the immediate zero-extended to a word ("00" & IMM), as in
// the multiplexer table.  For code 27 the word output is the immediate
// sign-extended, which PC-relative branches add to the PC (this design's
// choice).  Byte selections give a zero-extended word; word selections give
// their low byte.  Unused codes give 0.
module mux_rs
  import h8_pkg::*;
(
  input  logic [4:0]      rs_sel,
  input  logic [7:0][7:0] rh,
  input  logic [7:0][7:0] rl,
  input  logic [15:0]     ma,
  input  logic [15:0]     ir,
  input  logic [15:0]     tmp,
  input  logic [7:0]      IMM,
  output logic [7:0]      mux_B_out,
  output logic [15:0]     mux_W_out
);
  always_comb begin
    mux_W_out = 16'h0000;
    if (!rs_sel[4])
      mux_W_out = {8'h00, rs_sel[0] ? rl[rs_sel[3:1]] : rh[rs_sel[3:1]]};
    else if (rs_sel[3] == 1'b0)
      mux_W_out = {rh[rs_sel[2:0]], rl[rs_sel[2:0]]};
    else begin
      unique case (rs_sel)
        RS_MA:   mux_W_out = ma;
        RS_IR:   mux_W_out = ir;
        RS_TMP:  mux_W_out = tmp;
        RS_IMM:  mux_W_out = {{8{IMM[7]}}, IMM};
        RS_IMMZ: mux_W_out = {8'h00, IMM};
        default: mux_W_out = 16'h0000;
      endcase
    end
  end
  assign mux_B_out = mux_W_out[7:0];
endmodule
