// mux_rn: selects the bridge input.
//
// Combinational.  Codes 0..15 select a register half (2n = R(n)H, 2n+1 =
// R(n)L) as a byte; 16..23 select the word registers R0..R7; 24 the memory
// interface data_out (instruction and data words read from memory); 25 MA;
// 26 PC; 30 the CCR as a byte.  These follow the bridge operation table.
// This design adds 27 IR, 28 tmp and 29 the external sr input.  A byte selection drives mux_W_out with
// the byte zero-extended; a word selection drives mux_B_out with its low
// byte.  Unused codes give 0.
module mux_rn
  import h8_pkg::*;
(
  input  logic [4:0]      rn_sel,
  input  logic [7:0][7:0] rh,
  input  logic [7:0][7:0] rl,
  input  logic [15:0]     ma,
  input  logic [15:0]     ir,
  input  logic [15:0]     md_out,   // memory interface data_out
  input  logic [15:0]     pc,
  input  logic [15:0]     tmp,
  input  logic [7:0]      ccr,
  input  logic [15:0]     sr,
  output logic [7:0]      mux_B_out,
  output logic [15:0]     mux_W_out
);
  always_comb begin
    mux_W_out = 16'h0000;
    if (!rn_sel[4])
      mux_W_out = {8'h00, rn_sel[0] ? rl[rn_sel[3:1]] : rh[rn_sel[3:1]]};
    else if (rn_sel[3] == 1'b0)
      mux_W_out = {rh[rn_sel[2:0]], rl[rn_sel[2:0]]};
    else begin
      unique case (rn_sel)
        RN_MEM:  mux_W_out = md_out;
        RN_MA:   mux_W_out = ma;
        RN_PC:   mux_W_out = pc;
        RN_IR:   mux_W_out = ir;
        RN_TMP:  mux_W_out = tmp;
        RN_SR:   mux_W_out = sr;
        RN_CCR:  mux_W_out = {8'h00, ccr};
        default: mux_W_out = 16'h0000;
      endcase
    end
  end
  assign mux_B_out = mux_W_out[7:0];
endmodule
