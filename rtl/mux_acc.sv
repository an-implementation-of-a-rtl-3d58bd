// mux_acc: selects the byte the accumulator shifts.
//
// Combinational.  acc_sel = 2n picks R(n)H, 2n+1 picks R(n)L, for n = 0..7,
// as in the accumulator input-selection table (codes 1110 and 1111, R7H and
// R7L, complete that pattern).
module mux_acc (
  input  logic [3:0]      acc_sel,
  input  logic [7:0][7:0] rh,      // rh[n] = R(n)H
  input  logic [7:0][7:0] rl,      // rl[n] = R(n)L
  output logic [7:0]      mux_out
);
  assign mux_out = acc_sel[0] ? rl[acc_sel[3:1]] : rh[acc_sel[3:1]];
endmodule
