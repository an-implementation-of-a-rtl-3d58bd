// mux_ccr: selects the value loaded into the condition code register:
// 00 the ALU's flags, 01 the bridge's flags, 10 the accumulator's flags,
// 11 the ALU byte result itself (LDC, ANDC, ORC, XORC load the CCR as data).
// Combinational; codes follow the condition-code-register table.
module mux_ccr
  import h8_pkg::*;
(
  input  logic [7:0] alu,
  input  logic [7:0] data,
  input  logic [7:0] bdg,
  input  logic [7:0] acc,
  input  logic [1:0] ccr_sel,
  output logic [7:0] mux_out
);
  always_comb begin
    unique case (ccr_sel)
      CCR_FROM_ALU: mux_out = alu;
      CCR_FROM_BDG: mux_out = bdg;
      CCR_FROM_ACC: mux_out = acc;
      default:      mux_out = data;
    endcase
  end
endmodule
