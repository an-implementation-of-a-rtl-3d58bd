// mux_ma: selects the next memory address.
//
// Combinational.  ma_sel 00 = PC, 01 = the IR's 8-bit absolute address
// (zero-extended), 10 = the bridge word (an address fetched from memory or
// taken from a register), 11 = the ALU word (computed addresses).  The
// four sources follow the memory-address schematic; codes 00, 01 and 11
// follow the memory-address table, and code 10 is read as the bridge.
module mux_ma
  import h8_pkg::*;
(
  input  logic [15:0] aa,
  input  logic [15:0] pc,
  input  logic [15:0] data,
  input  logic [15:0] bdg,
  input  logic [1:0]  ma_sel,
  output logic [15:0] ma_out
);
  always_comb begin
    unique case (ma_sel)
      MA_PC:   ma_out = pc;
      MA_ABS:  ma_out = aa;
      MA_BDG:  ma_out = bdg;
      default: ma_out = data;
    endcase
  end
endmodule
