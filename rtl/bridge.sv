// bridge: routes a value from mux_rn to the 16-bit special registers (IR,
// PC, MA, MD, tmp) and to the timers, and gives the flags of a data move.
//
// Combinational.  bdg_sel 00 passes the word, 01 zero-extends the byte, 10
// copies the byte into both halves (so a byte can be stored at either half
// of a memory word) and 11 sign-extends the byte.  These four modifications
// are this design's choice: the operations themselves are not specified.
// ccr_out is the CCR with N and Z set from the moved value (word for code
// 00, byte otherwise) and V cleared, as an H8/300 MOV does; it reaches the
// CCR through mux_ccr code 01.
module bridge
  import h8_pkg::*;
(
  input  logic [7:0]  ccr_in,
  input  logic [7:0]  nport_B,
  input  logic [15:0] nport_W,
  input  logic [1:0]  bdg_sel,
  output logic [7:0]  ccr_out,
  output logic [15:0] bdgW_out
);
  always_comb begin
    unique case (bdg_sel)
      BDG_WORD: bdgW_out = nport_W;
      BDG_BYTE: bdgW_out = {8'h00, nport_B};
      BDG_DUP:  bdgW_out = {nport_B, nport_B};
      default:  bdgW_out = {{8{nport_B[7]}}, nport_B};
    endcase
  end

  always_comb begin
    ccr_out = ccr_in;
    if (bdg_sel == BDG_WORD) ccr_out[CCR_N:CCR_Z] = nz16(nport_W);
    else                     ccr_out[CCR_N:CCR_Z] = nz8(nport_B);
    ccr_out[CCR_V] = 1'b0;
  end
endmodule
