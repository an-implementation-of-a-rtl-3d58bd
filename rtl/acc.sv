// acc: the accumulator, the datapath's shift and rotate unit.
//
// Combinational.  Takes one byte (acc_in, chosen by mux_acc from the
// general-register halves) and the current CCR, and performs the shift or
// rotate selected by acc_op: rotate left/right, rotate left/right through
// carry, arithmetic shift left/right, logical shift left, and logical shift
// right.  The first seven codes follow the accumulator operation table;
// logical shift right takes the one remaining code, 0111, by this design's
// choice.  Flags follow the H8/300 rules: C receives the bit shifted out, N
// and Z describe the result, V is the overflow of an arithmetic left shift
// and 0 otherwise; the other CCR bits pass through.  The result goes to the
// general registers (load code 11) and ccr_out to mux_ccr (code 10).
module acc
  import h8_pkg::*;
(
  input  logic [3:0] acc_op,
  input  logic [7:0] acc_in,
  input  logic [7:0] ccr_in,
  output logic [7:0] acc_out,
  output logic [7:0] ccr_out
);
  logic c_in, c_out, v_out;

  assign c_in = ccr_in[CCR_C];

  always_comb begin
    acc_out = acc_in;
    c_out   = c_in;
    v_out   = 1'b0;
    unique case (acc_op)
      ACC_ROTL:  begin acc_out = {acc_in[6:0], acc_in[7]}; c_out = acc_in[7]; end
      ACC_ROTR:  begin acc_out = {acc_in[0], acc_in[7:1]}; c_out = acc_in[0]; end
      ACC_ROTXL: begin acc_out = {acc_in[6:0], c_in};      c_out = acc_in[7]; end
      ACC_ROTXR: begin acc_out = {c_in, acc_in[7:1]};      c_out = acc_in[0]; end
      ACC_SHAL:  begin
        acc_out = {acc_in[6:0], 1'b0};
        c_out   = acc_in[7];
        v_out   = acc_in[7] ^ acc_in[6];
      end
      ACC_SHAR:  begin acc_out = {acc_in[7], acc_in[7:1]}; c_out = acc_in[0]; end
      ACC_SHLL:  begin acc_out = {acc_in[6:0], 1'b0};      c_out = acc_in[7]; end
      ACC_SHLR:  begin acc_out = {1'b0, acc_in[7:1]};      c_out = acc_in[0]; end
      default: ;
    endcase
  end

  always_comb begin
    ccr_out        = ccr_in;
    ccr_out[CCR_N] = acc_out[7];
    ccr_out[CCR_Z] = (acc_out == 8'h00);
    ccr_out[CCR_V] = v_out;
    ccr_out[CCR_C] = c_out;
  end
endmodule
