// mux_md: chooses the word the memory interface writes or hands back to the
// datapath: md_sel = 0 selects the MD register, 1 the concatenator.
// Combinational.
module mux_md (
  input  logic        md_sel,
  input  logic [15:0] cnct,
  input  logic [15:0] md,
  output logic [15:0] mux_out
);
  assign mux_out = md_sel ? cnct : md;
endmodule
