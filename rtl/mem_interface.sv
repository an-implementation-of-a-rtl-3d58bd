// mem_interface: routes words between the datapath and the memory.
//
// Combinational.  With read_bar low (a read) data_out carries the word from
// memory.  With both strobes high it carries data_in (MD or concatenator,
// chosen by mux_md), handing that word back to the datapath.  With
// write_bar low, data_in is driven to memory on to_mem.  When not writing
// to_mem is 0: the bus is a plain one-directional signal here rather than
// the tri-state bus of an off-chip memory.  Strobes are active low.
module mem_interface (
  input  logic        wr_bar,
  input  logic        rd_bar,
  input  logic [15:0] data_in,
  input  logic [15:0] from_mem,
  output logic [15:0] to_mem,
  output logic [15:0] data_out
);
  assign data_out = !rd_bar ? from_mem : data_in;
  assign to_mem   = !wr_bar ? data_in  : 16'h0000;
endmodule
