// ma: 16-bit memory address register.
//
// Loads mux_ma's output when load is high.  The memory is 16 bits wide, so
// the address sent to memory (reg_out) always has bit 0 cleared; the stored
// bit 0 is brought out separately as `lower`, which tells the datapath and
// controller whether the low byte (lower = 1, odd address) or the high byte
// (lower = 0, even address) of the word is meant.  Synchronous reset to 0.
module ma (
  input  logic        clk,
  input  logic        reset,
  input  logic        load,
  input  logic [15:0] reg_in,
  output logic [15:0] reg_out,
  output logic        lower
);
  logic [15:0] addr_q;
  always_ff @(posedge clk) begin
    if (reset)     addr_q <= '0;
    else if (load) addr_q <= reg_in;
  end
  assign reg_out = {addr_q[15:1], 1'b0};
  assign lower   = addr_q[0];
endmodule
