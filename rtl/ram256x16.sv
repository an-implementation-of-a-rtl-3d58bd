// ram256x16: the on-chip program and data memory, one 256 x 16-bit block
// RAM in write-first mode.
//
// Synchronous: with ram_ce high, a rising edge writes mem_in when wr_bar is
// low, and registers the addressed word on mem_out; in a write cycle
// mem_out shows the word just written (write-first).  The word index is
// adrs[ADDR_BITS:1]: byte addresses are even, bit 0 chooses a byte inside
// the datapath, and higher address bits are not decoded (addresses alias
// every 2^(ADDR_BITS+1) bytes).  Contents are not reset; a testbench or an
// initial file supplies the program.
module ram256x16 #(
  parameter int unsigned ADDR_BITS = 8,
  parameter int unsigned WIDTH     = 16
) (
  input  logic             clk,
  input  logic             wr_bar,
  input  logic             ram_ce,
  input  logic [15:0]      adrs,
  input  logic [WIDTH-1:0] mem_in,
  output logic [WIDTH-1:0] mem_out
);
  logic [WIDTH-1:0] mem [2**ADDR_BITS];
  logic [ADDR_BITS-1:0] idx;

  assign idx = adrs[ADDR_BITS:1];

  always_ff @(posedge clk) begin
    if (ram_ce) begin
      if (!wr_bar) begin
        mem[idx] <= mem_in;
        mem_out  <= mem_in;
      end else begin
        mem_out  <= mem[idx];
      end
    end
  end
endmodule
