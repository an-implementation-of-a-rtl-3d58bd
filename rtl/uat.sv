// uat: the universal asynchronous transmitter, a transmit-only serial port
// (8 data bits, no parity, one stop bit, LSB first, line idle high).
//
// It runs on the processor clock.  When the controller pulses Load_UAT
// during a memory write and the address on MA_In equals UAT_ADDR, the low
// byte of the written word is taken.  At the next rising edge of the bit
// clock clk_UAT (9.6 kHz) the nine-bit shift register is loaded with the
// byte and a start bit; each further bit-clock edge shifts one bit out on
// To_UAT and shifts a 1 in, so after nine bit times the line returns to the
// stop/idle level.  A new byte must not be written before the previous one
// has left (ten bit times): there is no busy flag, and software paces
// itself, for instance with a timer.  The mapped address UAT_ADDR and the
// choice of the low byte are this design's.
module uat #(
  parameter logic [15:0] UAT_ADDR = 16'hFFF0
) (
  input  logic        clk,
  input  logic        reset,
  input  logic        Load_UAT,
  input  logic        clk_UAT,
  input  logic [15:0] MA_In,
  input  logic [15:0] Data_In,
  output logic        To_UAT
);
  logic [8:0] shreg;
  logic [7:0] hold;
  logic       pending;
  logic [1:0] bclk_sync;
  logic       tick;

  // bit clock comes from another clock domain: two-stage synchroniser
  always_ff @(posedge clk) begin
    if (reset) bclk_sync <= 2'b00;
    else       bclk_sync <= {bclk_sync[0], clk_UAT};
  end
  logic bclk_q;
  always_ff @(posedge clk) begin
    if (reset) bclk_q <= 1'b0;
    else       bclk_q <= bclk_sync[1];
  end
  assign tick = bclk_sync[1] & ~bclk_q;

  always_ff @(posedge clk) begin
    if (reset) begin
      shreg   <= '1;
      hold    <= '0;
      pending <= 1'b0;
    end else begin
      if (Load_UAT && {MA_In[15:1], 1'b0} == {UAT_ADDR[15:1], 1'b0}) begin
        hold    <= Data_In[7:0];
        pending <= 1'b1;
      end
      if (tick) begin
        if (pending) begin
          shreg   <= {hold, 1'b0};
          pending <= 1'b0;
        end else begin
          shreg   <= {1'b1, shreg[8:1]};
        end
      end
    end
  end

  assign To_UAT = shreg[0];
endmodule
