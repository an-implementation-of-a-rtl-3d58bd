// timer: one of the three 8-bit cycle-accurate timers of the timing
// extension.
//
// Loading (load high for one cycle) stores time_in both as the reload value
// and as the count.  Every following clock the count falls by one; in the
// cycle it is zero, done is high and the next edge reloads it, so a timer
// loaded with N raises done once every N+1 cycles, with no drift.  The
// controller's timer-wait instruction stalls until done, which makes a loop
// body that contains the wait take exactly N+1 cycles per pass as long as
// its own work is shorter.  The reload period (N+1) is this design's
// reading of "count down and are reloaded when they reach zero".
// Synchronous active-high reset clears count and reload value (done high).
module timer #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             reset,
  input  logic [WIDTH-1:0] time_in,
  input  logic             load,
  output logic             done
);
  logic [WIDTH-1:0] count, reload;

  always_ff @(posedge clk) begin
    if (reset) begin
      count  <= '0;
      reload <= '0;
    end else if (load) begin
      count  <= time_in;
      reload <= time_in;
    end else if (count == '0) begin
      count  <= reload;
    end else begin
      count  <= count - 1'b1;
    end
  end

  assign done = (count == '0);
endmodule
