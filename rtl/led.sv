// led: debugging display latch for the board's LED displays.
//
// The three manual trigger inputs (pulses from board switches) choose which
// bus the data display shows: Tri_mem_in the memory write data, Tri_mem_out
// the memory read data, Tri_add the memory address (the selection after
// reset).  Whenever the controller raises Trigger, the selected bus is
// latched on LED_data_out and the controller state on LED_state_out, so the
// display holds the values of the triggering cycle.  The outputs are the
// raw values; segment decoding is left to the board.  The sticky selection
// and the raw outputs are this design's reading of the module's ports.
module led (
  input  logic        clk,
  input  logic        reset,
  input  logic        Trigger,
  input  logic        Tri_mem_in,
  input  logic        Tri_mem_out,
  input  logic        Tri_add,
  input  logic [7:0]  States_IN,
  input  logic [15:0] mem_in,
  input  logic [15:0] mem_out,
  input  logic [15:0] mem_add,
  output logic [15:0] LED_data_out,
  output logic [7:0]  LED_state_out
);
  typedef enum logic [1:0] {SHOW_ADD, SHOW_IN, SHOW_OUT} show_e;
  show_e show;

  always_ff @(posedge clk) begin
    if (reset)            show <= SHOW_ADD;
    else if (Tri_mem_in)  show <= SHOW_IN;
    else if (Tri_mem_out) show <= SHOW_OUT;
    else if (Tri_add)     show <= SHOW_ADD;
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      LED_data_out  <= '0;
      LED_state_out <= '0;
    end else if (Trigger) begin
      LED_state_out <= States_IN;
      unique case (show)
        SHOW_IN:  LED_data_out <= mem_in;
        SHOW_OUT: LED_data_out <= mem_out;
        default:  LED_data_out <= mem_add;
      endcase
    end
  end
endmodule
