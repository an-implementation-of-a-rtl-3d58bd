// h8_top: the complete system: processor core, block RAM, clock dividers,
// serial transmitter and LED display latch.
//
// The 50 MHz board clock `clk` is divided by two (div_clk) to clock the
// core, the RAM, the UAT and the LED module at 25 MHz, and divided by 5208
// (divclk_uat) to make the 9.6 kHz bit clock of the UAT.  The controller
// drives the datapath's control word; the datapath's memory address and
// write data go to the 256 x 16 block RAM, whose read data returns to the
// datapath.  A memory write to UAT_ADDR also hands the low byte of the
// written word to the UAT, which sends it on UAT_out (9600 baud, 8N1).  The
// LED module latches, at every instruction decode, the controller state and
// the memory bus picked by the LED_in / LED_out / LED_add buttons.
// halt_req stalls the core before its next instruction fetch.  `reset` is
// active high and is sampled by both clock domains; hold it for at least
// four `clk` cycles.  The program is loaded into u_ram before reset is
// released.  RAM addresses alias every 512 bytes, so a program must keep
// its data away from the RAM word that aliases UAT_ADDR (H'01F0 for the
// default H'FFF0).
module h8_top
  import h8_pkg::*;
#(
  parameter int unsigned UAT_HALF_PERIOD = 2604,
  parameter logic [15:0] UAT_ADDR        = 16'hFFF0
) (
  input  logic        clk,
  input  logic        reset,
  input  logic        LED_in,
  input  logic        LED_out,
  input  logic        LED_add,
  input  logic        halt_req,
  input  logic [15:0] sr,
  output logic        UAT_out,
  output logic [15:0] data_out,
  output logic [7:0]  state_out,
  output logic        DClk_UAT_OUT
);
  logic        core_clk, uat_clk;
  h8_ctrl_t    ctrl;
  logic [15:0] ir_out, tmp_out, ma_out, to_mem, from_mem;
  logic [7:0]  ccr_out, c_state;
  logic        t0_done, t1_done, t2_done, lower;
  logic        ram_ce, load_uat, trigger_led;

  div_clk u_div_clk (.clk, .reset, .DClk(core_clk));
  divclk_uat #(.HALF_PERIOD(UAT_HALF_PERIOD)) u_divclk_uat (
    .clk, .reset, .DClk_UAT(uat_clk));
  assign DClk_UAT_OUT = uat_clk;

  h8_datapath u_datapath (
    .clk(core_clk), .reset, .ctrl, .from_mem, .sr, .ir_out, .tmp_out,
    .ccr_out, .t0_done, .t1_done, .t2_done, .lower, .MA_out(ma_out), .to_mem);

  controller u_controller (
    .clk(core_clk), .reset, .ir_out, .tmp_out, .ccr_out, .t0_done, .t1_done,
    .t2_done, .lower, .halt_current(halt_req), .c_state, .ctrl, .ram_ce,
    .load_uat, .trigger_LED(trigger_led));

  ram256x16 u_ram (
    .clk(core_clk), .wr_bar(ctrl.wr_bar), .ram_ce, .adrs(ma_out),
    .mem_in(to_mem), .mem_out(from_mem));

  uat #(.UAT_ADDR(UAT_ADDR)) u_uat (
    .clk(core_clk), .reset, .Load_UAT(load_uat), .clk_UAT(uat_clk),
    .MA_In(ma_out), .Data_In(to_mem), .To_UAT(UAT_out));

  led u_led (
    .clk(core_clk), .reset, .Trigger(trigger_led), .Tri_mem_in(LED_in),
    .Tri_mem_out(LED_out), .Tri_add(LED_add), .States_IN(c_state),
    .mem_in(to_mem), .mem_out(from_mem), .mem_add(ma_out),
    .LED_data_out(data_out), .LED_state_out(state_out));
endmodule
