// tb_h8_top: end-to-end test of the whole system at its default parameters
// (50 MHz board clock, 25 MHz core, 9600 baud serial output).
//
// Loads the program of h8_prog_pkg into the block RAM, releases reset and
// lets the processor run until SLEEP.  A serial receiver model decodes
// UAT_out and the message must read "Hello Columbia9".  Memory and
// register contents written by the program are compared with the expected
// values, the start-bit width is checked against 50e6/9600 board cycles,
// and the spacing between consecutive characters must be exactly
// DELAY * 256 core cycles, the guarantee of the timer extension.  The run
// also presses the halt and LED buttons once.  Every mechanism (fetch of a
// second instruction word, byte store merging into the high and into the
// low byte, byte loads from both halves, word store, branch taken and not
// taken, push/return, JSR, timer wait stalls, timer reloads, shifts,
// bridge-set flags, post-increment, UAT loads, LED triggers, halt stalls,
// a read-modify-write bit operation on memory, block-move bytes)
// is counted and must occur.
`timescale 1ns / 1ps
module tb_h8_top;
  import h8_pkg::*;
  import h8_prog_pkg::*;

  localparam int HALF      = 2604;           // divclk_uat default
  localparam int BIT_CLKS  = 2 * HALF;       // board cycles per bit
  localparam int DELAY     = delay_count(HALF);

  logic        clk = 1'b0, reset = 1'b1;
  logic        LED_in = 1'b0, LED_out = 1'b0, LED_add = 1'b0, halt_req = 1'b0;
  logic [15:0] sr = 16'h0000;
  logic        UAT_out, DClk_UAT_OUT;
  logic [15:0] data_out;
  logic [7:0]  state_out;

  int checks = 0, failures = 0;

  h8_top dut (.*);

  always #10 clk = ~clk;   // 50 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------- serial receiver
  string rx = "";
  initial begin
    @(negedge reset);
    forever begin
      logic [7:0] ch;
      @(negedge UAT_out);
      repeat (BIT_CLKS / 2) @(posedge clk);
      check(UAT_out == 1'b0, "start bit still low at its middle");
      for (int i = 0; i < 8; i++) begin
        repeat (BIT_CLKS) @(posedge clk);
        ch[i] = UAT_out;
      end
      repeat (BIT_CLKS) @(posedge clk);
      check(UAT_out == 1'b1, "stop bit");
      rx = {rx, string'(ch)};
    end
  end

  // bit clock: one period is 50e6 / 9600 board cycles (rounded to 5208)
  initial begin
    realtime t0, t1;
    @(negedge reset);
    @(posedge DClk_UAT_OUT) t0 = $realtime;
    @(posedge DClk_UAT_OUT) t1 = $realtime;
    check(t1 - t0 == 20.0 * BIT_CLKS,
          $sformatf("bit clock period %0t ns, expected %0d", t1 - t0, 20 * BIT_CLKS));
  end

  // ------------------------------------------------------- mechanism counts
  typedef enum int {
    M_FETCH, M_EXT, M_RMW_HIGH, M_RMW_LOW, M_WORD_WR, M_LD_EVEN, M_LD_ODD,
    M_BR_TAKEN, M_BR_NOT, M_PUSH, M_RTS, M_JSR, M_TWAIT_STALL, M_TIMER_RELOAD,
    M_SHIFT, M_BDG_FLAGS, M_POSTINC, M_UAT_LOAD, M_LED_TRIG, M_HALT_STALL,
    M_BIT_MEM, M_EE_BYTE, M_COUNT
  } mech_e;
  int mech [M_COUNT];
  string mech_name [M_COUNT] = '{
    "fetch", "ext-word fetch", "byte store high", "byte store low",
    "word store", "byte load even", "byte load odd", "branch taken",
    "branch not taken", "push", "return", "jsr", "timer-wait stall",
    "timer reload", "shift/rotate", "bridge flags", "post-increment",
    "uat load", "led trigger", "halt stall", "memory bit op",
    "block-move byte"};

  longint core_cycle = 0;
  longint last_uat_load = -1;
  int     uat_loads = 0;
  int     gap_ok = 0;

  always @(posedge dut.core_clk) begin
    core_cycle++;
    if (!reset) begin
      automatic logic [7:0] st = dut.u_controller.state;
      automatic h8_ctrl_t   c  = dut.ctrl;
      if (st == 8'h02) mech[M_FETCH]++;
      if (st == 8'h12) mech[M_EXT]++;
      if (st == 8'h30 && !dut.lower) mech[M_RMW_HIGH]++;
      if (st == 8'h30 &&  dut.lower) mech[M_RMW_LOW]++;
      if (st == 8'h31 && !c.md_sel) mech[M_WORD_WR]++;
      if (st == 8'h22 && dut.u_controller.is_byte && !dut.lower) mech[M_LD_EVEN]++;
      if (st == 8'h22 && dut.u_controller.is_byte &&  dut.lower) mech[M_LD_ODD]++;
      if (st == 8'h03 && dut.ir_out[15:12] == 4'h4) begin
        if (dut.u_controller.br_taken) mech[M_BR_TAKEN]++;
        else                           mech[M_BR_NOT]++;
      end
      if (st == 8'h40) mech[M_PUSH]++;
      if (st == 8'h22 && dut.u_controller.is_rts) mech[M_RTS]++;
      if (st == 8'h42) mech[M_JSR]++;
      if (st == 8'h32) mech[M_BIT_MEM]++;
      if (st == 8'h68) mech[M_EE_BYTE]++;
      if (st == 8'h50 && !dut.t0_done) mech[M_TWAIT_STALL]++;
      if (dut.t0_done && dut.u_datapath.g_timers[0].u_timer.reload != 0)
        mech[M_TIMER_RELOAD]++;
      if (c.loadccr && c.ccr_sel == CCR_FROM_ACC) mech[M_SHIFT]++;
      if (c.loadccr && c.ccr_sel == CCR_FROM_BDG) mech[M_BDG_FLAGS]++;
      if (st == 8'h03 && dut.ir_out[15:8] == 8'h6C) mech[M_POSTINC]++;
      if (dut.load_uat && dut.ma_out == 16'hFFF0) begin
        mech[M_UAT_LOAD]++;
        uat_loads++;
        // characters 2..14 each follow the last timer wait of the previous
        // call by the same instructions: their spacing is set by the timer
        if (uat_loads >= 3 && uat_loads <= 14) begin
          check(core_cycle - last_uat_load == longint'(DELAY * 256),
                $sformatf("character spacing %0d core cycles, expected %0d",
                          core_cycle - last_uat_load, DELAY * 256));
          gap_ok++;
        end
        last_uat_load = core_cycle;
      end
      if (dut.trigger_led) mech[M_LED_TRIG]++;
      if (halt_req && st == 8'h00) mech[M_HALT_STALL]++;
    end
  end

  // ------------------------------------------------------- core clock rate
  initial begin
    realtime t0, t1;
    @(negedge reset);
    @(posedge dut.core_clk) t0 = $realtime;
    @(posedge dut.core_clk) t1 = $realtime;
    check(t1 - t0 == 40.0, $sformatf("core clock period %0t ns, expected 40", t1 - t0));
  end

  // ------------------------------------------------------- stimulus
  initial begin
    for (int i = 0; i < 256; i++) dut.u_ram.mem[i] = 16'h0000;
    for (int i = 0; i < PROG_WORDS; i++) dut.u_ram.mem[i] = PROG[i];
    dut.u_ram.mem[16'h0100 >> 1] = 16'(DELAY);
    dut.u_ram.mem[16'h0102 >> 1] = BITS_WORD;
    dut.u_ram.mem[16'h00F0 >> 1] = F0_INIT;
    dut.u_ram.mem[16'h0164 >> 1] = 16'h00A5;
    repeat (10) @(posedge clk);
    reset = 1'b0;

    // stall the core for a while during the string build
    repeat (200) @(posedge clk);
    halt_req = 1'b1;
    repeat (60) @(posedge clk);
    halt_req = 1'b0;

    // select the memory write data for the LED display
    repeat (100) @(posedge clk);
    LED_in = 1'b1;
    repeat (4) @(posedge clk);
    LED_in = 1'b0;

    wait (dut.u_controller.state == 8'hFF);
    // let the last character leave the transmitter
    repeat (12 * BIT_CLKS) @(posedge clk);

    check(rx == MESSAGE, $sformatf("serial output \"%s\", expected \"%s\"", rx, MESSAGE));
    for (int i = 0; i < 14; i++) begin
      automatic logic [15:0] wd = dut.u_ram.mem[(16'h0140 + i) >> 1];
      automatic logic [7:0]  by = (i % 2 == 0) ? wd[15:8] : wd[7:0];
      check(by == 8'(MESSAGE[i]), $sformatf("string byte %0d = %h", i, by));
    end
    check(dut.u_ram.mem[16'h014E >> 1][15:8] == 8'h00, "string terminator");
    check(dut.u_ram.mem[16'h0150 >> 1] ==
          {8'(popcount16(BITS_WORD)), 8'(16 - popcount16(BITS_WORD))},
          $sformatf("bit counter result %h", dut.u_ram.mem[16'h0150 >> 1]));
    check(dut.u_ram.mem[16'h00F0 >> 1] == {F0_INIT[15:8] | 8'h10, 8'h5A},
          "byte store @aa:8 kept the other byte; BSET #4,@H'F0 set bit 4");
    check(dut.u_ram.mem[16'h0160 >> 1] == 16'h4865, "EEPMOV bytes 0-1");
    check(dut.u_ram.mem[16'h0162 >> 1] == 16'h6C6C, "EEPMOV bytes 2-3");
    check(dut.u_ram.mem[16'h0164 >> 1] == 16'h6FA5, "EEPMOV byte 4, next byte untouched");
    check(dut.u_datapath.rl[4] == 8'h00, "EEPMOV leaves R4L = 0");
    check({dut.u_datapath.rh[5], dut.u_datapath.rl[5]} == 16'h0145, "EEPMOV R5 end");
    check({dut.u_datapath.rh[6], dut.u_datapath.rl[6]} == 16'h0165, "EEPMOV R6 end");
    check(mech[M_EE_BYTE] == 5, $sformatf("EEPMOV moved %0d bytes", mech[M_EE_BYTE]));
    check(dut.u_datapath.rh[0] == 8'h5A, "byte load @aa:8 into R0H");
    check({dut.u_datapath.rh[7], dut.u_datapath.rl[7]} == 16'h01E0,
          "stack pointer balanced");
    check(dut.u_datapath.pc == 16'h00BA, "PC after SLEEP");
    check(gap_ok == 12, $sformatf("%0d character gaps checked", gap_ok));
    check(state_out == 8'h03, "LED state display shows the decode state");
    check(dut.u_led.show == 2'd1, "LED display switched to memory write data");

    for (int m = 0; m < M_COUNT; m++) begin
      $display("  %-18s %0d", mech_name[m], mech[m]);
      check(mech[m] > 0, $sformatf("mechanism '%s' never happened", mech_name[m]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------- watchdog
  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired (state %h, rx \"%s\")", dut.u_controller.state, rx);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
