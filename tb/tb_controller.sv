// tb_controller: runs hand-assembled H8/300 programs on the controller,
// the datapath and the block RAM (one clock, no dividers), then compares
// registers, CCR and memory with values worked out by hand from the
// instruction-set definitions.
//   A  data movement: MOV.B/MOV.W in register-indirect, post-increment,
//      pre-decrement, 16-bit displacement, @aa:8 (zero-extended) and
//      @aa:16 forms, byte
//      stores into both halves of a word, PUSH/POP.
//   B  arithmetic and control: ADD/ADDX/CMP, MULXU, ROTR, SHAR, NEG, NOT,
//      bit set/clear/invert/test/load/store, BSR/RTS, JSR @aa:16 and
//      @@aa:8, LDC/ORC/ANDC/STC, taken and untaken branches.
//   C  timer extension: a loop paced by TWAIT on a timer loaded with TLD
//      must take exactly N+1 cycles per pass.
//   D  all sixteen branch conditions, each with two random CCR values; a
//      BSET after each branch records whether it fell through, and the
//      result is compared with the condition evaluated here.
//   E  bit operations on memory bytes through @Rd and @aa:8: set, clear,
//      invert, register-numbered set, test, load and store.
//   F  EEPMOV block move from an odd to an even address, and with a zero
//      count.
module tb_controller;
  import h8_pkg::*;
  logic clk = 0, reset = 1, halt = 0;
  h8_ctrl_t ctrl;
  logic [15:0] ir_out, tmp_out, ma_out, to_mem, from_mem;
  logic [7:0]  ccr_out, c_state;
  logic        t0_done, t1_done, t2_done, lower, ram_ce, load_uat, trigger_led;
  int checks = 0, failures = 0;
  logic [7:0] prog [$];

  h8_datapath u_dp (.clk, .reset, .ctrl, .from_mem, .sr(16'h0000), .ir_out, .tmp_out,
                    .ccr_out, .t0_done, .t1_done, .t2_done, .lower, .MA_out(ma_out), .to_mem);
  controller u_ctl (.clk, .reset, .ir_out, .tmp_out, .ccr_out, .t0_done, .t1_done,
                    .t2_done, .lower, .halt_current(halt), .c_state, .ctrl, .ram_ce,
                    .load_uat, .trigger_LED(trigger_led));
  ram256x16 u_ram (.clk, .wr_bar(ctrl.wr_bar), .ram_ce, .adrs(ma_out), .mem_in(to_mem),
                   .mem_out(from_mem));
  always #5 clk = ~clk;

  task automatic check(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 30) $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask
  function automatic logic [15:0] rw(int n); return {u_dp.rh[n], u_dp.rl[n]}; endfunction
  function automatic logic [15:0] mw(int byte_addr); return u_ram.mem[byte_addr / 2]; endfunction

  // load prog at address 0, fill the rest with H'FFFF, reset, run to SLEEP
  task automatic run(string name, output int cycles);
    for (int i = 0; i < 256; i++) u_ram.mem[i] = 16'hFFFF;
    // source bytes for the block-move program: H'00C1..H'00C5
    u_ram.mem['hC0 / 2] = 16'hFF11; u_ram.mem['hC2 / 2] = 16'h2233;
    u_ram.mem['hC4 / 2] = 16'h4455;
    for (int i = 0; i < prog.size(); i += 2)
      u_ram.mem[i / 2] = {prog[i], (i + 1 < prog.size()) ? prog[i + 1] : 8'hFF};
    reset = 1; repeat (3) @(posedge clk); #1 reset = 0;
    cycles = 0;
    while (c_state != 8'hFF && cycles < 20000) begin @(posedge clk); #1; cycles++; end
    check({name, " reached SLEEP"}, 16'(cycles < 20000), 16'd1);
  endtask
  task automatic put(input logic [7:0] b []);
    foreach (b[i]) prog.push_back(b[i]);
  endtask

  // branch condition from the instruction-set definition
  function automatic bit cond(int c, logic [7:0] ccr);
    bit C = ccr[0], V = ccr[1], Z = ccr[2], N = ccr[3];
    case (c)
      0: return 1;            1: return 0;
      2: return !(C | Z);     3: return C | Z;
      4: return !C;           5: return C;
      6: return !Z;           7: return Z;
      8: return !V;           9: return V;
      10: return !N;          11: return N;
      12: return !(N ^ V);    13: return N ^ V;
      14: return !(Z | (N ^ V));
      default: return Z | (N ^ V);
    endcase
  endfunction

  // timer loop monitor: cycle numbers at which TWAIT ends
  int tw_exit [$];
  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!reset && c_state == 8'h50 && t1_done) tw_exit.push_back(cyc);
  end

  initial begin
    int n;
    ctrl = '0;
    // ------------------------------------------------------------ program A
    prog = {};
    put('{8'h79,8'h07,8'h01,8'h80});   // MOV.W #0180,R7
    put('{8'h79,8'h00,8'h01,8'h00});   // MOV.W #0100,R0
    put('{8'h79,8'h01,8'hA5,8'h5A});   // MOV.W #A55A,R1
    put('{8'h69,8'h81});               // MOV.W R1,@R0
    put('{8'hFA,8'h77});               // MOV.B #77,R2L
    put('{8'h68,8'h8A});               // MOV.B R2L,@R0        byte 0100
    put('{8'h0B,8'h00});               // ADDS #1,R0
    put('{8'hF2,8'hC3});               // MOV.B #C3,R2H
    put('{8'h68,8'h82});               // MOV.B R2H,@R0        byte 0101
    put('{8'h68,8'h03});               // MOV.B @R0,R3H
    put('{8'h1B,8'h00});               // SUBS #1,R0
    put('{8'h6C,8'h0B});               // MOV.B @R0+,R3L
    put('{8'h6D,8'hF1});               // PUSH R1
    put('{8'h6D,8'h74});               // POP R4
    put('{8'h6F,8'h05,8'hFF,8'hFF});   // MOV.W @(-1,R0),R5
    put('{8'h6B,8'h85,8'h00,8'hE0});   // MOV.W R5,@00E0
    put('{8'h6A,8'h0E,8'h00,8'hE1});   // MOV.B @00E1,R6L
    put('{8'h26,8'hE0});               // MOV.B @E0,R6H       (@aa:8 is zero-extended)
    put('{8'h6A,8'h86,8'h00,8'hE2});   // MOV.B R6H,@00E2
    put('{8'h3B,8'hE5});               // MOV.B R3L,@E5
    put('{8'h6C,8'h8C});               // MOV.B R4L,@-R0
    put('{8'h6D,8'h02});               // MOV.W @R0+,R2
    put('{8'h01,8'h80});               // SLEEP
    run("A", n);
    check("A R0", rw(0), 16'h0102);  check("A R1", rw(1), 16'hA55A);
    check("A R2", rw(2), 16'h5AC3);  check("A R3", rw(3), 16'hC377);
    check("A R4", rw(4), 16'hA55A);  check("A R5", rw(5), 16'h77C3);
    check("A R6", rw(6), 16'h77C3);  check("A R7", rw(7), 16'h0180);
    check("A M100", mw('h100), 16'h5AC3); check("A M0E0", mw('hE0), 16'h77C3);
    check("A M0E2", mw('hE2), 16'h77FF); check("A M0E4", mw('hE4), 16'hFF77);
    check("A M17E", mw('h17E), 16'hA55A);

    // ------------------------------------------------------------ program B
    prog = {};
    put('{8'h79,8'h07,8'h01,8'h80});   // 00 MOV.W #0180,R7
    put('{8'hF0,8'h0F});               // 04 MOV.B #0F,R0H
    put('{8'hF8,8'hF1});               // 06 MOV.B #F1,R0L
    put('{8'h08,8'h80});               // 08 ADD.B R0L,R0H   -> 00, C=1
    put('{8'h0E,8'h81});               // 0A ADDX R0L,R1H    -> F2, C=0, Z=0
    put('{8'h47,8'h02});               // 0C BEQ +2 (not taken)
    put('{8'h40,8'h02});               // 0E BRA +2
    put('{8'hF2,8'hEE});               // 10 MOV.B #EE,R2H (skipped)
    put('{8'h45,8'h02});               // 12 BCS +2 (not taken)
    put('{8'hF2,8'h11});               // 14 MOV.B #11,R2H
    put('{8'hA2,8'h11});               // 16 CMP.B #11,R2H
    put('{8'h46,8'h02});               // 18 BNE +2 (not taken)
    put('{8'h47,8'h02});               // 1A BEQ +2 (taken)
    put('{8'hF2,8'hEE});               // 1C skipped
    put('{8'hFB,8'hFB});               // 1E MOV.B #FB,R3L
    put('{8'h50,8'h23});               // 20 MULXU R2H,R3    -> 10AB
    put('{8'hF4,8'h81});               // 22 MOV.B #81,R4H
    put('{8'h13,8'h84});               // 24 ROTR R4H        -> C0
    put('{8'hFC,8'h80});               // 26 MOV.B #80,R4L
    put('{8'h11,8'h8C});               // 28 SHAR R4L        -> C0
    put('{8'hF5,8'h01});               // 2A MOV.B #01,R5H
    put('{8'h17,8'h85});               // 2C NEG R5H         -> FF
    put('{8'h17,8'h0D});               // 2E NOT R5L         -> FF
    put('{8'h70,8'h36});               // 30 BSET #3,R6H     -> 08
    put('{8'hFE,8'hFF});               // 32 MOV.B #FF,R6L
    put('{8'h72,8'h7E});               // 34 BCLR #7,R6L     -> 7F
    put('{8'h71,8'h0E});               // 36 BNOT #0,R6L     -> 7E
    put('{8'h73,8'h1E});               // 38 BTST #1,R6L
    put('{8'h77,8'h1E});               // 3A BLD #1,R6L      C=1
    put('{8'h67,8'h46});               // 3C BST #4,R6H      -> 18
    put('{8'h60,8'h86});               // 3E BSET R0L,R6H    bit 1 -> 1A
    put('{8'h55,8'h10});               // 40 BSR +10 -> 52
    put('{8'h5E,8'h00,8'h00,8'h60});   // 42 JSR @0060
    put('{8'h5F,8'h70});               // 46 JSR @@70 -> 0068
    put('{8'h07,8'h0F});               // 48 LDC #0F,CCR
    put('{8'h04,8'h80});               // 4A ORC #80
    put('{8'h06,8'hFE});               // 4C ANDC #FE        -> 8E
    put('{8'h02,8'h0A});               // 4E STC CCR,R2L
    put('{8'h01,8'h80});               // 50 SLEEP
    put('{8'h89,8'h01});               // 52 ADD.B #01,R1L
    put('{8'h54,8'h70});               // 54 RTS
    while (prog.size() < 'h60) prog.push_back(8'h00);
    put('{8'h89,8'h10});               // 60 ADD.B #10,R1L
    put('{8'h54,8'h70});               // 62 RTS
    put('{8'h00,8'h00,8'h00,8'h00});   // 64 NOP NOP
    put('{8'h89,8'h20});               // 68 ADD.B #20,R1L
    put('{8'h54,8'h70});               // 6A RTS
    put('{8'h00,8'h00,8'h00,8'h00});   // 6C
    put('{8'h00,8'h68});               // 70 vector -> 0068
    run("B", n);
    check("B R0", rw(0), 16'h00F1);  check("B R1", rw(1), 16'hF231);
    check("B R2", rw(2), 16'h118E);  check("B R3", rw(3), 16'h10AB);
    check("B R4", rw(4), 16'hC0C0);  check("B R5", rw(5), 16'hFFFF);
    check("B R6", rw(6), 16'h1A7E);  check("B R7", rw(7), 16'h0180);
    check("B CCR", 16'(ccr_out), 16'h008E);

    // ------------------------------------------------------------ program C
    for (int k = 0; k < 3; k++) begin
      int N;
      N = (k == 0) ? 29 : $urandom_range(20, 200);
      prog = {};
      put('{8'hF8, 8'(N)});            // 00 MOV.B #N,R0L
      put('{8'h58,8'h18});             // 02 TLD R0L -> timer 1
      put('{8'h57,8'h01});             // 04 TWAIT timer 1
      put('{8'h89,8'h01});             // 06 ADD.B #1,R1L
      put('{8'hA9,8'h05});             // 08 CMP.B #5,R1L
      put('{8'h46,8'hF8});             // 0A BNE -8 -> 04
      put('{8'h01,8'h80});             // 0C SLEEP
      tw_exit = {};
      run("C", n);
      check("C passes", 16'(tw_exit.size()), 16'd5);
      for (int i = 1; i < tw_exit.size(); i++)
        check($sformatf("C period N=%0d", N), 16'(tw_exit[i] - tw_exit[i - 1]), 16'(N + 1));
      check("C R1", rw(1), 16'h0005);
    end

    // ------------------------------------------------------------ program D
    begin
      logic [7:0] ccrs [32];
      logic [31:0] expect_bits;
      prog = {};
      expect_bits = '0;
      for (int i = 0; i < 32; i++) begin
        int c;
        c = i / 2;
        ccrs[i] = {4'h8, 4'($urandom)};
        put('{8'h07, ccrs[i]});                          // LDC #ccr
        put('{8'(8'h40 + c), 8'h02});                    // Bcc +2
        put('{8'h70, {1'b0, 3'(i % 8), 4'(i / 8)}});     // BSET #i%8, R(i/8)H
        if (!cond(c, ccrs[i])) expect_bits[i] = 1'b1;
      end
      put('{8'h01,8'h80});
      run("D", n);
      check("D R0H", 16'(u_dp.rh[0]), 16'(expect_bits[7:0]));
      check("D R1H", 16'(u_dp.rh[1]), 16'(expect_bits[15:8]));
      check("D R2H", 16'(u_dp.rh[2]), 16'(expect_bits[23:16]));
      check("D R3H", 16'(u_dp.rh[3]), 16'(expect_bits[31:24]));
    end
    // ------------------------------------------------------------ program E
    prog = {};
    put('{8'h79,8'h00,8'h00,8'hE0});   // MOV.W #00E0,R0
    put('{8'h79,8'h01,8'h00,8'hE1});   // MOV.W #00E1,R1
    put('{8'h79,8'h02,8'h12,8'h34});   // MOV.W #1234,R2
    put('{8'h69,8'h82});               // MOV.W R2,@R0        M[E0] = 1234
    put('{8'h7D,8'h00,8'h70,8'h70});   // BSET #7,@R0         -> 9234
    put('{8'h7D,8'h10,8'h72,8'h20});   // BCLR #2,@R1         -> 9230
    put('{8'h7F,8'hE1,8'h71,8'h00});   // BNOT #0,@E1         -> 9231
    put('{8'hF3,8'h06});               // MOV.B #06,R3H
    put('{8'h7D,8'h00,8'h60,8'h30});   // BSET R3H,@R0        -> D231
    put('{8'h7C,8'h10,8'h73,8'h10});   // BTST #1,@R1         Z=1
    put('{8'h02,8'h0C});               // STC CCR,R4L         84
    put('{8'h7E,8'hE0,8'h77,8'h70});   // BLD #7,@E0          C=1
    put('{8'h02,8'h0D});               // STC CCR,R5L         85
    put('{8'h7D,8'h10,8'h67,8'h70});   // BST #7,@R1          -> D2B1
    put('{8'h01,8'h80});               // SLEEP
    run("E", n);
    check("E M0E0", mw('hE0), 16'hD2B1);
    check("E R4L", 16'(u_dp.rl[4]), 16'h0084);
    check("E R5L", 16'(u_dp.rl[5]), 16'h0085);

    // ------------------------------------------------------------ program F
    prog = {};
    put('{8'h79,8'h05,8'h00,8'hC1});   // MOV.W #00C1,R5    source, odd start
    put('{8'h79,8'h06,8'h00,8'hD0});   // MOV.W #00D0,R6    destination, even
    put('{8'hFC,8'h05});               // MOV.B #5,R4L
    put('{8'h7B,8'h5C,8'h59,8'h8F});   // EEPMOV
    put('{8'hFC,8'h00});               // MOV.B #0,R4L
    put('{8'h7B,8'h5C,8'h59,8'h8F});   // EEPMOV with R4L = 0: moves nothing
    put('{8'h01,8'h80});               // SLEEP
    run("F", n);
    check("F M0D0", mw('hD0), 16'h1122);
    check("F M0D2", mw('hD2), 16'h3344);
    check("F M0D4", mw('hD4), 16'h55FF);
    check("F M0C0", mw('hC0), 16'hFF11);
    check("F R4", rw(4), 16'h0000);
    check("F R5", rw(5), 16'h00C6);
    check("F R6", rw(6), 16'h00D5);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
