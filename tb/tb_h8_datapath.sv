// tb_h8_datapath: drives the datapath with hand-built control words, one
// register-transfer step per clock, the way the controller does, and keeps
// a reference model of the architectural registers.  Each random round
// loads IR from memory, moves its immediate into a register half, runs byte
// and word ALU operations and a shift between random registers, sends a
// register pair through the bridge to MA, MD, tmp and PC, builds a byte
// store in the concatenator and checks the word presented to memory, adds a
// signed displacement to the PC, and loads timer 0 and counts the cycles
// until it signals done.  Registers are read through the hierarchy.
module tb_h8_datapath;
  import h8_pkg::*;
  logic clk = 0, reset;
  h8_ctrl_t ctrl;
  logic [15:0] from_mem, sr, ir_out, tmp_out, MA_out, to_mem;
  logic [7:0] ccr_out;
  logic t0_done, t1_done, t2_done, lower;
  int checks = 0, failures = 0;
  logic [7:0] mh [8], ml [8];   // model of R0H..R7H, R0L..R7L
  logic [15:0] mpc;

  h8_datapath dut (.*);
  always #5 clk = ~clk;

  function automatic h8_ctrl_t idle();
    h8_ctrl_t c = '0;
    c.rd_bar = 1'b1; c.wr_bar = 1'b1;
    return c;
  endfunction
  function automatic logic [15:0] rword(int r); return {mh[r], ml[r]}; endfunction
  // register code on mux inputs: byte 2r (high) / 2r+1 (low), word 16+r
  function automatic logic [4:0] bc(int r, bit low); return 5'(2 * r + int'(low)); endfunction
  function automatic logic [4:0] wc(int r); return 5'(16 + r); endfunction

  task automatic step(input h8_ctrl_t c);
    @(negedge clk); ctrl = c; @(posedge clk); #1; ctrl = idle();
  endtask
  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask
  task automatic check_regs();
    for (int r = 0; r < 8; r++) begin
      check($sformatf("R%0dH", r), 32'(dut.rh[r]), 32'(mh[r]));
      check($sformatf("R%0dL", r), 32'(dut.rl[r]), 32'(ml[r]));
    end
  endtask
  // load a register half from a word "read from memory" via IR immediate
  task automatic set_half(int r, bit low, logic [7:0] v);
    h8_ctrl_t c;
    c = idle(); from_mem = {8'($urandom), v}; c.rd_bar = 0; c.rn_sel = RN_MEM;
    c.bdg_sel = BDG_WORD; c.loadir = 1; step(c);
    check("IR load", 32'(ir_out), 32'(from_mem));
    c = idle(); c.rs_sel = RS_IMM; c.alu_sel = ALU_B_SPORT;
    if (low) begin c.load_rl[r] = LR_ALUB; ml[r] = v; end
    else     begin c.load_rh[r] = LR_ALUB; mh[r] = v; end
    step(c);
  endtask

  initial begin
    h8_ctrl_t c;
    reset = 1; ctrl = idle(); from_mem = 0; sr = 16'h1234;
    repeat (2) @(posedge clk); #1 reset = 0;
    for (int r = 0; r < 8; r++) begin mh[r] = 0; ml[r] = 0; end
    mpc = 0;
    check("ccr after reset", 32'(ccr_out), 32'h80);
    for (int r = 0; r < 8; r++) begin
      set_half(r, 0, 8'($urandom)); set_half(r, 1, 8'($urandom));
    end
    check_regs();
    for (int round = 0; round < 60; round++) begin
      int a, b, n;
      logic [8:0] s9;
      logic [16:0] s17;
      logic [7:0] byt;
      logic [15:0] w;
      a = $urandom_range(0, 7); b = $urandom_range(0, 7);
      set_half(a, 1'($urandom), 8'($urandom));
      // byte add Rb.L <- Rb.L + Ra.H, flags into CCR
      c = idle(); c.rs_sel = bc(a, 0); c.rd_sel = bc(b, 1); c.alu_sel = ALU_B_ADD;
      c.load_rl[b] = LR_ALUB; c.loadccr = 1; c.ccr_sel = CCR_FROM_ALU;
      s9 = {1'b0, ml[b]} + {1'b0, mh[a]};
      step(c); ml[b] = s9[7:0];
      check("add.b C", 32'(ccr_out[CCR_C]), 32'(s9[8]));
      check("add.b Z", 32'(ccr_out[CCR_Z]), 32'(s9[7:0] == 0));
      // word subtract Ra <- Ra - Rb
      c = idle(); c.rs_sel = wc(b); c.rd_sel = wc(a); c.alu_sel = ALU_W_SUB;
      c.load_rh[a] = LR_ALUW; c.load_rl[a] = LR_ALUW; c.loadccr = 1;
      s17 = {1'b0, rword(a)} - {1'b0, rword(b)};
      step(c); {mh[a], ml[a]} = s17[15:0];
      check("sub.w C", 32'(ccr_out[CCR_C]), 32'(s17[16]));
      // rotate Rb.H left through the shifter
      c = idle(); c.acc_sel = 4'(2 * b); c.acc_op = ACC_ROTL; c.load_rh[b] = LR_ACC;
      c.loadccr = 1; c.ccr_sel = CCR_FROM_ACC;
      byt = {mh[b][6:0], mh[b][7]};
      step(c);
      check("rotl C", 32'(ccr_out[CCR_C]), 32'(mh[b][7]));
      mh[b] = byt;
      check_regs();
      // register pair -> MA through the bridge
      c = idle(); c.rn_sel = wc(a); c.bdg_sel = BDG_WORD; c.ma_sel = MA_BDG; c.loadma = 1;
      step(c);
      check("MA", 32'(MA_out), 32'(rword(a) & 16'hFFFE));
      check("lower", 32'(lower), 32'(ml[a][0]));
      // register pair -> MD and tmp, switches -> tmp
      c = idle(); c.rn_sel = wc(b); c.loadmd = LD_BDG; step(c);
      check("MD", 32'(dut.md), 32'(rword(b)));
      c = idle(); c.rn_sel = RN_SR; c.loadtmp = LD_BDG; sr = 16'($urandom); step(c);
      check("tmp<-sr", 32'(tmp_out), 32'(sr));
      // byte store: Ra.L into the low or high byte of MD, then to memory
      n = $urandom_range(0, 1);
      c = idle(); c.rs_sel = bc(a, 1); c.alu_sel = ALU_B_SPORT;
      c.loadcnct = n ? CN_LOW : CN_HIGH; step(c);
      c = idle(); c.md_sel = 1'b1; c.wr_bar = 0;
      @(negedge clk); ctrl = c; #1;
      check("to_mem cnct", 32'(to_mem), 32'(n ? {mh[b], ml[a]} : {ml[a], ml[b]}));
      c.md_sel = 1'b0; ctrl = c; #1;
      check("to_mem md", 32'(to_mem), 32'(rword(b)));
      ctrl = idle(); #1;
      check("to_mem idle", 32'(to_mem), 32'h0);
      // PC <- bridge (register pair), then PC <- PC + sext(imm)
      c = idle(); c.rn_sel = wc(b); c.loadpc = LD_BDG; step(c); mpc = rword(b);
      set_half(7, 1, 8'($urandom));               // puts a new immediate in IR
      c = idle(); c.rd_sel = RD_PC; c.rs_sel = RS_IMM; c.alu_sel = ALU_W_ADD; c.loadpc = LD_ALU;
      step(c); mpc = mpc + {{8{ir_out[7]}}, ir_out[7:0]};
      check("PC rel", 32'(dut.pc), 32'(mpc));
      // timer 0 from Rb.H through the bridge; done after exactly N more cycles
      c = idle(); c.rn_sel = bc(b, 0); c.bdg_sel = BDG_BYTE; c.load_t = 3'b001; step(c);
      n = 0;
      while (!t0_done && n < 300) begin @(posedge clk); #1; n++; end
      check("timer0 cycles", 32'(n), 32'(mh[b]));
      // one cycle later it has reloaded, and it is done again N+1 cycles on
      n = 0;
      do begin @(posedge clk); #1; n++; end while (!t0_done && n < 300);
      check("timer0 period", 32'(n), 32'(mh[b]) + 1);
    end
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
