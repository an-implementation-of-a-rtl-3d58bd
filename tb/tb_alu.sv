// tb_alu: random operands through every ALU operation, compared with a
// reference written with signed and unsigned integer arithmetic (overflow
// as "the signed result is out of range", carry as "the unsigned result is
// out of range"), plus fixed decimal-adjust cases.  Checks the byte and
// word outputs and the full CCR.
module tb_alu;
  import h8_pkg::*;
  logic [7:0] ccr_in, sport, dport, ccr_out, aluB_out;
  logic [15:0] sport_w, dport_w, aluW_out;
  logic [5:0] alu_sel;
  int checks = 0, failures = 0;
  alu dut (.*);

  function automatic int sx8(int v);  return (v >= 128) ? v - 256 : v; endfunction
  function automatic int sx16(int v); return (v >= 32768) ? v - 65536 : v; endfunction

  task automatic expect_eq(input string what, input logic [7:0] eb, input logic [15:0] ew,
                           input logic [7:0] ec);
    checks++;
    if (aluB_out !== eb || aluW_out !== ew || ccr_out !== ec) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s sel=%0d s=%h d=%h sw=%h dw=%h c=%h: got %h/%h/%h exp %h/%h/%h",
                 what, alu_sel, sport, dport, sport_w, dport_w, ccr_in,
                 aluB_out, aluW_out, ccr_out, eb, ew, ec);
    end
  endtask

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int s, d, sw, dw, c, r, rs, h;
      logic [7:0] e;
      s = $urandom_range(0, 255); d = $urandom_range(0, 255);
      if (t % 7 == 0) s = d;                  // zero results
      sw = $urandom_range(0, 65535); dw = $urandom_range(0, 65535);
      if (t % 11 == 0) sw = dw;
      ccr_in = 8'($urandom); c = int'(ccr_in[0]);
      sport = 8'(s); dport = 8'(d); sport_w = 16'(sw); dport_w = 16'(dw);

      // byte add family: ADD, ADDX, INC
      for (int k = 0; k < 3; k++) begin
        int b2, ci;
        alu_sel = (k == 0) ? ALU_B_ADD : (k == 1) ? ALU_B_ADDX : ALU_B_INC;
        b2 = (k == 2) ? 1 : s; ci = (k == 1) ? c : 0;
        #1;
        r = d + b2 + ci; rs = sx8(d) + sx8(b2) + ci; h = (d % 16) + (b2 % 16) + ci;
        e = ccr_in;
        e[3] = ((r % 256) >= 128);
        if (k == 1) begin if (r % 256 != 0) e[2] = 0; end else e[2] = (r % 256 == 0);
        e[1] = (rs > 127 || rs < -128);
        if (k != 2) begin e[5] = (h > 15); e[0] = (r > 255); end
        expect_eq("add8", 8'(r), {8'h00, 8'(r)}, e);
      end
      // byte subtract family: SUB, SUBX, DEC, CMP, NEG
      for (int k = 0; k < 5; k++) begin
        int a1, b2, bi;
        alu_sel = (k == 0) ? ALU_B_SUB : (k == 1) ? ALU_B_SUBX : (k == 2) ? ALU_B_DEC :
                  (k == 3) ? ALU_B_CMP : ALU_B_NEG;
        a1 = (k == 4) ? 0 : d; b2 = (k == 2) ? 1 : (k == 4) ? d : s; bi = (k == 1) ? c : 0;
        #1;
        r = a1 - b2 - bi; rs = sx8(a1) - sx8(b2) - bi; h = (a1 % 16) - (b2 % 16) - bi;
        e = ccr_in;
        e[3] = (((r + 256) % 256) >= 128);
        if (k == 1) begin if ((r + 256) % 256 != 0) e[2] = 0; end else e[2] = ((r + 256) % 256 == 0);
        e[1] = (rs > 127 || rs < -128);
        if (k != 2) begin e[5] = (h < 0); e[0] = (r < 0); end
        expect_eq("sub8", 8'(r), {8'h00, 8'(r)}, e);
      end
      // byte logic and moves
      for (int k = 0; k < 6; k++) begin
        alu_sel = (k == 0) ? ALU_B_AND : (k == 1) ? ALU_B_OR : (k == 2) ? ALU_B_XOR :
                  (k == 3) ? ALU_B_NOT : (k == 4) ? ALU_B_SPORT : ALU_B_DPORT;
        #1;
        case (k)
          0: r = d & s; 1: r = d | s; 2: r = d ^ s; 3: r = 255 - d; 4: r = s; default: r = d;
        endcase
        e = ccr_in; e[3] = (r >= 128); e[2] = (r == 0); e[1] = 0;
        expect_eq("logic8", 8'(r), {8'h00, 8'(r)}, e);
      end
      alu_sel = ALU_B_CCR; #1;
      expect_eq("ccr", ccr_in, {8'h00, ccr_in}, ccr_in);
      alu_sel = ALU_B_ZERO; #1;
      expect_eq("zero8", 8'h00, 16'h0000, ccr_in);
      // word add / sub / cmp
      for (int k = 0; k < 3; k++) begin
        alu_sel = (k == 0) ? ALU_W_ADD : (k == 1) ? ALU_W_SUB : ALU_W_CMP;
        #1;
        if (k == 0) begin r = dw + sw; rs = sx16(dw) + sx16(sw); h = (dw % 4096) + (sw % 4096); end
        else        begin r = dw - sw; rs = sx16(dw) - sx16(sw); h = (dw % 4096) - (sw % 4096); end
        e = ccr_in;
        e[5] = (k == 0) ? (h > 4095) : (h < 0);
        e[3] = (((r + 65536) % 65536) >= 32768);
        e[2] = ((r + 65536) % 65536 == 0);
        e[1] = (rs > 32767 || rs < -32768);
        e[0] = (k == 0) ? (r > 65535) : (r < 0);
        expect_eq("arith16", 8'(r), 16'(r), e);
      end
      // address steps, multiply, word moves
      alu_sel = ALU_W_INC;  #1; expect_eq("inc16",  8'(dw + 1), 16'(dw + 1), ccr_in);
      alu_sel = ALU_W_DEC;  #1; expect_eq("dec16",  8'(dw - 1), 16'(dw - 1), ccr_in);
      alu_sel = ALU_W_INC2; #1; expect_eq("inc216", 8'(dw + 2), 16'(dw + 2), ccr_in);
      alu_sel = ALU_W_DEC2; #1; expect_eq("dec216", 8'(dw - 2), 16'(dw - 2), ccr_in);
      alu_sel = ALU_W_MUL;  #1; r = (dw % 256) * s; expect_eq("mul", 8'(r), 16'(r), ccr_in);
      alu_sel = ALU_W_SPORT; #1;
      e = ccr_in; e[3] = sw >= 32768; e[2] = sw == 0; e[1] = 0;
      expect_eq("movw", 8'(sw), 16'(sw), e);
      alu_sel = ALU_W_DPORT; #1;
      e = ccr_in; e[3] = dw >= 32768; e[2] = dw == 0; e[1] = 0;
      expect_eq("movw", 8'(dw), 16'(dw), e);
      // bit operations, bit number from the immediate (bits 6:4)
      begin
        int n, bitv, m;
        n = (s / 16) % 8; bitv = (d >> n) & 1; m = 1 << n;
        alu_sel = ALU_BSET; #1; expect_eq("bset", 8'(d | m), {8'h00, 8'(d | m)}, ccr_in);
        alu_sel = ALU_BCLR; #1; expect_eq("bclr", 8'(d & ~m), {8'h00, 8'(d & ~m)}, ccr_in);
        alu_sel = ALU_BNOT; #1; expect_eq("bnot", 8'(d ^ m), {8'h00, 8'(d ^ m)}, ccr_in);
        alu_sel = ALU_BTST; #1; e = ccr_in; e[2] = (bitv == 0); expect_eq("btst", 8'(d), {8'h00, 8'(d)}, e);
        alu_sel = ALU_BOR;  #1; e = ccr_in; e[0] = 1'(c | bitv);       expect_eq("bor",  8'(d), {8'h00, 8'(d)}, e);
        alu_sel = ALU_BIOR; #1; e = ccr_in; e[0] = 1'(c | (1 - bitv)); expect_eq("bior", 8'(d), {8'h00, 8'(d)}, e);
        alu_sel = ALU_BXOR; #1; e = ccr_in; e[0] = 1'(c ^ bitv);       expect_eq("bxor", 8'(d), {8'h00, 8'(d)}, e);
        alu_sel = ALU_BIXOR;#1; e = ccr_in; e[0] = 1'(c ^ (1 - bitv)); expect_eq("bixor",8'(d), {8'h00, 8'(d)}, e);
        alu_sel = ALU_BAND; #1; e = ccr_in; e[0] = 1'(c & bitv);       expect_eq("band", 8'(d), {8'h00, 8'(d)}, e);
        alu_sel = ALU_BIAND;#1; e = ccr_in; e[0] = 1'(c & (1 - bitv)); expect_eq("biand",8'(d), {8'h00, 8'(d)}, e);
        alu_sel = ALU_BLD;  #1; e = ccr_in; e[0] = 1'(bitv);           expect_eq("bld",  8'(d), {8'h00, 8'(d)}, e);
        alu_sel = ALU_BILD; #1; e = ccr_in; e[0] = 1'(1 - bitv);       expect_eq("bild", 8'(d), {8'h00, 8'(d)}, e);
        r = c ? (d | m) : (d & ~m);
        alu_sel = ALU_BST;  #1; expect_eq("bst", 8'(r), {8'h00, 8'(r)}, ccr_in);
        r = c ? (d & ~m) : (d | m);
        alu_sel = ALU_BIST; #1; expect_eq("bist", 8'(r), {8'h00, 8'(r)}, ccr_in);
        // register bit number (bits 2:0)
        n = s % 8; m = 1 << n; bitv = (d >> n) & 1;
        alu_sel = ALU_RBSET; #1; expect_eq("rbset", 8'(d | m), {8'h00, 8'(d | m)}, ccr_in);
        alu_sel = ALU_RBCLR; #1; expect_eq("rbclr", 8'(d & ~m), {8'h00, 8'(d & ~m)}, ccr_in);
        alu_sel = ALU_RBNOT; #1; expect_eq("rbnot", 8'(d ^ m), {8'h00, 8'(d ^ m)}, ccr_in);
        alu_sel = ALU_RBTST; #1; e = ccr_in; e[2] = (bitv == 0); expect_eq("rbtst", 8'(d), {8'h00, 8'(d)}, e);
        // word forms act on bit n+8
        n = (s / 16) % 8 + 8; m = 1 << n;
        alu_sel = ALU_WBSET; #1; expect_eq("wbset", 8'(dw | m), 16'(dw | m), ccr_in);
        alu_sel = ALU_WBCLR; #1; expect_eq("wbclr", 8'(dw & ~m), 16'(dw & ~m), ccr_in);
      end
    end
    // decimal adjust: 0x38 + 0x45 = 0x7D -> 0x83 ; 0x99 + 0x01 = 0x9A -> 0x00, C
    ccr_in = 8'h00; dport = 8'h7D; alu_sel = ALU_B_DAA; #1;
    expect_eq("daa", 8'h83, 16'h0083, 8'h08);
    ccr_in = 8'h00; dport = 8'h9A; #1;
    expect_eq("daa", 8'h00, 16'h0000, 8'h05);
    // 0x42 - 0x15 = 0x2D with H set -> 0x27
    ccr_in = 8'h20; dport = 8'h2D; alu_sel = ALU_B_DAS; #1;
    expect_eq("das", 8'h27, 16'h0027, 8'h20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
