// controller: multi-cycle control unit that fetches, decodes and executes
// H8/300 instructions by driving the datapath's control word.
//
// The machine has no pipeline and no cache, so every instruction takes a
// fixed, data-independent number of cycles (a taken and an untaken Bcc
// both finish in DECODE), which is what makes the timer extension
// cycle-accurate.  Each
// state issues one register-transfer step; IR is decoded combinationally
// in every state after the fetch.
//
//   FETCH0  MA <- PC, PC <- PC + 2           (stalls while halt_current)
//   FETCH1  memory read in progress
//   FETCH2  IR <- memory word (through mux_rn and the bridge)
//   DECODE  register-to-register instructions complete here; others branch
//           to the sequences below
//   EXT0-2  fetch the second instruction word (16-bit immediate, absolute
//           address or displacement)
//   DISP    MA <- Rn + d:16
//   RD1-2   memory read into MD;  RDX  MD -> register (or PC for RTS and
//           JMP @@aa:8, tmp for JSR @@aa:8)
//   MODW    concatenator merges the new byte into the word read (byte store)
//   WR      memory write of MD or the concatenator word
//   PUSH    R7 <- R7 - 2, MA <- R7 - 2, MD <- PC (BSR, JSR)
//   BR      PC <- PC + d:8 after the BSR push;  JMPT  PC <- tmp after JSR
//   X1      Rd <- MD for MOV.W #xx:16
//   BM0     bit operations on memory (7C-7F): the operation word has been
//           fetched into tmp; MA <- Rd or aa:8, then RD1, RD2
//   BMOP    the bit operation (decoded from tmp) on the addressed byte of
//           MD; modifying forms merge it in the concatenator and go to WR
//   TWAIT   stall until the selected timer's done (timer extension)
//   EE0-EEW EEPMOV: per byte, tmp <- R4L and stop when it is zero; read
//           @R5+, park the byte in the concatenator, read @R6+, merge the
//           byte into that word, write it back and decrement R4L
//   HALT    after SLEEP, until reset
//
// Implemented instructions: MOV.B/W in register, immediate, @Rn, @Rn+,
// @-Rn, @(d:16,Rn), @aa:8 (byte) and @aa:16 forms; ADD, ADDX, SUB, SUBX,
// CMP, AND, OR, XOR (byte register and immediate; word ADD/SUB/CMP), INC,
// DEC, ADDS, SUBS, NEG, NOT, DAA, DAS, MULXU; all eight shifts and
// rotates; BSET/BNOT/BCLR/BTST (immediate and register bit number),
// BOR/BIOR, BXOR/BIXOR, BAND/BIAND, BLD/BILD, BST/BIST on registers and,
// through @Rd and @aa:8 (prefixes 7C-7F), on memory bytes;
// LDC, STC, ANDC, ORC, XORC; Bcc (all 16 conditions), BSR, JMP and JSR
// @Rn/@aa:16/@@aa:8, RTS, EEPMOV, NOP, SLEEP.  The timer extension uses two first bytes
// the H8/300 leaves free: H'58 {2'b00, t[1:0], rs[3:0]} loads timer t from byte
// register rs (TLD) and H'57 {6'b0, t[1:0]} waits for timer t (TWAIT).
// Not implemented: DIVXU, RTE, interrupts.  The state sequence, the encodings of the
// timer instructions and the `lower` input are this design's own.
// All outputs are combinational from the state and the IR (Moore style).
module controller
  import h8_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  input  logic [15:0] ir_out,
  input  logic [15:0] tmp_out,
  input  logic [7:0]  ccr_out,
  input  logic        t0_done,
  input  logic        t1_done,
  input  logic        t2_done,
  input  logic        lower,
  input  logic        halt_current,
  output logic [7:0]  c_state,
  output h8_ctrl_t    ctrl,
  output logic        ram_ce,
  output logic        load_uat,
  output logic        trigger_LED
);
  typedef enum logic [7:0] {
    S_FETCH0 = 8'h00, S_FETCH1 = 8'h01, S_FETCH2 = 8'h02, S_DECODE = 8'h03,
    S_EXT0   = 8'h10, S_EXT1   = 8'h11, S_EXT2   = 8'h12, S_X1     = 8'h13,
    S_DISP   = 8'h14, S_BM0    = 8'h15,
    S_RD1    = 8'h20, S_RD2    = 8'h21, S_RDX    = 8'h22,
    S_MODW   = 8'h30, S_WR     = 8'h31, S_BMOP   = 8'h32,
    S_PUSH   = 8'h40, S_BR     = 8'h41, S_JMPT   = 8'h42,
    S_TWAIT  = 8'h50,
    S_EE0    = 8'h60, S_EE1    = 8'h61, S_EE2    = 8'h62, S_EE3    = 8'h63,
    S_EE4    = 8'h64, S_EE5    = 8'h65, S_EE6    = 8'h66, S_EE7    = 8'h67,
    S_EEW    = 8'h68,
    S_HALT   = 8'hFF
  } state_e;

  state_e state, nxt;

  logic [7:0] op, b;
  assign op = ir_out[15:8];
  assign b  = ir_out[7:0];

  // 4-bit H8 byte-register field (0-7 RnH, 8-15 RnL) -> mux code (2n / 2n+1)
  function automatic logic [4:0] bcode(input logic [3:0] r);
    return {1'b0, r[2:0], r[3]};
  endfunction
  function automatic logic [4:0] wcode(input logic [2:0] r);
    return {2'b10, r};
  endfunction

  // --------------------------------------------------------------- decode
  logic       c_f, v_f, z_f, n_f, br_taken;
  logic       mem_op, is_store, is_byte, is_rts, ext_needed;
  logic       is_bitmem, bm_modify;
  logic [3:0] dreg;        // data register (byte code field / word in [2:0])
  logic [2:0] areg;        // address register for @Rn forms
  logic [2:0] t_sel;
  logic       t_done;

  assign c_f = ccr_out[CCR_C];
  assign v_f = ccr_out[CCR_V];
  assign z_f = ccr_out[CCR_Z];
  assign n_f = ccr_out[CCR_N];

  always_comb begin
    unique case (op[3:0])
      4'h0: br_taken = 1'b1;
      4'h1: br_taken = 1'b0;
      4'h2: br_taken = !(c_f | z_f);
      4'h3: br_taken =  (c_f | z_f);
      4'h4: br_taken = !c_f;
      4'h5: br_taken =  c_f;
      4'h6: br_taken = !z_f;
      4'h7: br_taken =  z_f;
      4'h8: br_taken = !v_f;
      4'h9: br_taken =  v_f;
      4'hA: br_taken = !n_f;
      4'hB: br_taken =  n_f;
      4'hC: br_taken = !(n_f ^ v_f);
      4'hD: br_taken =  (n_f ^ v_f);
      4'hE: br_taken = !(z_f | (n_f ^ v_f));
      default: br_taken = (z_f | (n_f ^ v_f));
    endcase
  end

  always_comb begin
    mem_op     = 1'b0;
    is_store   = 1'b0;
    is_byte    = 1'b0;
    is_rts     = (op == 8'h54);
    ext_needed = 1'b0;
    dreg       = b[3:0];
    areg       = b[6:4];
    if (op[7:4] == 4'h2 || op[7:4] == 4'h3) begin
      mem_op   = 1'b1;
      is_store = op[4];
      is_byte  = 1'b1;
      dreg     = op[3:0];
    end else if (op >= 8'h68 && op <= 8'h6F) begin
      mem_op     = 1'b1;
      is_store   = b[7];
      is_byte    = !op[0];
      ext_needed = (op == 8'h6A || op == 8'h6B || op == 8'h6E || op == 8'h6F);
    end
  end

  // bit operations on memory (7C-7F): the operation word is held in tmp
  assign is_bitmem = (op[7:2] == 6'b011111);
  assign bm_modify = tmp_out[15:8] inside {8'h60, 8'h61, 8'h62, 8'h67,
                                           8'h70, 8'h71, 8'h72};

  // ALU code for a bit operation given its first byte and bit 7 of the
  // second (the "invert" variants)
  function automatic logic [5:0] bit_alu(input logic [7:0] o, input logic inv);
    unique case (o)
      8'h60:   return ALU_RBSET;
      8'h61:   return ALU_RBNOT;
      8'h62:   return ALU_RBCLR;
      8'h63:   return ALU_RBTST;
      8'h67:   return inv ? ALU_BIST  : ALU_BST;
      8'h70:   return ALU_BSET;
      8'h71:   return ALU_BNOT;
      8'h72:   return ALU_BCLR;
      8'h73:   return ALU_BTST;
      8'h74:   return inv ? ALU_BIOR  : ALU_BOR;
      8'h75:   return inv ? ALU_BIXOR : ALU_BXOR;
      8'h76:   return inv ? ALU_BIAND : ALU_BAND;
      8'h77:   return inv ? ALU_BILD  : ALU_BLD;
      default: return ALU_B_DPORT;
    endcase
  endfunction

  assign t_sel  = (op == 8'h58) ? {1'b0, b[5:4]} : {1'b0, b[1:0]};
  assign t_done = (t_sel == 3'd0) ? t0_done :
                  (t_sel == 3'd1) ? t1_done : t2_done;

  // ------------------------------------------------------------ state reg
  always_ff @(posedge clk) begin
    if (reset) state <= S_FETCH0;
    else       state <= nxt;
  end

  assign c_state     = state;
  assign ram_ce      = (state != S_HALT);
  assign load_uat    = !ctrl.wr_bar;
  assign trigger_LED = (state == S_DECODE);

  // ------------------------------------------------- control word helpers
  // destination register write of an ALU byte / word result
  function automatic h8_ctrl_t wr_byte(input h8_ctrl_t c, input logic [3:0] r);
    h8_ctrl_t x = c;
    if (r[3]) x.load_rl[r[2:0]] = LR_ALUB;
    else      x.load_rh[r[2:0]] = LR_ALUB;
    return x;
  endfunction
  function automatic h8_ctrl_t wr_word(input h8_ctrl_t c, input logic [2:0] r);
    h8_ctrl_t x = c;
    x.load_rh[r] = LR_ALUW;
    x.load_rl[r] = LR_ALUW;
    return x;
  endfunction
  function automatic h8_ctrl_t wr_acc(input h8_ctrl_t c, input logic [3:0] r);
    h8_ctrl_t x = c;
    if (r[3]) x.load_rl[r[2:0]] = LR_ACC;
    else      x.load_rh[r[2:0]] = LR_ACC;
    return x;
  endfunction

  // ------------------------------------------------------ control outputs
  always_comb begin
    ctrl          = '0;
    ctrl.rd_bar   = 1'b1;
    ctrl.wr_bar   = 1'b1;
    ctrl.alu_sel  = ALU_B_ZERO;
    ctrl.acc_op   = ACC_ROTL;
    nxt           = state;

    unique case (state)
      // ------------------------------------------------ instruction fetch
      S_FETCH0: begin
        if (!halt_current) begin
          ctrl.ma_sel  = MA_PC;
          ctrl.loadma  = 1'b1;
          ctrl.rd_sel  = RD_PC;
          ctrl.alu_sel = ALU_W_INC2;
          ctrl.loadpc  = LD_ALU;
          nxt          = S_FETCH1;
        end
      end
      S_FETCH1: begin
        ctrl.rd_bar = 1'b0;
        nxt         = S_FETCH2;
      end
      S_FETCH2: begin
        ctrl.rd_bar  = 1'b0;
        ctrl.rn_sel  = RN_MEM;
        ctrl.bdg_sel = BDG_WORD;
        ctrl.loadir  = 1'b1;
        nxt          = S_DECODE;
      end

      // ------------------------------------------------ decode / execute
      S_DECODE: begin
        nxt = S_FETCH0;
        casez (op)
          8'h01: if (b == 8'h80) nxt = S_HALT;                 // SLEEP
          8'h02: begin                                         // STC CCR,Rd
            ctrl.rd_sel  = RD_CCR;
            ctrl.alu_sel = ALU_B_DPORT;
            ctrl = wr_byte(ctrl, b[3:0]);
          end
          8'h03, 8'h04, 8'h05, 8'h06, 8'h07: begin             // LDC/ORC/XORC/ANDC
            ctrl.ccr_sel = CCR_FROM_DATA;
            ctrl.loadccr = 1'b1;
            ctrl.rd_sel  = (op == 8'h03) ? bcode(b[3:0]) : RD_CCR;
            ctrl.rs_sel  = RS_IMM;
            unique case (op[2:0])
              3'h3:    ctrl.alu_sel = ALU_B_DPORT;
              3'h4:    ctrl.alu_sel = ALU_B_OR;
              3'h5:    ctrl.alu_sel = ALU_B_XOR;
              3'h6:    ctrl.alu_sel = ALU_B_AND;
              default: ctrl.alu_sel = ALU_B_SPORT;
            endcase
          end
          8'h08, 8'h0E, 8'h14, 8'h15, 8'h16, 8'h18, 8'h1E, 8'h0C: begin
            ctrl.rs_sel  = bcode(b[7:4]);
            ctrl.rd_sel  = bcode(b[3:0]);
            ctrl.ccr_sel = CCR_FROM_ALU;
            ctrl.loadccr = 1'b1;
            unique case (op)
              8'h08:   ctrl.alu_sel = ALU_B_ADD;
              8'h0E:   ctrl.alu_sel = ALU_B_ADDX;
              8'h14:   ctrl.alu_sel = ALU_B_OR;
              8'h15:   ctrl.alu_sel = ALU_B_XOR;
              8'h16:   ctrl.alu_sel = ALU_B_AND;
              8'h18:   ctrl.alu_sel = ALU_B_SUB;
              8'h1E:   ctrl.alu_sel = ALU_B_SUBX;
              default: ctrl.alu_sel = ALU_B_SPORT;
            endcase
            ctrl = wr_byte(ctrl, b[3:0]);
          end
          8'h1C: begin                                         // CMP.B Rs,Rd
            ctrl.rs_sel  = bcode(b[7:4]);
            ctrl.rd_sel  = bcode(b[3:0]);
            ctrl.alu_sel = ALU_B_CMP;
            ctrl.ccr_sel = CCR_FROM_ALU;
            ctrl.loadccr = 1'b1;
          end
          8'h09, 8'h19, 8'h0D, 8'h1D: begin                    // word reg-reg
            ctrl.rs_sel  = wcode(b[6:4]);
            ctrl.rd_sel  = wcode(b[2:0]);
            ctrl.ccr_sel = CCR_FROM_ALU;
            ctrl.loadccr = 1'b1;
            unique case (op)
              8'h09:   ctrl.alu_sel = ALU_W_ADD;
              8'h19:   ctrl.alu_sel = ALU_W_SUB;
              8'h0D:   ctrl.alu_sel = ALU_W_SPORT;
              default: ctrl.alu_sel = ALU_W_CMP;
            endcase
            if (op != 8'h1D) ctrl = wr_word(ctrl, b[2:0]);
          end
          8'h0A, 8'h1A, 8'h0F, 8'h1F, 8'h17: begin             // single operand
            ctrl.rd_sel  = bcode(b[3:0]);
            ctrl.ccr_sel = CCR_FROM_ALU;
            ctrl.loadccr = 1'b1;
            unique case (op)
              8'h0A:   ctrl.alu_sel = ALU_B_INC;
              8'h1A:   ctrl.alu_sel = ALU_B_DEC;
              8'h0F:   ctrl.alu_sel = ALU_B_DAA;
              8'h1F:   ctrl.alu_sel = ALU_B_DAS;
              default: ctrl.alu_sel = b[7] ? ALU_B_NEG : ALU_B_NOT;
            endcase
            ctrl = wr_byte(ctrl, b[3:0]);
          end
          8'h0B, 8'h1B: begin                                  // ADDS / SUBS
            ctrl.rd_sel  = wcode(b[2:0]);
            ctrl.alu_sel = (op == 8'h0B) ? (b[7] ? ALU_W_INC2 : ALU_W_INC)
                                         : (b[7] ? ALU_W_DEC2 : ALU_W_DEC);
            ctrl = wr_word(ctrl, b[2:0]);
          end
          8'h10, 8'h11, 8'h12, 8'h13: begin                    // shifts/rotates
            ctrl.acc_sel = bcode(b[3:0]) [3:0];
            unique case (op[1:0])
              2'd0:    ctrl.acc_op = b[7] ? ACC_SHAL : ACC_SHLL;
              2'd1:    ctrl.acc_op = b[7] ? ACC_SHAR : ACC_SHLR;
              2'd2:    ctrl.acc_op = b[7] ? ACC_ROTL : ACC_ROTXL;
              default: ctrl.acc_op = b[7] ? ACC_ROTR : ACC_ROTXR;
            endcase
            ctrl.ccr_sel = CCR_FROM_ACC;
            ctrl.loadccr = 1'b1;
            ctrl = wr_acc(ctrl, b[3:0]);
          end
          8'h4?: begin                                         // Bcc d:8
            if (br_taken) begin
              ctrl.rd_sel  = RD_PC;
              ctrl.rs_sel  = RS_IMM;
              ctrl.alu_sel = ALU_W_ADD;
              ctrl.loadpc  = LD_ALU;
            end
          end
          8'h50: begin                                         // MULXU Rs,Rd
            ctrl.rs_sel  = bcode(b[7:4]);
            ctrl.rd_sel  = wcode(b[2:0]);
            ctrl.alu_sel = ALU_W_MUL;
            ctrl = wr_word(ctrl, b[2:0]);
          end
          8'h54: begin                                         // RTS
            ctrl.rn_sel  = wcode(3'd7);
            ctrl.bdg_sel = BDG_WORD;
            ctrl.ma_sel  = MA_BDG;
            ctrl.loadma  = 1'b1;
            ctrl.rd_sel  = wcode(3'd7);
            ctrl.alu_sel = ALU_W_INC2;
            ctrl = wr_word(ctrl, 3'd7);
            nxt = S_RD1;
          end
          8'h55: nxt = S_PUSH;                                 // BSR d:8
          8'h57: nxt = S_TWAIT;                                // TWAIT t
          8'h58: begin                                         // TLD Rs,t
            ctrl.rn_sel  = bcode(b[3:0]);
            ctrl.bdg_sel = BDG_BYTE;
            ctrl.load_t[t_sel[1:0]] = 1'b1;
          end
          8'h59, 8'h5D: begin                                  // JMP/JSR @Rn
            ctrl.rn_sel  = wcode(b[6:4]);
            ctrl.bdg_sel = BDG_WORD;
            if (op == 8'h59) ctrl.loadpc  = LD_BDG;
            else begin
              ctrl.loadtmp = LD_BDG;
              nxt = S_PUSH;
            end
          end
          8'h5A, 8'h5E, 8'h79: nxt = S_EXT0;                   // @aa:16, #xx:16
          8'h7C, 8'h7D, 8'h7E, 8'h7F: nxt = S_EXT0;            // bit op on memory
          8'h7B: if (b == 8'h5C) begin                         // EEPMOV
            ctrl.rd_sel  = RD_PC;                              // skip H'598F
            ctrl.alu_sel = ALU_W_INC2;
            ctrl.loadpc  = LD_ALU;
            nxt          = S_EE0;
          end
          8'h5B, 8'h5F: begin                                  // JMP/JSR @@aa:8
            ctrl.ma_sel = MA_ABS;
            ctrl.loadma = 1'b1;
            nxt = S_RD1;
          end
          8'h6?, 8'h2?, 8'h3?: begin
            if (mem_op) begin
              if (ext_needed) nxt = S_EXT0;
              else begin
                // address from IR (aa:8) or from Rn
                if (op[7:5] == 3'b001) begin
                  ctrl.ma_sel = MA_ABS;
                  ctrl.loadma = 1'b1;
                end else if ((op == 8'h6C || op == 8'h6D) && is_store) begin
                  // @-Rn: Rn <- Rn - size, MA <- Rn - size
                  ctrl.rd_sel  = wcode(areg);
                  ctrl.alu_sel = is_byte ? ALU_W_DEC : ALU_W_DEC2;
                  ctrl.ma_sel  = MA_ALU;
                  ctrl.loadma  = 1'b1;
                  ctrl = wr_word(ctrl, areg);
                end else begin
                  ctrl.rn_sel  = wcode(areg);
                  ctrl.bdg_sel = BDG_WORD;
                  ctrl.ma_sel  = MA_BDG;
                  ctrl.loadma  = 1'b1;
                  if (op == 8'h6C || op == 8'h6D) begin        // @Rn+
                    ctrl.rd_sel  = wcode(areg);
                    ctrl.alu_sel = is_byte ? ALU_W_INC : ALU_W_INC2;
                    ctrl = wr_word(ctrl, areg);
                  end
                end
                if (is_store && !is_byte) begin
                  // MD <- Rs (bridge is free in the @-Rn and aa:8 cases)
                  ctrl.rn_sel  = wcode(dreg[2:0]);
                  ctrl.bdg_sel = BDG_WORD;
                  ctrl.loadmd  = LD_BDG;
                  ctrl.ccr_sel = CCR_FROM_BDG;
                  ctrl.loadccr = 1'b1;
                  if (op == 8'h69) begin
                    // @Rn store: the bridge carries the address, so MD is
                    // loaded through the ALU instead
                    ctrl.rn_sel  = wcode(areg);
                    ctrl.loadmd  = LD_ALU;
                    ctrl.rd_sel  = wcode(dreg[2:0]);
                    ctrl.alu_sel = ALU_W_DPORT;
                    ctrl.ccr_sel = CCR_FROM_ALU;
                  end
                  nxt = S_WR;
                end else nxt = S_RD1;
              end
            end else begin
              // 60-63 register bit number, 67 BST/BIST
              ctrl.rd_sel = bcode(b[3:0]);
              ctrl.rs_sel = (op == 8'h67) ? RS_IMM : bcode(b[7:4]);
              unique case (op)
                8'h60:   ctrl.alu_sel = ALU_RBSET;
                8'h61:   ctrl.alu_sel = ALU_RBNOT;
                8'h62:   ctrl.alu_sel = ALU_RBCLR;
                8'h63:   ctrl.alu_sel = ALU_RBTST;
                8'h67:   ctrl.alu_sel = b[7] ? ALU_BIST : ALU_BST;
                default: ctrl.alu_sel = ALU_B_DPORT;
              endcase
              if (op == 8'h63) begin
                ctrl.ccr_sel = CCR_FROM_ALU;
                ctrl.loadccr = 1'b1;
              end else if (op inside {8'h60, 8'h61, 8'h62, 8'h67})
                ctrl = wr_byte(ctrl, b[3:0]);
            end
          end
          8'h70, 8'h71, 8'h72, 8'h73, 8'h74, 8'h75, 8'h76, 8'h77: begin
            ctrl.rd_sel = bcode(b[3:0]);
            ctrl.rs_sel = RS_IMM;
            unique case (op)
              8'h70:   ctrl.alu_sel = ALU_BSET;
              8'h71:   ctrl.alu_sel = ALU_BNOT;
              8'h72:   ctrl.alu_sel = ALU_BCLR;
              8'h73:   ctrl.alu_sel = ALU_BTST;
              8'h74:   ctrl.alu_sel = b[7] ? ALU_BIOR  : ALU_BOR;
              8'h75:   ctrl.alu_sel = b[7] ? ALU_BIXOR : ALU_BXOR;
              8'h76:   ctrl.alu_sel = b[7] ? ALU_BIAND : ALU_BAND;
              default: ctrl.alu_sel = b[7] ? ALU_BILD  : ALU_BLD;
            endcase
            if (op <= 8'h72) ctrl = wr_byte(ctrl, b[3:0]);
            else begin
              ctrl.ccr_sel = CCR_FROM_ALU;
              ctrl.loadccr = 1'b1;
            end
          end
          8'h8?, 8'h9?, 8'hA?, 8'hB?, 8'hC?, 8'hD?, 8'hE?, 8'hF?: begin
            ctrl.rd_sel  = bcode(op[3:0]);
            ctrl.rs_sel  = RS_IMM;
            ctrl.ccr_sel = CCR_FROM_ALU;
            ctrl.loadccr = 1'b1;
            unique case (op[7:4])
              4'h8:    ctrl.alu_sel = ALU_B_ADD;
              4'h9:    ctrl.alu_sel = ALU_B_ADDX;
              4'hA:    ctrl.alu_sel = ALU_B_CMP;
              4'hB:    ctrl.alu_sel = ALU_B_SUBX;
              4'hC:    ctrl.alu_sel = ALU_B_OR;
              4'hD:    ctrl.alu_sel = ALU_B_XOR;
              4'hE:    ctrl.alu_sel = ALU_B_AND;
              default: ctrl.alu_sel = ALU_B_SPORT;
            endcase
            if (op[7:4] != 4'hA) ctrl = wr_byte(ctrl, op[3:0]);
          end
          default: ;                                           // NOP
        endcase
      end

      // ------------------------------------------------ second word
      S_EXT0: begin
        ctrl.ma_sel  = MA_PC;
        ctrl.loadma  = 1'b1;
        ctrl.rd_sel  = RD_PC;
        ctrl.alu_sel = ALU_W_INC2;
        ctrl.loadpc  = LD_ALU;
        nxt          = S_EXT1;
      end
      S_EXT1: begin
        ctrl.rd_bar = 1'b0;
        nxt         = S_EXT2;
      end
      S_EXT2: begin
        ctrl.rd_bar  = 1'b0;
        ctrl.rn_sel  = RN_MEM;
        ctrl.bdg_sel = BDG_WORD;
        nxt          = S_FETCH0;
        unique case (op)
          8'h79: begin                                         // MOV.W #xx:16
            ctrl.loadmd  = LD_BDG;
            ctrl.ccr_sel = CCR_FROM_BDG;
            ctrl.loadccr = 1'b1;
            nxt          = S_X1;
          end
          8'h5A: ctrl.loadpc = LD_BDG;                         // JMP @aa:16
          8'h5E: begin                                         // JSR @aa:16
            ctrl.loadtmp = LD_BDG;
            nxt          = S_PUSH;
          end
          8'h6E, 8'h6F: begin                                  // d:16 -> MD
            ctrl.loadmd = LD_BDG;
            nxt         = S_DISP;
          end
          8'h7C, 8'h7D, 8'h7E, 8'h7F: begin                    // bit-op word
            ctrl.loadtmp = LD_BDG;
            nxt          = S_BM0;
          end
          default: begin                                       // @aa:16
            ctrl.ma_sel = MA_BDG;
            ctrl.loadma = 1'b1;
            if (is_store && !is_byte) begin
              ctrl.rd_sel  = wcode(dreg[2:0]);
              ctrl.alu_sel = ALU_W_DPORT;
              ctrl.loadmd  = LD_ALU;
              ctrl.ccr_sel = CCR_FROM_ALU;
              ctrl.loadccr = 1'b1;
              nxt          = S_WR;
            end else nxt = S_RD1;
          end
        endcase
      end
      S_BM0: begin                                           // MA <- @Rd / @aa:8
        if (op[1]) ctrl.ma_sel = MA_ABS;
        else begin
          ctrl.rn_sel  = wcode(b[6:4]);
          ctrl.bdg_sel = BDG_WORD;
          ctrl.ma_sel  = MA_BDG;
        end
        ctrl.loadma = 1'b1;
        nxt         = S_RD1;
      end
      S_X1: begin
        ctrl.rd_sel  = RD_MD;
        ctrl.alu_sel = ALU_W_DPORT;
        ctrl = wr_word(ctrl, b[2:0]);
        nxt = S_FETCH0;
      end
      S_DISP: begin
        ctrl.rd_sel  = RD_MD;
        ctrl.rs_sel  = wcode(areg);
        ctrl.alu_sel = ALU_W_ADD;
        ctrl.ma_sel  = MA_ALU;
        ctrl.loadma  = 1'b1;
        if (is_store && !is_byte) begin
          ctrl.rn_sel  = wcode(dreg[2:0]);
          ctrl.bdg_sel = BDG_WORD;
          ctrl.loadmd  = LD_BDG;
          ctrl.ccr_sel = CCR_FROM_BDG;
          ctrl.loadccr = 1'b1;
          nxt = S_WR;
        end else nxt = S_RD1;
      end

      // ------------------------------------------------ data read
      S_RD1: begin
        ctrl.rd_bar = 1'b0;
        nxt         = S_RD2;
      end
      S_RD2: begin
        ctrl.rd_bar  = 1'b0;
        ctrl.rn_sel  = RN_MEM;
        ctrl.bdg_sel = BDG_WORD;
        ctrl.loadmd  = LD_BDG;
        nxt          = is_bitmem ? S_BMOP :
                       (is_store && is_byte) ? S_MODW : S_RDX;
      end
      S_RDX: begin
        nxt = S_FETCH0;
        if (is_rts || op == 8'h5B) begin                     // RTS, JMP @@aa:8
          ctrl.rd_sel  = RD_MD;
          ctrl.alu_sel = ALU_W_DPORT;
          ctrl.loadpc  = LD_ALU;
        end else if (op == 8'h5F) begin                      // JSR @@aa:8
          ctrl.rd_sel  = RD_MD;
          ctrl.alu_sel = ALU_W_DPORT;
          ctrl.loadtmp = LD_ALU;
          nxt          = S_PUSH;
        end else begin
          ctrl.ccr_sel = CCR_FROM_ALU;
          ctrl.loadccr = 1'b1;
          if (is_byte) begin
            ctrl.rd_sel  = lower ? RD_MDL : RD_MDH;
            ctrl.alu_sel = ALU_B_DPORT;
            ctrl = wr_byte(ctrl, dreg);
          end else begin
            ctrl.rd_sel  = RD_MD;
            ctrl.alu_sel = ALU_W_DPORT;
            ctrl = wr_word(ctrl, dreg[2:0]);
          end
        end
      end

      // ------------------------------------------------ data write
      S_MODW: begin
        ctrl.rd_sel   = bcode(dreg);
        ctrl.alu_sel  = ALU_B_DPORT;
        ctrl.ccr_sel  = CCR_FROM_ALU;
        ctrl.loadccr  = 1'b1;
        ctrl.loadcnct = lower ? CN_LOW : CN_HIGH;
        nxt           = S_WR;
      end
      S_BMOP: begin                                          // bit op on the byte
        ctrl.rd_sel  = lower ? RD_MDL : RD_MDH;
        ctrl.rs_sel  = (tmp_out[15:12] == 4'h6 && tmp_out[11:8] != 4'h7)
                       ? bcode(tmp_out[7:4]) : RS_TMP;
        ctrl.alu_sel = bit_alu(tmp_out[15:8], tmp_out[7]);
        if (bm_modify) begin
          ctrl.loadcnct = lower ? CN_LOW : CN_HIGH;
          nxt           = S_WR;
        end else begin
          ctrl.ccr_sel = CCR_FROM_ALU;
          ctrl.loadccr = 1'b1;
          nxt          = S_FETCH0;
        end
      end
      S_WR: begin
        ctrl.wr_bar = 1'b0;
        ctrl.md_sel = (is_byte && mem_op) || is_bitmem;
        nxt = (op == 8'h55) ? S_BR :
              (op == 8'h5D || op == 8'h5E || op == 8'h5F) ? S_JMPT : S_FETCH0;
      end

      // ------------------------------------------------ subroutine calls
      S_PUSH: begin
        ctrl.rd_sel  = wcode(3'd7);
        ctrl.alu_sel = ALU_W_DEC2;
        ctrl.ma_sel  = MA_ALU;
        ctrl.loadma  = 1'b1;
        ctrl = wr_word(ctrl, 3'd7);
        ctrl.rn_sel  = RN_PC;
        ctrl.bdg_sel = BDG_WORD;
        ctrl.loadmd  = LD_BDG;
        nxt          = S_WR;
      end
      S_BR: begin
        ctrl.rd_sel  = RD_PC;
        ctrl.rs_sel  = RS_IMM;
        ctrl.alu_sel = ALU_W_ADD;
        ctrl.loadpc  = LD_ALU;
        nxt          = S_FETCH0;
      end
      S_JMPT: begin
        ctrl.rn_sel  = RN_TMP;
        ctrl.bdg_sel = BDG_WORD;
        ctrl.loadpc  = LD_BDG;
        nxt          = S_FETCH0;
      end

      // ------------------------------------------------ EEPMOV block move
      S_EE0: begin                                           // tmp <- R4L
        ctrl.rn_sel  = bcode(4'hC);
        ctrl.bdg_sel = BDG_BYTE;
        ctrl.loadtmp = LD_BDG;
        nxt          = S_EE1;
      end
      S_EE1: begin                                           // MA <- R5, R5++
        if (tmp_out[7:0] == 8'h00) nxt = S_FETCH0;
        else begin
          ctrl.rn_sel  = wcode(3'd5);
          ctrl.bdg_sel = BDG_WORD;
          ctrl.ma_sel  = MA_BDG;
          ctrl.loadma  = 1'b1;
          ctrl.rd_sel  = wcode(3'd5);
          ctrl.alu_sel = ALU_W_INC;
          ctrl = wr_word(ctrl, 3'd5);
          nxt          = S_EE2;
        end
      end
      S_EE2: begin
        ctrl.rd_bar = 1'b0;
        nxt         = S_EE3;
      end
      S_EE3: begin                                           // MD <- source
        ctrl.rd_bar  = 1'b0;
        ctrl.rn_sel  = RN_MEM;
        ctrl.bdg_sel = BDG_WORD;
        ctrl.loadmd  = LD_BDG;
        nxt          = S_EE4;
      end
      S_EE4: begin                                           // park byte, MA <- R6
        ctrl.rd_sel   = lower ? RD_MDL : RD_MDH;
        ctrl.alu_sel  = ALU_B_DPORT;
        ctrl.loadcnct = CN_LOW;
        ctrl.rn_sel   = wcode(3'd6);
        ctrl.bdg_sel  = BDG_WORD;
        ctrl.ma_sel   = MA_BDG;
        ctrl.loadma   = 1'b1;
        nxt           = S_EE5;
      end
      S_EE5: begin                                           // R6++, read
        ctrl.rd_bar  = 1'b0;
        ctrl.rd_sel  = wcode(3'd6);
        ctrl.alu_sel = ALU_W_INC;
        ctrl = wr_word(ctrl, 3'd6);
        nxt          = S_EE6;
      end
      S_EE6: begin                                           // MD <- destination
        ctrl.rd_bar  = 1'b0;
        ctrl.rn_sel  = RN_MEM;
        ctrl.bdg_sel = BDG_WORD;
        ctrl.loadmd  = LD_BDG;
        nxt          = S_EE7;
      end
      S_EE7: begin                                           // merge byte
        ctrl.rd_sel   = RD_CNCT;
        ctrl.alu_sel  = ALU_B_DPORT;
        ctrl.loadcnct = lower ? CN_LOW : CN_HIGH;
        nxt           = S_EEW;
      end
      S_EEW: begin                                           // write, R4L--
        ctrl.wr_bar  = 1'b0;
        ctrl.md_sel  = 1'b1;
        ctrl.rd_sel  = bcode(4'hC);
        ctrl.alu_sel = ALU_B_DEC;
        ctrl = wr_byte(ctrl, 4'hC);
        nxt          = S_EE0;
      end

      // ------------------------------------------------ timer extension
      S_TWAIT: if (t_done) nxt = S_FETCH0;

      S_HALT: ;
      default: nxt = S_FETCH0;
    endcase
  end

endmodule
