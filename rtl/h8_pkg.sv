// h8_pkg: types and constants shared by the H8/300-style processor.
//
// Holds the condition-code bit positions of the H8/300 CCR, the operation
// codes of the accumulator (shift/rotate unit) and of the ALU, the select
// codes of the datapath multiplexers, and the control word that the
// controller drives into the datapath every cycle.  The numeric codes follow
// the operation tables of the design; codes the tables leave open are this
// design's own choice and are marked as such below.
package h8_pkg;

  // ---------------------------------------------------------------- CCR bits
  localparam int CCR_I = 7;
  localparam int CCR_U = 6;
  localparam int CCR_H = 5;
  localparam int CCR_N = 3;
  localparam int CCR_Z = 2;
  localparam int CCR_V = 1;
  localparam int CCR_C = 0;

  // --------------------------------------------------- accumulator (acc_op)
  typedef enum logic [3:0] {
    ACC_ROTL  = 4'b0000,  // rotate left
    ACC_ROTR  = 4'b0001,  // rotate right
    ACC_ROTXL = 4'b0010,  // rotate left through carry
    ACC_ROTXR = 4'b0011,  // rotate right through carry
    ACC_SHAL  = 4'b0100,  // arithmetic shift left
    ACC_SHAR  = 4'b0101,  // arithmetic shift right
    ACC_SHLL  = 4'b0110,  // logical shift left
    ACC_SHLR  = 4'b0111   // logical shift right (code chosen by this design)
  } acc_op_e;

  // ------------------------------------------------------------ ALU (alu_sel)
  typedef enum logic [5:0] {
    ALU_B_ZERO   = 6'd0,
    ALU_B_ADD    = 6'd1,
    ALU_B_SUB    = 6'd2,
    ALU_B_ADDX   = 6'd3,
    ALU_B_SUBX   = 6'd4,
    ALU_B_INC    = 6'd5,
    ALU_B_DEC    = 6'd6,
    ALU_B_DAA    = 6'd7,
    ALU_B_DAS    = 6'd8,
    ALU_B_CMP    = 6'd9,
    ALU_B_NEG    = 6'd10,
    ALU_B_AND    = 6'd11,
    ALU_B_OR     = 6'd12,
    ALU_B_XOR    = 6'd13,
    ALU_B_NOT    = 6'd14,
    ALU_B_CCR    = 6'd15,   // byte output = CCR (STC, ANDC/ORC/XORC source)
    ALU_W_ZERO   = 6'd16,
    ALU_W_ADD    = 6'd17,
    ALU_W_SUB    = 6'd18,
    ALU_W_INC    = 6'd19,
    ALU_W_DEC    = 6'd20,
    ALU_W_INC2   = 6'd21,
    ALU_W_DEC2   = 6'd22,
    ALU_W_CMP    = 6'd23,
    ALU_W_MUL    = 6'd24,
    ALU_B_SPORT  = 6'd28,
    ALU_W_SPORT  = 6'd29,
    ALU_B_DPORT  = 6'd30,
    ALU_W_DPORT  = 6'd31,
    ALU_BSET     = 6'd32,   // bit number from immediate (sport[6:4])
    ALU_BNOT     = 6'd33,
    ALU_BCLR     = 6'd34,
    ALU_BTST     = 6'd35,
    ALU_BIOR     = 6'd36,
    ALU_BOR      = 6'd37,
    ALU_BIXOR    = 6'd38,
    ALU_BXOR     = 6'd39,
    ALU_BIAND    = 6'd40,
    ALU_BAND     = 6'd41,   // 41..45: own choice
    ALU_BILD     = 6'd42,
    ALU_BLD      = 6'd43,
    ALU_BIST     = 6'd44,
    ALU_BST      = 6'd45,
    ALU_RBSET    = 6'd46,   // bit number from a register (sport[2:0])
    ALU_RBNOT    = 6'd47,
    ALU_RBCLR    = 6'd48,
    ALU_RBTST    = 6'd49,
    ALU_WBSET    = 6'd50,   // word forms: bit n+8 of dport_w (even byte)
    ALU_WBNOT    = 6'd51,
    ALU_WBCLR    = 6'd52,
    ALU_WBIST    = 6'd53,
    ALU_WBST     = 6'd54,
    ALU_WRBSET   = 6'd55,
    ALU_WRBNOT   = 6'd56,
    ALU_WRBCLR   = 6'd57
  } alu_op_e;

  // ------------------------------------------------ mux_rn (rn_sel) codes
  localparam logic [4:0] RN_R0  = 5'd16;  // words R0..R7 = 16..23
  localparam logic [4:0] RN_MEM = 5'd24;  // memory interface data_out
  localparam logic [4:0] RN_MA  = 5'd25;
  localparam logic [4:0] RN_PC  = 5'd26;
  localparam logic [4:0] RN_IR  = 5'd27;
  localparam logic [4:0] RN_TMP = 5'd28;
  localparam logic [4:0] RN_SR  = 5'd29;
  localparam logic [4:0] RN_CCR = 5'd30;

  // ------------------------------------------------ mux_rd (rd_sel) codes
  localparam logic [4:0] RD_R0   = 5'd16; // words R0..R7 = 16..23
  localparam logic [4:0] RD_PC   = 5'd24;
  localparam logic [4:0] RD_MD   = 5'd25;
  localparam logic [4:0] RD_CCR  = 5'd27;
  localparam logic [4:0] RD_MDH  = 5'd28;
  localparam logic [4:0] RD_MDL  = 5'd29;
  localparam logic [4:0] RD_CNCT = 5'd30;

  // ------------------------------------------------ mux_rs (rs_sel) codes
  localparam logic [4:0] RS_R0   = 5'd16; // words R0..R7 = 16..23
  localparam logic [4:0] RS_MA   = 5'd24;
  localparam logic [4:0] RS_IR   = 5'd25;
  localparam logic [4:0] RS_TMP  = 5'd26;
  localparam logic [4:0] RS_IMM  = 5'd27; // byte IMM, word sign-extended
  localparam logic [4:0] RS_IMMZ = 5'd28; // word zero-extended IMM

  // ------------------------------------------------ small select codes
  localparam logic [1:0] MA_PC   = 2'b00;
  localparam logic [1:0] MA_ABS  = 2'b01;
  localparam logic [1:0] MA_BDG  = 2'b10;
  localparam logic [1:0] MA_ALU  = 2'b11;

  localparam logic [1:0] CCR_FROM_ALU  = 2'b00;
  localparam logic [1:0] CCR_FROM_BDG  = 2'b01;
  localparam logic [1:0] CCR_FROM_ACC  = 2'b10;
  localparam logic [1:0] CCR_FROM_DATA = 2'b11;

  // register16 / register_half load codes
  localparam logic [1:0] LD_HOLD = 2'b00;
  localparam logic [1:0] LD_BDG  = 2'b01;  // register16: bridge word
  localparam logic [1:0] LD_ALU  = 2'b10;  // register16: ALU word
  localparam logic [1:0] LR_ALUB = 2'b01;  // register half: ALU byte
  localparam logic [1:0] LR_ALUW = 2'b10;  // register half: its byte of ALU word
  localparam logic [1:0] LR_ACC  = 2'b11;  // register half: accumulator

  localparam logic [1:0] CN_HIGH = 2'b10;  // aluB & MD[7:0]
  localparam logic [1:0] CN_LOW  = 2'b11;  // MD[15:8] & aluB

  localparam logic [1:0] BDG_WORD = 2'b00; // pass word
  localparam logic [1:0] BDG_BYTE = 2'b01; // zero-extend byte
  localparam logic [1:0] BDG_DUP  = 2'b10; // byte in both halves
  localparam logic [1:0] BDG_SEXT = 2'b11; // sign-extend byte

  // ------------------------------------------------ control word
  typedef struct packed {
    logic [3:0] acc_op;
    logic [3:0] acc_sel;
    logic [5:0] alu_sel;
    logic [1:0] bdg_sel;
    logic [1:0] ma_sel;
    logic       md_sel;
    logic [1:0] ccr_sel;
    logic       loadccr;
    logic [1:0] loadtmp;
    logic       loadir;
    logic       loadma;
    logic [1:0] loadmd;
    logic [1:0] loadcnct;
    logic [1:0] loadpc;
    logic [4:0] rd_sel;
    logic [4:0] rs_sel;
    logic [4:0] rn_sel;
    logic [7:0][1:0] load_rh;   // load_r0h .. load_r7h
    logic [7:0][1:0] load_rl;   // load_r0l .. load_r7l
    logic [2:0] load_t;         // load_t0 .. load_t2
    logic       rd_bar;
    logic       wr_bar;
  } h8_ctrl_t;

  // flags of an 8-bit result: N and Z
  function automatic logic [1:0] nz8(input logic [7:0] v);
    return {v[7], v == 8'h00};
  endfunction
  function automatic logic [1:0] nz16(input logic [15:0] v);
    return {v[15], v == 16'h0000};
  endfunction

endpackage
