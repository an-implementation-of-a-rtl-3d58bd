// alu: the arithmetic logic unit of the datapath.
//
// Combinational.  Performs the byte, word and single-bit operations of the
// H8/300 instruction set selected by the six-bit alu_sel (codes in h8_pkg).
// Operands: sport/sport_w come from mux_rs (the source, Rs or immediate),
// dport/dport_w from mux_rd (the destination operand, Rd).  Subtraction is
// dport - sport.  Byte operations drive aluB_out (aluW_out = {00, byte}),
// word operations drive aluW_out (aluB_out = its low byte).  ccr_out is the
// CCR updated as the H8/300 manual specifies for the operation (H, N, Z, V,
// C); the controller decides whether it is loaded.  Byte and word add, sub,
// inc/dec, compare, negate, decimal adjust, logic, multiply and the
// pass-through modes follow the operation table.  The bit operations
// 32..45 take the bit number from the immediate (sport[6:4]); 46..49 from a
// register (sport[2:0]); the word forms 50..57 act on bit n+8 of dport_w,
// the byte at an even address.  Codes 41..45 (BAND, BILD, BLD, BIST, BST)
// and the word-form meaning are this design's choice.
module alu
  import h8_pkg::*;
(
  input  logic [7:0]  ccr_in,
  input  logic [7:0]  sport,
  input  logic [15:0] sport_w,
  input  logic [7:0]  dport,
  input  logic [15:0] dport_w,
  input  logic [5:0]  alu_sel,
  output logic [7:0]  ccr_out,
  output logic [7:0]  aluB_out,
  output logic [15:0] aluW_out
);
  logic        c;
  logic [8:0]  s9;
  logic [4:0]  h5;
  logic [16:0] s17;
  logic [12:0] h13;
  logic [7:0]  b;
  logic [15:0] w;
  logic        is_word;
  logic [2:0]  bn;      // bit number, byte forms
  logic [3:0]  wn;      // bit number, word forms
  logic        bit_b;   // selected bit of dport
  logic        bit_w;   // selected bit of dport_w
  logic [7:0]  adj;
  logic [7:0]  op1, op2; // operands of the byte adder/subtracter
  logic        cx;       // carry/borrow into it

  assign c     = ccr_in[CCR_C];
  assign bn    = (alu_sel >= 6'd46 && alu_sel <= 6'd49) ? sport[2:0] : sport[6:4];
  assign wn    = {1'b1, (alu_sel >= 6'd55) ? sport[2:0] : sport[6:4]};
  assign bit_b = dport[bn];
  assign bit_w = dport_w[wn];

  always_comb begin
    b       = 8'h00;
    w       = 16'h0000;
    is_word = 1'b0;
    s9      = '0;
    h5      = '0;
    s17     = '0;
    h13     = '0;
    adj     = 8'h00;
    op1     = 8'h00;
    op2     = 8'h00;
    cx      = 1'b0;
    ccr_out = ccr_in;
    unique case (alu_sel)
      // ---------------------------------------------------- byte arithmetic
      ALU_B_ZERO: b = 8'h00;
      ALU_B_ADD, ALU_B_ADDX, ALU_B_INC: begin
        op2 = (alu_sel == ALU_B_INC) ? 8'h01 : sport;
        cx  = (alu_sel == ALU_B_ADDX) ? c : 1'b0;
        s9  = {1'b0, dport} + {1'b0, op2} + {8'h00, cx};
        h5  = {1'b0, dport[3:0]} + {1'b0, op2[3:0]} + {4'h0, cx};
        b   = s9[7:0];
        ccr_out[CCR_N] = b[7];
        ccr_out[CCR_V] = (dport[7] == op2[7]) && (b[7] != dport[7]);
        if (alu_sel == ALU_B_ADDX) begin
          if (b != 8'h00) ccr_out[CCR_Z] = 1'b0;
        end else ccr_out[CCR_Z] = (b == 8'h00);
        if (alu_sel != ALU_B_INC) begin
          ccr_out[CCR_H] = h5[4];
          ccr_out[CCR_C] = s9[8];
        end
      end
      ALU_B_SUB, ALU_B_SUBX, ALU_B_DEC, ALU_B_CMP, ALU_B_NEG: begin
        op1 = (alu_sel == ALU_B_NEG) ? 8'h00 : dport;
        op2 = (alu_sel == ALU_B_DEC) ? 8'h01 :
              (alu_sel == ALU_B_NEG) ? dport : sport;
        cx  = (alu_sel == ALU_B_SUBX) ? c : 1'b0;
        s9  = {1'b0, op1} - {1'b0, op2} - {8'h00, cx};
        h5  = {1'b0, op1[3:0]} - {1'b0, op2[3:0]} - {4'h0, cx};
        b   = s9[7:0];
        ccr_out[CCR_N] = b[7];
        ccr_out[CCR_V] = (op1[7] != op2[7]) && (b[7] != op1[7]);
        if (alu_sel == ALU_B_SUBX) begin
          if (b != 8'h00) ccr_out[CCR_Z] = 1'b0;
        end else ccr_out[CCR_Z] = (b == 8'h00);
        if (alu_sel != ALU_B_DEC) begin
          ccr_out[CCR_H] = h5[4];
          ccr_out[CCR_C] = s9[8];
        end
      end
      ALU_B_DAA: begin
        adj = 8'h00;
        if (ccr_in[CCR_H] || dport[3:0] > 4'd9) adj[3:0] = 4'h6;
        if (c || dport > 8'h99)                 adj[7:4] = 4'h6;
        b = dport + adj;
        ccr_out[CCR_C] = c || (dport > 8'h99);
        ccr_out[CCR_N:CCR_Z] = nz8(b);
      end
      ALU_B_DAS: begin
        adj = 8'h00;
        if (ccr_in[CCR_H]) adj[3:0] = 4'h6;
        if (c)             adj[7:4] = 4'h6;
        b = dport - adj;
        ccr_out[CCR_N:CCR_Z] = nz8(b);
      end
      // ---------------------------------------------------- byte logic
      ALU_B_AND, ALU_B_OR, ALU_B_XOR, ALU_B_NOT, ALU_B_SPORT, ALU_B_DPORT: begin
        unique case (alu_sel)
          ALU_B_AND:   b = dport & sport;
          ALU_B_OR:    b = dport | sport;
          ALU_B_XOR:   b = dport ^ sport;
          ALU_B_NOT:   b = ~dport;
          ALU_B_SPORT: b = sport;
          default:     b = dport;
        endcase
        ccr_out[CCR_N:CCR_Z] = nz8(b);
        ccr_out[CCR_V]       = 1'b0;
      end
      ALU_B_CCR: b = ccr_in;
      // ---------------------------------------------------- word arithmetic
      ALU_W_ZERO: is_word = 1'b1;
      ALU_W_ADD: begin
        is_word = 1'b1;
        s17 = {1'b0, dport_w} + {1'b0, sport_w};
        h13 = {1'b0, dport_w[11:0]} + {1'b0, sport_w[11:0]};
        w   = s17[15:0];
        ccr_out[CCR_H] = h13[12];
        ccr_out[CCR_N:CCR_Z] = nz16(w);
        ccr_out[CCR_V] = (dport_w[15] == sport_w[15]) && (w[15] != dport_w[15]);
        ccr_out[CCR_C] = s17[16];
      end
      ALU_W_SUB, ALU_W_CMP: begin
        is_word = 1'b1;
        s17 = {1'b0, dport_w} - {1'b0, sport_w};
        h13 = {1'b0, dport_w[11:0]} - {1'b0, sport_w[11:0]};
        w   = s17[15:0];
        ccr_out[CCR_H] = h13[12];
        ccr_out[CCR_N:CCR_Z] = nz16(w);
        ccr_out[CCR_V] = (dport_w[15] != sport_w[15]) && (w[15] != dport_w[15]);
        ccr_out[CCR_C] = s17[16];
      end
      // address arithmetic (ADDS/SUBS, PC and stack steps): flags unchanged
      ALU_W_INC:  begin is_word = 1'b1; w = dport_w + 16'd1; end
      ALU_W_DEC:  begin is_word = 1'b1; w = dport_w - 16'd1; end
      ALU_W_INC2: begin is_word = 1'b1; w = dport_w + 16'd2; end
      ALU_W_DEC2: begin is_word = 1'b1; w = dport_w - 16'd2; end
      ALU_W_MUL:  begin is_word = 1'b1; w = dport_w[7:0] * sport; end
      ALU_W_SPORT, ALU_W_DPORT: begin
        is_word = 1'b1;
        w = (alu_sel == ALU_W_SPORT) ? sport_w : dport_w;
        ccr_out[CCR_N:CCR_Z] = nz16(w);
        ccr_out[CCR_V]       = 1'b0;
      end
      // ---------------------------------------------------- byte bit ops
      ALU_BSET,  ALU_RBSET: begin b = dport; b[bn] = 1'b1;   end
      ALU_BNOT,  ALU_RBNOT: begin b = dport; b[bn] = ~bit_b; end
      ALU_BCLR,  ALU_RBCLR: begin b = dport; b[bn] = 1'b0;   end
      ALU_BTST,  ALU_RBTST: begin b = dport; ccr_out[CCR_Z] = ~bit_b; end
      ALU_BIOR:  begin b = dport; ccr_out[CCR_C] = c | ~bit_b; end
      ALU_BOR:   begin b = dport; ccr_out[CCR_C] = c |  bit_b; end
      ALU_BIXOR: begin b = dport; ccr_out[CCR_C] = c ^ ~bit_b; end
      ALU_BXOR:  begin b = dport; ccr_out[CCR_C] = c ^  bit_b; end
      ALU_BIAND: begin b = dport; ccr_out[CCR_C] = c & ~bit_b; end
      ALU_BAND:  begin b = dport; ccr_out[CCR_C] = c &  bit_b; end
      ALU_BILD:  begin b = dport; ccr_out[CCR_C] = ~bit_b;     end
      ALU_BLD:   begin b = dport; ccr_out[CCR_C] =  bit_b;     end
      ALU_BIST:  begin b = dport; b[bn] = ~c; end
      ALU_BST:   begin b = dport; b[bn] =  c; end
      // ---------------------------------------------------- word bit ops
      ALU_WBSET, ALU_WRBSET: begin is_word = 1'b1; w = dport_w; w[wn] = 1'b1;   end
      ALU_WBNOT, ALU_WRBNOT: begin is_word = 1'b1; w = dport_w; w[wn] = ~bit_w; end
      ALU_WBCLR, ALU_WRBCLR: begin is_word = 1'b1; w = dport_w; w[wn] = 1'b0;   end
      ALU_WBIST: begin is_word = 1'b1; w = dport_w; w[wn] = ~c; end
      ALU_WBST:  begin is_word = 1'b1; w = dport_w; w[wn] =  c; end
      default: ;
    endcase
  end

  assign aluB_out = is_word ? w[7:0] : b;
  assign aluW_out = is_word ? w : {8'h00, b};
endmodule
