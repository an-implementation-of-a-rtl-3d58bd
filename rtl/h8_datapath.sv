// h8_datapath: the processor's datapath, wired as in the datapath diagram.
//
// Sixteen 8-bit register halves (R0H..R7L) feed four multiplexers: mux_acc
// to the accumulator (shifts and rotates), mux_rs and mux_rd to the ALU's
// source and destination ports, and mux_rn to the bridge.  The bridge
// carries values to the 16-bit special registers IR, PC, MA, MD and tmp,
// and its low byte loads the three timers.  The ALU word result can load
// PC, MD, tmp and MA (through mux_ma); ALU byte and word results and the
// accumulator load the register halves; the CCR takes flags from the ALU,
// bridge or accumulator, or a byte from the ALU, through mux_ccr.  The
// concatenator merges an ALU byte into the MD word for byte stores, and
// the memory interface sends MD or the concatenator word (mux_md) to
// memory and returns memory data to mux_rn.
//
// Every register loads on the rising clock edge under the control word
// `ctrl`, which the controller drives each cycle; all paths between the
// registers are combinational, so one control word is one register-transfer
// step.  Memory is synchronous: a word read with MA loaded at edge k is on
// from_mem after edge k+2 (MA register, then the RAM's output register).
module h8_datapath
  import h8_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  input  h8_ctrl_t    ctrl,
  input  logic [15:0] from_mem,
  input  logic [15:0] sr,
  output logic [15:0] ir_out,
  output logic [15:0] tmp_out,
  output logic [7:0]  ccr_out,
  output logic        t0_done,
  output logic        t1_done,
  output logic        t2_done,
  output logic        lower,
  output logic [15:0] MA_out,
  output logic [15:0] to_mem
);
  logic [7:0][7:0] rh, rl;
  logic [7:0]  acc_in, acc_out, acc_ccr;
  logic [7:0]  rs_b, rd_b, rn_b;
  logic [15:0] rs_w, rd_w, rn_w;
  logic [7:0]  alu_ccr, aluB;
  logic [15:0] aluW;
  logic [7:0]  bdg_ccr, ccr_in;
  logic [15:0] bdgW;
  logic [15:0] pc, md, cnct, ma_in, abs_addr, mux_md_out, data_out;
  logic [7:0]  imm;
  logic [2:0]  t_done;

  // ------------------------------------------------------ general registers
  for (genvar n = 0; n < 8; n++) begin : g_regs
    register_half #(.HIGH(1'b1)) u_rh (
      .clk, .reset, .load_sel(ctrl.load_rh[n]), .alu_W(aluW), .alu_B(aluB),
      .acc_in(acc_out), .reg_out(rh[n]));
    register_half #(.HIGH(1'b0)) u_rl (
      .clk, .reset, .load_sel(ctrl.load_rl[n]), .alu_W(aluW), .alu_B(aluB),
      .acc_in(acc_out), .reg_out(rl[n]));
  end

  // ------------------------------------------------------ accumulator
  mux_acc u_mux_acc (.acc_sel(ctrl.acc_sel), .rh, .rl, .mux_out(acc_in));
  acc u_acc (.acc_op(ctrl.acc_op), .acc_in, .ccr_in(ccr_out),
             .acc_out, .ccr_out(acc_ccr));

  // ------------------------------------------------------ ALU and its inputs
  mux_rs u_mux_rs (.rs_sel(ctrl.rs_sel), .rh, .rl, .ma(MA_out), .ir(ir_out),
                   .tmp(tmp_out), .IMM(imm), .mux_B_out(rs_b), .mux_W_out(rs_w));
  mux_rd u_mux_rd (.rd_sel(ctrl.rd_sel), .rh, .rl, .ccr(ccr_out), .md_out(md),
                   .pc, .cnct, .mux_B_out(rd_b), .mux_W_out(rd_w));
  alu u_alu (.ccr_in(ccr_out), .sport(rs_b), .sport_w(rs_w), .dport(rd_b),
             .dport_w(rd_w), .alu_sel(ctrl.alu_sel), .ccr_out(alu_ccr),
             .aluB_out(aluB), .aluW_out(aluW));

  // ------------------------------------------------------ bridge
  mux_rn u_mux_rn (.rn_sel(ctrl.rn_sel), .rh, .rl, .ma(MA_out), .ir(ir_out),
                   .md_out(data_out), .pc, .tmp(tmp_out), .ccr(ccr_out), .sr,
                   .mux_B_out(rn_b), .mux_W_out(rn_w));
  bridge u_bdg (.ccr_in(ccr_out), .nport_B(rn_b), .nport_W(rn_w),
                .bdg_sel(ctrl.bdg_sel), .ccr_out(bdg_ccr), .bdgW_out(bdgW));

  // ------------------------------------------------------ CCR
  mux_ccr u_mux_ccr (.alu(alu_ccr), .data(aluB), .bdg(bdg_ccr), .acc(acc_ccr),
                     .ccr_sel(ctrl.ccr_sel), .mux_out(ccr_in));
  register7 u_ccr (.clk, .reset, .load(ctrl.loadccr), .reg_in(ccr_in),
                   .reg_out(ccr_out));

  // ------------------------------------------------------ special registers
  ir u_ir (.clk, .reset, .loadir(ctrl.loadir), .reg_in(bdgW),
           .abs_out(abs_addr), .reg_out(ir_out), .IMM_out(imm));
  register16 u_pc  (.clk, .reset, .load(ctrl.loadpc),  .bdg_in(bdgW),
                    .reg_in(aluW), .reg_out(pc));
  register16 u_md  (.clk, .reset, .load(ctrl.loadmd),  .bdg_in(bdgW),
                    .reg_in(aluW), .reg_out(md));
  register16 u_tmp (.clk, .reset, .load(ctrl.loadtmp), .bdg_in(bdgW),
                    .reg_in(aluW), .reg_out(tmp_out));
  mux_ma u_mux_ma (.aa(abs_addr), .pc, .data(aluW), .bdg(bdgW),
                   .ma_sel(ctrl.ma_sel), .ma_out(ma_in));
  ma u_ma (.clk, .reset, .load(ctrl.loadma), .reg_in(ma_in),
           .reg_out(MA_out), .lower);
  md_concat u_cnct (.clk, .reset, .alu_B(aluB), .md_in(md),
                    .load(ctrl.loadcnct), .reg_out(cnct));

  // ------------------------------------------------------ memory interface
  mux_md u_mux_md (.md_sel(ctrl.md_sel), .cnct, .md, .mux_out(mux_md_out));
  mem_interface u_mi (.wr_bar(ctrl.wr_bar), .rd_bar(ctrl.rd_bar),
                      .data_in(mux_md_out), .from_mem, .to_mem, .data_out);

  // ------------------------------------------------------ timers
  for (genvar t = 0; t < 3; t++) begin : g_timers
    timer u_timer (.clk, .reset, .time_in(bdgW[7:0]), .load(ctrl.load_t[t]),
                   .done(t_done[t]));
  end
  assign t0_done = t_done[0];
  assign t1_done = t_done[1];
  assign t2_done = t_done[2];
endmodule
