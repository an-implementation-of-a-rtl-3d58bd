// tb_mux_rd: every select code with random sources; bytes 0..15, words
// 16..23, PC 24, MD 25, CCR 27, MD high byte 28, MD low byte 29,
// concatenator 30; unused codes give 0.
module tb_mux_rd;
  logic [4:0] rd_sel;
  logic [7:0][7:0] rh, rl;
  logic [15:0] md_out, pc, cnct, mux_W_out, exp;
  logic [7:0] ccr, mux_B_out;
  int checks = 0, failures = 0;
  mux_rd dut (.*);
  initial begin
    for (int t = 0; t < 20; t++) begin
      for (int n = 0; n < 8; n++) begin rh[n] = 8'($urandom); rl[n] = 8'($urandom); end
      md_out = 16'($urandom); pc = 16'($urandom); cnct = 16'($urandom); ccr = 8'($urandom);
      for (int s = 0; s < 32; s++) begin
        rd_sel = 5'(s); #1;
        if (s < 16) exp = {8'h00, (s % 2) ? rl[s / 2] : rh[s / 2]};
        else if (s < 24) exp = {rh[s - 16], rl[s - 16]};
        else case (s)
          24: exp = pc; 25: exp = md_out; 27: exp = {8'h00, ccr};
          28: exp = {8'h00, md_out[15:8]}; 29: exp = {8'h00, md_out[7:0]};
          30: exp = cnct; default: exp = 0;
        endcase
        checks++;
        if (mux_W_out !== exp || mux_B_out !== exp[7:0]) begin
          failures++; $display("FAIL sel %0d got %h exp %h", s, mux_W_out, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
