// tb_mux_rn: every select code with random sources; bytes 0..15, CCR 30 and
// words R0..R7 (16..23) as in the bridge-input table, then memory data 24,
// MA 25, PC 26, IR 27, tmp 28, sr 29; unused codes give 0.
module tb_mux_rn;
  logic [4:0] rn_sel;
  logic [7:0][7:0] rh, rl;
  logic [15:0] ma, ir, md_out, pc, tmp, sr, mux_W_out, exp;
  logic [7:0] ccr, mux_B_out;
  int checks = 0, failures = 0;
  mux_rn dut (.*);
  initial begin
    for (int t = 0; t < 20; t++) begin
      for (int n = 0; n < 8; n++) begin rh[n] = 8'($urandom); rl[n] = 8'($urandom); end
      ma = 16'($urandom); ir = 16'($urandom); md_out = 16'($urandom); pc = 16'($urandom);
      tmp = 16'($urandom); sr = 16'($urandom); ccr = 8'($urandom);
      for (int s = 0; s < 32; s++) begin
        rn_sel = 5'(s); #1;
        if (s < 16) exp = {8'h00, (s % 2) ? rl[s / 2] : rh[s / 2]};
        else if (s < 24) exp = {rh[s - 16], rl[s - 16]};
        else case (s)
          24: exp = md_out; 25: exp = ma; 26: exp = pc; 27: exp = ir;
          28: exp = tmp; 29: exp = sr; 30: exp = {8'h00, ccr}; default: exp = 0;
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
