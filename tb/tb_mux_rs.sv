// tb_mux_rs: every select code with random sources; bytes 0..15, words
// 16..23, MA 24, IR 25, tmp 26, immediate 27 (word sign-extended), "00" &
// immediate 28; unused codes give 0.
module tb_mux_rs;
  logic [4:0] rs_sel;
  logic [7:0][7:0] rh, rl;
  logic [15:0] ma, ir, tmp, mux_W_out, exp;
  logic [7:0] IMM, mux_B_out;
  int checks = 0, failures = 0;
  mux_rs dut (.*);
  initial begin
    for (int t = 0; t < 20; t++) begin
      for (int n = 0; n < 8; n++) begin rh[n] = 8'($urandom); rl[n] = 8'($urandom); end
      ma = 16'($urandom); ir = 16'($urandom); tmp = 16'($urandom); IMM = 8'($urandom);
      for (int s = 0; s < 32; s++) begin
        rs_sel = 5'(s); #1;
        if (s < 16) exp = {8'h00, (s % 2) ? rl[s / 2] : rh[s / 2]};
        else if (s < 24) exp = {rh[s - 16], rl[s - 16]};
        else case (s)
          24: exp = ma; 25: exp = ir; 26: exp = tmp;
          27: exp = IMM[7] ? {8'hFF, IMM} : {8'h00, IMM};
          28: exp = {8'h00, IMM}; default: exp = 0;
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
