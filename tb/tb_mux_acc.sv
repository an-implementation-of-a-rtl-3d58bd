// tb_mux_acc: every select code 0..15 with random register contents; code
// 2n must give R(n)H and 2n+1 R(n)L.
module tb_mux_acc;
  logic [3:0] acc_sel;
  logic [7:0][7:0] rh, rl;
  logic [7:0] mux_out, exp;
  int checks = 0, failures = 0;
  mux_acc dut (.*);
  initial begin
    for (int t = 0; t < 20; t++) begin
      for (int n = 0; n < 8; n++) begin rh[n] = 8'($urandom); rl[n] = 8'($urandom); end
      for (int s = 0; s < 16; s++) begin
        acc_sel = 4'(s); #1;
        exp = (s % 2) ? rl[s / 2] : rh[s / 2];
        checks++;
        if (mux_out !== exp) begin failures++; $display("FAIL sel %0d got %h exp %h", s, mux_out, exp); end
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
