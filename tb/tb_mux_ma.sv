// tb_mux_ma: codes 00 PC, 01 absolute address, 10 bridge, 11 ALU.
module tb_mux_ma;
  logic [15:0] aa, pc, data, bdg, ma_out, exp;
  logic [1:0] ma_sel;
  int checks = 0, failures = 0;
  mux_ma dut (.*);
  initial begin
    for (int t = 0; t < 50; t++) begin
      aa = 16'($urandom); pc = 16'($urandom); data = 16'($urandom); bdg = 16'($urandom);
      for (int s = 0; s < 4; s++) begin
        ma_sel = 2'(s); #1;
        exp = (s == 0) ? pc : (s == 1) ? aa : (s == 2) ? bdg : data;
        checks++;
        if (ma_out !== exp) begin failures++; $display("FAIL sel %0d", s); end
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
