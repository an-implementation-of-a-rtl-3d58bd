// tb_mux_ccr: codes 00 ALU flags, 01 bridge flags, 10 accumulator flags,
// 11 ALU byte as data.
module tb_mux_ccr;
  logic [7:0] alu, data, bdg, acc, mux_out, exp;
  logic [1:0] ccr_sel;
  int checks = 0, failures = 0;
  mux_ccr dut (.*);
  initial begin
    for (int t = 0; t < 50; t++) begin
      alu = 8'($urandom); data = 8'($urandom); bdg = 8'($urandom); acc = 8'($urandom);
      for (int s = 0; s < 4; s++) begin
        ccr_sel = 2'(s); #1;
        exp = (s == 0) ? alu : (s == 1) ? bdg : (s == 2) ? acc : data;
        checks++;
        if (mux_out !== exp) begin failures++; $display("FAIL sel %0d", s); end
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
