// tb_bridge: random values through all four bridge modes; the word output
// must be the word, the zero-extended byte, the duplicated byte and the
// sign-extended byte, and the flags N, Z of the moved value with V clear
// and the other CCR bits unchanged.
module tb_bridge;
  logic [7:0] ccr_in, nport_B, ccr_out, eccr;
  logic [15:0] nport_W, bdgW_out, exp;
  logic [1:0] bdg_sel;
  int checks = 0, failures = 0;
  bridge dut (.*);
  initial begin
    for (int t = 0; t < 200; t++) begin
      ccr_in = 8'($urandom); nport_W = 16'($urandom);
      if (t % 10 == 0) nport_W = 16'h0000;
      if (t % 10 == 1) nport_W = 16'h1200;
      nport_B = nport_W[7:0];
      for (int s = 0; s < 4; s++) begin
        bdg_sel = 2'(s); #1;
        case (s)
          0: exp = nport_W;
          1: exp = {8'h00, nport_B};
          2: exp = {nport_B, nport_B};
          default: exp = {{8{nport_B[7]}}, nport_B};
        endcase
        eccr = ccr_in;
        eccr[3] = (s == 0) ? nport_W[15] : nport_B[7];
        eccr[2] = (s == 0) ? (nport_W == 0) : (nport_B == 0);
        eccr[1] = 1'b0;
        checks++;
        if (bdgW_out !== exp || ccr_out !== eccr) begin
          failures++; $display("FAIL sel %0d in %h got %h/%h exp %h/%h", s, nport_W, bdgW_out, ccr_out, exp, eccr);
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
