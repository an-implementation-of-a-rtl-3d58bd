// tb_register_half: a high and a low half are driven with random load codes;
// code 01 must load the ALU byte, 10 the half's own byte of the ALU word
// (15:8 for the high half, 7:0 for the low half), 11 the accumulator, 00
// hold.  Reset clears both.
module tb_register_half;
  logic clk = 1'b0, reset = 1'b1;
  logic [1:0] load_sel = '0;
  logic [15:0] alu_W = '0;
  logic [7:0] alu_B = '0, acc_in = '0, out_h, out_l, mh, ml;
  int checks = 0, failures = 0;
  register_half #(.HIGH(1'b1)) dut_h (.clk, .reset, .load_sel, .alu_W, .alu_B, .acc_in, .reg_out(out_h));
  register_half #(.HIGH(1'b0)) dut_l (.clk, .reset, .load_sel, .alu_W, .alu_B, .acc_in, .reg_out(out_l));
  always #5 clk = ~clk;
  initial begin
    @(posedge clk); #1 reset = 1'b0; mh = 0; ml = 0;
    checks++; if (out_h !== 0 || out_l !== 0) failures++;
    for (int i = 0; i < 400; i++) begin
      load_sel = 2'($urandom); alu_W = 16'($urandom); alu_B = 8'($urandom); acc_in = 8'($urandom);
      @(posedge clk); #1;
      case (load_sel)
        2'b01: begin mh = alu_B; ml = alu_B; end
        2'b10: begin mh = alu_W[15:8]; ml = alu_W[7:0]; end
        2'b11: begin mh = acc_in; ml = acc_in; end
        default: ;
      endcase
      checks++;
      if (out_h !== mh || out_l !== ml) begin
        failures++;
        $display("FAIL sel=%b got %h/%h exp %h/%h", load_sel, out_h, out_l, mh, ml);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
