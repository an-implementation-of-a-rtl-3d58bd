// tb_ir: the instruction register loads on loadir and presents the word,
// its low byte as immediate, and the low byte zero-extended as address.
module tb_ir;
  logic clk = 1'b0, reset = 1'b1, loadir = 1'b0;
  logic [15:0] reg_in = '0, abs_out, reg_out, model;
  logic [7:0] IMM_out;
  int checks = 0, failures = 0;
  ir dut (.*);
  always #5 clk = ~clk;
  initial begin
    @(posedge clk); #1 reset = 1'b0; model = 0;
    for (int i = 0; i < 300; i++) begin
      loadir = 1'($urandom); reg_in = 16'($urandom);
      @(posedge clk); #1;
      if (loadir) model = reg_in;
      checks++;
      if (reg_out !== model || IMM_out !== model[7:0] || abs_out !== {8'h00, model[7:0]}) begin
        failures++; $display("FAIL ir %h imm %h abs %h exp %h", reg_out, IMM_out, abs_out, model);
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
