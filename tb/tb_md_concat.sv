// tb_md_concat: code 10 must store {ALU byte, MD low byte}, code 11
// {MD high byte, ALU byte}; other codes hold.
module tb_md_concat;
  logic clk = 1'b0, reset = 1'b1;
  logic [7:0] alu_B = '0;
  logic [15:0] md_in = '0, reg_out, model;
  logic [1:0] load = '0;
  int checks = 0, failures = 0;
  md_concat dut (.*);
  always #5 clk = ~clk;
  initial begin
    @(posedge clk); #1 reset = 1'b0; model = 0;
    for (int i = 0; i < 400; i++) begin
      load = 2'($urandom); alu_B = 8'($urandom); md_in = 16'($urandom);
      @(posedge clk); #1;
      if (load == 2'b10) model = {alu_B, md_in[7:0]};
      else if (load == 2'b11) model = {md_in[15:8], alu_B};
      checks++;
      if (reg_out !== model) begin failures++; $display("FAIL load=%b got %h exp %h", load, reg_out, model); end
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
