// tb_ma: the memory address register loads on `load`; the address sent to
// memory has bit 0 cleared and the stored bit 0 appears on `lower`.
module tb_ma;
  logic clk = 1'b0, reset = 1'b1, load = 1'b0, lower;
  logic [15:0] reg_in = '0, reg_out, model;
  int checks = 0, failures = 0;
  ma dut (.*);
  always #5 clk = ~clk;
  initial begin
    @(posedge clk); #1 reset = 1'b0; model = 0;
    for (int i = 0; i < 300; i++) begin
      load = 1'($urandom); reg_in = 16'($urandom);
      @(posedge clk); #1;
      if (load) model = reg_in;
      checks++;
      if (reg_out !== (model & 16'hFFFE) || lower !== model[0]) begin
        failures++; $display("FAIL ma %h lower %b exp %h", reg_out, lower, model);
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
