// tb_register7: the CCR register must come out of reset as H'80 (I set),
// load on `load` and hold otherwise.
module tb_register7;
  logic clk = 1'b0, reset = 1'b1, load = 1'b0;
  logic [7:0] reg_in = '0, reg_out, model;
  int checks = 0, failures = 0;
  register7 dut (.*);
  always #5 clk = ~clk;
  initial begin
    @(posedge clk); #1 reset = 1'b0; model = 8'h80;
    checks++; if (reg_out !== 8'h80) failures++;
    for (int i = 0; i < 300; i++) begin
      load = 1'($urandom); reg_in = 8'($urandom);
      @(posedge clk); #1;
      if (load) model = reg_in;
      checks++;
      if (reg_out !== model) begin failures++; $display("FAIL got %h exp %h", reg_out, model); end
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
