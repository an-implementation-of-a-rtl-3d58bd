// tb_register16: random load codes and data; the register must hold on
// 00/11, take the bridge word on 01 and the ALU word on 10, and clear on
// reset.  Compared with a reference variable each cycle.
module tb_register16;
  logic clk = 1'b0, reset = 1'b1;
  logic [1:0] load = '0;
  logic [15:0] bdg_in = '0, reg_in = '0, reg_out, model;
  int checks = 0, failures = 0;
  register16 dut (.*);
  always #5 clk = ~clk;
  initial begin
    @(posedge clk); #1 reset = 1'b0; model = '0;
    if (reg_out !== 16'h0) failures++;
    checks++;
    for (int i = 0; i < 400; i++) begin
      load = 2'($urandom); bdg_in = 16'($urandom); reg_in = 16'($urandom);
      @(posedge clk); #1;
      if (load == 2'b01) model = bdg_in;
      else if (load == 2'b10) model = reg_in;
      checks++;
      if (reg_out !== model) begin
        failures++;
        $display("FAIL load=%b got %h exp %h", load, reg_out, model);
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
