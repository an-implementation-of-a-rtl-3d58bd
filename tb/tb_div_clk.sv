// tb_div_clk: the core clock must toggle on every rising edge of the input
// clock, whatever its power-up value, and keep running while reset is high.
module tb_div_clk;
  logic clk = 0, reset, DClk;
  int checks = 0, failures = 0;
  div_clk dut (.*);
  always #10 clk = ~clk;      // 50 MHz
  initial begin
    logic prev;
    realtime t_last, t_now;
    reset = 1;
    @(posedge clk); #1 prev = DClk;
    for (int i = 0; i < 400; i++) begin
      if (i == 200) reset = 0;
      if (i % 37 == 0) reset = 1'($urandom);
      @(posedge clk); #1;
      checks++;
      if (DClk !== ~prev) begin failures++; $display("FAIL cycle %0d", i); end
      prev = DClk;
    end
    // period of the output is two input periods (40 ns): 25 MHz
    @(posedge DClk); t_last = $realtime;
    @(posedge DClk); t_now = $realtime;
    checks++;
    if (t_now - t_last != 40.0) begin failures++; $display("FAIL period %f", t_now - t_last); end
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
