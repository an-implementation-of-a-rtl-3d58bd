// tb_timer: after loading N the timer must raise `done` for one cycle every
// N+1 cycles, first N cycles after the load, and keep that period (the
// reload) over many periods; a second load restarts it with the new value.
module tb_timer;
  logic clk = 1'b0, reset = 1'b1, load = 1'b0, done;
  logic [7:0] time_in = '0;
  int checks = 0, failures = 0;
  timer dut (.*);
  always #5 clk = ~clk;
  task automatic run(input int n);
    int last, cyc;
    @(posedge clk); #1;
    time_in = 8'(n); load = 1'b1;
    @(posedge clk); #1;
    load = 1'b0;
    last = 0; cyc = 0;
    // count cycles from the load edge; done expected at cycles n, 2n+1, ...
    for (int k = 0; k < 5 * (n + 1) + 1; k++) begin
      automatic bit exp = (n == 0) ? 1'b1 : ((cyc >= n) && ((cyc - n) % (n + 1) == 0));
      checks++;
      if (done !== exp) begin
        failures++;
        $display("FAIL n=%0d cycle %0d done=%b exp %b", n, cyc, done, exp);
      end
      @(posedge clk); #1;
      cyc++;
    end
  endtask
  initial begin
    @(posedge clk); #1 reset = 1'b0;
    checks++; if (done !== 1'b1) failures++;   // never loaded: reads as zero
    run(5); run(1); run(0); run(255); run(17);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
