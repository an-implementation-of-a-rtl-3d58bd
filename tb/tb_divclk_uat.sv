// tb_divclk_uat: counts input cycles between output edges.  A short divider
// (HALF_PERIOD 7) checks the exact edge spacing and the reset; the default
// divider is checked for one full period of 5208 input cycles, which at
// 50 MHz is the 9.6 kHz bit clock.
module tb_divclk_uat;
  logic clk = 0, reset;
  logic d_small, d_full;
  int checks = 0, failures = 0;
  divclk_uat #(.HALF_PERIOD(7)) u_small (.clk, .reset, .DClk_UAT(d_small));
  divclk_uat                    u_full  (.clk, .reset, .DClk_UAT(d_full));
  always #10 clk = ~clk;

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got %0d exp %0d", what, got, exp); end
  endtask

  initial begin
    int n, last, edges;
    logic p;
    reset = 1;
    repeat (3) @(posedge clk);
    #1 expect_eq("reset low", int'(d_small), 0);
    reset = 0;
    // after reset, first toggle after exactly 7 cycles, then every 7
    n = 0; last = 0; edges = 0; p = d_small;
    while (edges < 40) begin
      @(posedge clk); #1; n++;
      if (d_small != p) begin
        expect_eq("small spacing", n - last, 7);
        last = n; edges++; p = d_small;
      end
      if ($urandom_range(0, 300) == 0 && edges > 5 && edges < 30) begin
        reset = 1; @(posedge clk); #1; reset = 0;
        expect_eq("reset clears", int'(d_small), 0);
        n = 0; last = 0; p = d_small;
      end
    end
    // full-size divider: measure one period in input cycles
    reset = 1; @(posedge clk); #1 reset = 0;
    begin
      realtime t0;
      @(posedge d_full); t0 = $realtime;
      @(posedge d_full);
      expect_eq("full period", int'(($realtime - t0) / 20.0), 5208);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
