// tb_uat: writes random bytes to the transmitter and decodes its serial
// line with an independent receiver that samples in the middle of each bit.
// Checks every frame (start bit 0, eight data bits LSB first, stop bit 1),
// the bit time (one bit-clock period, counted in core clocks), that writes
// to other addresses send nothing, and the idle level after reset.
module tb_uat;
  localparam int BIT_HALF = 20;            // bit clock half period, core clocks
  localparam int BIT = 2 * BIT_HALF;
  logic clk = 0, reset, Load_UAT, clk_UAT = 0, To_UAT;
  logic [15:0] MA_In, Data_In;
  int checks = 0, failures = 0;
  logic [7:0] sent_q [$];
  int received = 0, false_starts = 0;
  uat dut (.*);
  always #5 clk = ~clk;
  always begin repeat (BIT_HALF) @(posedge clk); clk_UAT = ~clk_UAT; end

  task automatic fail(string s); failures++; if (failures < 20) $display("FAIL %s", s); endtask

  // receiver: start edge, then sample at 1.5, 2.5, ... bit times
  initial begin
    logic [7:0] b;
    @(negedge reset);
    forever begin
      @(negedge To_UAT);
      repeat (BIT / 2) @(posedge clk);
      checks++;
      if (To_UAT !== 1'b0) fail("start bit not low at mid-bit");
      for (int i = 0; i < 8; i++) begin
        repeat (BIT) @(posedge clk);
        b[i] = To_UAT;
      end
      repeat (BIT) @(posedge clk);
      checks++;
      if (To_UAT !== 1'b1) fail("stop bit not high");
      checks++;
      if (sent_q.size() == 0) begin false_starts++; fail("frame with nothing sent"); end
      else begin
        logic [7:0] e;
        e = sent_q.pop_front();
        if (b !== e) fail($sformatf("byte got %h exp %h", b, e));
      end
      received++;
    end
  end

  task automatic write(input logic [15:0] a, input logic [15:0] d);
    @(negedge clk); Load_UAT = 1; MA_In = a; Data_In = d;
    @(negedge clk); Load_UAT = 0; MA_In = 16'h0000; Data_In = 16'($urandom);
  endtask

  initial begin
    Load_UAT = 0; MA_In = 0; Data_In = 0; reset = 1;
    repeat (5) @(posedge clk); #1;
    checks++; if (To_UAT !== 1'b1) fail("line not idle high in reset");
    reset = 0;
    for (int n = 0; n < 30; n++) begin
      logic [15:0] d;
      d = 16'($urandom);
      // a write elsewhere must be ignored
      if (n % 3 == 0) write(16'hFF00 + 16'($urandom_range(0, 200)) * 2 + 16'h0002, 16'($urandom));
      sent_q.push_back(d[7:0]);
      write(16'hFFF0 | 16'($urandom_range(0, 1)), d);   // bit 0 is a byte select, ignored
      repeat (11 * BIT + $urandom_range(0, BIT)) @(posedge clk);
    end
    repeat (2 * BIT) @(posedge clk);
    checks++; if (received != 30) fail($sformatf("received %0d frames", received));
    checks++; if (To_UAT !== 1'b1) fail("line not idle at end");
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
