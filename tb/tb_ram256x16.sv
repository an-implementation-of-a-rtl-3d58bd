// tb_ram256x16: random reads and writes against a shadow array.  Checks the
// one-cycle registered read, write-first behaviour (a write shows the new
// word on mem_out), that ram_ce low freezes both the array and mem_out, and
// that address bit 0 and bits above 8 are ignored.
module tb_ram256x16;
  logic clk = 0, wr_bar, ram_ce;
  logic [15:0] adrs, mem_in, mem_out;
  logic [15:0] shadow [256];
  logic [15:0] exp_out;
  int checks = 0, failures = 0;
  ram256x16 dut (.*);
  always #5 clk = ~clk;

  initial begin
    wr_bar = 1; ram_ce = 1; adrs = 0; mem_in = 0;
    // fill everything with known data first
    for (int i = 0; i < 256; i++) begin
      shadow[i] = 16'($urandom);
      @(negedge clk); wr_bar = 0; adrs = 16'(i * 2); mem_in = shadow[i];
    end
    @(negedge clk); wr_bar = 1;
    exp_out = mem_out;
    for (int t = 0; t < 4000; t++) begin
      int k, w, ce;
      k = $urandom_range(0, 255); w = ($urandom_range(0, 2) == 0); ce = ($urandom_range(0, 5) != 0);
      @(negedge clk);
      ram_ce = 1'(ce); wr_bar = !w;
      adrs = {7'($urandom), 8'(k), 1'($urandom)};
      mem_in = 16'($urandom);
      @(posedge clk); #1;
      if (ce) begin
        if (w) begin shadow[k] = mem_in; end
        exp_out = shadow[k];
      end
      checks++;
      if (mem_out !== exp_out) begin
        failures++;
        if (failures < 10) $display("FAIL k=%0d w=%0d ce=%0d got %h exp %h", k, w, ce, mem_out, exp_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
