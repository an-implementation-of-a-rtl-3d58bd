// tb_led: random bus values, trigger pulses and display-select buttons.
// A reference model keeps the selected source (address after reset) and
// the last captured word and state; the outputs must match it every cycle.
module tb_led;
  logic clk = 0, reset, Trigger, Tri_mem_in, Tri_mem_out, Tri_add;
  logic [7:0] States_IN, LED_state_out;
  logic [15:0] mem_in, mem_out, mem_add, LED_data_out;
  int checks = 0, failures = 0;
  led dut (.*);
  always #5 clk = ~clk;
  initial begin
    int sel;                 // 0 address, 1 mem_in, 2 mem_out
    logic [15:0] ed;
    logic [7:0] es;
    reset = 1; Trigger = 0; Tri_mem_in = 0; Tri_mem_out = 0; Tri_add = 0;
    States_IN = 0; mem_in = 0; mem_out = 0; mem_add = 0;
    @(negedge clk); reset = 0; sel = 0; ed = 0; es = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      Trigger = ($urandom_range(0, 2) == 0);
      Tri_mem_in = ($urandom_range(0, 15) == 0);
      Tri_mem_out = ($urandom_range(0, 15) == 0);
      Tri_add = ($urandom_range(0, 15) == 0);
      States_IN = 8'($urandom); mem_in = 16'($urandom); mem_out = 16'($urandom); mem_add = 16'($urandom);
      if (Trigger) begin
        es = States_IN;
        ed = (sel == 1) ? mem_in : (sel == 2) ? mem_out : mem_add;
      end
      if (Tri_mem_in) sel = 1; else if (Tri_mem_out) sel = 2; else if (Tri_add) sel = 0;
      @(posedge clk); #1;
      checks++;
      if (LED_data_out !== ed || LED_state_out !== es) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d got %h/%h exp %h/%h", t, LED_data_out, LED_state_out, ed, es);
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
