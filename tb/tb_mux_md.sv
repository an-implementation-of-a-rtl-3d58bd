// tb_mux_md: md_sel 0 gives MD, 1 the concatenator.
module tb_mux_md;
  logic md_sel;
  logic [15:0] cnct, md, mux_out;
  int checks = 0, failures = 0;
  mux_md dut (.*);
  initial begin
    for (int t = 0; t < 100; t++) begin
      cnct = 16'($urandom); md = 16'($urandom); md_sel = 1'($urandom); #1;
      checks++;
      if (mux_out !== (md_sel ? cnct : md)) begin failures++; $display("FAIL"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
