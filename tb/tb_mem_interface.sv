// tb_mem_interface: the three operating cases of the memory interface
// table: read (rd_bar low) returns memory data; idle (both high) returns
// the MD/concatenator word; write (wr_bar low) drives it to memory, and
// to_mem is 0 when not writing.
module tb_mem_interface;
  logic wr_bar, rd_bar;
  logic [15:0] data_in, from_mem, to_mem, data_out;
  int checks = 0, failures = 0;
  mem_interface dut (.*);
  initial begin
    for (int t = 0; t < 100; t++) begin
      data_in = 16'($urandom); from_mem = 16'($urandom);
      {wr_bar, rd_bar} = 2'b10; #1;
      checks++; if (data_out !== from_mem || to_mem !== 16'h0) begin failures++; $display("FAIL read"); end
      {wr_bar, rd_bar} = 2'b11; #1;
      checks++; if (data_out !== data_in || to_mem !== 16'h0) begin failures++; $display("FAIL idle"); end
      {wr_bar, rd_bar} = 2'b01; #1;
      checks++; if (to_mem !== data_in || data_out !== data_in) begin failures++; $display("FAIL write"); end
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
