// tb_acc: all 256 input bytes x both carry values x eight operations,
// against a reference written with integer arithmetic: the result, C (bit
// shifted out), N, Z, V (overflow of the arithmetic left shift only), and
// the unchanged upper CCR bits.
module tb_acc;
  logic [3:0] acc_op;
  logic [7:0] acc_in, ccr_in, acc_out, ccr_out;
  int checks = 0, failures = 0;
  acc dut (.*);
  initial begin
    for (int op = 0; op < 8; op++)
      for (int v = 0; v < 256; v++)
        for (int c = 0; c < 2; c++) begin
          int r, co, vo;
          logic [7:0] e;
          acc_op = 4'(op); acc_in = 8'(v); ccr_in = 8'($urandom) & 8'hFE | 8'(c); #1;
          vo = 0;
          case (op)
            0: begin r = ((v * 2) % 256) + (v / 128);     co = v / 128; end
            1: begin r = (v / 2) + (v % 2) * 128;         co = v % 2;   end
            2: begin r = ((v * 2) % 256) + c;             co = v / 128; end
            3: begin r = (v / 2) + c * 128;               co = v % 2;   end
            4: begin r = (v * 2) % 256; co = v / 128; vo = ((v / 128) != ((v / 64) % 2)) ? 1 : 0; end
            5: begin r = (v / 2) + (v / 128) * 128;       co = v % 2;   end
            6: begin r = (v * 2) % 256;                   co = v / 128; end
            default: begin r = v / 2;                     co = v % 2;   end
          endcase
          e = ccr_in;
          e[3] = (r >= 128); e[2] = (r == 0); e[1] = 1'(vo); e[0] = 1'(co);
          checks++;
          if (acc_out !== 8'(r) || ccr_out !== e) begin
            failures++;
            if (failures < 10) $display("FAIL op %0d in %h c %0d got %h/%h exp %h/%h", op, v, c, acc_out, ccr_out, 8'(r), e);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
