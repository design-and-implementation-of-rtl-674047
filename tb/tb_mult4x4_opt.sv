// tb_mult4x4_opt: exhaustive check of the 4x4 optimised multiplier against
// integer multiplication over all 256 operand pairs.
module tb_mult4x4_opt;
  logic [3:0] a, b;
  logic [7:0] p;
  int checks = 0, failures = 0;

  mult4x4_opt dut (.a(a), .b(b), .p(p));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a = 4'(i); b = 4'(j);
        #1;
        checks++;
        if (p != 8'(i * j)) begin
          failures++;
          $display("FAIL %0d*%0d = %0d", i, j, p);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
