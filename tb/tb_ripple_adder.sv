// tb_ripple_adder: exhaustive check of the 8-bit ripple-carry adder (all
// operand pairs, both carry-in values) against integer addition.
module tb_ripple_adder;
  logic [7:0] a, b, s;
  logic       cin, cout;
  int checks = 0, failures = 0;

  ripple_adder dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++)
        for (int c = 0; c < 2; c++) begin
          a = 8'(i); b = 8'(j); cin = 1'(c);
          #1;
          checks++;
          if ({cout, s} != 9'(i + j + c)) begin
            failures++;
            if (failures < 10) $display("FAIL %0d+%0d+%0d = %0d", i, j, c, {cout, s});
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
