// tb_cifm_mult24: checks the 24x24 CIFM multiplier against integer
// multiplication: all-ones, single bits, operands with a zero upper or lower
// half (which disable partial multipliers), and random mantissa-like and
// fully random operands.
module tb_cifm_mult24;
  logic [23:0] a, b;
  logic [47:0] p;
  int checks = 0, failures = 0;

  cifm_mult24 dut (.a(a), .b(b), .p(p));

  task automatic check(logic [23:0] x, logic [23:0] y);
    logic [47:0] expv;
    a = x; b = y;
    #1;
    expv = 48'(x) * 48'(y);
    checks++;
    if (p !== expv) begin
      failures++;
      $display("FAIL %h*%h = %h expected %h", x, y, p, expv);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(24'hFFFFFF, 24'hFFFFFF);
    check(24'h800000, 24'h800000);
    check(24'h000000, 24'hFFFFFF);
    check(24'hFFF000, 24'h000FFF);
    check(24'h000FFF, 24'hFFF000);
    for (int i = 0; i < 24; i++) check(24'(1) << i, 24'hFFFFFF);
    for (int k = 0; k < 4000; k++) begin
      logic [23:0] x, y;
      x = 24'($urandom); y = 24'($urandom);
      case (k % 8)
        0: x[11:0] = '0;
        1: y[11:0] = '0;
        2: x[23:12] = '0;
        3: y[23:12] = '0;
        4: begin x[23] = 1'b1; y[23] = 1'b1; end
        default: ;
      endcase
      check(x, y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
