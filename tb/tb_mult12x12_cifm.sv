// tb_mult12x12_cifm: checks the 12x12 multiplier built from 4x4 cells
// against integer multiplication (corners and random operands), and that a
// low enable forces the output to zero.
module tb_mult12x12_cifm;
  logic        en;
  logic [11:0] a, b;
  logic [23:0] p;
  int checks = 0, failures = 0;

  mult12x12_cifm dut (.en(en), .a(a), .b(b), .p(p));

  task automatic check(logic e, logic [11:0] x, logic [11:0] y);
    logic [23:0] expv;
    en = e; a = x; b = y;
    #1;
    expv = e ? 24'(x) * 24'(y) : 24'd0;
    checks++;
    if (p !== expv) begin
      failures++;
      $display("FAIL en=%b %h*%h = %h expected %h", e, x, y, p, expv);
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
    check(1, 12'hFFF, 12'hFFF);
    check(1, 12'h000, 12'hFFF);
    check(1, 12'h800, 12'h800);
    check(1, 12'h001, 12'hABC);
    for (int i = 0; i < 12; i++)
      for (int j = 0; j < 12; j++) check(1, 12'(1) << i, 12'hFFF >> j);
    for (int k = 0; k < 3000; k++) check(1, 12'($urandom), 12'($urandom));
    for (int k = 0; k < 20; k++) check(0, 12'($urandom) | 12'h1, 12'($urandom) | 12'h1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
