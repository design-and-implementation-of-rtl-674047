// tb_cifm_checker: checks the per-half zero flags of the CIFM checker for
// walking ones, zero halves and random operands.
module tb_cifm_checker;
  logic [23:0] x;
  logic        hi_nz, lo_nz;
  int checks = 0, failures = 0;

  cifm_checker dut (.x(x), .hi_nz(hi_nz), .lo_nz(lo_nz));

  task automatic check(logic [23:0] v);
    bit exp_hi, exp_lo;
    x = v;
    #1;
    exp_hi = (v >> 12) != 0;
    exp_lo = (v % 4096) != 0;
    checks++;
    if (hi_nz !== exp_hi || lo_nz !== exp_lo) begin
      failures++;
      $display("FAIL x=%h hi_nz=%b lo_nz=%b", v, hi_nz, lo_nz);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(24'h0);
    check(24'hFFFFFF);
    for (int k = 0; k < 24; k++) check(24'(1) << k);
    for (int k = 0; k < 200; k++) begin
      logic [23:0] v;
      v = 24'($urandom);
      case (k % 4)
        0: v[23:12] = '0;
        1: v[11:0]  = '0;
        default: ;
      endcase
      check(v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
