// tb_bch_gf_mult: checks the GF(2^16) multiplier against log/antilog tables.
// Corner cases (zero, one, alpha^15 * alpha) and 20000 random operand pairs.
module tb_bch_gf_mult;
  import bch_tb_pkg::*;

  logic [15:0] a, b, p;
  int checks = 0, failures = 0;

  bch_gf_mult dut (.a(a), .b(b), .p(p));

  task automatic check(logic [15:0] x, logic [15:0] y);
    a = x; b = y;
    #1;
    checks++;
    if (p !== mul(x, y)) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h = %h, expected %h", x, y, p, mul(x, y));
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
    init();
    check(16'h0000, 16'h1234);
    check(16'h1234, 16'h0000);
    check(16'h0001, 16'hBEEF);
    check(16'h8000, 16'h0002);   // alpha^15 * alpha = alpha^16 = x^5+x^3+x^2+1
    if (mul(16'h8000, 16'h0002) != 16'h002D) begin failures++; $display("reference table wrong"); end
    check(16'hFFFF, 16'hFFFF);
    for (int i = 0; i < 20000; i++) check(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
