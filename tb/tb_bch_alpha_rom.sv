// tb_bch_alpha_rom: reads every code rate from the alpha ROM and checks
// Nbch, Kbch, t against the rate table and each Chien start constant c_j
// against alpha^(-j*(Nbch-1)), i.e. c_j * alpha^(j*(Nbch-1)) = 1. Also checks
// the one-clock read latency and that the outputs hold while cs is low.
module tb_bch_alpha_rom;
  import bch_pkg::*;
  import bch_tb_pkg::*;

  logic clk = 0, rst_n = 0, cs = 0;
  rate_t rate_idx = '0;
  rate_info_t info;
  gf_t chien_init [T_MAX];
  int checks = 0, failures = 0;

  bch_alpha_rom dut (.clk, .rst_n, .cs, .rate_idx, .info, .chien_init);

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    // out-of-range index selects 9/10
    @(negedge clk); cs = 1; rate_idx = rate_t'(50);
    @(negedge clk); cs = 0;
    chk(int'(info.nbch) == 58320 && int'(info.t) == 8, "out-of-range index");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    init();
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < NR; r++) begin
      @(negedge clk); cs = 1; rate_idx = rate_t'(r);
      @(negedge clk); cs = 0; rate_idx = rate_t'((r + 5) % NR);
      chk(int'(info.nbch) == nbch(r), $sformatf("nbch rate %0d = %0d", r, info.nbch));
      chk(int'(info.kbch) == kbch(r), $sformatf("kbch rate %0d = %0d", r, info.kbch));
      chk(int'(info.t) == tcap(r),    $sformatf("t rate %0d = %0d", r, info.t));
      chk(int'(info.nbch) - int'(info.kbch) == 16 * int'(info.t), "parity length 16t");
      for (int j = 1; j <= 12; j++)
        chk(mul(chien_init[j-1], apow(longint'(j) * (nbch(r) - 1))) == 16'h0001,
            $sformatf("init rate %0d j %0d = %h", r, j, chien_init[j-1]));
      @(negedge clk);
      chk(int'(info.nbch) == nbch(r), "hold while cs low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
