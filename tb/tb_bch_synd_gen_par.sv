// tb_bch_synd_gen_par: streams a codeword of the t = 12 code, 16200 bits,
// through all 24 syndrome units: every syndrome must be zero. Then flips a
// few bits and compares each syndrome with r(alpha^j) evaluated term by term.
module tb_bch_synd_gen_par;
  import bch_tb_pkg::*;

  logic clk = 0, rst_n = 0, en = 0, first = 0;
  logic [7:0] data = '0;
  logic [15:0] synd [24];
  int checks = 0, failures = 0;

  bch_synd_gen_par #(.T(12)) dut (.clk, .rst_n, .en, .first, .data, .synd);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(byte unsigned cw []);
    for (int i = 0; i < cw.size(); i++) begin
      @(negedge clk); en = 1; first = (i == 0); data = cw[i];
    end
    @(negedge clk); en = 0; first = 0;
  endtask

  initial begin
    bit msg [];
    byte unsigned cw [];
    init();
    repeat (2) @(posedge clk);
    rst_n = 1;
    msg = new[16008];
    foreach (msg[i]) msg[i] = 1'($urandom);
    encode(msg, 12, cw);
    run(cw);
    for (int j = 0; j < 24; j++) begin
      checks++;
      if (synd[j] !== 16'h0) begin failures++; $display("FAIL codeword S%0d = %h", j + 1, synd[j]); end
    end
    cw[5] ^= 8'h10; cw[1000] ^= 8'h81; cw[2024] ^= 8'h01;
    run(cw);
    for (int j = 0; j < 24; j++) begin
      checks++;
      if (synd[j] !== syndrome(cw, j + 1)) begin failures++; $display("FAIL errors S%0d = %h", j + 1, synd[j]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
