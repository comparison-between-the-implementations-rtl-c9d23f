// tb_bch_synd_gen: streams random frames (with idle gaps) through the
// syndrome accumulator for J = 3 and compares the result with r(alpha^3)
// evaluated term by term. A second frame checks that 'first' restarts.
module tb_bch_synd_gen;
  import bch_tb_pkg::*;

  logic clk = 0, rst_n = 0, en = 0, first = 0;
  logic [7:0] data = '0;
  logic [15:0] s;
  int checks = 0, failures = 0;

  bch_synd_gen #(.J(3)) dut (.clk, .rst_n, .en, .first, .data, .s);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte unsigned frame [];
    init();
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 6; f++) begin
      frame = new[50 + 37 * f];
      foreach (frame[i]) frame[i] = 8'($urandom);
      for (int i = 0; i < frame.size(); i++) begin
        @(negedge clk);
        if ($urandom_range(3) == 0) begin en = 0; @(negedge clk); end
        en = 1; first = (i == 0); data = frame[i];
      end
      @(negedge clk); en = 0; first = 0;
      checks++;
      if (s !== syndrome(frame, 3)) begin
        failures++; $display("FAIL frame %0d: %h expected %h", f, s, syndrome(frame, 3));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
