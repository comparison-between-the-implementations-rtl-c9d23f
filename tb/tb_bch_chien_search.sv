// tb_bch_chien_search: builds Lambda(x) = c * prod (1 + alpha^p x) for random
// error positions p (c a random non-zero scale), loads it with the start
// constants of the frame length, steps over the whole frame and checks every
// byte's error mask bit by bit (byte b, bit 7-k is position N-1-(8b+k)).
// Frame lengths 16200 and 58320; mask_valid must follow step by one clock.
module tb_bch_chien_search;
  import bch_pkg::*;
  import bch_tb_pkg::*;

  logic clk = 0, rst_n = 0, load = 0, step = 0;
  gf_t lambda [13];
  gf_t initc [12];
  logic [7:0] mask;
  logic mask_valid;
  int checks = 0, failures = 0;

  bch_chien_search #(.T(12)) dut (.clk, .rst_n, .load, .lambda, .init(initc), .step, .mask, .mask_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nlist [2] = '{16200, 58320};
    init();
    foreach (lambda[i]) lambda[i] = '0;
    foreach (initc[i]) initc[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 8; trial++) begin
      int n, ne, found;
      int pos [$];
      logic [15:0] c;
      n  = nlist[trial % 2];
      ne = (trial * 5) % 13;
      pos = {};
      while (pos.size() < ne) begin
        int p;
        p = $urandom_range(n - 1);
        if (!(p inside {pos})) pos.push_back(p);
      end
      c = 16'($urandom_range(65535, 1));
      foreach (lambda[i]) lambda[i] = '0;
      lambda[0] = c;
      foreach (pos[e])
        for (int d = 12; d >= 1; d--) lambda[d] = lambda[d] ^ mul(lambda[d-1], apow(pos[e]));
      for (int j = 1; j <= 12; j++) initc[j-1] = apow(-longint'(j) * (n - 1));
      @(negedge clk); load = 1;
      @(negedge clk); load = 0;
      found = 0;
      for (int b = 0; b < n / 8; b++) begin
        logic [7:0] exp_mask;
        step = 1;
        @(negedge clk);
        step = 0;
        exp_mask = '0;
        for (int k = 0; k < 8; k++) if ((n - 1 - (8*b + k)) inside {pos}) exp_mask[7-k] = 1'b1;
        checks++;
        if (!mask_valid || mask !== exp_mask) begin
          failures++;
          if (failures < 20) $display("FAIL trial %0d byte %0d mask %b expected %b", trial, b, mask, exp_mask);
        end
        found += $countones(mask);
        if ($urandom_range(7) == 0) begin
          @(negedge clk);
          checks++;
          if (mask_valid) begin failures++; $display("FAIL mask_valid without step"); end
        end
      end
      checks++;
      if (found != ne) begin failures++; $display("FAIL found %0d of %0d", found, ne); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
