// tb_bch_ribm_fsm: feeds syndromes of random error patterns (0..t errors at
// random positions of a 58320-bit frame) for t = 8, 10 and 12 and checks that
// the error locator has exactly the injected positions p as roots
// (Lambda(alpha^-p) = 0), degree = number of errors, Lambda_0 != 0, and that
// done is high in the (2t+2)th clock, counting the start clock as the first.
module tb_bch_ribm_fsm;
  import bch_pkg::*;
  import bch_tb_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  tcap_t t = '0;
  gf_t synd [24];
  gf_t lambda [13];
  logic [4:0] deg;
  logic done, busy;
  int checks = 0, failures = 0;

  bch_ribm_fsm #(.T(12)) dut (.clk, .rst_n, .start, .t, .synd, .lambda, .deg, .done, .busy);

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic gf_t eval_at(int p);   // Lambda(alpha^-p)
    gf_t v;
    v = 0;
    for (int i = 0; i <= 12; i++) v ^= mul(lambda[i], apow(-longint'(i) * p));
    return v;
  endfunction

  initial begin
    int tv [3] = '{8, 10, 12};
    init();
    foreach (synd[i]) synd[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int ti = 0; ti < 3; ti++) begin
      for (int trial = 0; trial < 40; trial++) begin
        int ne, cyc;
        int pos [$];
        ne = trial % (tv[ti] + 1);
        pos = {};
        while (pos.size() < ne) begin
          int p;
          p = $urandom_range(58319);
          if (!(p inside {pos})) pos.push_back(p);
        end
        for (int j = 1; j <= 24; j++) begin
          gf_t s;
          s = 0;
          // syndromes beyond 2t carry garbage: they must not be used
          if (j <= 2 * tv[ti]) foreach (pos[e]) s ^= apow(longint'(j) * pos[e]);
          else s = 16'($urandom);
          synd[j-1] = s;
        end
        @(negedge clk); start = 1; t = tcap_t'(tv[ti]);
        @(negedge clk); start = 0;
        for (int j = 0; j < 24; j++) synd[j] = 16'($urandom);   // inputs only sampled at start
        cyc = 1;
        while (!done && cyc < 100) begin @(negedge clk); cyc++; end
        chk(cyc == 2 * tv[ti] + 2, $sformatf("latency %0d for t=%0d", cyc, tv[ti]));
        chk(int'(deg) == ne, $sformatf("deg %0d for %0d errors t=%0d", deg, ne, tv[ti]));
        chk(lambda[0] != 0, "lambda0 nonzero");
        foreach (pos[e]) chk(eval_at(pos[e]) == 0, $sformatf("root at %0d", pos[e]));
        chk(!busy, "idle after done");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
