// tb_bch_fifo_fsm2: checks the single-action FIFO against a queue model at
// depth 16: random writes and reads (never both in one clock, as the decoder
// uses it), filling it to FULL, refused writes while FULL, empty reads, and
// the one-clock read latency. A write-priority clock with both requests is
// also checked.
module tb_bch_fifo_fsm2;
  localparam int D = 16;

  logic clk = 0, rst_n = 0, wr_en = 0, rd_en = 0;
  logic [7:0] wr_data = '0, rd_data;
  logic rd_valid, full, empty;
  logic [4:0] count;
  int checks = 0, failures = 0;
  int fulls = 0, refused = 0;
  byte unsigned q [$];

  bch_fifo_fsm2 #(.WIDTH(8), .DEPTH(D)) dut (.clk, .rst_n, .wr_en, .wr_data, .rd_en, .rd_data, .rd_valid, .full, .empty, .count);

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one clock: op 0 idle, 1 write, 2 read, 3 both
  task automatic cycle(int op);
    bit exp_rd;
    byte unsigned exp_data;
    byte unsigned d;
    d = 8'($urandom);
    @(negedge clk);
    chk(full == (q.size() == D), "full flag");
    chk(empty == (q.size() == 0), "empty flag");
    chk(int'(count) == q.size(), "count");
    wr_en = op[0]; rd_en = op[1]; wr_data = d;
    exp_rd = 0;
    if (op[0]) begin
      if (q.size() < D) q.push_back(d); else refused++;
    end else if (op[1] && q.size() > 0) begin
      exp_rd = 1; exp_data = q.pop_front();
    end
    if (q.size() == D) fulls++;
    @(negedge clk);
    wr_en = 0; rd_en = 0;
    chk(rd_valid == exp_rd, "rd_valid");
    if (exp_rd) chk(rd_data == exp_data, $sformatf("rd_data %h expected %h", rd_data, exp_data));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 20; i++) cycle(1);    // overfill
    for (int i = 0; i < 20; i++) cycle(2);    // over-empty
    for (int i = 0; i < 2000; i++) cycle($urandom_range(2) == 0 ? 2 : ($urandom_range(1) ? 1 : 0));
    for (int i = 0; i < 200; i++) cycle($urandom_range(1, 2));
    cycle(3); cycle(3);
    chk(fulls > 0 && refused > 0, "full state reached and writes refused");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
