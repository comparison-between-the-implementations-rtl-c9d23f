// tb_bch_fifo_ctrl: drives the frame sequencer with frames of three code
// rates (random input gaps, stray bytes before in_sof) and models the ROM
// (one-clock read) and Berlekamp-Massey (done a random number of clocks
// after start). Checks: Nbch/8 FIFO writes and syndrome enables per frame,
// one synd_first, bm_start exactly once right after the last write,
// chien_load after bm_done, Nbch/8 reads each with a Chien step, Kbch/8
// message tags, the first/last tags at the right reads, in_ready low from
// the end of receive to the last read, and no write and read together.
module tb_bch_fifo_ctrl;
  import bch_pkg::*;
  import bch_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_sof = 0, in_ready;
  logic rom_cs;
  rate_info_t info = '0;
  logic fifo_full = 0, fifo_wr, fifo_rd, synd_en, synd_first, bm_start, bm_done = 0;
  logic chien_load, chien_step, rd_msg, rd_first, rd_last_msg, rd_last;
  int checks = 0, failures = 0;
  int cur_rate = 0;

  bch_fifo_ctrl dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ROM model
  always @(posedge clk)
    if (rom_cs) info <= '{nbch: 16'(nbch(cur_rate)), kbch: 16'(kbch(cur_rate)), t: 4'(tcap(cur_rate))};

  // BM model
  int bm_delay = 0;
  int bm_starts = 0;
  always @(posedge clk) begin
    bm_done <= 0;
    if (bm_start) begin bm_delay <= 3 + int'($urandom_range(30)); bm_starts++; end
    else if (bm_delay > 0) begin
      bm_delay <= bm_delay - 1;
      if (bm_delay == 1) bm_done <= 1;
    end
  end

  // event monitor
  int wrs, synds, firsts, rds, steps, msgs, loads, f_first, f_lastmsg, f_last, rd_idx;
  int last_wr_cycle, bm_cycle, done_cycle, load_cycle, cycle_no;
  int stalled;
  bit in_read;
  always @(posedge clk) if (rst_n) begin
    cycle_no++;
    if (fifo_wr && fifo_rd) chk(0, "write and read together");
    if (fifo_wr) begin wrs++; last_wr_cycle = cycle_no; end
    if (synd_en) synds++;
    if (synd_first) if (synd_en) firsts++;
    if (bm_start) bm_cycle = cycle_no;
    if (bm_done) done_cycle = cycle_no;
    if (chien_load) begin loads++; load_cycle = cycle_no; end
    if (chien_step != fifo_rd) chk(0, "step differs from read");
    if (fifo_rd) begin
      if (rd_first)    begin f_first++;   chk(rd_idx == 0, "rd_first index"); end
      if (rd_last_msg) begin f_lastmsg++; chk(rd_idx == kbch(cur_rate) / 8 - 1, "rd_last_msg index"); end
      if (rd_last)     begin f_last++;    chk(rd_idx == nbch(cur_rate) / 8 - 1, "rd_last index"); end
      chk(rd_msg == (rd_idx < kbch(cur_rate) / 8), "rd_msg tag");
      if (rd_msg) msgs++;
      rds++; steps++; rd_idx++;
      chk(!in_ready, "in_ready low while reading");
    end
    if (in_valid && !in_ready) stalled++;
  end

  initial begin
    int rates [3] = '{5, 0, 10};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      int nb;
      cur_rate = rates[f];
      nb = nbch(cur_rate) / 8;
      wrs = 0; synds = 0; firsts = 0; rds = 0; steps = 0; msgs = 0; loads = 0;
      f_first = 0; f_lastmsg = 0; f_last = 0; rd_idx = 0; bm_starts = 0; stalled = 0;
      // stray bytes without sof are dropped
      repeat (3) begin @(negedge clk); in_valid = 1; in_sof = 0; end
      for (int i = 0; i < nb; i++) begin
        @(negedge clk);
        while ($urandom_range(4) == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1; in_sof = (i == 0);
        chk(in_ready, "ready during receive");
      end
      // keep offering input: it must stall until the frame has been read
      @(negedge clk); in_sof = 1;
      wait (rds == nb);
      @(negedge clk); in_valid = 0; in_sof = 0;
      repeat (3) @(negedge clk);
      chk(wrs == nb, $sformatf("writes %0d of %0d", wrs, nb));
      chk(synds == nb, "syndrome enables");
      chk(firsts == 1, "one synd_first");
      chk(bm_starts == 1, "one bm_start");
      chk(bm_cycle == last_wr_cycle + 1, "bm_start right after last write");
      chk(loads == 1 && load_cycle == done_cycle + 1, "chien_load after bm_done");
      chk(rds == nb && steps == nb, "reads");
      chk(msgs == kbch(cur_rate) / 8, "message tags");
      chk(f_first == 1 && f_lastmsg == 1 && f_last == 1, "tags once");
      chk(stalled > 0, "input stalled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
