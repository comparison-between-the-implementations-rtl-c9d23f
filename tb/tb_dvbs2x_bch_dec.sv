// tb_dvbs2x_bch_dec: end-to-end test of the decoder at its default sizes.
//
// Encodes random messages with the systematic BCH encoder of the reference
// package, for DVB-S2 and DVB-S2X code rates with t = 8, 10 and 12 (frames
// of 14400 to 58320 bits), flips 0..t random bits anywhere in the frame (message or parity),
// and streams the frames back to back with random input gaps. Checks:
//   - every message byte out equals the original message;
//   - st_nerr equals the number of flipped bits and st_fail is low;
//   - frames with more than t errors: counted; at least one must be flagged;
//   - first output byte sampled 2t+7 clock edges after the edge that
//     accepts the last input byte,
//     and the Kbch/8 message bytes leave on consecutive clocks;
//   - mechanisms seen at least once: input stall, code-rate switch,
//     error-free frame, correction, full-t correction, failure flag.
module tb_dvbs2x_bch_dec;
  import bch_pkg::*;
  import bch_tb_pkg::*;

  localparam int NF = 13;
  int rates [NF] = '{10, 10, 5, 0, 10, 5, 0, 9, 3, 0, 10, 11, 24};
  int nerrs [NF] = '{ 0,  3, 10, 12, 8,  1, 13, 8, 7, 20, 9, 12, 11};

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, in_sof = 0;
  logic [7:0] in_data = '0;
  rate_t in_rate = '0;
  logic out_valid, out_sof, out_eof, st_valid, st_fail;
  logic [7:0] out_data;
  logic [4:0] st_nerr;

  int checks = 0, failures = 0;
  int n_stall = 0, n_switch = 0, n_clean = 0, n_corr = 0, n_full_t = 0, n_flagged = 0, n_over = 0;

  dvbs2x_bch_dec dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  byte unsigned msgb [NF][];
  byte unsigned rxb  [NF][];

  // input side
  int last_acc_cycle [NF];
  int cycle_no = 0;
  int in_frame = -1;

  task automatic send(int f);
    for (int i = 0; i < rxb[f].size(); i++) begin
      @(negedge clk);
      while ($urandom_range(15) == 0) begin in_valid = 0; @(negedge clk); end
      in_valid = 1; in_sof = (i == 0); in_data = rxb[f][i]; in_rate = rate_t'(rates[f]);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    @(negedge clk); in_valid = 0; in_sof = 0;
  endtask

  // output side
  int of = 0, ob = 0, first_out_cycle, prev_out_cycle;
  bit frame_ok;
  // one block samples everything at the clock edge and then counts the clock
  always @(posedge clk) if (rst_n) begin
    if (in_valid && !in_ready) n_stall++;
    if (in_valid && in_ready) begin
      if (in_sof) in_frame++;
      last_acc_cycle[in_frame] = cycle_no;
    end
    if (out_valid) begin
      int t;
      t = tcap(rates[of]);
      if (ob == 0) begin
        chk(out_sof, "out_sof on first byte");
        first_out_cycle = cycle_no;
        chk(cycle_no - last_acc_cycle[of] == 2 * t + 7,
            $sformatf("frame %0d first-byte latency %0d", of, cycle_no - last_acc_cycle[of]));
        frame_ok = 1;
      end else begin
        chk(cycle_no == prev_out_cycle + 1, "consecutive output bytes");
      end
      prev_out_cycle = cycle_no;
      if (nerrs[of] <= t) chk(out_data == msgb[of][ob], $sformatf("frame %0d byte %0d: %h expected %h", of, ob, out_data, msgb[of][ob]));
      chk(out_eof == (ob == kbch(rates[of]) / 8 - 1), "out_eof position");
      ob++;
    end
    if (st_valid) begin
      int t;
      t = tcap(rates[of]);
      chk(ob == kbch(rates[of]) / 8, $sformatf("frame %0d message bytes %0d", of, ob));
      if (nerrs[of] <= t) begin
        chk(!st_fail, $sformatf("frame %0d flagged as failed", of));
        chk(int'(st_nerr) == nerrs[of], $sformatf("frame %0d nerr %0d expected %0d", of, st_nerr, nerrs[of]));
        if (nerrs[of] == 0) n_clean++;
        else n_corr++;
        if (nerrs[of] == t) n_full_t++;
      end else begin
        n_over++;
        if (st_fail) n_flagged++;
      end
      of++; ob = 0;
    end
    cycle_no++;
  end

  initial begin
    init();
    for (int f = 0; f < NF; f++) begin
      bit msg [];
      int n, k, t;
      int pos [$];
      n = nbch(rates[f]); k = kbch(rates[f]); t = tcap(rates[f]);
      msg = new[k];
      foreach (msg[i]) msg[i] = 1'($urandom);
      encode(msg, t, rxb[f]);
      msgb[f] = new[k / 8];
      foreach (msgb[f][b]) msgb[f][b] = rxb[f][b];
      pos = {};
      while (pos.size() < nerrs[f]) begin
        int p;
        p = $urandom_range(n - 1);
        if (!(p inside {pos})) pos.push_back(p);
      end
      foreach (pos[e]) rxb[f][pos[e] / 8][7 - pos[e] % 8] ^= 1'b1;
      if (f > 0 && tcap(rates[f]) != tcap(rates[f-1])) n_switch++;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < NF; f++) send(f);
    wait (of == NF);
    repeat (5) @(posedge clk);
    $display("stalls=%0d rate_switches=%0d clean=%0d corrected=%0d full_t=%0d over_t=%0d flagged=%0d",
             n_stall, n_switch, n_clean, n_corr, n_full_t, n_over, n_flagged);
    chk(n_stall > 0, "input stall seen");
    chk(n_switch > 0, "t switch seen");
    chk(n_clean > 0, "error-free frame seen");
    chk(n_corr > 0, "corrected frame seen");
    chk(n_full_t > 0, "t-error frame seen");
    chk(n_flagged > 0, "decoding failure flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
