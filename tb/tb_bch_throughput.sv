// tb_bch_throughput: throughput workload at the default sizes.
//
// Streams frames back to back with the source always valid (it only waits on
// in_ready), for the longest frame of each t (9/10: t = 8; 5/6: t = 10;
// 4/5: t = 12) and the shortest (1/4: t = 12), each with t random errors.
// Checks that the distance between the in_sof acceptances of consecutive
// frames is exactly Nbch/8 + 2t + 4 + Nbch/8 clocks, that every frame decodes
// correctly, and that at a 100 MHz clock the decoder keeps up with a
// 5 Msymbol/s link carrying 8 bits per symbol (40 Mbit/s of LDPC frames, of
// which Nbch/64800 reach the BCH decoder).
module tb_bch_throughput;
  import bch_pkg::*;
  import bch_tb_pkg::*;

  localparam int NF = 5;
  int rates [NF] = '{10, 8, 7, 0, 10};

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, in_sof = 0;
  logic [7:0] in_data = '0;
  rate_t in_rate = '0;
  logic out_valid, out_sof, out_eof, st_valid, st_fail;
  logic [7:0] out_data;
  logic [4:0] st_nerr;

  int checks = 0, failures = 0;

  dvbs2x_bch_dec dut (.*);

  always #5 clk = ~clk;   // 100 MHz

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

  byte unsigned msgb [NF][];
  byte unsigned rxb  [NF][];

  int cycle_no = 0, in_frame = -1, of = 0, ob = 0;
  int sof_cycle [NF];
  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready && in_sof) begin in_frame++; sof_cycle[in_frame] = cycle_no; end
    if (out_valid) begin
      chk(out_data == msgb[of][ob], $sformatf("frame %0d byte %0d", of, ob));
      ob++;
    end
    if (st_valid) begin
      chk(!st_fail && int'(st_nerr) == tcap(rates[of]), $sformatf("frame %0d status", of));
      of++; ob = 0;
    end
    cycle_no++;
  end

  initial begin
    init();
    for (int f = 0; f < NF; f++) begin
      bit msg [];
      int pos [$];
      msg = new[kbch(rates[f])];
      foreach (msg[i]) msg[i] = 1'($urandom);
      encode(msg, tcap(rates[f]), rxb[f]);
      msgb[f] = new[kbch(rates[f]) / 8];
      foreach (msgb[f][b]) msgb[f][b] = rxb[f][b];
      pos = {};
      while (pos.size() < tcap(rates[f])) begin
        int p;
        p = $urandom_range(nbch(rates[f]) - 1);
        if (!(p inside {pos})) pos.push_back(p);
      end
      foreach (pos[e]) rxb[f][pos[e] / 8][7 - pos[e] % 8] ^= 1'b1;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < NF; f++)
      for (int i = 0; i < rxb[f].size(); i++) begin
        @(negedge clk);
        in_valid = 1; in_sof = (i == 0); in_data = rxb[f][i]; in_rate = rate_t'(rates[f]);
        @(posedge clk);
        while (!in_ready) @(posedge clk);
      end
    @(negedge clk); in_valid = 0; in_sof = 0;
    wait (of == NF);
    for (int f = 0; f + 1 < NF; f++) begin
      int nb, t, period;
      real mbps_built, mbps_needed;
      nb = nbch(rates[f]) / 8;
      t  = tcap(rates[f]);
      period = sof_cycle[f+1] - sof_cycle[f];
      chk(period == 2 * nb + 2 * t + 4, $sformatf("frame %0d period %0d expected %0d", f, period, 2 * nb + 2 * t + 4));
      mbps_built  = real'(nbch(rates[f])) / (real'(period) * 10.0e-9) / 1.0e6;
      mbps_needed = 5.0 * 8.0 * real'(nbch(rates[f])) / 64800.0;
      $display("rate idx %0d: %0d clocks/frame, %0.1f Mbit/s at 100 MHz, %0.1f needed", rates[f], period, mbps_built, mbps_needed);
      chk(mbps_built > mbps_needed, "keeps up with 5 Msymbol/s");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
