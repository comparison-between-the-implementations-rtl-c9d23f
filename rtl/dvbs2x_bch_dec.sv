// dvbs2x_bch_dec: DVB-S2X BCH decoder for normal FECFRAMEs, eight bits per clock.
//
// The outer BCH code of DVB-S2X corrects up to t = 8, 10 or 12 bit errors in a
// frame of Nbch bits (14400..58320) that the LDPC decoder hands on. A frame is
// decoded in three phases:
//   1. receive: bytes are stored in the frame FIFO while the 2*T_MAX syndromes
//      are accumulated byte-parallel;
//   2. locate: Berlekamp-Massey (RiBM) turns the syndromes into the error
//      locator Lambda(x);
//   3. correct: the FIFO is read back while the Chien search marks, per byte,
//      the bits in error; the message bytes leave XORed with that mask.
// The code rate, selected per frame by in_rate with in_sof, sets Nbch, Kbch, t
// and the Chien start constants (bch_alpha_rom).
//
// Interface:
//   in_valid/in_ready/in_data/in_sof/in_rate  input bytes, bit 7 first on the
//                     line; in_sof with in_rate on the first byte of a frame.
//   out_valid/out_data/out_sof/out_eof       the Kbch/8 corrected message bytes;
//                     no back-pressure.
//   st_valid/st_nerr/st_fail                 one pulse per frame, registered on
//                     the clock after the frame's last FIFO byte (parity
//                     included) comes out of the FIFO: number of
//                     bits corrected, and decoding failure (roots found in the
//                     frame differ from the degree of Lambda). A failed frame's
//                     bytes have already been sent with whatever mask was found.
// Timing: receive takes Nbch/8 accepted bytes; locate 2t+4 clocks; correct
// Nbch/8 clocks, with the first message byte out three clocks after the read
// phase starts. in_ready is low from the end of receive until the last read.
// The block split (ROM, syndrome units, RiBM FSM, Chien search, FIFO, FIFO
// controller, top logic) follows the described design; the handshakes, status
// outputs and pipelining are this design's choice.
module dvbs2x_bch_dec
  import bch_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [7:0]  in_data,
  input  logic        in_sof,
  input  rate_t       in_rate,
  output logic        out_valid,
  output logic [7:0]  out_data,
  output logic        out_sof,
  output logic        out_eof,
  output logic        st_valid,
  output logic [4:0]  st_nerr,
  output logic        st_fail
);

  rate_info_t info;
  gf_t        chien_init [T_MAX];
  gf_t        synd [NSYND];
  gf_t        lambda [T_MAX+1];
  logic [4:0] deg;
  logic       bm_done, bm_busy;
  logic [7:0] mask;
  logic       mask_valid;
  logic [7:0] rd_data;
  logic       rd_valid, fifo_full, fifo_empty;
  logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_count;

  logic rom_cs, fifo_wr, fifo_rd, synd_en, synd_first, bm_start, chien_load, chien_step;
  logic rd_msg, rd_first, rd_last_msg, rd_last;

  bch_fifo_ctrl u_ctrl (
    .clk, .rst_n,
    .in_valid, .in_sof, .in_ready,
    .rom_cs, .info,
    .fifo_full, .fifo_wr, .fifo_rd,
    .synd_en, .synd_first,
    .bm_start, .bm_done,
    .chien_load, .chien_step,
    .rd_msg, .rd_first, .rd_last_msg, .rd_last
  );

  bch_alpha_rom u_rom (
    .clk, .rst_n, .cs(rom_cs), .rate_idx(in_rate), .info, .chien_init
  );

  bch_synd_gen_par #(.T(T_MAX)) u_synd (
    .clk, .rst_n, .en(synd_en), .first(synd_first), .data(in_data), .synd
  );

  bch_ribm_fsm #(.T(T_MAX)) u_bm (
    .clk, .rst_n, .start(bm_start), .t(info.t), .synd, .lambda, .deg,
    .done(bm_done), .busy(bm_busy)
  );

  bch_chien_search #(.T(T_MAX)) u_chien (
    .clk, .rst_n, .load(chien_load), .lambda, .init(chien_init),
    .step(chien_step), .mask, .mask_valid
  );

  bch_fifo_fsm2 #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .wr_en(fifo_wr), .wr_data(in_data), .rd_en(fifo_rd),
    .rd_data, .rd_valid, .full(fifo_full), .empty(fifo_empty), .count(fifo_count)
  );

  // Tags follow the FIFO read latency of one clock.
  logic tag_msg, tag_first, tag_last_msg, tag_last;
  logic [4:0] roots, roots_next;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tag_msg      <= 1'b0;
      tag_first    <= 1'b0;
      tag_last_msg <= 1'b0;
      tag_last     <= 1'b0;
    end else begin
      tag_msg      <= rd_msg;
      tag_first    <= rd_first;
      tag_last_msg <= rd_last_msg;
      tag_last     <= rd_last;
    end
  end

  assign roots_next = (tag_first ? 5'd0 : roots) + 5'($countones(mask));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
      out_sof   <= 1'b0;
      out_eof   <= 1'b0;
      st_valid  <= 1'b0;
      st_nerr   <= '0;
      st_fail   <= 1'b0;
      roots     <= '0;
    end else begin
      out_valid <= rd_valid && mask_valid && tag_msg;
      out_data  <= rd_data ^ mask;
      out_sof   <= rd_valid && tag_first;
      out_eof   <= rd_valid && tag_last_msg;
      st_valid  <= rd_valid && tag_last;
      if (rd_valid && mask_valid) roots <= roots_next;
      if (rd_valid && tag_last) begin
        st_nerr <= roots_next;
        st_fail <= (roots_next != deg);
      end
    end
  end

  // Rules of the sequencing: FIFO read and Chien mask stay aligned; BM is
  // only started while idle; a frame starts in an empty FIFO and never
  // overfills it.
  a_aligned:   assert property (@(posedge clk) disable iff (!rst_n) rd_valid == mask_valid);
  a_bm_idle:   assert property (@(posedge clk) disable iff (!rst_n) bm_start |-> !bm_busy);
  a_sof_empty: assert property (@(posedge clk) disable iff (!rst_n) (fifo_wr && synd_first) |-> fifo_empty);
  a_frame_fit: assert property (@(posedge clk) disable iff (!rst_n) fifo_count <= ($clog2(FIFO_DEPTH+1))'(info.nbch[15:3]));

endmodule
