// bch_fifo_ctrl: frame sequencer of the decoder (controls the FIFO and the
// decoding steps around it).
//
// A frame passes through three phases:
//   receive  - each accepted input byte is written into the FIFO and fed to
//              the syndrome generators; the first byte (in_sof) also reads the
//              code-rate ROM. The phase ends after Nbch/8 bytes.
//   locate   - Berlekamp-Massey is started on the finished syndromes; the
//              sequencer waits for its done and then loads the Chien search.
//   correct  - the FIFO is read one byte per clock while the Chien search
//              steps alongside; the read is tagged as message byte (first
//              Kbch/8 bytes), first, last message byte and last byte.
// in_ready is high only in the idle and receive phases: input is stalled
// while a frame is being corrected, because the FIFO does one action at a time.
// Bytes that arrive while idle without in_sof are dropped.
//
// Timing: every output is a decode of the current state and inputs, acting in
// the same clock. The read tags belong to the read issued in that clock;
// the FIFO data they describe appears one clock later.
// The FIFO-controller role follows the described design; the phase split,
// the handshake and the tags are this design's choice.
module bch_fifo_ctrl
  import bch_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // input stream
  input  logic        in_valid,
  input  logic        in_sof,
  output logic        in_ready,
  // code-rate ROM
  output logic        rom_cs,
  input  rate_info_t  info,
  // FIFO
  input  logic        fifo_full,
  output logic        fifo_wr,
  output logic        fifo_rd,
  // syndromes
  output logic        synd_en,
  output logic        synd_first,
  // Berlekamp-Massey
  output logic        bm_start,
  input  logic        bm_done,
  // Chien search
  output logic        chien_load,
  output logic        chien_step,
  // tags of the read issued in this clock
  output logic        rd_msg,
  output logic        rd_first,
  output logic        rd_last_msg,
  output logic        rd_last
);

  typedef enum logic [2:0] {S_IDLE, S_RECV, S_BM_START, S_BM_WAIT, S_LOAD, S_READ} state_t;

  state_t      state;
  logic [12:0] cnt;        // bytes written or read in the current phase
  logic [12:0] n_bytes;
  logic [12:0] k_bytes;

  assign n_bytes = info.nbch[15:3];
  assign k_bytes = info.kbch[15:3];

  logic accept;
  assign in_ready = ((state == S_IDLE) || (state == S_RECV)) && !fifo_full;
  assign accept   = in_valid && in_ready && ((state == S_RECV) || in_sof);

  assign rom_cs      = (state == S_IDLE) && accept;
  assign fifo_wr     = accept;
  assign synd_en     = accept;
  assign synd_first  = (state == S_IDLE);
  assign bm_start    = (state == S_BM_START);
  assign chien_load  = (state == S_LOAD);
  assign fifo_rd     = (state == S_READ);
  assign chien_step  = (state == S_READ);
  assign rd_msg      = (state == S_READ) && (cnt < k_bytes);
  assign rd_first    = (state == S_READ) && (cnt == '0);
  assign rd_last_msg = (state == S_READ) && (cnt == k_bytes - 1'b1);
  assign rd_last     = (state == S_READ) && (cnt == n_bytes - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
    end else begin
      case (state)
        S_IDLE: if (accept) begin
          cnt   <= 13'd1;
          state <= S_RECV;
        end
        S_RECV: if (accept) begin
          cnt <= cnt + 1'b1;
          if (cnt + 1'b1 == n_bytes) state <= S_BM_START;
        end
        S_BM_START: state <= S_BM_WAIT;
        S_BM_WAIT:  if (bm_done) state <= S_LOAD;
        S_LOAD: begin
          cnt   <= '0;
          state <= S_READ;
        end
        S_READ: begin
          cnt <= cnt + 1'b1;
          if (rd_last) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The frame length must be whole bytes and match its parity length 16t.
  a_rate_info: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_BM_START) |-> (info.nbch - info.kbch == 16'(16 * int'(info.t))));
  a_no_write_read: assert property (@(posedge clk) disable iff (!rst_n) !(fifo_wr && fifo_rd));

endmodule
