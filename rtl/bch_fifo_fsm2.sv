// bch_fifo_fsm2: byte-wide frame FIFO controlled by a three-state FSM.
//
// Holds the received frame while its syndromes and error locator are being
// computed, so the bytes can be corrected when they are read back. It does
// one action per clock, a write or a read, never both. The FSM remembers the
// last action: S_WRITE, S_READ, or S_FULL. S_FULL is entered by the write that
// fills the last free word and refuses every further write until a read frees
// a word, so no write can land outside the readable area.
//
// Interface: wr_en writes wr_data when not full; rd_en reads when not empty
// and wr_en is low (a write takes priority). Read data is registered:
// rd_data is valid, with rd_valid, on the clock after rd_en.
// The single-action, three-state organisation and the byte width follow the
// described design; the depth, the write priority and the registered read are
// this design's choice.
module bch_fifo_fsm2
  import bch_pkg::*;
#(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = FIFO_DEPTH
)(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             rd_valid,
  output logic             full,
  output logic             empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = $clog2(DEPTH);

  typedef enum logic [1:0] {S_WRITE, S_READ, S_FULL} state_t;

  state_t           state;
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr;
  logic [AW-1:0]    rd_ptr;
  logic             do_wr;
  logic             do_rd;

  assign full  = (state == S_FULL);
  assign empty = (count == '0);
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty && !wr_en;

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_READ;
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      count    <= '0;
      rd_data  <= '0;
      rd_valid <= 1'b0;
    end else begin
      rd_valid <= do_rd;
      if (do_wr) begin
        wr_ptr <= inc(wr_ptr);
        count  <= count + 1'b1;
        state  <= (count == ($clog2(DEPTH+1))'(DEPTH - 1)) ? S_FULL : S_WRITE;
      end else if (do_rd) begin
        rd_data <= mem[rd_ptr];
        rd_ptr  <= inc(rd_ptr);
        count   <= count - 1'b1;
        state   <= S_READ;
      end
    end
  end

  // The FULL state and the counter must agree.
  a_full_count: assert property (@(posedge clk) disable iff (!rst_n)
    full == (count == ($clog2(DEPTH+1))'(DEPTH)));
  a_count_range: assert property (@(posedge clk) disable iff (!rst_n)
    count <= ($clog2(DEPTH+1))'(DEPTH));

endmodule
