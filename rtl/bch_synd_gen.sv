// bch_synd_gen: accumulator for one syndrome S_J over a whole frame.
//
// Holds S_J in a register and, on every clock with en high, replaces it with
// the byte-parallel Horner step of bch_synd_par. With first high the old
// value is ignored, so a new frame starts without an extra clear cycle.
// After the last byte of a frame s equals r(alpha^J). Reset clears s.
// The accumulator follows the described syndrome generator; the first/en
// interface is this design's choice.
module bch_synd_gen
  import bch_pkg::*;
#(
  parameter int unsigned J = 1
)(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       first,
  input  logic [7:0] data,
  output gf_t        s
);

  gf_t s_next;

  bch_synd_par #(.J(J)) u_par (.s_in(first ? gf_t'('0) : s), .data(data), .s_out(s_next));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  s <= '0;
    else if (en) s <= s_next;
  end

endmodule
