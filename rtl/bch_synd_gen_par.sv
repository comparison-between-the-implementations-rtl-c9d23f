// bch_synd_gen_par: all 2*T_MAX syndromes S_1..S_2T computed in parallel.
//
// One bch_synd_gen per syndrome, all fed the same byte stream. The syndromes
// are ready the clock after the last byte of the frame. For a code with
// t < T_MAX only S_1..S_2t are used downstream. All syndromes, even ones, are
// computed directly, as in the described parallel syndrome generator.
module bch_synd_gen_par
  import bch_pkg::*;
#(
  parameter int unsigned T = T_MAX
)(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       first,
  input  logic [7:0] data,
  output gf_t        synd [2*T]   // synd[k] = S_(k+1)
);

  for (genvar k = 0; k < int'(2*T); k++) begin : g_synd
    bch_synd_gen #(.J(k + 1)) u_gen (
      .clk(clk), .rst_n(rst_n), .en(en), .first(first), .data(data), .s(synd[k]));
  end

endmodule
