// bch_synd_par: one byte-parallel Horner step of syndrome S_J.
//
// The received word r(x) arrives most significant coefficient first, eight
// bits per clock, bit 7 of a byte being the earliest (highest-degree) bit.
// Eight serial Horner steps S <- S*alpha^J + r_i are folded into one:
//   s_out = s_in * alpha^(8J) + sum_{i=0..7} byte[i] * alpha^(J*i).
// Combinational; alpha^(8J) and alpha^(J*i) are elaboration-time constants.
// The byte-parallel syndrome unit follows the described design (8 bits per
// clock); the folding formula is the standard one.
module bch_synd_par
  import bch_pkg::*;
#(
  parameter int unsigned J = 1   // syndrome index, S_J = r(alpha^J)
)(
  input  gf_t        s_in,
  input  logic [7:0] data,
  output gf_t        s_out
);

  localparam gf_t A8J = gf_alpha_pow(8 * J);

  gf_t shifted;
  gf_t term;

  bch_gf_mult u_mul (.a(s_in), .b(A8J), .p(shifted));

  always_comb begin
    term = '0;
    for (int i = 0; i < 8; i++)
      if (data[i]) term ^= gf_alpha_pow(J * i);
    s_out = shifted ^ term;
  end

endmodule
