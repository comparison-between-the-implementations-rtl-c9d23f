// bch_gf_mult: GF(2^16) multiplier, the basic arithmetic cell of the decoder.
//
// Computes p = a * b in GF(2^16) defined by x^16+x^5+x^3+x^2+1. It is purely
// combinational: a shift-and-add array of 16 partial products, each reduced
// as it is shifted. When one operand is a constant, synthesis folds the array
// into a small XOR network, so the same cell serves the constant multipliers
// of the syndrome and Chien units and the full multipliers of Berlekamp-Massey.
// The field follows the DVB-S2X normal-frame BCH code; the array form is this
// design's choice.
module bch_gf_mult
  import bch_pkg::*;
(
  input  gf_t a,
  input  gf_t b,
  output gf_t p
);

  gf_t acc;
  gf_t sh;

  always_comb begin
    acc = '0;
    sh  = a;
    for (int i = 0; i < int'(GF_M); i++) begin
      if (b[i]) acc = acc ^ sh;
      sh = sh[GF_M-1] ? ((sh << 1) ^ GF_POLY[GF_M-1:0]) : (sh << 1);
    end
  end

  assign p = acc;

endmodule
