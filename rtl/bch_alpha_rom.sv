// bch_alpha_rom: code-rate ROM with chip select holding the alpha constants.
//
// For each of the NRATES normal-frame code rates it stores the BCH frame
// length Nbch, the message length Kbch, the correction capability t and the
// T_MAX Chien-search start constants alpha^(j*(65536-Nbch)), j = 1..T_MAX.
// Those constants move the Chien search of the shortened code to the first
// received bit, which is the coefficient of x^(Nbch-1).
//
// Interface: when cs is high at a rising clock edge, the entry of rate_idx is
// registered on the outputs (one cycle of latency); otherwise the outputs hold.
// The table is computed at elaboration from the field definition in bch_pkg.
// The ROM and its role follow the described design; its exact contents and the
// registered read are this design's choice.
module bch_alpha_rom
  import bch_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cs,
  input  rate_t       rate_idx,
  output rate_info_t  info,
  output gf_t         chien_init [T_MAX]
);

  typedef gf_t init_row_t [T_MAX];

  function automatic init_row_t make_row(rate_t r);
    init_row_t row;
    int unsigned nb;
    nb = int'(rate_info(r).nbch);
    for (int j = 1; j <= int'(T_MAX); j++)
      row[j-1] = gf_alpha_pow((j * (65536 - nb)) % GF_ORDER);
    return row;
  endfunction

  gf_t rom [NRATES][T_MAX];

  initial begin
    for (int r = 0; r < int'(NRATES); r++) begin
      init_row_t row;
      row = make_row(rate_t'(r));
      for (int j = 0; j < int'(T_MAX); j++) rom[r][j] = row[j];
    end
  end

  rate_t idx_c;
  assign idx_c = (rate_idx < rate_t'(NRATES)) ? rate_idx : rate_t'(NRATES - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      info <= rate_info(rate_t'(NRATES - 1));
      for (int j = 0; j < int'(T_MAX); j++) chien_init[j] <= '0;
    end else if (cs) begin
      info <= rate_info(idx_c);
      for (int j = 0; j < int'(T_MAX); j++) chien_init[j] <= rom[idx_c][j];
    end
  end

endmodule
