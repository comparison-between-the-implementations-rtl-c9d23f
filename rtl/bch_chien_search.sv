// bch_chien_search: byte-parallel Chien search over a shortened BCH frame.
//
// Finds the error positions of a frame by evaluating the error locator
// Lambda(x) at alpha^-p for every bit position p, eight positions per clock,
// in the order the bits were received (p = Nbch-1 first). Register L_j holds
// Lambda_j * alpha^(-j*p0), p0 being the first position of the current byte.
// Position p0-k of the byte (k = 0..7, byte bit 7-k) is in error when
//   Lambda_0 + sum_j L_j * alpha^(j*k) = 0,
// and each step multiplies L_j by alpha^(8j).
//
// Interface: load (one clock) takes lambda and the per-rate start constants
// init[j-1] = alpha^(j*(65536-Nbch)) from the alpha ROM. Each clock with step
// high examines one byte; its error mask (1 = flip that bit) is registered,
// so mask is valid, with mask_valid, on the clock after the step. This lines
// it up with a FIFO byte read in the same clock as the step.
// Chien search and its byte-wide parallelism follow the described design; the
// start-constant scheme is this design's choice.
module bch_chien_search
  import bch_pkg::*;
#(
  parameter int unsigned T = T_MAX
)(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  gf_t        lambda [T+1],
  input  gf_t        init   [T],
  input  logic       step,
  output logic [7:0] mask,
  output logic       mask_valid
);

  gf_t l0;
  gf_t lreg   [T];      // lreg[j-1] = L_j
  gf_t lload  [T];      // lambda_j * init_j
  gf_t lnext  [T];      // L_j * alpha^(8j)
  gf_t lterm  [8][T];   // L_j * alpha^(j*k)
  logic [7:0] mask_c;

  for (genvar j = 1; j <= int'(T); j++) begin : g_j
    bch_gf_mult u_load (.a(lambda[j]), .b(init[j-1]), .p(lload[j-1]));
    bch_gf_mult u_next (.a(lreg[j-1]), .b(gf_alpha_pow(8 * j)), .p(lnext[j-1]));
    for (genvar kk = 0; kk < 8; kk++) begin : g_k
      bch_gf_mult u_term (.a(lreg[j-1]), .b(gf_alpha_pow(j * kk)), .p(lterm[kk][j-1]));
    end
  end

  always_comb begin
    for (int kk = 0; kk < 8; kk++) begin
      gf_t v;
      v = l0;
      for (int j = 0; j < int'(T); j++) v ^= lterm[kk][j];
      mask_c[7-kk] = (v == '0);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      l0         <= '0;
      mask       <= '0;
      mask_valid <= 1'b0;
      for (int j = 0; j < int'(T); j++) lreg[j] <= '0;
    end else begin
      mask_valid <= step;
      if (load) begin
        l0 <= lambda[0];
        for (int j = 0; j < int'(T); j++) lreg[j] <= lload[j];
      end else if (step) begin
        mask <= mask_c;
        for (int j = 0; j < int'(T); j++) lreg[j] <= lnext[j];
      end
    end
  end

endmodule
