// bch_ribm_fsm: reformulated inversionless Berlekamp-Massey (RiBM) solver.
//
// Turns the syndromes S_1..S_2t of a frame into the error-locator polynomial
// Lambda(x), whose roots are the inverses of the error positions. It uses the
// RiBM array of 3*T+1 processing elements, each holding a delta and a theta
// register and two GF multipliers. One clock is one iteration r:
//   delta_i <- gamma*delta_(i+1) + delta_0*theta_i
//   if delta_0 != 0 and k >= 0: theta_i <- delta_(i+1), gamma <- delta_0, k <- -k-1
//   else:                       k <- k+1
// After 2t iterations Lambda_i = delta_(t+i), i = 0..t (scaled by a non-zero
// constant, which leaves its roots unchanged).
//
// The correction capability t is an input sampled at start, so one array of
// T_MAX serves the t = 8, 10 and 12 code rates: the unused upper elements stay
// zero. deg is the degree of Lambda, the number of errors the decoder expects
// to find.
//
// Timing: start (one clock, while idle) loads the array; 2t clocks later the
// iterations end, and on the next clock lambda/deg are registered and done
// pulses high. busy is high from the clock after start until done.
// The algorithm and its FSM control follow the described design; the
// runtime-t handling and the interface are this design's choice.
module bch_ribm_fsm
  import bch_pkg::*;
#(
  parameter int unsigned T = T_MAX
)(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  tcap_t       t,
  input  gf_t         synd [2*T],     // synd[k] = S_(k+1)
  output gf_t         lambda [T+1],   // lambda[i] = coefficient of x^i
  output logic [4:0]  deg,
  output logic        done,
  output logic        busy
);

  localparam int unsigned NPE = 3 * T + 1;

  typedef enum logic [1:0] {S_IDLE, S_ITER, S_OUT} state_t;

  state_t         state;
  gf_t            delta [NPE];
  gf_t            theta [NPE];
  gf_t            gamma;
  logic signed [6:0] k;
  logic [5:0]     r;
  tcap_t          t_q;

  gf_t            m_gd [NPE];   // gamma * delta_(i+1)
  gf_t            m_dt [NPE];   // delta_0 * theta_i
  gf_t            delta_up [NPE];

  always_comb
    for (int i = 0; i < int'(NPE); i++)
      delta_up[i] = (i + 1 < int'(NPE)) ? delta[(i+1) % NPE] : gf_t'('0);

  for (genvar i = 0; i < int'(NPE); i++) begin : g_pe
    bch_gf_mult u_gd (.a(gamma),    .b(delta_up[i]), .p(m_gd[i]));
    bch_gf_mult u_dt (.a(delta[0]), .b(theta[i]),    .p(m_dt[i]));
  end

  logic update_theta;
  assign update_theta = (delta[0] != '0) && (k >= 0);

  // Lambda taken out of the delta registers at offset t.
  gf_t lam_sel [T+1];
  always_comb begin
    for (int i = 0; i <= int'(T); i++) begin
      lam_sel[i] = '0;
      if (i <= int'(t_q)) lam_sel[i] = delta[(int'(t_q) + i) % NPE];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      gamma <= '0;
      k     <= '0;
      r     <= '0;
      t_q   <= '0;
      done  <= 1'b0;
      deg   <= '0;
      for (int i = 0; i < int'(NPE); i++) begin
        delta[i] <= '0;
        theta[i] <= '0;
      end
      for (int i = 0; i <= int'(T); i++) lambda[i] <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          t_q   <= t;
          gamma <= 16'h0001;
          k     <= '0;
          r     <= '0;
          for (int i = 0; i < int'(NPE); i++) begin
            if (i == 3 * int'(t))    begin delta[i] <= 16'h0001; theta[i] <= 16'h0001; end
            else if (i < 2 * int'(t)) begin delta[i] <= synd[i % (2*T)]; theta[i] <= synd[i % (2*T)]; end
            else                      begin delta[i] <= '0;       theta[i] <= '0;       end
          end
          state <= S_ITER;
        end
        S_ITER: begin
          for (int i = 0; i < int'(NPE); i++) begin
            delta[i] <= m_gd[i] ^ m_dt[i];
            if (update_theta) theta[i] <= delta_up[i];
          end
          if (update_theta) begin
            gamma <= delta[0];
            k     <= -k - 7'sd1;
          end else begin
            k     <= k + 7'sd1;
          end
          r <= r + 6'd1;
          if (r == 6'(2 * int'(t_q) - 1)) state <= S_OUT;
        end
        S_OUT: begin
          deg <= '0;
          for (int i = 0; i <= int'(T); i++) begin
            lambda[i] <= lam_sel[i];
            if (lam_sel[i] != '0) deg <= 5'(i);
          end
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

endmodule
