// bch_pkg: constants, types and Galois-field helpers shared by the DVB-S2X
// BCH decoder.
//
// The decoder works on normal FECFRAMEs, whose BCH code lives in GF(2^16)
// with primitive polynomial g1(x) = 1 + x^2 + x^3 + x^5 + x^16. A code
// corrects t = 8, 10 or 12 bit errors depending on the code rate, and is a
// shortened form of the length-65535 narrow-sense code (roots alpha^1 ..
// alpha^2t). The field and code-rate table are taken from the DVB-S2/S2X
// standard; the decoder structure (syndromes, Berlekamp-Massey, Chien search,
// a byte-wide frame FIFO) follows the described design.
//
// The functions below are used by the RTL only to compute constants at
// elaboration time and by constant-operand multipliers, which synthesis
// reduces to XOR networks.
package bch_pkg;

  localparam int unsigned GF_M      = 16;
  localparam int unsigned GF_ORDER  = (1 << GF_M) - 1;   // 65535
  localparam logic [GF_M:0] GF_POLY = 17'h1002D;          // x^16+x^5+x^3+x^2+1
  localparam int unsigned T_MAX     = 12;                 // largest t of any code rate
  localparam int unsigned NSYND     = 2 * T_MAX;          // syndromes S1..S24
  localparam int unsigned NRATES    = 35;                 // normal-frame code rates
  localparam int unsigned FIFO_DEPTH = 8192;              // bytes, >= 58320/8

  typedef logic [GF_M-1:0] gf_t;
  typedef logic [5:0]      rate_t;   // code-rate index, see rate table below
  typedef logic [3:0]      tcap_t;   // error-correction capability t

  // Code-rate table of the normal FECFRAME BCH code (Nbch, Kbch, t).
  typedef struct packed {
    logic [15:0] nbch;
    logic [15:0] kbch;
    tcap_t       t;
  } rate_info_t;

  // Multiply two field elements (shift-and-add, reduced by GF_POLY).
  function automatic gf_t gf_mul(gf_t a, gf_t b);
    gf_t acc;
    gf_t sh;
    acc = '0;
    sh  = a;
    for (int i = 0; i < int'(GF_M); i++) begin
      if (b[i]) acc ^= sh;
      sh = sh[GF_M-1] ? ((sh << 1) ^ GF_POLY[GF_M-1:0]) : (sh << 1);
    end
    return acc;
  endfunction

  // alpha^e for any non-negative exponent (square and multiply).
  function automatic gf_t gf_alpha_pow(int unsigned e);
    gf_t r;
    gf_t b;
    int unsigned x;
    x = e % GF_ORDER;
    r = 16'h0001;
    b = 16'h0002;
    for (int i = 0; i < int'(GF_M); i++) begin
      if (x[i]) r = gf_mul(r, b);
      b = gf_mul(b, b);
    end
    return r;
  endfunction

  // Indices 0..10 are the DVB-S2 rates (t = 8, 10 or 12); 11..34 the rates
  // DVB-S2X adds, all with t = 12 and Nbch = 64800 * rate. Indices above 34
  // select rate 9/10.
  function automatic rate_info_t rate_info(rate_t r);
    logic [15:0] n;
    case (r)
      6'd0:    return '{nbch: 16'd16200, kbch: 16'd16008, t: 4'd12};  // 1/4
      6'd1:    return '{nbch: 16'd21600, kbch: 16'd21408, t: 4'd12};  // 1/3
      6'd2:    return '{nbch: 16'd25920, kbch: 16'd25728, t: 4'd12};  // 2/5
      6'd3:    return '{nbch: 16'd32400, kbch: 16'd32208, t: 4'd12};  // 1/2
      6'd4:    return '{nbch: 16'd38880, kbch: 16'd38688, t: 4'd12};  // 3/5
      6'd5:    return '{nbch: 16'd43200, kbch: 16'd43040, t: 4'd10};  // 2/3
      6'd6:    return '{nbch: 16'd48600, kbch: 16'd48408, t: 4'd12};  // 3/4
      6'd7:    return '{nbch: 16'd51840, kbch: 16'd51648, t: 4'd12};  // 4/5
      6'd8:    return '{nbch: 16'd54000, kbch: 16'd53840, t: 4'd10};  // 5/6
      6'd9:    return '{nbch: 16'd57600, kbch: 16'd57472, t: 4'd8};   // 8/9
      6'd10:   return '{nbch: 16'd58320, kbch: 16'd58192, t: 4'd8};   // 9/10
      default: begin
        case (r)
          6'd11:   n = 16'd14400;   // 2/9
          6'd12:   n = 16'd18720;   // 13/45
          6'd13:   n = 16'd29160;   // 9/20
          6'd14:   n = 16'd32400;   // 90/180
          6'd15:   n = 16'd34560;   // 96/180
          6'd16:   n = 16'd35640;   // 11/20
          6'd17:   n = 16'd36000;   // 100/180
          6'd18:   n = 16'd37440;   // 104/180
          6'd19:   n = 16'd37440;   // 26/45
          6'd20:   n = 16'd38880;   // 18/30
          6'd21:   n = 16'd40320;   // 28/45
          6'd22:   n = 16'd41400;   // 23/36
          6'd23:   n = 16'd41760;   // 116/180
          6'd24:   n = 16'd43200;   // 20/30
          6'd25:   n = 16'd44640;   // 124/180
          6'd26:   n = 16'd45000;   // 25/36
          6'd27:   n = 16'd46080;   // 128/180
          6'd28:   n = 16'd46800;   // 13/18
          6'd29:   n = 16'd47520;   // 132/180
          6'd30:   n = 16'd47520;   // 22/30
          6'd31:   n = 16'd48600;   // 135/180
          6'd32:   n = 16'd50400;   // 140/180
          6'd33:   n = 16'd50400;   // 7/9
          6'd34:   n = 16'd55440;   // 154/180
          default: return '{nbch: 16'd58320, kbch: 16'd58192, t: 4'd8};  // 9/10
        endcase
        return '{nbch: n, kbch: n - 16'd192, t: 4'd12};
      end
    endcase
  endfunction

endpackage
