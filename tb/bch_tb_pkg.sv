// bch_tb_pkg: reference models for the BCH decoder testbenches.
//
// Everything here is computed independently of the RTL: GF(2^16) arithmetic
// uses exp/log tables built by stepping an LFSR (the RTL uses a shift-and-add
// multiplier), the code-rate table is re-typed from the DVB-S2 and DVB-S2X
// normal-frame BCH parameters, and the systematic encoder builds g(x) as the product of
// the minimal polynomials of alpha^1, alpha^3, .., alpha^(2t-1).
// Call init() once before using anything else.
package bch_tb_pkg;

  int unsigned gexp [65535];
  int unsigned glog [65536];

  function automatic void init();
    int unsigned x;
    x = 1;
    for (int i = 0; i < 65535; i++) begin
      gexp[i] = x;
      glog[x] = i;
      x = x << 1;
      if (x & 32'h10000) x ^= 32'h1002D;
    end
  endfunction

  function automatic logic [15:0] mul(logic [15:0] a, logic [15:0] b);
    if (a == 0 || b == 0) return 16'h0;
    return 16'(gexp[(glog[a] + glog[b]) % 65535]);
  endfunction

  function automatic logic [15:0] apow(longint e);
    longint m;
    m = e % 65535;
    if (m < 0) m += 65535;
    return 16'(gexp[int'(m)]);
  endfunction

  // Normal-frame BCH code table: Nbch, Kbch, t per rate index 0..34.
  // 0..10: DVB-S2 rates 1/4 .. 9/10. 11..34: DVB-S2X rates 2/9, 13/45, 9/20,
  // 90/180, 96/180, 11/20, 100/180, 104/180, 26/45, 18/30, 28/45, 23/36,
  // 116/180, 20/30, 124/180, 25/36, 128/180, 13/18, 132/180, 22/30, 135/180,
  // 140/180, 7/9, 154/180 (Nbch = 64800 * rate, t = 12).
  localparam int NR = 35;
  function automatic int nbch(int r);
    int tbl [11] = '{16200, 21600, 25920, 32400, 38880, 43200, 48600, 51840, 54000, 57600, 58320};
    int num [24] = '{2, 13, 9, 90, 96, 11, 100, 104, 26, 18, 28, 23, 116, 20, 124, 25, 128, 13, 132, 22, 135, 140, 7, 154};
    int den [24] = '{9, 45, 20, 180, 180, 20, 180, 180, 45, 30, 45, 36, 180, 30, 180, 36, 180, 18, 180, 30, 180, 180, 9, 180};
    if (r < 11) return tbl[r];
    return 64800 * num[r-11] / den[r-11];
  endfunction
  function automatic int kbch(int r);
    int tbl [11] = '{16008, 21408, 25728, 32208, 38688, 43040, 48408, 51648, 53840, 57472, 58192};
    if (r < 11) return tbl[r];
    return nbch(r) - 192;
  endfunction
  function automatic int tcap(int r);
    int tbl [11] = '{12, 12, 12, 12, 12, 10, 12, 12, 10, 8, 8};
    if (r < 11) return tbl[r];
    return 12;
  endfunction

  // Generator polynomial, bit i = coefficient of x^i, degree 16t.
  function automatic logic [192:0] gen_poly(int t);
    logic [192:0] g;
    g = 193'd1;
    for (int i = 1; i < 2 * t; i += 2) begin
      logic [15:0] mp [17];   // minimal polynomial of alpha^i over GF(2^16)
      logic [16:0] mbin;
      logic [192:0] prod;
      int c;
      for (int d = 0; d <= 16; d++) mp[d] = 0;
      mp[0] = 1;
      c = i;
      for (int n = 0; n < 16; n++) begin
        // multiply by (x + alpha^c)
        for (int d = 16; d >= 1; d--) mp[d] = mp[d-1] ^ mul(mp[d], apow(c));
        mp[0] = mul(mp[0], apow(c));
        c = (c * 2) % 65535;
      end
      for (int d = 0; d <= 16; d++) mbin[d] = mp[d][0];
      prod = '0;
      for (int d = 0; d <= 16; d++) if (mbin[d]) prod ^= (g << d);
      g = prod;
    end
    return g;
  endfunction

  // Systematic encoding: msg bits first (msg[0] is sent first), then 16t
  // parity bits. Returns the codeword as bytes, bit 7 of a byte first.
  function automatic void encode(input bit msg [], input int t, output byte unsigned cw []);
    logic [192:0] g;
    logic [191:0] rem;
    int deg, n, k;
    bit bits [];
    g   = gen_poly(t);
    deg = 16 * t;
    k   = msg.size();
    n   = k + deg;
    rem = '0;
    for (int i = 0; i < k; i++) begin
      bit fb;
      fb  = msg[i] ^ rem[deg-1];
      rem = rem << 1;
      if (fb) rem ^= g[191:0];
      rem &= (192'd1 << deg) - 1;
    end
    bits = new[n];
    for (int i = 0; i < k; i++) bits[i] = msg[i];
    for (int i = 0; i < deg; i++) bits[k+i] = rem[deg-1-i];
    cw = new[n / 8];
    for (int b = 0; b < n / 8; b++) begin
      byte unsigned v;
      v = 0;
      for (int i = 0; i < 8; i++) v[7-i] = bits[8*b+i];
      cw[b] = v;
    end
  endfunction

  // Syndrome S_j of a byte array, by evaluating r(alpha^j) term by term.
  function automatic logic [15:0] syndrome(input byte unsigned cw [], input int j);
    logic [15:0] s;
    int n;
    n = cw.size() * 8;
    s = 0;
    for (int b = 0; b < cw.size(); b++)
      for (int i = 0; i < 8; i++)
        if (cw[b][7-i]) s ^= apow(longint'(j) * (n - 1 - (8*b+i)));
    return s;
  endfunction

endpackage
