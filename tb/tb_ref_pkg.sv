// tb_ref_pkg: reference arithmetic for the RTU testbenches, written
// independently of the RTL helpers.
//
// posit_real() evaluates a posit bit pattern by walking its bits; lane_real()
// evaluates one lane of a decoded 104-bit vector; make_lane() packs a lane.
// Field positions follow the unified format: for L lanes of a 64-bit vector
// the sign of lane l is bit l*8/L of the sign vector, the exponent (width
// 10/8/6/4, two's complement) starts at bit l*32/L, the fraction (width
// 59/28/13/6 with hidden one) at bit l*64/L.
package tb_ref_pkg;

  function automatic int n_of(input int m);  return 64 / (1 << m); endfunction
  function automatic int es_of(input int m); return 3 - m;         endfunction
  function automatic int fw_of(input int m); return n_of(m) - es_of(m) - 2; endfunction
  function automatic int ew_of(input int m); return 10 - 2 * m;    endfunction

  function automatic real pow2(input int e);
    real r;
    r = 1.0;
    if (e >= 0) for (int i = 0; i < e; i++) r = r * 2.0;
    else        for (int i = 0; i < -e; i++) r = r / 2.0;
    return r;
  endfunction

  // value of an n-bit posit (NaR returned as 0)
  function automatic real posit_real(input logic [63:0] p, input int m);
    int n, es, i, k, e, nb;
    logic [63:0] x;
    logic s;
    real f, w;
    n  = n_of(m);
    es = es_of(m);
    x  = (n == 64) ? p : (p & ((64'd1 << n) - 1));
    if (x == 0) return 0.0;
    if (x == (64'd1 << (n - 1))) return 0.0;
    s = x[n-1];
    if (s) x = (n == 64) ? (-x) : ((-x) & ((64'd1 << n) - 1));
    i = n - 2;
    k = 0;
    if (x[i]) begin
      while (i >= 0 && x[i]) begin k++; i--; end
      k = k - 1;
    end else begin
      while (i >= 0 && !x[i]) begin k--; i--; end
    end
    i--;                       // skip terminator
    e = 0;
    for (int j = 0; j < es; j++) begin
      e = e * 2;
      if (i >= 0) begin e = e + x[i]; i--; end
    end
    f = 1.0;
    w = 0.5;
    while (i >= 0) begin
      if (x[i]) f = f + w;
      w = w / 2.0;
      i--;
    end
    return (s ? -1.0 : 1.0) * f * pow2(k * (1 << es) + e);
  endfunction

  function automatic real lane_real(input logic [103:0] v, input int m, input int l);
    int L, ew, fw, e;
    logic s;
    logic [63:0] fr;
    logic [31:0] ex;
    L  = 1 << m;
    ew = ew_of(m);
    fw = fw_of(m);
    s  = v[64 + 32 + l * (8 / L)];
    ex = v[95:64] >> (l * (32 / L));
    e  = 0;
    for (int i = 0; i < ew; i++) if (ex[i]) e = e + (1 << i);
    if (ex[ew-1]) e = e - (1 << ew);
    fr = v[63:0] >> (l * (64 / L));
    if (fw < 64) fr = fr & ((64'd1 << fw) - 1);
    return (s ? -1.0 : 1.0) * real'(fr) * pow2(e - (fw - 1));
  endfunction

  function automatic logic [103:0] make_lane(input logic [103:0] v, input int m, input int l,
                                             input logic s, input int e, input logic [63:0] f);
    int L, ew, fw;
    logic [103:0] r;
    L  = 1 << m;
    ew = ew_of(m);
    fw = fw_of(m);
    r  = v;
    r[96 + l * (8 / L)] = s;
    for (int i = 0; i < ew; i++) r[64 + l * (32 / L) + i] = e[i];
    for (int i = 0; i < fw; i++) r[l * (64 / L) + i] = f[i];
    return r;
  endfunction

  // random valid lane: hidden bit set, scale within +-lim
  function automatic logic [103:0] rand_vec(input int m, input int lim, input int fbits_used);
    logic [103:0] r;
    logic [63:0] f;
    int fw, e;
    r  = '0;
    fw = fw_of(m);
    for (int l = 0; l < (1 << m); l++) begin
      f = {$urandom, $urandom};
      f = f & ((64'd1 << fw) - 1);
      // keep only the top fbits_used bits, hidden one set
      f = (f >> (fw - fbits_used)) << (fw - fbits_used);
      f[fw-1] = 1'b1;
      e = int'($urandom_range(2 * lim)) - lim;
      r = make_lane(r, m, l, 1'($urandom), e, f);
    end
    return r;
  endfunction

  // sign, scale and fraction (hidden one at bit fw-1) of a posit; zero/NaR
  // give fraction 0
  function automatic void posit_fields(input logic [63:0] p, input int m, output logic s,
                                       output int sc, output logic [63:0] f);
    int n, es, i, k, e, fw;
    logic [63:0] x;
    n  = n_of(m);
    es = es_of(m);
    fw = fw_of(m);
    x  = (n == 64) ? p : (p & ((64'd1 << n) - 1));
    s = 1'b0; sc = 0; f = '0;
    if (x == 0 || x == (64'd1 << (n - 1))) return;
    s = x[n-1];
    if (s) x = (n == 64) ? (-x) : ((-x) & ((64'd1 << n) - 1));
    i = n - 2;
    k = 0;
    if (x[i]) begin
      while (i >= 0 && x[i]) begin k++; i--; end
      k = k - 1;
    end else begin
      while (i >= 0 && !x[i]) begin k--; i--; end
    end
    i--;
    e = 0;
    for (int j = 0; j < es; j++) begin
      e = e * 2;
      if (i >= 0) begin e = e + x[i]; i--; end
    end
    sc = k * (1 << es) + e;
    f = 64'd1;
    for (int j = 0; j < fw - 1; j++) begin
      f = f << 1;
      if (i >= 0) begin f[0] = x[i]; i--; end
    end
  endfunction

endpackage
