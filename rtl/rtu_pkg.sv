// rtu_pkg: types, constants and posit helper functions shared by the
// Reconfigurable Tensor Unit (RTU).
//
// Vector precision ("mode") selects one of the four standard posit formats
// packed in a 64-bit word: 1x posit<64,3>, 2x posit<32,2>, 4x posit<16,1>,
// 8x posit<8,0>. Inside the PE array every operand travels in a decoded,
// "unified" 104-bit vector: an 8-bit sign vector, a 32-bit exponent vector
// and a 64-bit fraction vector (hidden bit included). For L lanes, lane l
// keeps its sign at bit l*(8/L), its exponent (two's complement scale
// k*2^es+e, 10/8/6/4 bits wide) at bit l*(32/L) and its fraction (59/28/13/6
// bits, hidden one at the top) at bit l*(64/L); unused bits are 0. A fraction
// of 0 is the value zero. The quire vector is 2048 bits; lane l starts at bit
// l*(2048/L) and holds an n*n/2-bit two's complement fixed-point number whose
// LSB weighs minpos^2 (1.0 sits at bit QB = 2(n-2)2^es), the rest being 0.
// These layouts follow the document's vector formats; the exact field
// positions inside a lane, the zero convention and NaR handling (decoded as
// zero) are this design's choices.
package rtu_pkg;

  localparam int QW      = 2048;  // unified quire vector width
  localparam int VW      = 104;   // unified operand vector width
  localparam int RW      = 106;   // pipeline register entry width
  localparam int CTRL_W  = 64;    // PE control word
  localparam int CNT_W   = 32;    // sequencer count
  localparam int SH_W    = 12;    // quire shift amount width

  typedef enum logic [1:0] {
    M_P64 = 2'd0,
    M_P32 = 2'd1,
    M_P16 = 2'd2,
    M_P8  = 2'd3
  } vmode_e;

  typedef struct packed {
    logic [7:0]  sign;
    logic [31:0] exp;
    logic [63:0] frac;
  } uvec_t;

  typedef struct packed {
    logic  valid;
    logic  last;
    uvec_t vec;
  } rentry_t;

  // Quire operand codes and operations.
  typedef enum logic [2:0] {
    QS_ZERO = 3'd0,
    QS_PROD = 3'd1,
    QS_VC   = 3'd2,
    QS_FWD  = 3'd3,
    QS_REG  = 3'd4,
    QS_SLO  = 3'd5,
    QS_SHI  = 3'd6
  } qsel_e;

  typedef enum logic [1:0] {
    QO_ADD  = 2'd0,  // A + B
    QO_SUB  = 2'd1,  // A - B
    QO_RSUB = 2'd2,  // B - A
    QO_NEG  = 2'd3   // -(A + B)
  } qop_e;

  // Fields of the control word that drive the VMA.
  typedef struct packed {
    vmode_e     vec;
    logic       enu;
    qsel_e      ops_a;
    qsel_e      ops_b;
    qop_e       opc;
    logic [1:0] qin_sel;
    logic       enr;
    logic [1:0] spe;
  } vma_ctl_t;

  // 64-bit PE control word (this design's layout).
  typedef struct packed {
    logic [11:0] rsvd;     // [63:52]
    logic [1:0]  spe;      // [51:50] split level
    logic        enr;      // [49]    enable EF stages
    logic [1:0]  qin_sel;  // [48:47] forwarded quire source: 0 W, 1 N, 2 NW
    qop_e        opc;      // [46:45]
    qsel_e       ops_b;    // [44:42]
    qsel_e       ops_a;    // [41:39]
    logic        enu;      // [38]    enable M,Q stages
    vmode_e      vec;      // [37:36] vector width
    logic        pre;      // [35]    enable pre-processing
    logic [3:0]  sel_vc;   // [34:31]
    logic [3:0]  sel_vb;   // [30:27]
    logic [3:0]  sel_va;   // [26:23]
    logic [2:0]  fwd_se;   // [22:20] register forwarded south-east
    logic [2:0]  fwd_s;    // [19:17] register forwarded south
    logic [8:0]  fwd_e;    // [16:8]  three registers forwarded east
    logic [7:0]  rin_mask; // [7:0]   registers that load this cycle
  } ctrl_word_t;

  // Operand source codes for Va/Vb/Vc selection.
  localparam logic [3:0] IS_W0 = 4'd8, IS_W1 = 4'd9, IS_W2 = 4'd10, IS_N = 4'd11,
                         IS_NW = 4'd12, IS_PRES = 4'd13, IS_PREF = 4'd14, IS_ZERO = 4'd15;

  // Pattern generator descriptor.
  typedef struct packed {
    logic [1:0]  bank;     // target bank (storage units)
    vmode_e      mode;     // posit vector precision of the stream
    logic [9:0]  offset;
    logic [9:0]  x_size;   // elements per row (0 = empty)
    logic [9:0]  x_stride;
    logic [9:0]  y_size;   // rows
    logic [9:0]  y_stride;
  } desc_t;

  // ---------------- per-precision constants ----------------
  function automatic int lanes(input vmode_e m);
    return 1 << int'(m);
  endfunction
  function automatic int pbits(input vmode_e m);   // n
    return 64 >> int'(m);
  endfunction
  function automatic int pes(input vmode_e m);     // es
    return 3 - int'(m);
  endfunction
  function automatic int fbits(input vmode_e m);   // fraction incl. hidden bit
    return pbits(m) - pes(m) - 2;
  endfunction
  function automatic int ebits(input vmode_e m);   // exponent field width
    return 10 - 2 * int'(m);
  endfunction
  function automatic int qbits(input vmode_e m);   // quire bits per lane
    return pbits(m) * pbits(m) / 2;
  endfunction
  function automatic int qbias(input vmode_e m);   // quire bit of 1.0
    return 2 * (pbits(m) - 2) * (1 << pes(m));
  endfunction
  function automatic int maxscale(input vmode_e m);
    return (pbits(m) - 2) * (1 << pes(m));
  endfunction

  // ---------------- lane accessors of the unified vector ----------------
  function automatic logic get_sign(input uvec_t v, input vmode_e m, input int l);
    return v.sign[l * (8 >> int'(m))];
  endfunction
  function automatic int get_exp(input uvec_t v, input vmode_e m, input int l);
    logic [31:0] t;
    int w;
    w = ebits(m);
    t = v.exp >> (l * (32 >> int'(m)));
    t = t << (32 - w);
    return $signed(t) >>> (32 - w);
  endfunction
  function automatic logic [63:0] get_frac(input uvec_t v, input vmode_e m, input int l);
    logic [63:0] t;
    t = v.frac >> (l * (64 >> int'(m)));
    return t & ((64'd1 << fbits(m)) - 64'd1);
  endfunction
  function automatic uvec_t put_lane(input uvec_t v, input vmode_e m, input int l,
                                     input logic s, input int e, input logic [63:0] f);
    uvec_t r;
    logic [31:0] em;
    logic [63:0] fm;
    r  = v;
    em = ((32'd1 << ebits(m)) - 32'd1);
    fm = ((64'd1 << fbits(m)) - 64'd1);
    r.sign[l * (8 >> int'(m))] = s;
    r.exp  = (r.exp & ~(em << (l * (32 >> int'(m))))) |
             ((32'(e) & em) << (l * (32 >> int'(m))));
    r.frac = (r.frac & ~(fm << (l * (64 >> int'(m))))) |
             ((f & fm) << (l * (64 >> int'(m))));
    return r;
  endfunction

  // ---------------- scalar posit decode ----------------
  // Returns sign, scale and fraction (hidden bit at fbits-1); zero and NaR
  // give fraction 0.
  function automatic void posit_decode(input logic [63:0] p, input vmode_e m,
                                       output logic s, output int e,
                                       output logic [63:0] f);
    int n, es, run, k;
    logic [63:0] x, body;
    logic r0;
    n  = pbits(m);
    es = pes(m);
    x  = p & ((n == 64) ? '1 : ((64'd1 << n) - 64'd1));
    s  = x[n-1];
    e  = 0;
    f  = '0;
    if ((x & ~(64'd1 << (n - 1))) == '0) begin
      s = 1'b0;              // zero or NaR
      return;
    end
    if (s) x = (~x + 64'd1) & ((n == 64) ? '1 : ((64'd1 << n) - 64'd1));
    r0  = x[n-2];
    run = 0;
    for (int i = n - 2; i >= 0; i--) begin
      if (x[i] == r0) run++;
      else break;
    end
    k = r0 ? run - 1 : -run;
    // drop sign and regime (+terminator), MSB-align the rest at bit 63
    body = x << (64 - n + 1);
    body = (run + 1 >= 64) ? '0 : (body << (run + 1));
    e = (es == 0) ? 0 : int'(body >> (64 - es));
    e = k * (1 << es) + e;
    f = (body << es) >> (64 - (fbits(m) - 1));
    f = f | (64'd1 << (fbits(m) - 1));
  endfunction

  // ---------------- scalar posit encode ----------------
  // f holds the fraction with the hidden bit at fbits-1 (0 means zero); its
  // LSB may be a sticky bit. Rounds to nearest even, saturates at
  // maxpos/minpos, never returns NaR or (for nonzero input) zero.
  function automatic logic [63:0] posit_encode(input logic s, input int e,
                                               input logic [63:0] f, input vmode_e m);
    int n, es, k, ex, rl, fb;
    logic [127:0] str;
    logic [63:0] r, mask;
    logic guard, sticky;
    n    = pbits(m);
    es   = pes(m);
    fb   = fbits(m);
    mask = (n == 64) ? '1 : ((64'd1 << n) - 64'd1);
    if (f == '0) return '0;
    if (e > maxscale(m) || e < -maxscale(m)) begin
      e = (e > 0) ? maxscale(m) : -maxscale(m);
      f = 64'd1 << (fbits(m) - 1);
    end
    k  = e >>> es;
    ex = e - k * (1 << es);
    // bit string after the sign, MSB at bit 127
    str = '0;
    if (k >= 0) begin
      rl  = k + 2;
      str = ~(128'h0) << (128 - (k + 1));          // k+1 ones, then a zero
    end else begin
      rl  = -k + 1;
      str = 128'd1 << (128 - rl);                  // -k zeros, then a one
    end
    if (es > 0) str = str | (128'(ex) << (128 - rl - es));
    str = str | ((128'(f) & ((128'd1 << (fb - 1)) - 128'd1)) << (128 - rl - es - (fb - 1)));
    r      = 64'(str >> (128 - (n - 1)));
    guard  = str[128 - n];
    sticky = |(str & ((128'd1 << (128 - n)) - 128'd1));
    if (guard && (sticky || r[0]) && (r != (mask >> 1))) r = r + 64'd1;
    if (r == '0) r = 64'd1;
    if (s) r = (~r + 64'd1) & mask;
    return r & mask;
  endfunction

endpackage
