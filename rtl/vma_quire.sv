// vma_quire: the quire arithmetic (Q) stage of the VMA, combinational part.
//
// 1. Signed conversion: the carry-save product of each lane is resolved and,
//    for a negative product sign, two's-complemented; Vc fractions are
//    complemented the same way by their sign.
// 2. Alignment: each signed value is placed in its quire lane with its 1.0
//    at bit 2*QB (the quire position of maxpos^2), sign-extended over the
//    lane, and arithmetically shifted right by QB - scale, which leaves 1.0 at
//    bit QB + scale. QB = 992/240/56/12 for 64/32/16/8-bit posits. For valid
//    posit operands no set bit is shifted out below the quire LSB.
// 3. Operand selection: A and B are each chosen from zero, the product, Vc,
//    the forwarded quire, the quire register, or the low/high half produced
//    by the quire splitter.
// 4. A 4:2 carry-save adder sums A, B and the +1 words needed to negate
//    either of them (opc: A+B, A-B, B-A, -(A+B)); the vector carry-select
//    adder resolves the result modulo 2^(n*n/2) per lane.
// The VMA registers the result as the quire. Steps, operand sources and the
// 4:2 adder follow the document; resolving the product before negation and
// aligning with a right shift are this design's choices.
module vma_quire
  import rtu_pkg::*;
(
  input  vmode_e         mode,
  input  logic [7:0]     sign_p,
  input  logic [63:0]    exp_p,
  input  logic [127:0]   s_p,
  input  logic [127:0]   c_p,
  input  uvec_t          vc,
  input  qsel_e          ops_a,
  input  qsel_e          ops_b,
  input  qop_e           opc,
  input  logic [QW-1:0]  quire_fwd,
  input  logic [QW-1:0]  quire_reg,
  input  logic [QW-1:0]  split_lo,
  input  logic [QW-1:0]  split_hi,
  output logic [QW-1:0]  quire_next
);
  logic [QW-1:0]   pre_p, pre_c, q_p, q_c;
  logic [SH_W-1:0] amt_p [8];
  logic [SH_W-1:0] amt_c [8];
  logic [127:0]    prod;

  assign prod = s_p + c_p;

  // signed conversion and pre-alignment
  always_comb begin
    logic [QW-1:0] v, lm;
    logic [127:0]  pl;
    logic [63:0]   fl;
    int nl, stride, qb, bq, w, fb, ep, sc;
    logic [63:0]   et;
    nl     = lanes(mode);
    stride = QW / nl;
    qb     = qbits(mode);
    bq     = qbias(mode);
    w      = 64 / nl;
    fb     = fbits(mode);
    lm     = (qb == QW) ? '1 : ((QW'(1) << qb) - QW'(1));
    pre_p  = '0;
    pre_c  = '0;
    pl     = '0;
    v      = '0;
    et     = '0;
    ep     = 0;
    sc     = 0;
    fl     = '0;
    for (int l = 0; l < 8; l++) begin
      amt_p[l] = '0;
      amt_c[l] = '0;
      if (l < nl) begin
        // product lane: 2w bits at 2w*l
        pl = (prod >> (2 * w * l)) & ((w == 64) ? '1 : ((128'd1 << (2 * w)) - 128'd1));
        v  = QW'(pl);
        if (sign_p[l * (8 / nl)]) v = ~v + QW'(1);
        v  = (v << (2 * bq - (2 * fb - 2))) & lm;
        pre_p = pre_p | (v << (l * stride));
        et = exp_p >> (l * w);
        et = et << (64 - w);
        ep = int'($signed(et) >>> (64 - w));
        sc = bq - ep;
        amt_p[l] = (sc < 0) ? '0 : (sc >= qb) ? SH_W'(qb) : SH_W'(sc);
        // Vc lane
        fl = get_frac(vc, mode, l);
        v  = QW'(fl);
        if (get_sign(vc, mode, l)) v = ~v + QW'(1);
        v  = (v << (2 * bq - (fb - 1))) & lm;
        pre_c = pre_c | (v << (l * stride));
        sc = bq - get_exp(vc, mode, l);
        amt_c[l] = (sc < 0) ? '0 : (sc >= qb) ? SH_W'(qb) : SH_W'(sc);
      end
    end
  end

  vec_quire_shifter #(.LEFT(1'b0)) u_sh_p (.mode(mode), .din(pre_p), .amt(amt_p), .dout(q_p));
  vec_quire_shifter #(.LEFT(1'b0)) u_sh_c (.mode(mode), .din(pre_c), .amt(amt_c), .dout(q_c));

  // operand selection, 4:2 compression
  logic [QW-1:0] opa, opb, w0, w1, w2, w3, s1, c1, s2, c2, lmask, lsb1;
  logic          na, nb;

  function automatic logic [QW-1:0] pick(input qsel_e s, input logic [QW-1:0] p,
                                         input logic [QW-1:0] c, input logic [QW-1:0] f,
                                         input logic [QW-1:0] r, input logic [QW-1:0] lo,
                                         input logic [QW-1:0] hi);
    unique case (s)
      QS_PROD: return p;
      QS_VC:   return c;
      QS_FWD:  return f;
      QS_REG:  return r;
      QS_SLO:  return lo;
      QS_SHI:  return hi;
      default: return '0;
    endcase
  endfunction

  always_comb begin
    int nl, stride, qb;
    nl     = lanes(mode);
    stride = QW / nl;
    qb     = qbits(mode);
    lmask  = '0;
    lsb1   = '0;
    for (int l = 0; l < 8; l++)
      if (l < nl) begin
        lmask = lmask | (((qb == QW) ? '1 : ((QW'(1) << qb) - QW'(1))) << (l * stride));
        lsb1  = lsb1 | (QW'(1) << (l * stride));
      end
    opa = pick(ops_a, q_p, q_c, quire_fwd, quire_reg, split_lo, split_hi) & lmask;
    opb = pick(ops_b, q_p, q_c, quire_fwd, quire_reg, split_lo, split_hi) & lmask;
    na  = (opc == QO_RSUB) || (opc == QO_NEG);
    nb  = (opc == QO_SUB)  || (opc == QO_NEG);
    w0  = na ? (~opa & lmask) : opa;
    w1  = nb ? (~opb & lmask) : opb;
    w2  = na ? lsb1 : '0;
    w3  = nb ? lsb1 : '0;
    s1  = w0 ^ w1 ^ w2;
    c1  = (((w0 & w1) | (w0 & w2) | (w1 & w2)) << 1) & lmask;
    s2  = s1 ^ c1 ^ w3;
    c2  = (((s1 & c1) | (s1 & w3) | (c1 & w3)) << 1) & lmask;
  end

  vec_csel_adder u_add (.mode(mode), .a(s2), .b(c2), .sum(quire_next));
endmodule
