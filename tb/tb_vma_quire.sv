// tb_vma_quire: checks the quire arithmetic stage. For every precision and
// random operands it forms the exact fixed-point quire value of the product
// (given in carry-save form with a random split) and of Vc, picks the two
// operands named by random ops_a/ops_b codes (product, Vc, forwarded quire,
// quire register, splitter halves, zero) and applies the random opc; the
// expected lane is computed here modulo 2^(n*n/2).
module tb_vma_quire;
  import rtu_pkg::*;
  import tb_ref_pkg::*;

  vmode_e       mode;
  logic [7:0]   sign_p;
  logic [63:0]  exp_p;
  logic [127:0] s_p, c_p;
  uvec_t        vc;
  qsel_e        ops_a, ops_b;
  qop_e         opc;
  logic [2047:0] qf, qr, slo, shi, qn;
  int checks = 0, failures = 0;

  vma_quire dut (.mode(mode), .sign_p(sign_p), .exp_p(exp_p), .s_p(s_p), .c_p(c_p), .vc(vc),
                 .ops_a(ops_a), .ops_b(ops_b), .opc(opc), .quire_fwd(qf), .quire_reg(qr),
                 .split_lo(slo), .split_hi(shi), .quire_next(qn));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [2047:0] rnd2048();
    logic [2047:0] r;
    for (int i = 0; i < 64; i++) r[32*i +: 32] = $urandom;
    return r;
  endfunction

  initial begin
    logic [2047:0] lm, tp, tc, a, b, exp_l, got_l, pick [7];
    logic [127:0]  prod, fa, fb, cs;
    int L, w, qb, bq, fw, ea, eb, ec, stride, mx;
    for (int m = 0; m < 4; m++) begin
      for (int t = 0; t < 60; t++) begin
        mode   = vmode_e'(m);
        L      = 1 << m;
        w      = 64 / L;
        qb     = qbits(mode);
        bq     = qbias(mode);
        fw     = fw_of(m);
        stride = 2048 / L;
        mx     = maxscale(mode);
        lm     = (qb == 2048) ? '1 : ((2048'd1 << qb) - 1);
        sign_p = '0; exp_p = '0; prod = '0;
        vc = uvec_t'(rand_vec(m, mx, fw));
        qf = rnd2048(); qr = rnd2048(); slo = rnd2048(); shi = rnd2048();
        ops_a = qsel_e'($urandom_range(6));
        ops_b = qsel_e'($urandom_range(6));
        opc   = qop_e'($urandom_range(3));
        for (int l = 0; l < L; l++) begin
          fa = 128'({$urandom, $urandom}) & ((128'd1 << fw) - 1); fa[fw-1] = 1'b1;
          fb = 128'({$urandom, $urandom}) & ((128'd1 << fw) - 1); fb[fw-1] = 1'b1;
          ea = int'($urandom_range(2 * mx - fw + 1)) - mx + fw - 1;
          eb = int'($urandom_range(2 * mx - fw + 1)) - mx + fw - 1;
          prod = prod | ((fa * fb) << (2 * w * l));
          sign_p[l * (8 / L)] = 1'($urandom);
          exp_p = exp_p | ((64'(ea + eb) & ((w == 64) ? '1 : ((64'd1 << w) - 1))) << (w * l));
        end
        cs  = {$urandom, $urandom, $urandom, $urandom};
        c_p = cs;
        s_p = prod - cs;
        #1;
        for (int l = 0; l < L; l++) begin
          // exact product term
          fa = (prod >> (2 * w * l)) & ((w == 64) ? '1 : ((128'd1 << (2 * w)) - 1));
          ea = int'($signed(exp_p << (64 - w * (l + 1))) >>> (64 - w));
          tp = 2048'(fa) << (ea + bq - (2 * fw - 2));
          if (sign_p[l * (8 / L)]) tp = -tp;
          tp = tp & lm;
          ec = get_exp(vc, mode, l);
          tc = 2048'(get_frac(vc, mode, l)) << (ec + bq - (fw - 1));
          if (get_sign(vc, mode, l)) tc = -tc;
          tc = tc & lm;
          pick[0] = '0;
          pick[1] = tp;
          pick[2] = tc;
          pick[3] = (qf >> (l * stride)) & lm;
          pick[4] = (qr >> (l * stride)) & lm;
          pick[5] = (slo >> (l * stride)) & lm;
          pick[6] = (shi >> (l * stride)) & lm;
          a = pick[int'(ops_a)];
          b = pick[int'(ops_b)];
          case (opc)
            QO_ADD:  exp_l = a + b;
            QO_SUB:  exp_l = a - b;
            QO_RSUB: exp_l = b - a;
            default: exp_l = -(a + b);
          endcase
          exp_l = exp_l & lm;
          got_l = (qn >> (l * stride)) & ((stride == 2048) ? '1 : ((2048'd1 << stride) - 1));
          checks++;
          if (got_l != exp_l) begin
            failures++;
            if (failures < 10) $display("mismatch m=%0d l=%0d ops %0d %0d opc %0d", m, l, ops_a, ops_b, opc);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
