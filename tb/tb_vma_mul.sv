// tb_vma_mul: checks the VMA multiply stage on random vectors of every
// precision: product signs, product scales (read per 64/L-bit lane) and the
// carry-save fraction product (s+c per 2*64/L-bit lane) against products
// computed here lane by lane.
module tb_vma_mul;
  import rtu_pkg::*;
  import tb_ref_pkg::*;

  vmode_e       mode;
  uvec_t        va, vb;
  logic [7:0]   sign_p;
  logic [63:0]  exp_p;
  logic [127:0] s_p, c_p;
  int checks = 0, failures = 0;

  vma_mul dut (.mode(mode), .va(va), .vb(vb), .sign_p(sign_p), .exp_p(exp_p), .s_p(s_p), .c_p(c_p));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] prod, fa, fb, exp_prod;
    logic [63:0]  ex;
    int L, w, ea, eb, ep;
    for (int m = 0; m < 4; m++) begin
      for (int t = 0; t < 40; t++) begin
        mode = vmode_e'(m);
        va = uvec_t'(rand_vec(m, maxscale(vmode_e'(m)), fw_of(m)));
        vb = uvec_t'(rand_vec(m, maxscale(vmode_e'(m)), fw_of(m)));
        #1;
        L = 1 << m;
        w = 64 / L;
        prod = s_p + c_p;
        for (int l = 0; l < L; l++) begin
          fa = 128'(va.frac >> (l * w)) & ((128'd1 << w) - 1);
          fb = 128'(vb.frac >> (l * w)) & ((128'd1 << w) - 1);
          exp_prod = fa * fb;
          checks++;
          if (((prod >> (2 * w * l)) & ((w == 64) ? '1 : ((128'd1 << (2 * w)) - 1))) != exp_prod) begin
            failures++;
            $display("frac mismatch m=%0d l=%0d", m, l);
          end
          ea = get_exp(va, vmode_e'(m), l);
          eb = get_exp(vb, vmode_e'(m), l);
          ex = exp_p >> (l * w);
          ep = (w == 64) ? int'($signed(ex)) : int'($signed(ex << (64 - w)) >>> (64 - w));
          checks++;
          if (ep != ea + eb) begin
            failures++;
            $display("exp mismatch m=%0d l=%0d %0d+%0d got %0d", m, l, ea, eb, ep);
          end
          checks++;
          if (sign_p[l * (8 / L)] != (va.sign[l * (8 / L)] ^ vb.sign[l * (8 / L)])) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
