// tb_posit_vec_encoder: (1) round trip: random posit vectors of every
// precision are split into sign/scale/fraction by a reference decoder and
// must encode back to the same bits; (2) rounding: random 8-bit-precision
// vectors with full 6-bit fractions and scales beyond the posit range must
// encode to the nearest posit (ties to the even pattern, never zero or NaR),
// found here by searching all 8-bit posits.
module tb_posit_vec_encoder;
  import rtu_pkg::*;
  import tb_ref_pkg::*;
  vmode_e mode;
  uvec_t din;
  logic [63:0] dout;
  int checks = 0, failures = 0;

  posit_vec_encoder dut (.mode(mode), .din(din), .dout(dout));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] nearest8(input real v);
    logic [7:0] best;
    real bd, d, pv;
    best = 8'h01;
    bd   = 1.0e300;
    for (int p = 1; p < 256; p++) begin
      if (p == 128) continue;
      pv = posit_real(64'(p), 3);
      d  = (pv > v) ? pv - v : v - pv;
      if (d < bd || (d == bd && p[0] == 1'b0)) begin
        bd   = d;
        best = 8'(p);
      end
    end
    return best;
  endfunction

  initial begin
    logic [63:0] w, expw;
    logic s;
    int sc, n;
    logic [63:0] f;
    uvec_t u;
    for (int m = 0; m < 4; m++) begin
      for (int t = 0; t < 300; t++) begin
        w = {$urandom, $urandom};
        if (t % 4 == 3) w = w >> $urandom_range(60);
        n = n_of(m);
        u = '0;
        expw = '0;
        for (int l = 0; l < (1 << m); l++) begin
          posit_fields(w >> (l * n), m, s, sc, f);
          u = uvec_t'(make_lane(u, m, l, s, sc, f));
          if (f != 0) expw = expw | ((((n == 64) ? w : (w >> (l * n)) & ((64'd1 << n) - 1))) << (l * n));
        end
        mode = vmode_e'(m);
        din  = u;
        #1;
        checks++;
        if (dout != expw) begin
          failures++;
          if (failures < 10) $display("roundtrip m=%0d got %h exp %h", m, dout, expw);
        end
      end
    end
    for (int t = 0; t < 300; t++) begin
      u = uvec_t'(rand_vec(3, 9, 6));
      mode = M_P8;
      din  = u;
      #1;
      for (int l = 0; l < 8; l++) begin
        checks++;
        if (dout[8*l +: 8] != nearest8(lane_real(u, 3, l))) begin
          failures++;
          if (failures < 10) $display("round l=%0d v=%g got %h exp %h", l, lane_real(u, 3, l), dout[8*l +: 8], nearest8(lane_real(u, 3, l)));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
