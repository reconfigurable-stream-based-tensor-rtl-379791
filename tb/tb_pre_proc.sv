// tb_pre_proc: checks that every lane of "scaled" lies in [0.5,1) in
// magnitude, keeps the sign, and that scaled equals x times "factor", with
// factor a power of two; zero lanes and the disabled state are covered.
module tb_pre_proc;
  import rtu_pkg::*;
  import tb_ref_pkg::*;
  logic en;
  vmode_e mode;
  uvec_t x, sc, fa;
  int checks = 0, failures = 0;

  pre_proc dut (.en(en), .mode(mode), .x(x), .scaled(sc), .factor(fa));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real xv, sv, fv, mag;
    for (int t = 0; t < 200; t++) begin
      mode = vmode_e'(t % 4);
      en   = (t % 10) != 9;
      x    = uvec_t'(rand_vec(int'(mode), maxscale(mode) / 2, fw_of(int'(mode))));
      if (t % 7 == 0) x = uvec_t'(make_lane(x, int'(mode), 0, 1'b0, 0, 64'd0));
      #1;
      for (int l = 0; l < lanes(mode); l++) begin
        xv = lane_real(x, int'(mode), l);
        sv = lane_real(sc, int'(mode), l);
        fv = lane_real(fa, int'(mode), l);
        checks++;
        if (!en) begin
          if (sc != '0 || fa != '0) failures++;
          continue;
        end
        if (xv == 0.0) begin
          if (sv != 0.0 || fv != 1.0) failures++;
          continue;
        end
        mag = sv < 0 ? -sv : sv;
        if (mag < 0.5 || mag >= 1.0 || ((sv < 0) != (xv < 0)) || sv != xv * fv) begin
          failures++;
          $display("m=%0d l=%0d x=%g scaled=%g factor=%g", mode, l, xv, sv, fv);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
