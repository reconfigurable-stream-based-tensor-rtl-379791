// pre_proc: input pre-processing (PRE) for non-restoring division and
// square root.
//
// Iterative Newton-Raphson/Goldschmidt division needs the divisor scaled into
// [0.5, 1) and the dividend scaled by the same factor. For every lane of the
// decoded input vector x this module outputs
//   scaled = (-1)^s * 1.f * 2^-1        (the lane's exponent replaced by -1)
//   factor = +1.0 * 2^-(e+1)             (the scaling factor that was applied)
// so that scaled = x * factor. The factor's scale is clamped to the posit
// range of the precision. A zero lane gives scaled 0 and factor 1.0. When
// "en" is low both outputs are zero. Combinational.
// The function is the document's; the two-output interface is this design's.
module pre_proc
  import rtu_pkg::*;
(
  input  logic   en,
  input  vmode_e mode,
  input  uvec_t  x,
  output uvec_t  scaled,
  output uvec_t  factor
);
  always_comb begin
    int e, fe;
    logic [63:0] f;
    scaled = '0;
    factor = '0;
    e      = 0;
    fe     = 0;
    f      = '0;
    if (en) begin
      for (int l = 0; l < 8; l++) begin
        if (l < lanes(mode)) begin
          f = get_frac(x, mode, l);
          e = get_exp(x, mode, l);
          if (f != '0) begin
            scaled = put_lane(scaled, mode, l, get_sign(x, mode, l), -1, f);
            fe = -(e + 1);
            if (fe > maxscale(mode))  fe = maxscale(mode);
            if (fe < -maxscale(mode)) fe = -maxscale(mode);
          end else begin
            fe = 0;
          end
          factor = put_lane(factor, mode, l, 1'b0, fe, 64'd1 << (fbits(mode) - 1));
        end
      end
    end
  end
endmodule
