// posit_vec_encoder: vectorized posit encoder of the data streaming
// infrastructure.
//
// Converts each lane of a unified vector (sign, scale, fraction with hidden
// one and a sticky LSB) into a posit of the selected precision and packs the
// lanes into a 64-bit memory word. The scale is split into regime k and
// exponent e; regime, exponent and fraction bits are concatenated and cut to
// n-1 bits, rounding to nearest with ties to even on the cut bits. Scales
// beyond the range saturate to maxpos/minpos; a nonzero value never rounds to
// zero or NaR; negative values are two's-complemented. Combinational.
// Encoding at the array output follows the document; rounding details are
// this design's.
module posit_vec_encoder
  import rtu_pkg::*;
(
  input  vmode_e      mode,
  input  uvec_t       din,
  output logic [63:0] dout
);
  always_comb begin
    logic [63:0] p;
    int n;
    n    = pbits(mode);
    dout = '0;
    p    = '0;
    for (int l = 0; l < 8; l++) begin
      if (l < lanes(mode)) begin
        p    = posit_encode(get_sign(din, mode, l), get_exp(din, mode, l), get_frac(din, mode, l), mode);
        dout = dout | (p << (l * n));
      end
    end
  end
endmodule
