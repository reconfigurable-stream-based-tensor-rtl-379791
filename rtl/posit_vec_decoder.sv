// posit_vec_decoder: vectorized posit decoder of the data streaming
// infrastructure.
//
// Splits a 64-bit memory word into 1, 2, 4 or 8 posits (mode 0..3: posit<64,3>,
// <32,2>, <16,1>, <8,0>) and decodes each into the unified vector format of
// rtu_pkg: sign, scale k*2^es+e and fraction with the hidden one. Negative
// posits are two's-complemented first; the regime run length is counted, then
// the exponent and fraction bits that follow the regime are extracted. Zero
// and NaR become fraction 0. Combinational; one lane decoder per precision and
// lane, selected by mode.
// Decoding in the streaming path, not in the PE, follows the document; the
// per-lane decoders and the NaR rule are this design's.
module posit_vec_decoder
  import rtu_pkg::*;
(
  input  vmode_e      mode,
  input  logic [63:0] din,
  output uvec_t       dout
);
  always_comb begin
    logic s;
    int   e;
    logic [63:0] f, p;
    int   n;
    s    = 1'b0;
    e    = 0;
    f    = '0;
    p    = '0;
    n    = pbits(mode);
    dout = '0;
    for (int l = 0; l < 8; l++) begin
      if (l < lanes(mode)) begin
        p = din >> (l * n);
        posit_decode(p, mode, s, e, f);
        dout = put_lane(dout, mode, l, s, e, f);
      end
    end
  end
endmodule
