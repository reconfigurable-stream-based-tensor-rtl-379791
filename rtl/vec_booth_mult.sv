// vec_booth_mult: variable-precision vector fraction multiplier.
//
// An 8x8 grid of 8-bit radix-4 Booth multipliers forms every byte product
// a_i*b_j of the two 64-bit fraction vectors. For 1x64, 2x32, 4x16 or 8x8-bit
// lanes (mode 0..3) only products whose two bytes belong to the same lane are
// kept; each lands at bit 8*(i+j), which places the 2W-bit product of a W-bit
// lane at bit 2W*lane of the 128-bit result. The 64 partial products are
// summed by a chain of 3:2 carry-save compressors, and the result is left in
// carry-save form (s + c = product vector). Combinational.
//
// The Booth grid and the carry-save output follow the document; the linear
// arrangement of the compressors is this design's choice.
module vec_booth_mult
  import rtu_pkg::*;
(
  input  vmode_e       mode,
  input  logic [63:0]  a,
  input  logic [63:0]  b,
  output logic [127:0] s,
  output logic [127:0] c
);
  logic [15:0] bp [64];

  for (genvar i = 0; i < 8; i++) begin : g_row
    for (genvar j = 0; j < 8; j++) begin : g_col
      booth_mul8 u_cell (.a(a[8*i +: 8]), .b(b[8*j +: 8]), .p(bp[8*i + j]));
    end
  end

  always_comb begin
    logic [127:0] pp, ns, nc;
    int lb;                                // bytes per lane
    lb = 8 >> int'(mode);
    s  = '0;
    c  = '0;
    for (int i = 0; i < 8; i++) begin
      for (int j = 0; j < 8; j++) begin
        if ((i / lb) == (j / lb)) pp = 128'(bp[8*i + j]) << (8 * (i + j));
        else                      pp = '0;
        ns = s ^ c ^ pp;
        nc = ((s & c) | (s & pp) | (c & pp)) << 1;
        s  = ns;
        c  = nc;
      end
    end
  end
endmodule
