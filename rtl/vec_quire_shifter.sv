// vec_quire_shifter: lane-partitioned barrel shifter over the 2048-bit
// unified quire vector.
//
// The word is split into 1, 2, 4 or 8 lanes (mode 0..3); lane l starts at bit
// l*2048/L and is n*n/2 bits wide (2048/512/128/32). Each lane has its own
// shift amount. Eleven logarithmic levels shift the whole word by 2^k and then
// repair the lane edges with masks: bits that crossed a lane boundary are
// replaced by the lane's sign (arithmetic right shift, LEFT=0) or by zeros
// (logical left shift, LEFT=1), and bits outside the lanes are kept 0. A shift
// of a lane's width or more empties it. Combinational.
//
// The document describes a left shifter that ORs partial shifts between
// levels; the masked form used here is this design's own, and the right
// direction is used for operand alignment.
module vec_quire_shifter
  import rtu_pkg::*;
#(
  parameter bit LEFT = 1'b0
) (
  input  vmode_e          mode,
  input  logic [QW-1:0]   din,
  input  logic [SH_W-1:0] amt [8],
  output logic [QW-1:0]   dout
);
  always_comb begin
    logic [QW-1:0] cur, t, lmask, fill, sgn, en;
    int nl, stride, qb, d;
    nl     = lanes(mode);
    stride = QW / nl;
    qb     = qbits(mode);
    lmask  = '0;
    for (int l = 0; l < 8; l++)
      if (l < nl) lmask = lmask | (((qb == QW) ? '1 : ((QW'(1) << qb) - QW'(1))) << (l * stride));
    cur = din & lmask;
    // sign of each lane replicated over the lane
    sgn = '0;
    for (int l = 0; l < 8; l++)
      if (l < nl && cur[l * stride + qb - 1])
        sgn = sgn | (((qb == QW) ? '1 : ((QW'(1) << qb) - QW'(1))) << (l * stride));
    for (int k = 0; k < 12; k++) begin
      d    = 1 << k;
      fill = '0;
      en   = '0;
      for (int l = 0; l < 8; l++) begin
        if (l < nl) begin
          if (d >= qb) fill = fill | (((qb == QW) ? '1 : ((QW'(1) << qb) - QW'(1))) << (l * stride));
          else if (LEFT) fill = fill | (((QW'(1) << d) - QW'(1)) << (l * stride));
          else           fill = fill | (((QW'(1) << d) - QW'(1)) << (l * stride + qb - d));
          if (amt[l][k])
            en = en | (((qb == QW) ? '1 : ((QW'(1) << qb) - QW'(1))) << (l * stride));
        end
      end
      if (LEFT) t = (d >= QW) ? '0 : (cur << d);
      else      t = (d >= QW) ? '0 : (cur >> d);
      t   = (t & lmask & ~fill) | (LEFT ? '0 : (sgn & fill));
      cur = (t & en) | (cur & ~en);
    end
    dout = cur;
  end
endmodule
