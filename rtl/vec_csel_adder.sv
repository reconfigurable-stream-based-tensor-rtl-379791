// vec_csel_adder: vector carry-select adder over the 2048-bit quire vector.
//
// A chain of 64 32-bit carry-select blocks: each block computes its sum for
// carry-in 0 and 1 and the incoming carry picks one. The carry into a block is
// forced to 0 where a quire lane starts (lane l of L lanes starts at bit
// l*2048/L), so each lane adds modulo 2^(n*n/2), and bits outside the lanes
// are cleared. Combinational.
module vec_csel_adder
  import rtu_pkg::*;
(
  input  vmode_e        mode,
  input  logic [QW-1:0] a,
  input  logic [QW-1:0] b,
  output logic [QW-1:0] sum
);
  localparam int NB = QW / 32;

  always_comb begin
    logic [32:0] s0, s1;
    logic        cy;
    logic [QW-1:0] lmask;
    int nl, stride, qb;
    nl     = lanes(mode);
    stride = QW / nl;
    qb     = qbits(mode);
    lmask  = '0;
    for (int l = 0; l < 8; l++)
      if (l < nl) lmask = lmask | (((qb == QW) ? '1 : ((QW'(1) << qb) - QW'(1))) << (l * stride));
    cy  = 1'b0;
    sum = '0;
    for (int bi = 0; bi < NB; bi++) begin
      if (((bi * 32) % stride) == 0) cy = 1'b0;
      s0 = {1'b0, a[32*bi +: 32]} + {1'b0, b[32*bi +: 32]};
      s1 = {1'b0, a[32*bi +: 32]} + {1'b0, b[32*bi +: 32]} + 33'd1;
      sum[32*bi +: 32] = cy ? s1[31:0] : s0[31:0];
      cy = cy ? s1[32] : s0[32];
    end
    sum = sum & lmask;
  end
endmodule
