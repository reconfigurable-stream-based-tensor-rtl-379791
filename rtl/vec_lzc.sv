// vec_lzc: vectorized leading-zero counter over the 2048-bit quire vector.
//
// Partial counts are taken for each 32-bit block; for each of the L lanes
// (n*n/2 bits starting at bit l*2048/L) the block counts are combined from the
// top block down until a block holding a one is met. A lane of all zeros
// yields its full width. Combinational.
module vec_lzc
  import rtu_pkg::*;
(
  input  vmode_e          mode,
  input  logic [QW-1:0]   din,
  output logic [SH_W-1:0] cnt [8]
);
  logic [5:0] blz [QW/32];

  always_comb begin
    for (int b = 0; b < QW / 32; b++) begin
      blz[b] = 6'd32;
      for (int i = 0; i < 32; i++)
        if (din[32*b + i]) blz[b] = 6'(31 - i);
    end
  end

  always_comb begin
    int nl, stride, qb, b0;
    logic done;
    nl     = lanes(mode);
    stride = QW / nl;
    qb     = qbits(mode);
    b0     = 0;
    for (int l = 0; l < 8; l++) begin
      cnt[l] = '0;
      done   = 1'b0;
      if (l < nl) begin
        b0 = (l * stride) / 32;
        for (int b = QW / 32 - 1; b >= 0; b--) begin
          if (b >= b0 && b < b0 + qb / 32 && !done) begin
            cnt[l] = cnt[l] + SH_W'(blz[b]);
            if (blz[b] != 6'd32) done = 1'b1;
          end
        end
      end
    end
  end
endmodule
