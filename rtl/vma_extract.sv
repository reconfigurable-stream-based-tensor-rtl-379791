// vma_extract: the two fraction/exponent extraction (EF) stages of the VMA.
//
// EF1: each quire lane is turned into sign and magnitude (vector carry-select
// complementer) and its leading zeros are counted (vector LZC); sign,
// magnitude, counts and the precision are registered.
// EF2: the magnitude of each lane is shifted left by its zero count so the
// leading one reaches the lane top; the top F bits become the fraction (F =
// 59/28/13/6, hidden bit included) and every bit below is OR'ed into the
// fraction LSB. The scale is (n*n/2 - 1 - count) - QB. A zero lane gives
// fraction 0; a scale outside the posit range saturates to maxpos or minpos.
// The result is registered as the 104-bit output vector.
// Latency: 2 cycles from "quire/valid_in" to "vout/valid_out"; one new quire
// per cycle.
// The split into complement+LZC and shift+sticky follows the document; the
// normalising left shift (the document names a right shifter) and the
// saturation are this design's choices.
module vma_extract
  import rtu_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          valid_in,
  input  vmode_e        mode,
  input  logic [QW-1:0] quire,
  output logic          valid_out,
  output uvec_t         vout
);
  // ---------------- EF1 ----------------
  logic [QW-1:0]   negw, lsb1, mag;
  logic [7:0]      lsign;
  logic [SH_W-1:0] lz [8];

  always_comb begin
    int nl, stride, qb;
    nl     = lanes(mode);
    stride = QW / nl;
    qb     = qbits(mode);
    negw   = '0;
    lsb1   = '0;
    lsign  = '0;
    for (int l = 0; l < 8; l++)
      if (l < nl && quire[l * stride + qb - 1]) begin
        lsign[l] = 1'b1;
        negw = negw | (((qb == QW) ? '1 : ((QW'(1) << qb) - QW'(1))) << (l * stride));
        lsb1 = lsb1 | (QW'(1) << (l * stride));
      end
  end

  vec_csel_adder u_cmp (.mode(mode), .a(quire ^ negw), .b(lsb1), .sum(mag));
  vec_lzc        u_lzc (.mode(mode), .din(mag), .cnt(lz));

  logic            r1_valid;
  vmode_e          r1_mode;
  logic [7:0]      r1_sign;
  logic [QW-1:0]   r1_mag;
  logic [SH_W-1:0] r1_lz [8];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r1_valid <= 1'b0;
      r1_mode  <= M_P64;
      r1_sign  <= '0;
      r1_mag   <= '0;
      for (int l = 0; l < 8; l++) r1_lz[l] <= '0;
    end else begin
      r1_valid <= valid_in;
      if (valid_in) begin
        r1_mode <= mode;
        r1_sign <= lsign;
        r1_mag  <= mag;
        r1_lz   <= lz;
      end
    end
  end

  // ---------------- EF2 ----------------
  logic [QW-1:0] norm;
  uvec_t         res;

  vec_quire_shifter #(.LEFT(1'b1)) u_norm (.mode(r1_mode), .din(r1_mag), .amt(r1_lz), .dout(norm));

  always_comb begin
    logic [QW-1:0] lane;
    logic [63:0]   f;
    logic          st;
    int nl, stride, qb, fb, sc;
    nl     = lanes(r1_mode);
    stride = QW / nl;
    qb     = qbits(r1_mode);
    fb     = fbits(r1_mode);
    res    = '0;
    lane   = '0;
    f      = '0;
    st     = 1'b0;
    sc     = 0;
    for (int l = 0; l < 8; l++) begin
      if (l < nl && int'(r1_lz[l]) < qb) begin
        lane = norm >> (l * stride);
        f    = 64'(lane >> (qb - fb)) & ((64'd1 << fb) - 64'd1);
        st   = |(lane & ((QW'(1) << (qb - fb)) - QW'(1)));
        sc   = (qb - 1 - int'(r1_lz[l])) - qbias(r1_mode);
        if (sc > maxscale(r1_mode) || sc < -maxscale(r1_mode)) begin
          sc = (sc > 0) ? maxscale(r1_mode) : -maxscale(r1_mode);
          f  = 64'd1 << (fb - 1);
          st = 1'b0;
        end
        res = put_lane(res, r1_mode, l, r1_sign[l], sc, f | {63'd0, st});
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_out <= 1'b0;
      vout      <= '0;
    end else begin
      valid_out <= r1_valid;
      if (r1_valid) vout <= res;
    end
  end
endmodule
