// vec_cla_adder: partitioned carry-lookahead adder for exponent vectors.
//
// Adds two 64-bit vectors split into 1x64, 2x32, 4x16 or 8x8-bit lanes
// (mode 0..3). The adder is built from eight 8-bit blocks; block
// generate/propagate signals feed a lookahead carry network, and a single-bit
// multiplexer per block boundary breaks the carry chain where a lane ends.
// Purely combinational.
//
// The document specifies a 32-bit adder with 4-bit smallest lanes; this
// design doubles the width so that the product scale of two 8-bit posits
// (-12..12) fits in its lane.
module vec_cla_adder
  import rtu_pkg::*;
(
  input  vmode_e      mode,
  input  logic [63:0] a,
  input  logic [63:0] b,
  output logic [63:0] sum
);
  logic [7:0] g, p, cin;

  always_comb begin
    for (int i = 0; i < 8; i++) begin
      g[i] = ({1'b0, a[8*i +: 8]} + {1'b0, b[8*i +: 8]}) > 9'd255;
      p[i] = (a[8*i +: 8] ^ b[8*i +: 8]) == 8'hff;
    end
    // lookahead: carry into block i; broken at lane boundaries
    cin[0] = 1'b0;
    for (int i = 1; i < 8; i++) begin
      if ((i % (8 >> int'(mode))) == 0) cin[i] = 1'b0;
      else                              cin[i] = g[i-1] | (p[i-1] & cin[i-1]);
    end
    for (int i = 0; i < 8; i++)
      sum[8*i +: 8] = a[8*i +: 8] + b[8*i +: 8] + {7'd0, cin[i]};
  end
endmodule
