// quire_splitter: quire vector splitter for vector-to-scalar reduction.
//
// With split level spe = s (1..3) the active lanes are the ones below bit
// 2048>>s. "lo" keeps those lanes; "hi" moves the lanes between bit 2048>>s
// and 2048>>(s-1) down by 2048>>s bits onto them. Feeding lo and hi back to
// the quire adder adds lane pairs, so an L-lane vector reduces to one scalar
// in log2(L) passes with spe = 1, 2, 3. spe = 0 gives zeros. Combinational.
// The function is the document's; the spe encoding is this design's.
module quire_splitter
  import rtu_pkg::*;
(
  input  logic [1:0]    spe,
  input  logic [QW-1:0] quire,
  output logic [QW-1:0] lo,
  output logic [QW-1:0] hi
);
  always_comb begin
    logic [QW-1:0] m;
    int h;
    h  = QW >> spe;
    m  = (QW'(1) << h) - QW'(1);
    lo = (spe == 2'd0) ? '0 : (quire & m);
    hi = (spe == 2'd0) ? '0 : ((quire >> h) & m);
  end
endmodule
