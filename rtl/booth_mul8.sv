// booth_mul8: 8x8-bit unsigned radix-4 Booth multiplier.
//
// The multiplier b is recoded into five radix-4 digits in {-2..2} (b is
// zero-extended so that it stays unsigned); each digit selects 0, +-a or
// +-2a, and the five shifted partial products are summed into a 16-bit
// result. Combinational. One of the 64 cells of the vector fraction
// multiplier.
module booth_mul8 (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] p
);
  logic [10:0] bx;        // {0, 0, b, 0}
  logic signed [19:0] acc;
  logic signed [19:0] pp;

  always_comb begin
    bx  = {2'b00, b, 1'b0};
    acc = '0;
    for (int d = 0; d < 5; d++) begin
      unique case (bx[2*d +: 3])
        3'b001, 3'b010: pp = 20'sd0 + $signed({12'd0, a});
        3'b011:         pp = $signed({11'd0, a, 1'b0});
        3'b100:         pp = -$signed({11'd0, a, 1'b0});
        3'b101, 3'b110: pp = -$signed({12'd0, a});
        default:        pp = '0;
      endcase
      acc = acc + (pp <<< (2 * d));
    end
    p = acc[15:0];
  end
endmodule
