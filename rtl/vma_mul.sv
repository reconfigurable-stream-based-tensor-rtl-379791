// vma_mul: the floating-point multiply (M) stage of the VMA, combinational
// part.
//
// For each lane of the selected vector precision it forms the product sign
// (bitwise XOR of the sign vectors), the product scale (partitioned adder on
// the sign-extended exponents) and the fraction product (Booth grid, left in
// carry-save form). The product exponent vector is 64 bits wide with 64/L
// bits per lane, and the 128-bit carry-save fraction holds a 2*(64/L)-bit
// product per lane at bit lane*128/L. The VMA registers these outputs
// together with Vc at the end of the stage.
module vma_mul
  import rtu_pkg::*;
(
  input  vmode_e       mode,
  input  uvec_t        va,
  input  uvec_t        vb,
  output logic [7:0]   sign_p,
  output logic [63:0]  exp_p,
  output logic [127:0] s_p,
  output logic [127:0] c_p
);
  logic [63:0] ea, eb;

  // sign-extend each exponent field to its 64/L-bit lane
  always_comb begin
    int lw;
    lw = 64 >> int'(mode);
    ea = '0;
    eb = '0;
    for (int l = 0; l < 8; l++) begin
      if (l < lanes(mode)) begin
        ea = ea | ((64'(get_exp(va, mode, l)) & ((lw == 64) ? '1 : ((64'd1 << lw) - 64'd1))) << (l * lw));
        eb = eb | ((64'(get_exp(vb, mode, l)) & ((lw == 64) ? '1 : ((64'd1 << lw) - 64'd1))) << (l * lw));
      end
    end
  end

  assign sign_p = va.sign ^ vb.sign;

  vec_cla_adder u_exp (.mode(mode), .a(ea), .b(eb), .sum(exp_p));

  vec_booth_mult u_frac (.mode(mode), .a(va.frac), .b(vb.frac), .s(s_p), .c(c_p));
endmodule
