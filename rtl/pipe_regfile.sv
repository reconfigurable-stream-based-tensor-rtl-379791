// pipe_regfile: the PE's local 8-entry register file (the "R" module).
//
// Each 106-bit entry is {valid, last, 104-bit decoded vector}. The registers
// serve both as local storage (constants, intermediate results) and as the
// pipeline registers of the 2D register-transfer grid. Register j loads from
// a fixed source when in_mask[j] is set and that source carries a valid
// entry: R0..R2 from the three west inputs, R3 from the north input, R4 from
// the north-west input, R5..R7 from the PE's own VMA output. Otherwise it
// keeps its value. Output selects pick the three entries forwarded east and
// the ones forwarded south and south-east; the select and the register
// contents are both visible in the same cycle, so data moves one PE per
// cycle. All registers reset to zero.
// The size and the input/output masks follow the document; the fixed source
// map and the meaning of the two extra bits are this design's choices.
module pipe_regfile
  import rtu_pkg::*;
#(
  parameter int NREG = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] in_mask,
  input  rentry_t    w_in [3],
  input  rentry_t    n_in,
  input  rentry_t    nw_in,
  input  rentry_t    vout_in,
  input  logic [8:0] sel_e,
  input  logic [2:0] sel_s,
  input  logic [2:0] sel_se,
  output rentry_t    regs [NREG],
  output rentry_t    e_out [3],
  output rentry_t    s_out,
  output rentry_t    se_out
);
  rentry_t src [8];

  always_comb begin
    src[0] = w_in[0];
    src[1] = w_in[1];
    src[2] = w_in[2];
    src[3] = n_in;
    src[4] = nw_in;
    src[5] = vout_in;
    src[6] = vout_in;
    src[7] = vout_in;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < NREG; j++) regs[j] <= '0;
    end else begin
      for (int j = 0; j < NREG; j++)
        if (in_mask[j % 8] && src[j % 8].valid) regs[j] <= src[j % 8];
    end
  end

  always_comb begin
    for (int k = 0; k < 3; k++) e_out[k] = regs[int'(sel_e[3*k +: 3]) % NREG];
    s_out  = regs[int'(sel_s) % NREG];
    se_out = regs[int'(sel_se) % NREG];
  end
endmodule
