// pe: variable-precision Processing Element of the RTU array.
//
// Holds a VMA, the input pre-processing module (PRE), the 8-entry pipeline
// register file and the configuration controller. Each cycle the
// controller's 64-bit control word (layout in rtu_pkg::ctrl_word_t) sets:
// which registers load (rin_mask) and which are forwarded east/south/
// south-east; where Va, Vb and Vc come from (a register, one of the three
// west inputs, the north or north-west input, the PRE outputs or zero);
// PRE activation (on west input 0); vector width; M/Q and EF stage enables;
// quire operands, operation, forwarded-quire source and split level.
// Neighbour links: three west inputs (the stream generators for column 0),
// north and north-west inputs, three east outputs, south and south-east
// outputs, and the quire fusing links (own quire out, quire in from west,
// north and north-west). The VMA result leaves on "vout" with its valid bit.
// The PE composition follows the document; the control word layout and the
// neighbour port counts are this design's.
module pe
  import rtu_pkg::*;
#(
  parameter int CFG_DEPTH = 16
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         cfg_we,
  input  logic [$clog2(CFG_DEPTH)-1:0] cfg_addr,
  input  logic [CTRL_W+CNT_W-1:0]      cfg_wdata,
  input  logic                         start,
  output logic                         busy,
  input  rentry_t                      w_in [3],
  input  rentry_t                      n_in,
  input  rentry_t                      nw_in,
  output rentry_t                      e_out [3],
  output rentry_t                      s_out,
  output rentry_t                      se_out,
  input  logic [QW-1:0]                qf_w,
  input  logic [QW-1:0]                qf_n,
  input  logic [QW-1:0]                qf_nw,
  output logic [QW-1:0]                quire_out,
  output rentry_t                      vout
);
  ctrl_word_t cw;
  logic [CTRL_W-1:0] ctrl;

  cfg_controller #(.CFG_DEPTH(CFG_DEPTH)) u_ctl (
    .clk(clk), .rst_n(rst_n), .cfg_we(cfg_we), .cfg_addr(cfg_addr), .cfg_wdata(cfg_wdata),
    .start(start), .ctrl(ctrl), .busy(busy)
  );
  assign cw = ctrl_word_t'(ctrl);

  rentry_t regs [8];
  rentry_t vout_e;

  pipe_regfile #(.NREG(8)) u_rf (
    .clk(clk), .rst_n(rst_n), .in_mask(cw.rin_mask), .w_in(w_in), .n_in(n_in), .nw_in(nw_in),
    .vout_in(vout_e), .sel_e(cw.fwd_e), .sel_s(cw.fwd_s), .sel_se(cw.fwd_se),
    .regs(regs), .e_out(e_out), .s_out(s_out), .se_out(se_out)
  );

  uvec_t pre_s, pre_f;
  pre_proc u_pre (.en(cw.pre), .mode(cw.vec), .x(w_in[0].vec), .scaled(pre_s), .factor(pre_f));

  function automatic uvec_t opsel(input logic [3:0] s, input rentry_t r [8],
                                  input rentry_t w [3], input rentry_t n, input rentry_t nw,
                                  input uvec_t ps, input uvec_t pf);
    if (s < 4'd8) return r[s[2:0]].vec;
    unique case (s)
      IS_W0:   return w[0].vec;
      IS_W1:   return w[1].vec;
      IS_W2:   return w[2].vec;
      IS_N:    return n.vec;
      IS_NW:   return nw.vec;
      IS_PRES: return ps;
      IS_PREF: return pf;
      default: return '0;
    endcase
  endfunction

  uvec_t    va, vb, vc, vo;
  vma_ctl_t vctl;
  logic     vo_valid;

  always_comb begin
    va = opsel(cw.sel_va, regs, w_in, n_in, nw_in, pre_s, pre_f);
    vb = opsel(cw.sel_vb, regs, w_in, n_in, nw_in, pre_s, pre_f);
    vc = opsel(cw.sel_vc, regs, w_in, n_in, nw_in, pre_s, pre_f);
    vctl.vec     = cw.vec;
    vctl.enu     = cw.enu;
    vctl.ops_a   = cw.ops_a;
    vctl.ops_b   = cw.ops_b;
    vctl.opc     = cw.opc;
    vctl.qin_sel = cw.qin_sel;
    vctl.enr     = cw.enr;
    vctl.spe     = cw.spe;
  end

  vma u_vma (
    .clk(clk), .rst_n(rst_n), .ctl(vctl), .va(va), .vb(vb), .vc(vc),
    .qf_w(qf_w), .qf_n(qf_n), .qf_nw(qf_nw), .quire_out(quire_out),
    .vout(vo), .vout_valid(vo_valid)
  );

  assign vout_e = '{valid: vo_valid, last: 1'b0, vec: vo};
  assign vout   = vout_e;
endmodule
