// vma: variable-precision Vector Multiply-Accumulate unit.
//
// A 4-stage pipeline over decoded posit vectors (1x64, 2x32, 4x16, 8x8 lanes):
//   M   - sign XOR, exponent add, Booth fraction product (vma_mul); the
//         product, Vc and the control fields are registered when ctl.enu is 1.
//   Q   - quire arithmetic (vma_quire) on the registered product, Vc, a
//         forwarded quire from the west, north or north-west PE (ctl.qin_sel),
//         the quire register or the splitter halves (quire_splitter); the
//         result is written to the quire register one cycle after enu.
//   EF1, EF2 - extraction back to sign/exponent/fraction (vma_extract), for
//         quire results whose control word had ctl.enr set.
// Operands issued with enu at cycle t update the quire at the end of cycle
// t+1 and appear on vout (vout_valid high) at cycle t+4. One operation can be
// issued per cycle, so back-to-back accumulation into the quire register
// works without stalls. The quire register is driven out on quire_out for
// VMA fusing in neighbouring PEs.
// Stage split and operand sources follow the document; carrying the control
// fields down the pipeline with the operands is this design's choice.
module vma
  import rtu_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  vma_ctl_t      ctl,
  input  uvec_t         va,
  input  uvec_t         vb,
  input  uvec_t         vc,
  input  logic [QW-1:0] qf_w,
  input  logic [QW-1:0] qf_n,
  input  logic [QW-1:0] qf_nw,
  output logic [QW-1:0] quire_out,
  output uvec_t         vout,
  output logic          vout_valid
);
  // ---------------- M stage ----------------
  logic [7:0]   sign_p;
  logic [63:0]  exp_p;
  logic [127:0] s_p, c_p;

  vma_mul u_mul (.mode(ctl.vec), .va(va), .vb(vb), .sign_p(sign_p), .exp_p(exp_p),
                 .s_p(s_p), .c_p(c_p));

  logic         m_vld;
  vma_ctl_t     m_ctl;
  logic [7:0]   m_sign;
  logic [63:0]  m_exp;
  logic [127:0] m_s, m_c;
  uvec_t        m_vc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_vld  <= 1'b0;
      m_ctl  <= '0;
      m_sign <= '0;
      m_exp  <= '0;
      m_s    <= '0;
      m_c    <= '0;
      m_vc   <= '0;
    end else begin
      m_vld <= ctl.enu;
      if (ctl.enu) begin
        m_ctl  <= ctl;
        m_sign <= sign_p;
        m_exp  <= exp_p;
        m_s    <= s_p;
        m_c    <= c_p;
        m_vc   <= vc;
      end
    end
  end

  // ---------------- Q stage ----------------
  logic [QW-1:0] quire_q, quire_next, qfwd, split_lo, split_hi;

  always_comb begin
    unique case (m_ctl.qin_sel)
      2'd1:    qfwd = qf_n;
      2'd2:    qfwd = qf_nw;
      default: qfwd = qf_w;
    endcase
  end

  quire_splitter u_split (.spe(m_ctl.spe), .quire(quire_q), .lo(split_lo), .hi(split_hi));

  vma_quire u_q (
    .mode(m_ctl.vec), .sign_p(m_sign), .exp_p(m_exp), .s_p(m_s), .c_p(m_c), .vc(m_vc),
    .ops_a(m_ctl.ops_a), .ops_b(m_ctl.ops_b), .opc(m_ctl.opc),
    .quire_fwd(qfwd), .quire_reg(quire_q), .split_lo(split_lo), .split_hi(split_hi),
    .quire_next(quire_next)
  );

  logic   q_vld;
  vmode_e q_mode;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      quire_q <= '0;
      q_vld   <= 1'b0;
      q_mode  <= M_P64;
    end else begin
      q_vld <= m_vld && m_ctl.enr;
      if (m_vld) begin
        quire_q <= quire_next;
        q_mode  <= m_ctl.vec;
      end
    end
  end

  assign quire_out = quire_q;

  // ---------------- EF stages ----------------
  vma_extract u_ef (.clk(clk), .rst_n(rst_n), .valid_in(q_vld), .mode(q_mode), .quire(quire_q),
                    .valid_out(vout_valid), .vout(vout));
endmodule
