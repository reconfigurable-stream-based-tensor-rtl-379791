// tb_vma: runs whole VMA operations in every precision and compares the
// decoded outputs with real-number references computed here:
//   - a 6-term multiply-accumulate into the quire register (back to back),
//   - the vector-to-scalar reduction with the quire splitter,
//   - Va*Vb - Vc,
//   - Va*Vb + a quire forwarded from a neighbour (VMA fusing).
// The result of an operation issued in cycle t must be valid in cycle t+4.
module tb_vma;
  import rtu_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  vma_ctl_t ctl;
  uvec_t va, vb, vc, vout;
  logic [2047:0] qf_w, qf_n, qf_nw, qout;
  logic vout_valid;
  int checks = 0, failures = 0, cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  vma dut (.clk(clk), .rst_n(rst_n), .ctl(ctl), .va(va), .vb(vb), .vc(vc), .qf_w(qf_w),
           .qf_n(qf_n), .qf_nw(qf_nw), .quire_out(qout), .vout(vout), .vout_valid(vout_valid));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic close(input real got, input real expv, input int m, input string what);
    real tol;
    tol = (expv < 0 ? -expv : expv) * pow2(-(fw_of(m) - 2));
    checks++;
    if ((got - expv) > tol || (expv - got) > tol) begin
      failures++;
      $display("%s m=%0d got %g exp %g", what, m, got, expv);
    end
  endtask

  task automatic issue(input vmode_e m, input qsel_e a, input qsel_e b, input qop_e o,
                       input logic enr, input logic [1:0] spe, input logic [1:0] qs);
    ctl.vec = m; ctl.enu = 1'b1; ctl.ops_a = a; ctl.ops_b = b; ctl.opc = o;
    ctl.enr = enr; ctl.spe = spe; ctl.qin_sel = qs;
  endtask

  // wait for the result of an op issued at cycle c
  task automatic wait_out(input int c);
    @(negedge clk);
    ctl = '0;
    while (!vout_valid) @(negedge clk);
    checks++;
    if (cycle - c != 4) begin
      failures++;
      $display("latency %0d", cycle - c);
    end
  endtask

  initial begin
    real acc [8], tot;
    int L, c0;
    uvec_t a, b, cc;
    ctl = '0; va = '0; vb = '0; vc = '0; qf_w = '0; qf_n = '0; qf_nw = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m < 4; m++) begin
      L = 1 << m;
      // ---- multiply-accumulate ----
      for (int l = 0; l < 8; l++) acc[l] = 0.0;
      for (int i = 0; i < 6; i++) begin
        @(negedge clk);
        a = uvec_t'(rand_vec(m, 2, 5));
        b = uvec_t'(rand_vec(m, 2, 5));
        va = a; vb = b;
        for (int l = 0; l < L; l++) acc[l] += lane_real(a, m, l) * lane_real(b, m, l);
        issue(vmode_e'(m), QS_PROD, (i == 0) ? QS_ZERO : QS_REG, QO_ADD, i == 5, 2'd0, 2'd0);
        c0 = cycle;
      end
      wait_out(c0);
      for (int l = 0; l < L; l++) close(lane_real(vout, m, l), acc[l], m, "mac");
      // ---- reduction to a scalar ----
      tot = 0.0;
      for (int l = 0; l < L; l++) tot += acc[l];
      if (L > 1) begin
        for (int s = 1; (1 << s) <= L; s++) begin
          @(negedge clk);
          issue(vmode_e'(m), QS_SLO, QS_SHI, QO_ADD, (1 << s) == L, 2'(s), 2'd0);
          c0 = cycle;
        end
        wait_out(c0);
        close(lane_real(vout, m, 0), tot, m, "reduce");
        for (int l = 1; l < L; l++) close(lane_real(vout, m, l), 0.0, m, "reduce-zero");
      end
      // ---- Va*Vb - Vc ----
      @(negedge clk);
      a = uvec_t'(rand_vec(m, 3, 6)); b = uvec_t'(rand_vec(m, 3, 6)); cc = uvec_t'(rand_vec(m, 3, 6));
      va = a; vb = b; vc = cc;
      issue(vmode_e'(m), QS_PROD, QS_VC, QO_SUB, 1'b1, 2'd0, 2'd0);
      c0 = cycle;
      wait_out(c0);
      for (int l = 0; l < L; l++)
        close(lane_real(vout, m, l), lane_real(a, m, l) * lane_real(b, m, l) - lane_real(cc, m, l), m, "fms");
      // ---- fused: Va*Vb + forwarded quire (1.0 in every lane, from north) ----
      @(negedge clk);
      qf_n = '0;
      for (int l = 0; l < L; l++) qf_n[l * (2048 / L) + qbias(vmode_e'(m))] = 1'b1;
      a = uvec_t'(rand_vec(m, 2, 6)); b = uvec_t'(rand_vec(m, 2, 6));
      va = a; vb = b;
      issue(vmode_e'(m), QS_PROD, QS_FWD, QO_ADD, 1'b1, 2'd0, 2'd1);
      c0 = cycle;
      wait_out(c0);
      for (int l = 0; l < L; l++)
        close(lane_real(vout, m, l), lane_real(a, m, l) * lane_real(b, m, l) + 1.0, m, "fused");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
