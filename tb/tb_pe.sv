// tb_pe: programs one PE through its configuration port and runs it:
// a 4-term 2x32-bit multiply-accumulate on its west inputs (issued on
// consecutive cycles by three control words), capture of the VMA result in
// register R5 and its forwarding south, capture of a west input in R0 and its
// forwarding east, and a PRE-scaled product (W1 times the scaling factor of
// W0). Results are compared with real-number references, and the output
// cycle of each VMA result with the 4-cycle latency.
module tb_pe;
  import rtu_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cfg_we, start, busy;
  logic [3:0] cfg_addr;
  logic [95:0] cfg_wdata;
  rentry_t w_in [3];
  rentry_t n_in, nw_in, s_out, se_out, vout;
  rentry_t e_out [3];
  logic [2047:0] qo;
  int checks = 0, failures = 0, cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  pe dut (.clk(clk), .rst_n(rst_n), .cfg_we(cfg_we), .cfg_addr(cfg_addr), .cfg_wdata(cfg_wdata),
          .start(start), .busy(busy), .w_in(w_in), .n_in(n_in), .nw_in(nw_in), .e_out(e_out),
          .s_out(s_out), .se_out(se_out), .qf_w('0), .qf_n('0), .qf_nw('0), .quire_out(qo),
          .vout(vout));

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [95:0] tup(input ctrl_word_t c, input int n);
    return {64'(c), 32'(n)};
  endfunction

  task automatic close(input real got, input real expv, input string what);
    real tol;
    tol = (expv < 0 ? -expv : expv) * pow2(-26);
    checks++;
    if ((got - expv) > tol || (expv - got) > tol) begin
      failures++;
      $display("%s got %g exp %g", what, got, expv);
    end
  endtask

  uvec_t ins0 [16];
  uvec_t ins1 [16];
  int    vcyc [$];
  uvec_t vval [$];

  always @(negedge clk) if (rst_n && vout.valid) begin
    vcyc.push_back(cycle);
    vval.push_back(vout.vec);
  end

  initial begin
    ctrl_word_t c [6];
    logic [95:0] prog [16];
    int c0;
    real acc [2];
    uvec_t s_snap;
    for (int i = 0; i < 6; i++) c[i] = '0;
    c[0].vec = M_P32; c[0].enu = 1; c[0].sel_va = IS_W0; c[0].sel_vb = IS_W1; c[0].sel_vc = IS_ZERO;
    c[0].ops_a = QS_PROD; c[0].ops_b = QS_ZERO; c[0].opc = QO_ADD;
    c[1] = c[0]; c[1].ops_b = QS_REG;
    c[2] = c[1]; c[2].enr = 1; c[2].rin_mask = 8'b0000_0001; c[2].fwd_e = 9'd0;
    c[3].rin_mask = 8'b0010_0000; c[3].fwd_s = 3'd5;
    c[4].vec = M_P32; c[4].pre = 1; c[4].enu = 1; c[4].enr = 1; c[4].sel_va = IS_PREF;
    c[4].sel_vb = IS_W1; c[4].sel_vc = IS_ZERO; c[4].ops_a = QS_PROD; c[4].ops_b = QS_ZERO;
    c[4].fwd_s = 3'd5;
    c[5].fwd_s = 3'd5;
    for (int i = 0; i < 16; i++) prog[i] = '0;
    prog[0] = tup(c[0], 1); prog[1] = tup(c[1], 2); prog[2] = tup(c[2], 1);
    prog[3] = tup(c[3], 5); prog[4] = tup(c[4], 1); prog[5] = tup(c[5], 6);
    for (int i = 0; i < 16; i++) begin
      ins0[i] = uvec_t'(rand_vec(1, 20, 8));
      ins1[i] = uvec_t'(rand_vec(1, 20, 8));
    end
    cfg_we = 0; start = 0; cfg_addr = '0; cfg_wdata = '0;
    for (int k = 0; k < 3; k++) w_in[k] = '0;
    n_in = '0; nw_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 16; i++) begin
      cfg_we = 1; cfg_addr = 4'(i); cfg_wdata = prog[i];
      @(negedge clk);
    end
    cfg_we = 0;
    start = 1;
    @(negedge clk);
    start = 0;
    c0 = cycle;                       // first control word active in this cycle
    for (int i = 0; i < 16; i++) begin
      w_in[0] = '{valid: 1'b1, last: 1'b0, vec: ins0[i]};
      w_in[1] = '{valid: 1'b1, last: 1'b0, vec: ins1[i]};
      @(negedge clk);
      if (i == 7) s_snap = s_out.vec;
      if (i == 3) begin
        // R0 captured the W0 of cycle 3 (end of the third word)
        checks++;
        if (e_out[0].vec != ins0[3] || !e_out[0].valid) begin
          failures++;
          $display("east forward wrong");
        end
      end
    end
    while (busy) @(negedge clk);
    for (int l = 0; l < 2; l++) begin
      acc[l] = 0.0;
      for (int i = 0; i < 4; i++) acc[l] += lane_real(ins0[i], 1, l) * lane_real(ins1[i], 1, l);
    end
    checks++;
    if (vcyc.size() != 2) begin
      failures++;
      $display("expected 2 results, got %0d", vcyc.size());
    end else begin
      checks++;
      if (vcyc[0] - c0 != 3 + 4 || vcyc[1] - c0 != 9 + 4) begin
        failures++;
        $display("result cycles %0d %0d", vcyc[0] - c0, vcyc[1] - c0);
      end
      for (int l = 0; l < 2; l++) close(lane_real(vval[0], 1, l), acc[l], "mac");
      for (int l = 0; l < 2; l++)
        close(lane_real(vval[1], 1, l),
              lane_real(ins1[9], 1, l) * pow2(-(get_exp(ins0[9], M_P32, l) + 1)), "pre");
      checks++;
      if (s_snap != vval[0]) begin
        failures++;
        $display("south forward wrong");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
