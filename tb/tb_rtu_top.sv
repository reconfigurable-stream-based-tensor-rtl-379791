// tb_rtu_top: end-to-end run of the 4x4 RTU at its default size.
//
// Workload: a vector dot product spread over the array (the reduction-tree
// mapping): each row streams 8 words of a and b (4x16-bit posits) from banks
// A and B into its first PE, which multiplies and accumulates them in its
// quire, reduces the 4 lanes to one with two quire-split passes, and the
// first-column PEs then add their quires down the column through the quire
// fusing links. The bottom-left PE extracts the result, keeps it in R5 and
// the register grid carries it east through three PEs into row 3's storage
// unit, which encodes it and writes it to bank C. Meanwhile, in other PEs:
// PE(0,1) applies the PRE scaling to row 0's forwarded streams, and PE(1,1)
// squares a third stream of 8x8-bit posits forwarded from PE(1,0).
// Checks: stored dot product against a real-number reference; each PRE and
// square result; the cycle at which the result is stored. Mechanism counters
// (stream elements, multiply-accumulates, quire splits, quire fusing,
// register forwarding, reconfigurations, PRE, two precisions at once,
// storage writes) must all be non-zero.
module tb_rtu_top;
  import rtu_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 8;

  logic clk = 0, rst_n = 0;
  logic start, busy, cfg_we, desc_we, host_we, host_re;
  logic [3:0] cfg_pe, cfg_addr;
  logic [95:0] cfg_wdata;
  logic [1:0] desc_row, desc_addr, host_row, host_bank;
  logic [2:0] desc_unit;
  desc_t desc_wdata;
  logic [9:0] host_addr;
  logic [63:0] host_wdata, host_rdata;
  int checks = 0, failures = 0, cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  rtu_top dut (
    .clk(clk), .rst_n(rst_n), .start(start), .busy(busy),
    .cfg_we(cfg_we), .cfg_pe(cfg_pe), .cfg_addr(cfg_addr), .cfg_wdata(cfg_wdata),
    .desc_we(desc_we), .desc_row(desc_row), .desc_unit(desc_unit), .desc_addr(desc_addr),
    .desc_wdata(desc_wdata), .host_we(host_we), .host_re(host_re), .host_row(host_row),
    .host_bank(host_bank), .host_addr(host_addr), .host_wdata(host_wdata), .host_rdata(host_rdata)
  );

  initial begin
    repeat (4000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_stream = 0, n_mac = 0, n_split = 0, n_fuse = 0, n_fwd = 0, n_reconf = 0;
  int n_pre = 0, n_multiprec = 0, n_store = 0;
  int start_cyc = 0, store_cyc = 0;
  logic [15:0] is_p8, is_p16;

  for (genvar r = 0; r < 4; r++) begin : g_mr
    always @(negedge clk) if (rst_n) begin
      for (int k = 0; k < 3; k++) if (dut.g_row[r].u_strm.s_out[k].valid) n_stream++;
      if (dut.g_row[r].u_strm.t_valid[1] && dut.g_row[r].u_strm.st_in[1].valid) begin
        n_store++;
        store_cyc = cycle;
      end
    end
    for (genvar c = 0; c < 4; c++) begin : g_mc
      logic [63:0] prev;
      always @(negedge clk) if (rst_n) begin
        ctrl_word_t w;
        w = dut.g_row[r].g_col[c].u_pe.cw;
        if (w.enu && w.ops_b == QS_REG && w.ops_a == QS_PROD) n_mac++;
        if (w.enu && w.spe != 0) n_split++;
        if (w.enu && (w.ops_a == QS_FWD || w.ops_b == QS_FWD)) n_fuse++;
        if (w.enu && w.pre) n_pre++;
        if (dut.g_row[r].g_col[c].u_pe.busy && 64'(w) != prev) n_reconf++;
        prev = 64'(w);
        is_p8[r*4+c]  = w.enu && w.vec == M_P8;
        is_p16[r*4+c] = w.enu && w.vec == M_P16;
        if (c > 0 && dut.g_row[r].g_col[c].u_pe.w_in[0].valid && dut.g_row[r].g_col[c].u_pe.cw.rin_mask[0])
          n_fwd++;
      end
    end
  end
  always @(negedge clk) if (rst_n && (|is_p8) && (|is_p16)) n_multiprec++;

  // PRE results of PE(0,1) and squares of PE(1,1)
  uvec_t pre_out [$];
  uvec_t sq_out [$];
  always @(negedge clk) if (rst_n) begin
    if (dut.g_row[0].g_col[1].u_pe.vout.valid) pre_out.push_back(dut.g_row[0].g_col[1].u_pe.vout.vec);
    if (dut.g_row[1].g_col[1].u_pe.vout.valid) sq_out.push_back(dut.g_row[1].g_col[1].u_pe.vout.vec);
  end

  // ---------------- helpers ----------------
  function automatic logic [95:0] tup(input ctrl_word_t w, input int n);
    return {64'(w), 32'(n)};
  endfunction

  // random posit vector: each lane +-(1 + k/8) * 2^e, e in [-2,2]
  function automatic logic [63:0] rand_word(input int m);
    logic [63:0] w;
    logic [103:0] u;
    logic [63:0] f;
    int fw;
    fw = fw_of(m);
    u  = '0;
    for (int l = 0; l < (1 << m); l++) begin
      f = (64'd8 + 64'($urandom_range(7))) << (fw - 4);
      u = make_lane(u, m, l, 1'($urandom), int'($urandom_range(4)) - 2, f);
    end
    w = enc_ref(u, m);
    return w;
  endfunction

  // pack a lane-exact unified vector into posits (values chosen exactly representable)
  function automatic logic [63:0] enc_ref(input logic [103:0] u, input int m);
    logic [63:0] w;
    logic [63:0] best;
    real v, d, bd;
    int n;
    n = n_of(m);
    w = '0;
    for (int l = 0; l < (1 << m); l++) begin
      v  = lane_real(u, m, l);
      bd = 1.0e300;
      best = '0;
      // search by value: only used for 8/16-bit lanes with few fraction bits
      for (int p = 1; p < (1 << n); p++) begin
        d = posit_real(64'(p), m) - v;
        if (d < 0) d = -d;
        if (d < bd) begin bd = d; best = 64'(p); end
        if (bd == 0.0) break;
      end
      w = w | (best << (l * n));
    end
    return w;
  endfunction

  task automatic cfg(input int pe, input int a, input logic [95:0] d);
    cfg_we = 1; cfg_pe = 4'(pe); cfg_addr = 4'(a); cfg_wdata = d;
    @(negedge clk);
    cfg_we = 0;
  endtask

  task automatic dsc(input int r, input int u, input int a, input desc_t d);
    desc_we = 1; desc_row = 2'(r); desc_unit = 3'(u); desc_addr = 2'(a); desc_wdata = d;
    @(negedge clk);
    desc_we = 0;
  endtask

  task automatic hw(input int r, input int b, input int a, input logic [63:0] d);
    host_we = 1; host_row = 2'(r); host_bank = 2'(b); host_addr = 10'(a); host_wdata = d;
    @(negedge clk);
    host_we = 0;
  endtask

  // ---------------- test ----------------
  logic [63:0] aw [4][N];
  logic [63:0] bw [4][N];
  logic [63:0] cw8 [N];

  initial begin
    ctrl_word_t idle, mac0, mac1, sp1, sp2, fuse, cap, fwd, pre, sq;
    int a;
    real dot, v, tol;
    logic [63:0] res;
    start = 0; cfg_we = 0; desc_we = 0; host_we = 0; host_re = 0;
    cfg_pe = '0; cfg_addr = '0; cfg_wdata = '0; desc_row = '0; desc_addr = '0; desc_unit = '0;
    desc_wdata = '0; host_row = '0; host_bank = '0; host_addr = '0; host_wdata = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);

    // data
    dot = 0.0;
    for (int r = 0; r < 4; r++)
      for (int i = 0; i < N; i++) begin
        aw[r][i] = rand_word(2);
        bw[r][i] = rand_word(2);
        for (int l = 0; l < 4; l++)
          dot += posit_real(aw[r][i] >> (16 * l), 2) * posit_real(bw[r][i] >> (16 * l), 2);
        hw(r, 0, i, aw[r][i]);
        hw(r, 1, i, bw[r][i]);
      end
    for (int i = 0; i < N; i++) begin
      cw8[i] = rand_word(3);
      hw(1, 2, i, cw8[i]);
    end

    // stream descriptors: A, B in every row; 8-bit stream C in row 1; result store in row 3
    for (int r = 0; r < 4; r++) begin
      dsc(r, 0, 0, '{bank: 2'd0, mode: M_P16, offset: 10'd0, x_size: 10'(N), x_stride: 10'd1, y_size: 10'd1, y_stride: 10'd0});
      dsc(r, 0, 1, '0);
      dsc(r, 1, 0, '{bank: 2'd1, mode: M_P16, offset: 10'd0, x_size: 10'(N), x_stride: 10'd1, y_size: 10'd1, y_stride: 10'd0});
      dsc(r, 1, 1, '0);
      dsc(r, 2, 0, (r == 1) ? '{bank: 2'd2, mode: M_P8, offset: 10'd0, x_size: 10'(N), x_stride: 10'd1, y_size: 10'd1, y_stride: 10'd0} : '0);
      dsc(r, 2, 1, '0);
      dsc(r, 3, 0, '0);
      dsc(r, 4, 0, (r == 3) ? '{bank: 2'd2, mode: M_P16, offset: 10'd500, x_size: 10'd1, x_stride: 10'd0, y_size: 10'd1, y_stride: 10'd0} : '0);
      dsc(r, 4, 1, '0);
    end

    // PE programs
    idle = '0;
    mac0 = '0; mac0.vec = M_P16; mac0.enu = 1; mac0.sel_va = IS_W0; mac0.sel_vb = IS_W1;
    mac0.sel_vc = IS_ZERO; mac0.ops_a = QS_PROD; mac0.ops_b = QS_ZERO; mac0.opc = QO_ADD;
    mac1 = mac0; mac1.ops_b = QS_REG;
    sp1  = '0; sp1.vec = M_P16; sp1.enu = 1; sp1.ops_a = QS_SLO; sp1.ops_b = QS_SHI; sp1.spe = 2'd1;
    sp2  = sp1; sp2.spe = 2'd2;
    fuse = '0; fuse.vec = M_P16; fuse.enu = 1; fuse.ops_a = QS_REG; fuse.ops_b = QS_FWD; fuse.qin_sel = 2'd1;
    cap  = '0; cap.rin_mask = 8'b0010_0000; cap.fwd_e = 9'd5;
    fwd  = '0; fwd.rin_mask = 8'b0000_0001; fwd.fwd_e = 9'd0;
    pre  = '0; pre.vec = M_P16; pre.pre = 1; pre.enu = 1; pre.enr = 1; pre.sel_va = IS_PREF;
    pre.sel_vb = IS_W1; pre.sel_vc = IS_ZERO; pre.ops_a = QS_PROD; pre.ops_b = QS_ZERO;
    sq   = '0; sq.vec = M_P8; sq.enu = 1; sq.enr = 1; sq.sel_va = IS_W0; sq.sel_vb = IS_W0;
    sq.sel_vc = IS_ZERO; sq.ops_a = QS_PROD; sq.ops_b = QS_ZERO;
    for (int r = 0; r < 4; r++) begin
      ctrl_word_t m0, m1;
      m0 = mac0; m1 = mac1;
      if (r == 0) begin   // forward a and b east to PE(0,1)
        m0.rin_mask = 8'b0000_0011; m0.fwd_e = {3'd2, 3'd1, 3'd0};
        m1.rin_mask = 8'b0000_0011; m1.fwd_e = {3'd2, 3'd1, 3'd0};
      end
      if (r == 1) begin   // forward the 8-bit stream east to PE(1,1)
        m0.rin_mask = 8'b0000_0100; m0.fwd_e = {3'd1, 3'd0, 3'd2};
        m1.rin_mask = 8'b0000_0100; m1.fwd_e = {3'd1, 3'd0, 3'd2};
      end
      a = 0;
      cfg(r * 4, a++, tup(idle, 2));
      cfg(r * 4, a++, tup(m0, 1));
      cfg(r * 4, a++, tup(m1, N - 1));
      cfg(r * 4, a++, tup(sp1, 1));
      cfg(r * 4, a++, tup(sp2, 1));
      if (r > 1) cfg(r * 4, a++, tup(idle, r - 1));
      if (r > 0) begin
        ctrl_word_t f;
        f = fuse;
        if (r == 3) f.enr = 1;
        cfg(r * 4, a++, tup(f, 1));
      end
      if (r == 3) cfg(r * 4, a++, tup(cap, 10));
      cfg(r * 4, a++, tup(idle, 0));
    end
    cfg(1, 0, tup(idle, 3)); cfg(1, 1, tup(pre, N)); cfg(1, 2, tup(idle, 0));
    cfg(5, 0, tup(idle, 3)); cfg(5, 1, tup(sq, N));  cfg(5, 2, tup(idle, 0));
    for (int c = 1; c < 4; c++) begin
      cfg(12 + c, 0, tup(fwd, 30));
      cfg(12 + c, 1, tup(idle, 0));
    end
    for (int p = 0; p < 16; p++)
      if (p != 0 && p != 4 && p != 8 && p != 12 && p != 1 && p != 5 && p < 13) cfg(p, 0, tup(idle, 0));

    // run
    start = 1;
    start_cyc = cycle;
    @(negedge clk);
    start = 0;
    while (busy) @(negedge clk);

    // dot product in bank C of row 3, lane 0; other lanes zero
    host_re = 1; host_row = 2'd3; host_bank = 2'd2; host_addr = 10'd500;
    @(negedge clk);
    host_re = 0;
    res = host_rdata;
    v   = posit_real(res, 2);
    tol = (dot < 0 ? -dot : dot) * pow2(-10) + pow2(-20);
    checks++;
    if (v - dot > tol || dot - v > tol || res[63:16] != '0) begin
      failures++;
      $display("dot product: got %g (%h) expected %g", v, res, dot);
    end
    // store cycle: last MAC issue at cycle 10, splits 11-12, fusing 13-15,
    // EF out at 19, R5 at 20, three hops east, storage write in cycle 23
    checks++;
    if (store_cyc - start_cyc != 23) begin
      failures++;
      $display("store cycle %0d", store_cyc - start_cyc);
    end
    // PRE results: b * 2^-(exp(a)+1)
    checks++;
    if (pre_out.size() != N) failures++;
    for (int i = 0; i < N && i < pre_out.size(); i++)
      for (int l = 0; l < 4; l++) begin
        real av, bv, sf;
        int e;
        av = posit_real(aw[0][i] >> (16 * l), 2);
        bv = posit_real(bw[0][i] >> (16 * l), 2);
        e  = 0;
        while ((av < 0 ? -av : av) >= pow2(e + 1)) e++;
        while ((av < 0 ? -av : av) < pow2(e)) e--;
        sf = pow2(-(e + 1));
        checks++;
        if (lane_real(pre_out[i], 2, l) != bv * sf) begin
          failures++;
          $display("pre %0d/%0d got %g exp %g", i, l, lane_real(pre_out[i], 2, l), bv * sf);
        end
      end
    // squares of the 8-bit stream
    checks++;
    if (sq_out.size() != N) failures++;
    for (int i = 0; i < N && i < sq_out.size(); i++)
      for (int l = 0; l < 8; l++) begin
        real cv;
        cv = posit_real(cw8[i] >> (8 * l), 3);
        checks++;
        if (lane_real(sq_out[i], 3, l) > cv * cv * 1.07 || lane_real(sq_out[i], 3, l) < cv * cv * 0.93) begin
          failures++;
          $display("square %0d/%0d got %g exp %g", i, l, lane_real(sq_out[i], 3, l), cv * cv);
        end
      end
    $display("mechanisms: stream=%0d mac=%0d split=%0d fuse=%0d fwd=%0d reconf=%0d pre=%0d multiprec=%0d store=%0d",
             n_stream, n_mac, n_split, n_fuse, n_fwd, n_reconf, n_pre, n_multiprec, n_store);
    if (n_stream == 0) failures++;
    if (n_mac == 0) failures++;
    if (n_split == 0) failures++;
    if (n_fuse == 0) failures++;
    if (n_fwd == 0) failures++;
    if (n_reconf == 0) failures++;
    if (n_pre == 0) failures++;
    if (n_multiprec == 0) failures++;
    if (n_store == 0) failures++;
    checks += 9;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
