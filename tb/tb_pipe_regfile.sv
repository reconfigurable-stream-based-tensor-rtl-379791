// tb_pipe_regfile: drives random entries on all sources and random masks and
// output selects, keeps a model of the eight registers (fixed source map,
// load only with mask set and valid source) and compares every register and
// forwarded output each cycle.
module tb_pipe_regfile;
  import rtu_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [7:0] in_mask;
  rentry_t w_in [3];
  rentry_t n_in, nw_in, vout_in;
  logic [8:0] sel_e;
  logic [2:0] sel_s, sel_se;
  rentry_t regs [8];
  rentry_t e_out [3];
  rentry_t s_out, se_out;
  rentry_t model [8];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pipe_regfile dut (.clk(clk), .rst_n(rst_n), .in_mask(in_mask), .w_in(w_in), .n_in(n_in),
                    .nw_in(nw_in), .vout_in(vout_in), .sel_e(sel_e), .sel_s(sel_s), .sel_se(sel_se),
                    .regs(regs), .e_out(e_out), .s_out(s_out), .se_out(se_out));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic rentry_t rnd();
    rentry_t r;
    r = rentry_t'({$urandom, $urandom, $urandom, $urandom});
    return r;
  endfunction

  initial begin
    rentry_t src [8];
    for (int j = 0; j < 8; j++) model[j] = '0;
    in_mask = '0; sel_e = '0; sel_s = '0; sel_se = '0;
    for (int k = 0; k < 3; k++) w_in[k] = '0;
    n_in = '0; nw_in = '0; vout_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      for (int k = 0; k < 3; k++) w_in[k] = rnd();
      n_in = rnd(); nw_in = rnd(); vout_in = rnd();
      in_mask = 8'($urandom);
      sel_e = 9'($urandom); sel_s = 3'($urandom); sel_se = 3'($urandom);
      #1;
      for (int k = 0; k < 3; k++) begin
        checks++;
        if (e_out[k] != model[sel_e[3*k +: 3]]) failures++;
      end
      checks++;
      if (s_out != model[sel_s] || se_out != model[sel_se]) failures++;
      src = '{w_in[0], w_in[1], w_in[2], n_in, nw_in, vout_in, vout_in, vout_in};
      @(posedge clk);
      for (int j = 0; j < 8; j++) if (in_mask[j] && src[j].valid) model[j] = src[j];
      #1;
      for (int j = 0; j < 8; j++) begin
        checks++;
        if (regs[j] != model[j]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
