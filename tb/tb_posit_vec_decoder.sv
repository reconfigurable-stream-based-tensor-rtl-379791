// tb_posit_vec_decoder: decodes every 8-bit posit in every lane position and
// random 16/32/64-bit posit vectors (with zero, NaR and extreme patterns
// mixed in) and compares each lane's sign, scale and fraction with a
// bit-walking reference decoder.
module tb_posit_vec_decoder;
  import rtu_pkg::*;
  import tb_ref_pkg::*;
  vmode_e mode;
  logic [63:0] din;
  uvec_t dout, e;
  int checks = 0, failures = 0;

  posit_vec_decoder dut (.mode(mode), .din(din), .dout(dout));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_word(input int m, input logic [63:0] w);
    logic s;
    int sc, n;
    logic [63:0] f;
    mode = vmode_e'(m);
    din  = w;
    #1;
    n = n_of(m);
    e = '0;
    for (int l = 0; l < (1 << m); l++) begin
      posit_fields(w >> (l * n), m, s, sc, f);
      e = uvec_t'(make_lane(e, m, l, s, sc, f));
    end
    checks++;
    if (dout != e) begin
      failures++;
      if (failures < 10) $display("m=%0d word %h got %h exp %h", m, w, dout, e);
    end
  endtask

  initial begin
    logic [63:0] w;
    for (int v = 0; v < 256; v++) check_word(3, {8{8'(v)}});
    for (int m = 0; m < 4; m++) begin
      for (int t = 0; t < 300; t++) begin
        w = {$urandom, $urandom};
        if (t % 17 == 0) w = '0;
        if (t % 17 == 1) w = 64'h8000_0000_0000_0000 >> 0;
        if (t % 17 == 2) w = 64'h7fff_ffff_ffff_ffff;
        if (t % 17 == 3) w = 64'h0000_0000_0000_0001;
        if (t % 5 == 4) w = w >> $urandom_range(60);   // long regimes
        check_word(m, w);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
