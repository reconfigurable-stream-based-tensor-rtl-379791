// tb_vma_extract: checks the two EF stages. Quire lanes are built here from a
// random sign, scale and a mantissa four bits longer than the fraction (so
// the sticky OR is exercised); zero lanes and scales beyond maxpos are mixed
// in. Expected sign, exponent and fraction follow from the construction. One
// quire per cycle is fed and each result must appear exactly two cycles later.
module tb_vma_extract;
  import rtu_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic valid_in, valid_out;
  vmode_e mode;
  logic [2047:0] quire;
  uvec_t vout;
  int checks = 0, failures = 0, cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  vma_extract dut (.clk(clk), .rst_n(rst_n), .valid_in(valid_in), .mode(mode), .quire(quire),
                   .valid_out(valid_out), .vout(vout));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  uvec_t exp_q [$];
  int    mode_q [$];
  int    cyc_q [$];

  // scoreboard
  always @(negedge clk) begin
    if (rst_n && valid_out) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
      end else begin
        uvec_t e;
        int c;
        e = exp_q.pop_front();
        void'(mode_q.pop_front());
        c = cyc_q.pop_front();
        if (vout != e) begin
          failures++;
          if (failures < 10) $display("mismatch got %h exp %h", vout, e);
        end
        checks++;
        if (cycle - c != 2) begin
          failures++;
          $display("latency %0d", cycle - c);
        end
      end
    end
  end

  initial begin
    uvec_t e;
    logic [2047:0] lane, q;
    logic [63:0] man, f;
    int L, qb, bq, fw, mx, sc, stride, kind;
    logic s;
    valid_in = 0; mode = M_P64; quire = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 160; t++) begin
      @(negedge clk);
      mode   = vmode_e'(t % 4);
      L      = lanes(mode);
      qb     = qbits(mode);
      bq     = qbias(mode);
      fw     = fw_of(int'(mode));
      mx     = maxscale(mode);
      stride = 2048 / L;
      q = '0;
      e = '0;
      for (int l = 0; l < L; l++) begin
        kind = $urandom_range(9);
        s    = 1'($urandom);
        if (kind == 0) continue;                      // zero lane
        man = {$urandom, $urandom} & ((64'd1 << (fw + 4)) - 1);
        man[fw + 3] = 1'b1;
        if (kind == 1) sc = mx + 1 + $urandom_range(qb - 3 - bq - mx - 1);  // beyond maxpos
        else           sc = int'($urandom_range(2 * mx)) - mx;
        if (sc + bq - (fw + 3) < 0) sc = fw + 3 - bq;   // keep the mantissa inside the quire
        lane = 2048'(man) << (sc + bq - (fw + 3));
        if (s) lane = -lane;
        if (qb < 2048) lane = lane & ((2048'd1 << qb) - 1);
        q = q | (lane << (l * stride));
        if (sc > mx) begin
          f  = 64'd1 << (fw - 1);
          sc = mx;
        end else begin
          f = (man >> 4) | 64'(man[3:0] != 0);
        end
        e = uvec_t'(make_lane(e, int'(mode), l, s, sc, f));
      end
      quire    = q;
      valid_in = 1;
      exp_q.push_back(e);
      mode_q.push_back(int'(mode));
      cyc_q.push_back(cycle);
    end
    @(negedge clk);
    valid_in = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
