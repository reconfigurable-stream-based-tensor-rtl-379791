// tb_quire_splitter: checks that each split level keeps the low active lanes
// and moves the next group of lanes down onto them, on random quires.
module tb_quire_splitter;
  import rtu_pkg::*;
  logic [1:0] spe;
  logic [2047:0] q, lo, hi, elo, ehi;
  int checks = 0, failures = 0;

  quire_splitter dut (.spe(spe), .quire(q), .lo(lo), .hi(hi));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int h;
    for (int t = 0; t < 40; t++) begin
      for (int i = 0; i < 64; i++) q[32*i +: 32] = $urandom;
      spe = 2'(t % 4);
      #1;
      elo = '0;
      ehi = '0;
      if (spe != 0) begin
        h = 2048 >> spe;
        for (int i = 0; i < h; i++) begin
          elo[i] = q[i];
          ehi[i] = q[i + h];
        end
      end
      checks++;
      if (lo != elo) failures++;
      checks++;
      if (hi != ehi) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
