// tb_pattern_gen: loads a linear, a tiled (2D) and a second linear
// descriptor, runs the generator once free-running (one address per cycle)
// and once with a random step, and compares the address sequence, bank, mode
// and "last" flag with the affine formula offset + i*x_stride + j*y_stride
// evaluated here. Also checks that the free-running pattern takes exactly one
// cycle per element.
module tb_pattern_gen;
  import rtu_pkg::*;
  logic clk = 0, rst_n = 0;
  logic desc_we, start, step, valid, last;
  logic [1:0] desc_addr, bank;
  desc_t desc_wdata;
  logic [9:0] addr;
  vmode_e mode;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pattern_gen #(.NDESC(4)) dut (.clk(clk), .rst_n(rst_n), .desc_we(desc_we), .desc_addr(desc_addr),
                               .desc_wdata(desc_wdata), .start(start), .step(step), .valid(valid),
                               .addr(addr), .bank(bank), .mode(mode), .last(last));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  desc_t d [4];
  int ea [$];
  int eb [$];

  initial begin
    int n, cyc;
    d[0] = '{bank: 2'd1, mode: M_P32, offset: 10'd5,   x_size: 10'd4, x_stride: 10'd1, y_size: 10'd1, y_stride: 10'd0};
    d[1] = '{bank: 2'd2, mode: M_P8,  offset: 10'd100, x_size: 10'd3, x_stride: 10'd2, y_size: 10'd3, y_stride: 10'd32};
    d[2] = '{bank: 2'd0, mode: M_P16, offset: 10'd900, x_size: 10'd5, x_stride: 10'd3, y_size: 10'd1, y_stride: 10'd0};
    d[3] = '0;
    for (int k = 0; k < 3; k++)
      for (int j = 0; j < d[k].y_size; j++)
        for (int i = 0; i < d[k].x_size; i++) begin
          ea.push_back(int'(d[k].offset) + i * int'(d[k].x_stride) + j * int'(d[k].y_stride));
          eb.push_back(k);
        end
    desc_we = 0; start = 0; step = 0; desc_addr = '0; desc_wdata = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int k = 0; k < 4; k++) begin
      desc_we = 1; desc_addr = 2'(k); desc_wdata = d[k];
      @(negedge clk);
    end
    desc_we = 0;
    for (int pass = 0; pass < 2; pass++) begin
      start = 1;
      @(negedge clk);
      start = 0;
      n = 0;
      cyc = 0;
      while (valid) begin
        step = (pass == 0) ? 1'b1 : 1'($urandom);
        #1;
        if (step) begin
          checks++;
          if (int'(addr) != ea[n] || bank != d[eb[n]].bank || mode != d[eb[n]].mode ||
              last != (n == ea.size() - 1)) begin
            failures++;
            $display("elem %0d addr %0d exp %0d", n, addr, ea[n]);
          end
          n++;
        end
        @(negedge clk);
        cyc++;
      end
      checks++;
      if (n != ea.size()) failures++;
      if (pass == 0) begin
        checks++;
        if (cyc != ea.size()) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
