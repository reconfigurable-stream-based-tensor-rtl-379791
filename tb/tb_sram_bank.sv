// tb_sram_bank: random reads and writes against a model; read data must
// appear one cycle after the read and hold otherwise; a same-cycle read and
// write of one address returns the old word.
module tb_sram_bank;
  logic clk = 0;
  logic re, we;
  logic [9:0] raddr, waddr;
  logic [63:0] rdata, wdata;
  logic [63:0] model [1024];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sram_bank dut (.clk(clk), .re(re), .raddr(raddr), .rdata(rdata), .we(we), .waddr(waddr), .wdata(wdata));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] expd;
    re = 0; we = 0; raddr = '0; waddr = '0; wdata = '0;
    @(negedge clk);
    for (int i = 0; i < 1024; i++) begin
      we = 1; waddr = 10'(i); wdata = {$urandom, $urandom}; model[i] = wdata;
      @(negedge clk);
    end
    we = 0; re = 1; raddr = '0; expd = model[0];
    @(negedge clk);
    for (int t = 0; t < 3000; t++) begin
      re = 1'($urandom); we = 1'($urandom);
      raddr = 10'($urandom_range(63)); waddr = 10'($urandom_range(63));
      wdata = {$urandom, $urandom};
      if (re) expd = model[raddr];
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1;
      if (re) begin
        checks++;
        if (rdata != expd) failures++;
      end else begin
        checks++;
        if (rdata != expd) failures++;   // holds the last read
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
