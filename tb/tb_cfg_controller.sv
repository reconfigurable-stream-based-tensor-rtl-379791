// tb_cfg_controller: loads a program of {control word, count} tuples, starts
// the sequencer and checks the control word in every cycle: each word must be
// applied for exactly its count of cycles starting the cycle after start,
// words must follow without gaps, and the controller must end (zero word,
// busy low) at the tuple with count 0. Then it checks that a program filling
// the whole memory also ends.
module tb_cfg_controller;
  import rtu_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cfg_we, start, busy;
  logic [3:0] cfg_addr;
  logic [95:0] cfg_wdata;
  logic [63:0] ctrl;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cfg_controller #(.CFG_DEPTH(16)) dut (.clk(clk), .rst_n(rst_n), .cfg_we(cfg_we), .cfg_addr(cfg_addr),
                                      .cfg_wdata(cfg_wdata), .start(start), .ctrl(ctrl), .busy(busy));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] words [16];
  int          cnts  [16];

  task automatic run_prog(input int n);
    @(negedge clk);
    for (int i = 0; i < 16; i++) begin
      cfg_we = 1; cfg_addr = 4'(i);
      cfg_wdata = {words[i], 32'(i < n ? cnts[i] : 0)};
      @(negedge clk);
    end
    cfg_we = 0;
    start = 1;
    @(negedge clk);
    start = 0;
    for (int i = 0; i < n; i++) begin
      for (int k = 0; k < cnts[i]; k++) begin
        checks++;
        if (ctrl != words[i] || !busy) begin
          failures++;
          $display("word %0d cycle %0d: got %h", i, k, ctrl);
        end
        @(negedge clk);
      end
    end
    checks++;
    if (ctrl != '0 || busy) begin
      failures++;
      $display("did not stop");
    end
  endtask

  initial begin
    cfg_we = 0; start = 0; cfg_addr = '0; cfg_wdata = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 16; i++) begin
      words[i] = {$urandom, $urandom};
      cnts[i]  = 1 + $urandom_range(5);
    end
    run_prog(5);
    run_prog(1);
    run_prog(16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
