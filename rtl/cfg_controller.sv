// cfg_controller: the PE's configuration controller (sequencer plus local
// configuration memory).
//
// The memory holds CFG_DEPTH tuples {64-bit control word, 32-bit count}
// written through the load port (cfg_we/cfg_addr/cfg_wdata, one tuple per
// cycle, only while idle). A start pulse makes the sequencer read tuple 0;
// from the next cycle its control word drives the PE for "count" cycles,
// timed by the 32-bit counter, after which the next tuple is read and applied
// without a gap. A tuple with count 0, or the end of the memory, ends the
// program; the controller then returns to idle and drives an all-zero
// control word (everything disabled).
// Counter width, control word width and the tuple format follow the
// document; the depth and the end-of-program rule are this design's.
module cfg_controller
  import rtu_pkg::*;
#(
  parameter int CFG_DEPTH = 16
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         cfg_we,
  input  logic [$clog2(CFG_DEPTH)-1:0] cfg_addr,
  input  logic [CTRL_W+CNT_W-1:0]      cfg_wdata,
  input  logic                         start,
  output logic [CTRL_W-1:0]            ctrl,
  output logic                         busy
);
  logic [CTRL_W+CNT_W-1:0]      mem [CFG_DEPTH];
  logic [$clog2(CFG_DEPTH)-1:0] pc;
  logic [CNT_W-1:0]             cnt;
  logic [CTRL_W-1:0]            cur_word;
  logic [CNT_W-1:0]             cur_cnt;
  logic                         run;

  always_ff @(posedge clk) begin
    if (cfg_we && !run) mem[cfg_addr] <= cfg_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run      <= 1'b0;
      pc       <= '0;
      cnt      <= '0;
      cur_word <= '0;
      cur_cnt  <= '0;
    end else if (!run) begin
      if (start && mem[0][CNT_W-1:0] != '0) begin
        run      <= 1'b1;
        pc       <= '0;
        cnt      <= '0;
        cur_word <= mem[0][CTRL_W+CNT_W-1:CNT_W];
        cur_cnt  <= mem[0][CNT_W-1:0];
      end
    end else if (cnt == cur_cnt - 1'b1) begin
      cnt <= '0;
      if (int'(pc) == CFG_DEPTH - 1 || mem[pc + 1'b1][CNT_W-1:0] == '0) begin
        run      <= 1'b0;
        cur_word <= '0;
      end else begin
        pc       <= pc + 1'b1;
        cur_word <= mem[pc + 1'b1][CTRL_W+CNT_W-1:CNT_W];
        cur_cnt  <= mem[pc + 1'b1][CNT_W-1:0];
      end
    end else begin
      cnt <= cnt + 1'b1;
    end
  end

  assign ctrl = run ? cur_word : '0;
  assign busy = run;
endmodule
