// pattern_gen: descriptor-based stream pattern generation unit.
//
// A small descriptor memory (NDESC entries, loaded through desc_we/desc_addr/
// desc_wdata while idle) holds 2D affine descriptors {bank, mode, offset,
// x_size, x_stride, y_size, y_stride}. After a start pulse the descriptor
// iteration control walks descriptor 0, 1, ... ; for each it produces
//   addr = offset + i*x_stride + j*y_stride,  i < x_size, j < y_size
// with i running fastest. The stride terms are kept as running sums (stride
// control), the element/row counts by the size control, and the address
// generation adds them to the offset. A descriptor with x_size or y_size 0,
// or the end of the memory, ends the pattern. While "valid" is high, addr,
// bank, mode and last (final element of the pattern) describe the current
// element; it is consumed and the generator advances in a cycle where "step"
// is high (tie step to valid for a free-running read stream, or to the
// arriving data's valid for a storage stream).
// Linear, tiled and, by chaining descriptors, sliding-window or banded
// patterns follow the document's description; the descriptor fields are this
// design's.
module pattern_gen
  import rtu_pkg::*;
#(
  parameter int NDESC = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     desc_we,
  input  logic [$clog2(NDESC)-1:0] desc_addr,
  input  desc_t                    desc_wdata,
  input  logic                     start,
  input  logic                     step,
  output logic                     valid,
  output logic [9:0]               addr,
  output logic [1:0]               bank,
  output vmode_e                   mode,
  output logic                     last
);
  desc_t                    dmem [NDESC];
  logic [$clog2(NDESC)-1:0] di;
  logic [9:0]               xi, yi, xacc, yacc;
  logic                     run;
  desc_t                    cd;

  function automatic logic empty(input desc_t d);
    return d.x_size == '0 || d.y_size == '0;
  endfunction

  always_ff @(posedge clk) begin
    if (desc_we && !run) dmem[desc_addr] <= desc_wdata;
  end

  assign cd    = dmem[di];
  assign valid = run;
  assign addr  = cd.offset + xacc + yacc;
  assign bank  = cd.bank;
  assign mode  = cd.mode;

  logic last_x, last_y, last_d;
  always_comb begin
    last_x = (xi == cd.x_size - 1'b1);
    last_y = (yi == cd.y_size - 1'b1);
    last_d = (int'(di) == NDESC - 1) || empty(dmem[di + 1'b1]);
    last   = run && last_x && last_y && last_d;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run  <= 1'b0;
      di   <= '0;
      xi   <= '0;
      yi   <= '0;
      xacc <= '0;
      yacc <= '0;
    end else if (!run) begin
      if (start && !empty(dmem[0])) begin
        run  <= 1'b1;
        di   <= '0;
        xi   <= '0;
        yi   <= '0;
        xacc <= '0;
        yacc <= '0;
      end
    end else if (step) begin
      if (!last_x) begin
        xi   <= xi + 1'b1;
        xacc <= xacc + cd.x_stride;
      end else begin
        xi   <= '0;
        xacc <= '0;
        if (!last_y) begin
          yi   <= yi + 1'b1;
          yacc <= yacc + cd.y_stride;
        end else begin
          yi   <= '0;
          yacc <= '0;
          if (last_d) run <= 1'b0;
          else        di  <= di + 1'b1;
        end
      end
    end
  end
endmodule
