// rtu_top: Reconfigurable Tensor Unit (RTU).
//
// A ROWS x COLS array of posit vector PEs fed by a per-row data streaming
// infrastructure. Each row has three SRAM banks, three stream generators
// whose decoded streams enter the row's first PE on its three west inputs,
// and two storage units that encode and store the last PE's VMA output and
// its first east-forwarded register. Inside the array the pipeline register
// grid forwards entries east, south and south-east, one PE per cycle; the
// south links of the bottom row wrap to the top row. Each PE drives its quire
// to the PEs east, south and south-east of it (VMA fusing); the receiver
// picks one with its control word. PEs of column 0 see zero on their
// north-west and west quire links.
// Programming: cfg_* writes {control word, count} tuples into the
// configuration memory of PE cfg_pe (row*COLS+col); desc_* writes stream
// descriptors of row desc_row (unit 0..2 input generators, 3..4 storage); the
// host_* port reads and writes the banks while busy is low. A start pulse
// launches all controllers and generators in the same cycle; busy stays high
// until every controller, generator and storage unit has finished.
// Array size, bank count and grid directions follow the document; the
// programming ports, the wrap-around of the quire links and the column-0
// edge values are this design's.
module rtu_top
  import rtu_pkg::*;
#(
  parameter int ROWS      = 4,
  parameter int COLS      = 4,
  parameter int CFG_DEPTH = 16,
  parameter int NDESC     = 4
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             start,
  output logic                             busy,
  input  logic                             cfg_we,
  input  logic [$clog2(ROWS*COLS)-1:0]     cfg_pe,
  input  logic [$clog2(CFG_DEPTH)-1:0]     cfg_addr,
  input  logic [CTRL_W+CNT_W-1:0]          cfg_wdata,
  input  logic                             desc_we,
  input  logic [$clog2(ROWS)-1:0]          desc_row,
  input  logic [2:0]                       desc_unit,
  input  logic [$clog2(NDESC)-1:0]         desc_addr,
  input  desc_t                            desc_wdata,
  input  logic                             host_we,
  input  logic                             host_re,
  input  logic [$clog2(ROWS)-1:0]          host_row,
  input  logic [1:0]                       host_bank,
  input  logic [9:0]                       host_addr,
  input  logic [63:0]                      host_wdata,
  output logic [63:0]                      host_rdata
);
  rentry_t       e_o  [ROWS][COLS][3];
  rentry_t       s_o  [ROWS][COLS];
  rentry_t       se_o [ROWS][COLS];
  rentry_t       v_o  [ROWS][COLS];
  logic [QW-1:0] q_o  [ROWS][COLS];
  rentry_t       strm [ROWS][3];
  logic          pe_busy  [ROWS][COLS];
  logic          row_busy [ROWS];
  logic [63:0]   row_rdata [ROWS];
  logic [$clog2(ROWS)-1:0] h_row;

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    localparam int RN = (r + ROWS - 1) % ROWS;   // row above, wrapping
    rentry_t st [2];
    assign st[0] = v_o[r][COLS-1];
    assign st[1] = e_o[r][COLS-1][0];

    stream_row #(.NDESC(NDESC)) u_strm (
      .clk(clk), .rst_n(rst_n), .start(start), .busy(row_busy[r]),
      .desc_we(desc_we && desc_row == $clog2(ROWS)'(r)), .desc_unit(desc_unit),
      .desc_addr(desc_addr), .desc_wdata(desc_wdata),
      .host_we(host_we && host_row == $clog2(ROWS)'(r)),
      .host_re(host_re && host_row == $clog2(ROWS)'(r)),
      .host_bank(host_bank), .host_addr(host_addr), .host_wdata(host_wdata),
      .host_rdata(row_rdata[r]), .s_out(strm[r]), .st_in(st)
    );

    for (genvar c = 0; c < COLS; c++) begin : g_col
      rentry_t       w_i [3];
      rentry_t       nw_i;
      logic [QW-1:0] qw_i, qnw_i;
      if (c == 0) begin : g_edge
        assign w_i   = strm[r];
        assign nw_i  = '0;
        assign qw_i  = '0;
        assign qnw_i = '0;
      end else begin : g_inner
        assign w_i   = e_o[r][c-1];
        assign nw_i  = se_o[RN][c-1];
        assign qw_i  = q_o[r][c-1];
        assign qnw_i = q_o[RN][c-1];
      end

      pe #(.CFG_DEPTH(CFG_DEPTH)) u_pe (
        .clk(clk), .rst_n(rst_n),
        .cfg_we(cfg_we && cfg_pe == $clog2(ROWS*COLS)'(r * COLS + c)),
        .cfg_addr(cfg_addr), .cfg_wdata(cfg_wdata), .start(start), .busy(pe_busy[r][c]),
        .w_in(w_i), .n_in(s_o[RN][c]), .nw_in(nw_i),
        .e_out(e_o[r][c]), .s_out(s_o[r][c]), .se_out(se_o[r][c]),
        .qf_w(qw_i), .qf_n(q_o[RN][c]), .qf_nw(qnw_i), .quire_out(q_o[r][c]),
        .vout(v_o[r][c])
      );
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       h_row <= '0;
    else if (host_re) h_row <= host_row;
  end
  assign host_rdata = row_rdata[h_row];

  always_comb begin
    busy = 1'b0;
    for (int r = 0; r < ROWS; r++) begin
      busy = busy | row_busy[r];
      for (int c = 0; c < COLS; c++) busy = busy | pe_busy[r][c];
    end
  end
endmodule
