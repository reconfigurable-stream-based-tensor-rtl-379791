// stream_row: data streaming infrastructure of one row of the PE array.
//
// Three SRAM banks (A, B, C; 1024 x 64 bits each) serve as scratchpad and
// stream buffers. Three stream generators (pattern_gen + posit_vec_decoder)
// feed the row's first PE: generator k reads bank k, the word returns one
// cycle later, is decoded with the precision of its descriptor and is
// registered, so element k reaches s_out[k] two cycles after its address was
// issued. Two storage units (pattern_gen + posit_vec_encoder) take the
// results leaving the row's last PE: each valid entry on st_in[k] is encoded
// and written at the next address of storage generator k, into the bank named
// by that generator's descriptor (if both storage units hit the same bank in
// one cycle, unit 0 wins). The host port reads and writes the banks; it
// shares the bank ports with the generators and should be used only while
// "busy" is low. Descriptor memories are loaded through desc_we with
// desc_unit 0..2 (generators) or 3..4 (storage units).
// The bank count and the generator/storage split follow the document; the
// bank assignment, priority and host port are this design's.
module stream_row
  import rtu_pkg::*;
#(
  parameter int NDESC = 4,
  parameter int DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  output logic                     busy,
  // descriptor load
  input  logic                     desc_we,
  input  logic [2:0]               desc_unit,
  input  logic [$clog2(NDESC)-1:0] desc_addr,
  input  desc_t                    desc_wdata,
  // host access
  input  logic                     host_we,
  input  logic                     host_re,
  input  logic [1:0]               host_bank,
  input  logic [$clog2(DEPTH)-1:0] host_addr,
  input  logic [63:0]              host_wdata,
  output logic [63:0]              host_rdata,
  // array side
  output rentry_t                  s_out [3],
  input  rentry_t                  st_in [2]
);
  logic       g_valid [3];
  logic [9:0] g_addr  [3];
  logic [1:0] g_bank  [3];
  vmode_e     g_mode  [3];
  logic       g_last  [3];
  logic       t_valid [2];
  logic [9:0] t_addr  [2];
  logic [1:0] t_bank  [2];
  vmode_e     t_mode  [2];
  logic       t_last  [2];

  logic                     b_re    [3];
  logic [$clog2(DEPTH)-1:0] b_raddr [3];
  logic [63:0]              b_rdata [3];
  logic                     b_we    [3];
  logic [$clog2(DEPTH)-1:0] b_waddr [3];
  logic [63:0]              b_wdata [3];
  logic [63:0]              enc     [2];

  for (genvar k = 0; k < 3; k++) begin : g_in
    pattern_gen #(.NDESC(NDESC)) u_pg (
      .clk(clk), .rst_n(rst_n), .desc_we(desc_we && desc_unit == 3'(k)), .desc_addr(desc_addr),
      .desc_wdata(desc_wdata), .start(start), .step(g_valid[k]), .valid(g_valid[k]),
      .addr(g_addr[k]), .bank(g_bank[k]), .mode(g_mode[k]), .last(g_last[k])
    );
  end

  for (genvar k = 0; k < 2; k++) begin : g_st
    pattern_gen #(.NDESC(NDESC)) u_pg (
      .clk(clk), .rst_n(rst_n), .desc_we(desc_we && desc_unit == 3'(k + 3)), .desc_addr(desc_addr),
      .desc_wdata(desc_wdata), .start(start), .step(st_in[k].valid && t_valid[k]),
      .valid(t_valid[k]), .addr(t_addr[k]), .bank(t_bank[k]), .mode(t_mode[k]), .last(t_last[k])
    );
    posit_vec_encoder u_enc (.mode(t_mode[k]), .din(st_in[k].vec), .dout(enc[k]));
  end

  // bank port arbitration
  always_comb begin
    for (int b = 0; b < 3; b++) begin
      b_re[b]    = g_valid[b] || (host_re && host_bank == 2'(b));
      b_raddr[b] = g_valid[b] ? $clog2(DEPTH)'(g_addr[b]) : host_addr;
      b_we[b]    = 1'b0;
      b_waddr[b] = host_addr;
      b_wdata[b] = host_wdata;
      if (host_we && host_bank == 2'(b)) b_we[b] = 1'b1;
      if (st_in[1].valid && t_valid[1] && t_bank[1] == 2'(b)) begin
        b_we[b]    = 1'b1;
        b_waddr[b] = $clog2(DEPTH)'(t_addr[1]);
        b_wdata[b] = enc[1];
      end
      if (st_in[0].valid && t_valid[0] && t_bank[0] == 2'(b)) begin
        b_we[b]    = 1'b1;
        b_waddr[b] = $clog2(DEPTH)'(t_addr[0]);
        b_wdata[b] = enc[0];
      end
    end
  end

  for (genvar b = 0; b < 3; b++) begin : g_mem
    sram_bank #(.DEPTH(DEPTH), .DW(64)) u_sram (
      .clk(clk), .re(b_re[b]), .raddr(b_raddr[b]), .rdata(b_rdata[b]),
      .we(b_we[b]), .waddr(b_waddr[b]), .wdata(b_wdata[b])
    );
  end

  // read pipeline: decode the returned word and register it
  logic   r_valid [3];
  logic   r_last  [3];
  vmode_e r_mode  [3];
  logic [1:0] h_bank;
  uvec_t  dec [3];

  for (genvar k = 0; k < 3; k++) begin : g_dec
    posit_vec_decoder u_dec (.mode(r_mode[k]), .din(b_rdata[k]), .dout(dec[k]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 3; k++) begin
        r_valid[k] <= 1'b0;
        r_last[k]  <= 1'b0;
        r_mode[k]  <= M_P64;
        s_out[k]   <= '0;
      end
      h_bank <= '0;
    end else begin
      for (int k = 0; k < 3; k++) begin
        r_valid[k] <= g_valid[k];
        r_last[k]  <= g_last[k];
        if (g_valid[k]) r_mode[k] <= g_mode[k];
        s_out[k]   <= '{valid: r_valid[k], last: r_last[k], vec: r_valid[k] ? dec[k] : '0};
      end
      if (host_re) h_bank <= host_bank;
    end
  end

  always_comb begin
    host_rdata = b_rdata[0];
    if (h_bank == 2'd1) host_rdata = b_rdata[1];
    if (h_bank == 2'd2) host_rdata = b_rdata[2];
  end

  assign busy = g_valid[0] || g_valid[1] || g_valid[2] || t_valid[0] || t_valid[1] ||
                r_valid[0] || r_valid[1] || r_valid[2] ||
                s_out[0].valid || s_out[1].valid || s_out[2].valid;
endmodule
