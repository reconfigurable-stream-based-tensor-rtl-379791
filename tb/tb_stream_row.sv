// tb_stream_row: fills the banks through the host port, programs two input
// generators (a linear 16-bit-posit stream from bank A and a strided 8-bit
// stream from bank B) and two storage units (32-bit posits into bank C,
// 64-bit posits into bank B), starts the row, and checks:
//   - every decoded stream element against a reference decoder, in order,
//     arriving two cycles after its address was issued;
//   - that the entries offered to the storage units at random cycles are
//     encoded and written at their addresses (read back via the host port).
module tb_stream_row;
  import rtu_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start, busy, desc_we, host_we, host_re;
  logic [2:0] desc_unit;
  logic [1:0] desc_addr, host_bank;
  desc_t desc_wdata;
  logic [9:0] host_addr;
  logic [63:0] host_wdata, host_rdata;
  rentry_t s_out [3];
  rentry_t st_in [2];
  int checks = 0, failures = 0, cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  stream_row dut (.clk(clk), .rst_n(rst_n), .start(start), .busy(busy), .desc_we(desc_we),
                  .desc_unit(desc_unit), .desc_addr(desc_addr), .desc_wdata(desc_wdata),
                  .host_we(host_we), .host_re(host_re), .host_bank(host_bank), .host_addr(host_addr),
                  .host_wdata(host_wdata), .host_rdata(host_rdata), .s_out(s_out), .st_in(st_in));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic uvec_t dec_ref(input logic [63:0] w, input int m);
    logic s;
    int sc;
    logic [63:0] f;
    uvec_t u;
    u = '0;
    for (int l = 0; l < (1 << m); l++) begin
      posit_fields(w >> (l * n_of(m)), m, s, sc, f);
      u = uvec_t'(make_lane(u, m, l, s, sc, f));
    end
    return u;
  endfunction

  task automatic hwrite(input int b, input int a, input logic [63:0] d);
    host_we = 1; host_bank = 2'(b); host_addr = 10'(a); host_wdata = d;
    @(negedge clk);
    host_we = 0;
  endtask

  task automatic desc(input int u, input int a, input desc_t d);
    desc_we = 1; desc_unit = 3'(u); desc_addr = 2'(a); desc_wdata = d;
    @(negedge clk);
    desc_we = 0;
  endtask

  logic [63:0] a_words [8];
  logic [63:0] b_words [12];
  logic [63:0] st0 [3];
  logic [63:0] st1 [2];
  int got0 = 0, got1 = 0, start_cyc;

  always @(negedge clk) if (rst_n) begin
    if (s_out[0].valid) begin
      checks++;
      if (s_out[0].vec != dec_ref(a_words[got0], 2)) failures++;
      if (got0 == 0) begin
        checks++;
        if (cycle - start_cyc != 3) begin   // address in cycle start+1, data two cycles later
          failures++;
          $display("stream latency %0d", cycle - start_cyc);
        end
      end
      checks++;
      if (s_out[0].last != (got0 == 7)) failures++;
      got0++;
    end
    if (s_out[1].valid) begin
      checks++;
      if (s_out[1].vec != dec_ref(b_words[3 * got1], 3)) failures++;
      got1++;
    end
    checks++;
    if (s_out[2].valid) failures++;
  end

  initial begin
    int sent0, sent1;
    start = 0; desc_we = 0; host_we = 0; host_re = 0; desc_unit = '0; desc_addr = '0;
    desc_wdata = '0; host_bank = '0; host_addr = '0; host_wdata = '0;
    st_in[0] = '0; st_in[1] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 8; i++)  begin a_words[i] = {$urandom, $urandom}; hwrite(0, i, a_words[i]); end
    for (int i = 0; i < 12; i++) begin b_words[i] = {$urandom, $urandom}; hwrite(1, 100 + i, b_words[i]); end
    for (int i = 0; i < 3; i++) st0[i] = {$urandom, $urandom};
    for (int i = 0; i < 2; i++) st1[i] = {$urandom, $urandom};
    desc(0, 0, '{bank: 2'd0, mode: M_P16, offset: 10'd0, x_size: 10'd8, x_stride: 10'd1, y_size: 10'd1, y_stride: 10'd0});
    desc(0, 1, '0);
    desc(1, 0, '{bank: 2'd1, mode: M_P8, offset: 10'd100, x_size: 10'd4, x_stride: 10'd3, y_size: 10'd1, y_stride: 10'd0});
    desc(1, 1, '0);
    desc(2, 0, '0);
    desc(3, 0, '{bank: 2'd2, mode: M_P32, offset: 10'd50, x_size: 10'd3, x_stride: 10'd1, y_size: 10'd1, y_stride: 10'd0});
    desc(3, 1, '0);
    desc(4, 0, '{bank: 2'd1, mode: M_P64, offset: 10'd200, x_size: 10'd1, x_stride: 10'd0, y_size: 10'd2, y_stride: 10'd7});
    desc(4, 1, '0);
    start = 1;
    start_cyc = cycle;
    @(negedge clk);
    start = 0;
    sent0 = 0; sent1 = 0;
    while (sent0 < 3 || sent1 < 2) begin
      st_in[0] = '0; st_in[1] = '0;
      if (sent0 < 3 && $urandom_range(1)) begin
        st_in[0] = '{valid: 1'b1, last: 1'b0, vec: dec_ref(st0[sent0], 1)};
        sent0++;
      end
      if (sent1 < 2 && $urandom_range(1)) begin
        st_in[1] = '{valid: 1'b1, last: 1'b0, vec: dec_ref(st1[sent1], 0)};
        sent1++;
      end
      @(negedge clk);
    end
    st_in[0] = '0; st_in[1] = '0;
    while (busy) @(negedge clk);
    checks++;
    if (got0 != 8 || got1 != 4) begin
      failures++;
      $display("stream counts %0d %0d", got0, got1);
    end
    // read back stored words (a canonical posit re-encodes to itself, except -0/NaR)
    for (int i = 0; i < 3; i++) begin
      host_re = 1; host_bank = 2'd2; host_addr = 10'(50 + i);
      @(negedge clk);
      host_re = 0;
      checks++;
      if (host_rdata != dec_ref_roundtrip(st0[i], 1)) begin
        failures++;
        $display("stored P32 %0d got %h exp %h", i, host_rdata, st0[i]);
      end
    end
    for (int i = 0; i < 2; i++) begin
      host_re = 1; host_bank = 2'd1; host_addr = 10'(200 + 7 * i);
      @(negedge clk);
      host_re = 0;
      checks++;
      if (host_rdata != dec_ref_roundtrip(st1[i], 0)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected stored word: each lane as written, NaR lanes become zero
  function automatic logic [63:0] dec_ref_roundtrip(input logic [63:0] w, input int m);
    int n;
    logic [63:0] r, p;
    n = n_of(m);
    r = '0;
    for (int l = 0; l < (1 << m); l++) begin
      p = (n == 64) ? w : ((w >> (l * n)) & ((64'd1 << n) - 1));
      if (p == (64'd1 << (n - 1))) p = '0;
      r = r | (p << (l * n));
    end
    return r;
  endfunction
endmodule
