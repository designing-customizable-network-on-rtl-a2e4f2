// tb_noc_ni_master: the AXI master interface of node (2,1) in a 4x4 mesh
// (address block 0x90000000, 256 words of local memory, an attached
// tb_axi_slave). The testbench injects request flits as the router would:
// two requesters (node 0 and node 15) write at the same time, with their W
// beats interleaved and sent before their AW flits, into the memory and
// into the slave; then both read back. Checked: one B flit per write, sent
// only after all its beats, routed to the requester's base address, OKAY;
// R flits with the right data, beat number, LAST and route; the slave sees
// the out-of-memory beats and nothing else. A second instance without an
// attached slave must answer out-of-memory requests with DECERR.
module tb_noc_ni_master;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  axi_req_t m_req, m_req2;
  axi_rsp_t m_rsp;
  int checks = 0, failures = 0, slw, slr;

  logic aw_v, aw_r, w_v, w_r, ar_v, ar_r, b_v, b_r, r_v, r_r;
  aw_flit_t aw_f; w_flit_t w_f; ar_flit_t ar_f; b_flit_t b_f; r_flit_t r_f;
  logic m_en, m_we; logic [7:0] m_addr; logic [31:0] m_wd, m_rd; logic [3:0] m_ws;

  noc_ni_master #(.NX(4), .NY(4), .MY_X(2), .MY_Y(1), .MEM_DEPTH(256)) dut (
    .clk, .rst_n, .m_req, .m_rsp,
    .aw_i_valid(aw_v), .aw_i_ready(aw_r), .aw_i(aw_f),
    .w_i_valid(w_v), .w_i_ready(w_r), .w_i(w_f),
    .ar_i_valid(ar_v), .ar_i_ready(ar_r), .ar_i(ar_f),
    .b_o_valid(b_v), .b_o_ready(b_r), .b_o(b_f),
    .r_o_valid(r_v), .r_o_ready(r_r), .r_o(r_f),
    .m_en, .m_we, .m_addr, .m_wdata(m_wd), .m_wstrb(m_ws), .m_rdata(m_rd));
  noc_local_mem #(.DEPTH(256)) u_mem (.clk, .a_en(1'b0), .a_we(1'b0), .a_addr('0), .a_wdata('0),
    .a_wstrb('0), .a_rdata(), .b_en(m_en), .b_we(m_we), .b_addr(m_addr), .b_wdata(m_wd),
    .b_wstrb(m_ws), .b_rdata(m_rd));
  tb_axi_slave u_sl (.clk, .rst_n, .req(m_req), .rsp(m_rsp), .n_writes(slw), .n_reads(slr));

  // second instance: no memory, no slave
  logic aw2_v, aw2_r, w2_v, w2_r, ar2_v, ar2_r, b2_v, r2_v;
  aw_flit_t aw2_f; w_flit_t w2_f; ar_flit_t ar2_f; b_flit_t b2_f; r_flit_t r2_f;
  noc_ni_master #(.NX(4), .NY(4), .MY_X(2), .MY_Y(1), .MEM_EN(1'b0), .HAS_SLAVE(1'b0),
                  .MEM_DEPTH(256)) dut2 (
    .clk, .rst_n, .m_req(m_req2), .m_rsp('0),
    .aw_i_valid(aw2_v), .aw_i_ready(aw2_r), .aw_i(aw2_f),
    .w_i_valid(w2_v), .w_i_ready(w2_r), .w_i(w2_f),
    .ar_i_valid(ar2_v), .ar_i_ready(ar2_r), .ar_i(ar2_f),
    .b_o_valid(b2_v), .b_o_ready(1'b1), .b_o(b2_f),
    .r_o_valid(r2_v), .r_o_ready(1'b1), .r_o(r2_f),
    .m_en(), .m_we(), .m_addr(), .m_wdata(), .m_wstrb(), .m_rdata('0));

  // ---------------- response capture ----------------
  b_flit_t bq [$];
  r_flit_t rq [$];
  always @(negedge clk) begin b_r = ($urandom % 3) != 0; r_r = ($urandom % 3) != 0; end
  always @(posedge clk) if (rst_n) begin
    if (b_v && b_r) bq.push_back(b_f);
    if (r_v && r_r) rq.push_back(r_f);
  end

  task automatic send_aw(logic [31:0] a, int len, logic [7:0] src);
    @(negedge clk); aw_v = 1; aw_f = '{len: 8'(len - 1), burst: BURST_INCR, src: src, route: a};
    #1; while (!aw_r) begin @(negedge clk); #1; end
    @(negedge clk); aw_v = 0;
  endtask
  task automatic send_w(logic [31:0] a, int idx, logic [7:0] src);
    @(negedge clk); w_v = 1; w_f = '{data: a ^ 32'h1234_0000, strb: '1, idx: 8'(idx), src: src, route: a};
    #1; while (!w_r) begin @(negedge clk); #1; end
    @(negedge clk); w_v = 0;
  endtask
  task automatic send_ar(logic [31:0] a, int len, logic [7:0] src);
    @(negedge clk); ar_v = 1; ar_f = '{len: 8'(len - 1), burst: BURST_INCR, src: src, route: a};
    #1; while (!ar_r) begin @(negedge clk); #1; end
    @(negedge clk); ar_v = 0;
  endtask
  task automatic expect_r(logic [31:0] a, int len, logic [31:0] route);
    int got = 0;
    int guard = 0;
    while (got < len && guard < 2000) begin
      @(negedge clk); guard++;
      while (rq.size() != 0) begin
        r_flit_t f;
        f = rq.pop_front();
        checks++;
        if (f.idx != 8'(got) || f.data != ((a + 32'(got)) ^ 32'h1234_0000) || f.route != route ||
            f.last != (got == len - 1) || f.resp != RESP_OKAY) begin
          failures++; $display("FAIL R flit %p beat %0d", f, got);
        end
        got++;
      end
    end
    checks++; if (got != len) begin failures++; $display("FAIL R beats %0d of %0d", got, len); end
  endtask

  localparam logic [31:0] BASE = 32'h9000_0000;
  initial begin
    aw_v = 0; w_v = 0; ar_v = 0; aw2_v = 0; w2_v = 0; ar2_v = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    // interleaved writes: node 0 -> memory 0x10..0x13, node 15 -> slave 0x1000..0x1002
    send_w(BASE + 32'h10, 0, 8'h00);
    send_w(BASE + 32'h1000, 0, 8'h33);
    send_w(BASE + 32'h12, 2, 8'h00);
    send_aw(BASE + 32'h1000, 3, 8'h33);
    send_w(BASE + 32'h1002, 2, 8'h33);
    send_w(BASE + 32'h11, 1, 8'h00);
    repeat (20) @(negedge clk);
    checks++; if (bq.size() != 0) begin failures++; $display("FAIL early B"); end
    send_aw(BASE + 32'h10, 4, 8'h00);
    send_w(BASE + 32'h1001, 1, 8'h33);
    repeat (20) @(negedge clk);
    checks++; if (bq.size() != 1) begin failures++; $display("FAIL B count %0d, want 1", bq.size()); end
    send_w(BASE + 32'h13, 3, 8'h00);
    repeat (20) @(negedge clk);
    checks++;
    if (bq.size() != 2) begin failures++; $display("FAIL B count %0d, want 2", bq.size()); end
    else begin
      checks++;
      if (bq[0].route != 32'hF000_0000 || bq[1].route != 32'h0 ||
          bq[0].resp != RESP_OKAY || bq[1].resp != RESP_OKAY) begin
        failures++; $display("FAIL B flits %p %p", bq[0], bq[1]);
      end
    end
    checks++; if (slw != 3) begin failures++; $display("FAIL slave writes %0d", slw); end
    // reads back
    send_ar(BASE + 32'h10, 4, 8'h00);
    expect_r(BASE + 32'h10, 4, 32'h0);
    send_ar(BASE + 32'h1000, 3, 8'h33);
    expect_r(BASE + 32'h1000, 3, 32'hF000_0000);
    checks++; if (slr != 1) begin failures++; $display("FAIL slave reads %0d", slr); end
    // no memory, no slave: DECERR
    @(negedge clk); ar2_v = 1; ar2_f = '{len: 8'd1, burst: BURST_INCR, src: 8'h12, route: BASE};
    @(negedge clk); ar2_v = 0;
    begin
      int n = 0;
      repeat (20) begin
        @(negedge clk); #1;
        if (r2_v) begin
          checks++; n++;
          if (r2_f.resp != RESP_DECERR || r2_f.route != 32'h6000_0000) begin
            failures++; $display("FAIL DECERR R %p", r2_f);
          end
        end
      end
      checks++; if (n != 2) begin failures++; $display("FAIL DECERR beats %0d", n); end
    end
    @(negedge clk); aw2_v = 1; aw2_f = '{len: 8'd0, burst: BURST_INCR, src: 8'h12, route: BASE};
    w2_v = 1; w2_f = '{data: 0, strb: '1, idx: 0, src: 8'h12, route: BASE};
    @(negedge clk); aw2_v = 0; w2_v = 0;
    begin
      int n = 0;
      repeat (10) begin
        @(negedge clk); #1;
        if (b2_v) begin
          checks++; n++;
          if (b2_f.resp != RESP_DECERR) begin failures++; $display("FAIL DECERR B %p", b2_f); end
        end
      end
      checks++; if (n != 1) begin failures++; $display("FAIL DECERR B count %0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
