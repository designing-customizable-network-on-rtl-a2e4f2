// tb_noc_ni_slave: the AXI slave interface of node (1,1) in a 4x4 mesh. The
// testbench plays the attached master (shared tasks) and the network: it
// takes the AW/W/AR flits with random back-pressure and checks their fields
// (route = target address or beat address, source id 0x11, beat numbers,
// burst length), answers a write with a B flit once all its beats arrived,
// and answers a read with its R flits in a random order. The master must see
// the beats in order. Accesses to the node's own local memory
// (0x50000000..+MEM_DEPTH) must produce no flits. A WLAST in the wrong place
// must give SLVERR.
module tb_noc_ni_slave;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  axi_req_t s_req;
  axi_rsp_t s_rsp;
  int checks = 0, failures = 0;
  logic [31:0] ref_mem [logic [31:0]];
  `include "tb_axi_master_tasks.svh"

  logic aw_v, aw_r, w_v, w_r, ar_v, ar_r, b_v, b_r, r_v, r_r;
  aw_flit_t aw_f; w_flit_t w_f; ar_flit_t ar_f; b_flit_t b_f; r_flit_t r_f;
  logic m_en, m_we; logic [7:0] m_addr; logic [31:0] m_wd, m_rd; logic [3:0] m_ws;

  noc_ni_slave #(.NX(4), .NY(4), .MY_X(1), .MY_Y(1), .MEM_DEPTH(256)) dut (
    .clk, .rst_n, .s_req, .s_rsp,
    .aw_o_valid(aw_v), .aw_o_ready(aw_r), .aw_o(aw_f),
    .w_o_valid(w_v), .w_o_ready(w_r), .w_o(w_f),
    .ar_o_valid(ar_v), .ar_o_ready(ar_r), .ar_o(ar_f),
    .b_i_valid(b_v), .b_i_ready(b_r), .b_i(b_f),
    .r_i_valid(r_v), .r_i_ready(r_r), .r_i(r_f),
    .m_en, .m_we, .m_addr, .m_wdata(m_wd), .m_wstrb(m_ws), .m_rdata(m_rd));
  noc_local_mem #(.DEPTH(256)) u_mem (.clk, .a_en(m_en), .a_we(m_we), .a_addr(m_addr),
    .a_wdata(m_wd), .a_wstrb(m_ws), .a_rdata(m_rd), .b_en(1'b0), .b_we(1'b0), .b_addr('0),
    .b_wdata('0), .b_wstrb('0), .b_rdata());

  logic [31:0] exp_aw_addr; logic [7:0] exp_len; int cur_salt;

  // ---------------- network model ----------------
  int n_flits = 0, n_ooo = 0;
  int w_left = 0;
  logic [1:0] next_bresp = RESP_OKAY;
  ar_flit_t ar_q [$];
  always @(negedge clk) begin
    aw_r = ($urandom % 3) != 0;
    w_r  = ($urandom % 3) != 0;
    ar_r = ($urandom % 3) != 0;
  end
  always @(posedge clk) if (rst_n) begin
    if (aw_v && aw_r) begin
      n_flits++;
      checks++;
      if (aw_f.src != 8'h11 || aw_f.route != exp_aw_addr || aw_f.len != exp_len) begin
        failures++; $display("FAIL AW flit %p", aw_f);
      end
      w_left = int'(aw_f.len) + 1;
    end
    if (w_v && w_r) begin
      n_flits++;
      checks++;
      if (w_f.src != 8'h11 || w_f.route != beat_addr(exp_aw_addr, BURST_INCR, w_f.idx) ||
          w_f.data != pat(w_f.route, cur_salt)) begin
        failures++; $display("FAIL W flit %p", w_f);
      end
      w_left--;
      if (w_left == 0) fork begin
        repeat ($urandom % 5) @(negedge clk);
        @(negedge clk); b_v = 1; b_f = '{resp: next_bresp, route: 32'h5000_0000};
        #1; while (!b_r) begin @(negedge clk); #1; end
        @(negedge clk); b_v = 0;
      end join_none
    end
    if (ar_v && ar_r) begin
      n_flits++;
      checks++;
      if (ar_f.src != 8'h11) begin failures++; $display("FAIL AR flit %p", ar_f); end
      ar_q.push_back(ar_f);
    end
  end
  // R responder: beats of each read in a random order
  initial begin
    r_v = 0; b_v = 0;
    forever begin
      @(negedge clk);
      if (ar_q.size() != 0) begin
        ar_flit_t a; int order [$];
        a = ar_q.pop_front();
        order.delete();
        for (int i = 0; i <= int'(a.len); i++) order.push_back(i);
        order.shuffle();
        foreach (order[k]) begin
          logic [31:0] ad;
          if (k > 0 && order[k] < order[k - 1]) n_ooo++;
          ad = beat_addr(a.route, a.burst, 8'(order[k]));
          r_v = 1;
          r_f = '{data: ref_rd(ad), resp: RESP_OKAY, idx: 8'(order[k]), last: order[k] == int'(a.len),
                  route: 32'h5000_0000};
          @(negedge clk);
          r_v = 0;
          repeat ($urandom % 3) @(negedge clk);
        end
      end
    end
  end

  task automatic rw(logic [31:0] a, int len, int salt);
    exp_aw_addr = a; exp_len = 8'(len - 1); cur_salt = salt;
    m_write(a, len, BURST_INCR, salt, RESP_OKAY);
    m_read(a, len, BURST_INCR, RESP_OKAY);
  endtask

  initial begin
    int n_before;
    s_req = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    rw(32'hE000_1000, 1, 1);
    rw(32'hE000_2000, 8, 2);
    rw(32'h2345_0000, 40, 3);
    rw(32'h5000_1000, 3, 4);        // own block, past the memory: goes out too
    rw(32'hF000_0000, 256, 5);
    n_before = n_flits;
    exp_aw_addr = 32'h5000_0020; cur_salt = 6;
    m_write(32'h5000_0020, 10, BURST_INCR, 6, RESP_OKAY);      // local memory
    m_read(32'h5000_0020, 10, BURST_INCR, RESP_OKAY);
    m_read(32'h5000_0024, 3, BURST_FIXED, RESP_OKAY);
    checks++; if (n_flits != n_before) begin failures++; $display("FAIL local access left the node"); end
    // remote error passed through
    next_bresp = RESP_SLVERR; exp_aw_addr = 32'hA000_0000; exp_len = 0; cur_salt = 7;
    m_write(32'hA000_0000, 1, BURST_INCR, 7, RESP_SLVERR);
    next_bresp = RESP_OKAY;
    checks++; if (n_ooo == 0) begin failures++; $display("FAIL no out-of-order beats sent"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (50000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
