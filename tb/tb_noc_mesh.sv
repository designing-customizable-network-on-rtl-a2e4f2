// tb_noc_mesh: end-to-end test of the mesh at its default size (4x4, every
// node with an attached master, an attached slave and 4096 words of local
// memory). Every node's slave is a tb_axi_slave; every node's master is
// driven by tasks here. The test follows the three verification phases of
// the design:
//   1. one pair of nodes (4 -> 14, the documented example, and others):
//      bursts of every length 1..256 into local memory and into the
//      attached slave, then read back in a different order;
//   2. one source (node 0) writes to every other node, then reads back;
//   3. every node at once writes to every other node, then all read back.
// A write updates a reference model (word per address); every read beat is
// compared with it. It also checks local accesses (a node's own memory),
// FIXED bursts, and counts the mechanisms: adaptive routes, busy outputs,
// arbiter scan cycles, out-of-order beat arrival at a requester, memory vs
// slave targets. Each must have happened at least once.
module tb_noc_mesh;
  import noc_pkg::*;

  localparam int NX = 4, NY = 4, NN = NX * NY, MEMD = 4096;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  axi_req_t   s_req [NN];
  axi_rsp_t   s_rsp [NN];
  axi_req_t   m_req [NN];
  axi_rsp_t   m_rsp [NN];
  logic [4:0] ev_served [NN], ev_adaptive [NN], ev_blocked [NN];
  int         sl_w [NN], sl_r [NN];

  noc_mesh dut (.*);

  for (genvar n = 0; n < NN; n++) begin : g_sl
    tb_axi_slave u_sl (.clk, .rst_n, .req(m_req[n]), .rsp(m_rsp[n]),
                       .n_writes(sl_w[n]), .n_reads(sl_r[n]));
  end

  int checks = 0, failures = 0;
  logic [31:0] ref_mem [logic [31:0]];

  // ------------------------------------------------ event counters
  longint n_adaptive = 0, n_blocked = 0, n_served = 0, n_ooo = 0, n_scan = 0;
  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < NN; n++) begin
      n_adaptive += $countones(ev_adaptive[n]);
      n_blocked  += $countones(ev_blocked[n]);
      n_served   += $countones(ev_served[n]);
    end
  end

  // out-of-order arrival of R beats at a requester, and arbiter scan cycles
  // (a port tested without a request after a service) in every router
  for (genvar x = 0; x < NX; x++) begin : g_ox
    for (genvar y = 0; y < NY; y++) begin : g_oy
      always @(posedge clk) if (rst_n) begin
        n_scan += longint'(dut.g_x[x].g_y[y].u_node.u_aw.u_router.u_arb.scan_skip)
                + longint'(dut.g_x[x].g_y[y].u_node.u_w.u_router.u_arb.scan_skip)
                + longint'(dut.g_x[x].g_y[y].u_node.u_b.u_router.u_arb.scan_skip)
                + longint'(dut.g_x[x].g_y[y].u_node.u_ar.u_router.u_arb.scan_skip)
                + longint'(dut.g_x[x].g_y[y].u_node.u_r.u_router.u_arb.scan_skip);
      end
      int next_idx = 0;
      always @(posedge clk) begin
        if (dut.g_x[x].g_y[y].u_node.u_lp.g_slave_if.u_ni_slave.r_i_valid) begin
          if (dut.g_x[x].g_y[y].u_node.u_lp.g_slave_if.u_ni_slave.r_i.idx != 8'(next_idx)) n_ooo++;
          next_idx = dut.g_x[x].g_y[y].u_node.u_lp.g_slave_if.u_ni_slave.r_i.last ? 0 : next_idx + 1;
        end
      end
    end
  end

  function automatic logic [31:0] node_addr(int n, logic [31:0] off);
    return node_base(NX, NY, n / NY, n % NY) + off;
  endfunction

  function automatic logic [31:0] pattern(int src, logic [31:0] a, int salt);
    return {8'(src), 8'(salt), 16'(a)} ^ (a << 3);
  endfunction

  function automatic logic [31:0] ref_rd(int dst, logic [31:0] a);
    // unwritten local memory is random; only written words are compared
    return ref_mem.exists(a) ? ref_mem[a] : (a ^ 32'hA5A5_5A5A);
  endfunction

  // ------------------------------------------------ master tasks
  task automatic axi_write(int n, logic [31:0] addr, int len, logic [1:0] burst, int salt,
                           output logic [1:0] resp);
    @(negedge clk);
    s_req[n].aw_valid = 1'b1;
    s_req[n].aw       = '{addr: addr, len: 8'(len - 1), burst: burst};
    forever begin #1; if (s_rsp[n].aw_ready) break; @(negedge clk); end
    @(negedge clk);
    s_req[n].aw_valid = 1'b0;
    for (int i = 0; i < len; i++) begin
      logic [31:0] a;
      a = beat_addr(addr, burst, 8'(i));
      s_req[n].w_valid = 1'b1;
      s_req[n].w       = '{data: pattern(n, a, salt + i), strb: '1, last: (i == len - 1)};
      forever begin #1; if (s_rsp[n].w_ready) break; @(negedge clk); end
      ref_mem[a] = pattern(n, a, salt + i);
      @(negedge clk);
    end
    s_req[n].w_valid = 1'b0;
    s_req[n].b_ready = 1'b1;
    forever begin #1; if (s_rsp[n].b_valid) break; @(negedge clk); end
    resp = s_rsp[n].b.resp;
    @(negedge clk);
    s_req[n].b_ready = 1'b0;
  endtask

  task automatic axi_read_check(int n, logic [31:0] addr, int len, logic [1:0] burst,
                                output int cycles);
    int beat, t0;
    @(negedge clk);
    s_req[n].ar_valid = 1'b1;
    s_req[n].ar       = '{addr: addr, len: 8'(len - 1), burst: burst};
    forever begin #1; if (s_rsp[n].ar_ready) break; @(negedge clk); end
    t0 = cyc;
    @(negedge clk);
    s_req[n].ar_valid = 1'b0;
    s_req[n].r_ready  = 1'b1;
    beat = 0;
    while (beat < len) begin
      #1;
      if (s_rsp[n].r_valid) begin
        logic [31:0] a;
        a = beat_addr(addr, burst, 8'(beat));
        checks++;
        if (s_rsp[n].r.data !== ref_rd(0, a) || s_rsp[n].r.resp != RESP_OKAY ||
            s_rsp[n].r.last != (beat == len - 1)) begin
          failures++;
          if (failures < 10)
            $display("FAIL read n%0d a=%h beat %0d: got %h resp %0d last %0d, want %h",
                     n, a, beat, s_rsp[n].r.data, s_rsp[n].r.resp, s_rsp[n].r.last, ref_rd(0, a));
        end
        beat++;
        if (beat == len) cycles = cyc - t0;
      end
      @(negedge clk);
    end
    s_req[n].r_ready = 1'b0;
  endtask

  task automatic wr_chk(int n, logic [31:0] addr, int len, logic [1:0] burst, int salt);
    logic [1:0] resp;
    axi_write(n, addr, len, burst, salt, resp);
    checks++;
    if (resp != RESP_OKAY) begin
      failures++;
      $display("FAIL write n%0d a=%h resp %0d", n, addr, resp);
    end
  endtask

  int cyc = 0;
  always @(posedge clk) cyc++;

  // offsets: local memory region and slave (outside memory) region
  function automatic logic [31:0] mem_off(int src, int k);
    return 32'(src * 128 + k * 32);
  endfunction
  function automatic logic [31:0] ext_off(int src, int k);
    return 32'h0010_0000 + 32'(src * 1024 + k * 300);
  endfunction

  function automatic logic [31:0] len_addr(int len);
    return node_addr(14, (len % 2 == 1) ? 32'(32'h800 + (len * 7) % 1792)
                                        : 32'(32'h0030_0000 + len * 256));
  endfunction

  // ------------------------------------------------ phases
  int n_mem_tx = 0, n_ext_tx = 0, n_local_tx = 0;

  task automatic pair_test(int s, int d);
    int c;
    // writes with several lengths into memory and slave
    for (int k = 0; k < 3; k++) begin
      wr_chk(s, node_addr(d, mem_off(s, k)), 1 + k * 7, BURST_INCR, 11 * k);
      wr_chk(s, node_addr(d, ext_off(s, k)), 2 + k * 6, BURST_INCR, 13 * k);
    end
    // read back in a different order
    for (int k = 2; k >= 0; k--) begin
      axi_read_check(s, node_addr(d, ext_off(s, k)), 2 + k * 6, BURST_INCR, c);
      axi_read_check(s, node_addr(d, mem_off(s, k)), 1 + k * 7, BURST_INCR, c);
    end
    if (s == d) n_local_tx += 6; else begin n_mem_tx += 6; n_ext_tx += 6; end
  endtask

  task automatic source_to_all(int s, int salt);
    int c;
    for (int d = 0; d < NN; d++) if (d != s) begin
      wr_chk(s, node_addr(d, mem_off(s, 3)), 1 + (d + salt) % 12, BURST_INCR, salt + d);
      wr_chk(s, node_addr(d, ext_off(s, 3)), 1 + (d * 3 + salt) % 10, BURST_INCR, salt + 2 * d);
    end
    for (int d = NN - 1; d >= 0; d--) if (d != s) begin
      axi_read_check(s, node_addr(d, mem_off(s, 3)), 1 + (d + salt) % 12, BURST_INCR, c);
      axi_read_check(s, node_addr(d, ext_off(s, 3)), 1 + (d * 3 + salt) % 10, BURST_INCR, c);
    end
  endtask

  initial begin
    int c;
    logic [31:0] sweep_a;
    int n_done = 0;
    for (int n = 0; n < NN; n++) s_req[n] = '0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;

    // Phase 1: the documented pair, then others; long bursts included
    pair_test(4, 14);
    pair_test(14, 4);
    pair_test(0, 15);
    pair_test(9, 9);                      // a node's own memory and slave
    wr_chk(4, node_addr(14, 32'h0000_0400), 256, BURST_INCR, 77);
    wr_chk(4, node_addr(14, 32'h0020_0000), 256, BURST_INCR, 78);
    axi_read_check(4, node_addr(14, 32'h0020_0000), 256, BURST_INCR, c);
    axi_read_check(4, node_addr(14, 32'h0000_0400), 256, BURST_INCR, c);
    // every burst length 1..256 from node 4 to node 14, alternately into the
    // upper half of its memory and into its slave, read back in reverse order
    for (int len = 1; len <= 256; len++) begin
      sweep_a = len_addr(len);
      wr_chk(4, sweep_a, len, BURST_INCR, len);
    end
    for (int len = 256; len >= 1; len--) begin
      sweep_a = len_addr(len);
      axi_read_check(4, sweep_a, len, BURST_INCR, c);
    end
    // FIXED burst: all beats to one address, the last one stays
    wr_chk(6, node_addr(1, 32'h0000_0F00), 4, BURST_FIXED, 5);
    axi_read_check(6, node_addr(1, 32'h0000_0F00), 3, BURST_FIXED, c);
    $display("phase 1 done at cycle %0d", cyc);

    // Phase 2: one source to all
    source_to_all(0, 1);
    source_to_all(10, 2);
    $display("phase 2 done at cycle %0d", cyc);

    // Phase 3: everybody at once (writes then reads, per source)
    for (int s = 0; s < NN; s++) begin
      automatic int ss = s;
      fork begin source_to_all(ss, 100 + ss); n_done++; end join_none
    end
    wait (n_done == NN);
    $display("phase 3 done at cycle %0d", cyc);

    // mechanism coverage
    checks++; if (n_adaptive == 0) begin failures++; $display("FAIL: no adaptive route taken"); end
    checks++; if (n_blocked == 0)  begin failures++; $display("FAIL: no busy output seen"); end
    checks++; if (n_ooo == 0)      begin failures++; $display("FAIL: no out-of-order R beat"); end
    checks++; if (n_scan == 0)     begin failures++; $display("FAIL: arbiter never scanned"); end
    checks++; if (n_local_tx == 0) begin failures++; $display("FAIL: no local access"); end
    begin
      int ws = 0;
      for (int n = 0; n < NN; n++) ws += sl_w[n];
      checks++; if (ws == 0) begin failures++; $display("FAIL: slaves never written"); end
    end
    $display("served=%0d adaptive=%0d blocked=%0d out_of_order_beats=%0d scan_skips=%0d cycles=%0d",
             n_served, n_adaptive, n_blocked, n_ooo, n_scan, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
