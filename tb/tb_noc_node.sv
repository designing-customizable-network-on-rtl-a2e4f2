// tb_noc_node: one node, (1,1) of a 4x4 mesh (block 0x50000000), with its
// network ports driven by the testbench in place of the four neighbours.
// Checked: a remote read by the attached master leaves as an AR flit on the
// east port (target (3,2)) and its R flit, injected on the east input, is
// returned to the master; an AR flit arriving from the west for this node's
// memory is answered with an R flit on the west output carrying the data the
// master wrote locally; a W flit from the south for node (1,3) passes
// straight through to the north output; a B flit from the north for node
// (0,0) leaves west (X first). The AR crossing also checks the five-cycle
// router + receiver time of a node.
module tb_noc_node;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  axi_req_t s_req, m_req;
  axi_rsp_t s_rsp, m_rsp;
  int checks = 0, failures = 0, slw, slr;
  logic [31:0] ref_mem [logic [31:0]];
  `include "tb_axi_master_tasks.svh"

  logic aw_iv[4], aw_ir[4], aw_ov[4], aw_or[4]; aw_flit_t aw_id[4], aw_od[4];
  logic w_iv[4],  w_ir[4],  w_ov[4],  w_or[4];  w_flit_t  w_id[4],  w_od[4];
  logic b_iv[4],  b_ir[4],  b_ov[4],  b_or[4];  b_flit_t  b_id[4],  b_od[4];
  logic ar_iv[4], ar_ir[4], ar_ov[4], ar_or[4]; ar_flit_t ar_id[4], ar_od[4];
  logic r_iv[4],  r_ir[4],  r_ov[4],  r_or[4];  r_flit_t  r_id[4],  r_od[4];
  logic [4:0] evs, eva, evb;

  noc_node #(.NX(4), .NY(4), .MY_X(1), .MY_Y(1), .MEM_DEPTH(256)) dut (
    .clk, .rst_n, .s_req, .s_rsp, .m_req, .m_rsp,
    .aw_in_valid(aw_iv), .aw_in_ready(aw_ir), .aw_in_data(aw_id),
    .aw_out_valid(aw_ov), .aw_out_ready(aw_or), .aw_out_data(aw_od),
    .w_in_valid(w_iv), .w_in_ready(w_ir), .w_in_data(w_id),
    .w_out_valid(w_ov), .w_out_ready(w_or), .w_out_data(w_od),
    .b_in_valid(b_iv), .b_in_ready(b_ir), .b_in_data(b_id),
    .b_out_valid(b_ov), .b_out_ready(b_or), .b_out_data(b_od),
    .ar_in_valid(ar_iv), .ar_in_ready(ar_ir), .ar_in_data(ar_id),
    .ar_out_valid(ar_ov), .ar_out_ready(ar_or), .ar_out_data(ar_od),
    .r_in_valid(r_iv), .r_in_ready(r_ir), .r_in_data(r_id),
    .r_out_valid(r_ov), .r_out_ready(r_or), .r_out_data(r_od),
    .ev_served(evs), .ev_adaptive(eva), .ev_blocked(evb));
  tb_axi_slave u_sl (.clk, .rst_n, .req(m_req), .rsp(m_rsp), .n_writes(slw), .n_reads(slr));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int t;
    s_req = '0;
    for (int d = 0; d < 4; d++) begin
      aw_iv[d] = 0; w_iv[d] = 0; b_iv[d] = 0; ar_iv[d] = 0; r_iv[d] = 0;
      aw_id[d] = '0; w_id[d] = '0; b_id[d] = '0; ar_id[d] = '0; r_id[d] = '0;
      aw_or[d] = 1; w_or[d] = 1; b_or[d] = 1; ar_or[d] = 1; r_or[d] = 1;
    end
    repeat (3) @(negedge clk); rst_n = 1;

    // 1. remote read: AR out east, R in from east
    fork
      begin
        t = 0;
        while (!ar_ov[DIR_E]) begin @(negedge clk); t++; end
        chk(ar_od[DIR_E].route == 32'hE000_0100 && ar_od[DIR_E].src == 8'h11 &&
            ar_od[DIR_E].len == 0, "AR flit east");
        @(negedge clk);
        r_iv[DIR_E] = 1;
        r_id[DIR_E] = '{data: 32'hCAFE_F00D, resp: RESP_OKAY, idx: 0, last: 1, route: 32'h5000_0000};
        #1; while (!r_ir[DIR_E]) begin @(negedge clk); #1; end
        @(negedge clk); r_iv[DIR_E] = 0;
      end
      begin
        ref_mem[32'hE000_0100] = 32'hCAFE_F00D;
        m_read(32'hE000_0100, 1, BURST_INCR, RESP_OKAY);
      end
    join
    // counted from one cycle before ARVALID rises: 1 (master) + 1 (AXI
    // handshake into the interface's flit register) + 5 (receiver + router)
    chk(t == 7, $sformatf("AR leaves after %0d cycles, want 7", t));

    // 2. remote read of this node's memory arriving from the west
    m_write(32'h5000_0010, 2, BURST_INCR, 9, RESP_OKAY);
    @(negedge clk);
    ar_iv[DIR_W] = 1; ar_id[DIR_W] = '{len: 8'd1, burst: BURST_INCR, src: 8'h01, route: 32'h5000_0010};
    #1; while (!ar_ir[DIR_W]) begin @(negedge clk); #1; end
    @(negedge clk); ar_iv[DIR_W] = 0;
    for (int beat = 0; beat < 2; beat++) begin
      int g = 0;
      while (!r_ov[DIR_W] && g < 100) begin @(negedge clk); g++; end
      chk(r_ov[DIR_W] && r_od[DIR_W].data == ref_rd(32'h5000_0010 + 32'(beat)) &&
          r_od[DIR_W].idx == 8'(beat) && r_od[DIR_W].route == 32'h1000_0000,
          $sformatf("R flit west beat %0d", beat));
      @(negedge clk);
    end

    // 3. W flit from south to (1,3) goes north unchanged
    @(negedge clk);
    w_iv[DIR_S] = 1; w_id[DIR_S] = '{data: 32'h1111_2222, strb: '1, idx: 3, src: 8'h10, route: 32'h7000_0040};
    #1; while (!w_ir[DIR_S]) begin @(negedge clk); #1; end
    @(negedge clk); w_iv[DIR_S] = 0;
    begin
      int g = 0;
      while (!w_ov[DIR_N] && g < 50) begin @(negedge clk); g++; end
      chk(w_ov[DIR_N] && w_od[DIR_N] == '{data: 32'h1111_2222, strb: 4'hF, idx: 8'd3, src: 8'h10,
                                           route: 32'h7000_0040}, "W pass-through north");
    end

    // 4. B flit from north for node (0,0) leaves west
    @(negedge clk);
    b_iv[DIR_N] = 1; b_id[DIR_N] = '{resp: RESP_OKAY, route: 32'h0};
    #1; while (!b_ir[DIR_N]) begin @(negedge clk); #1; end
    @(negedge clk); b_iv[DIR_N] = 0;
    begin
      int g = 0;
      while (!b_ov[DIR_W] && g < 50) begin @(negedge clk); g++; end
      chk(b_ov[DIR_W] && !b_ov[DIR_S], "B west first");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
