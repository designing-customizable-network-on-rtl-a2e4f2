// tb_noc_latency: zero-load latency on a 7x7 mesh, the document's timing
// experiment. Node 0 (bottom-left) issues single-beat reads to twelve nodes
// 1 to 12 hops away, one at a time, with no other traffic; every node's
// attached slave answers at once. The latency of a read is counted in clock
// cycles from the cycle the master raises ARVALID to the cycle RVALID is
// high (both inclusive). Each node passed costs five cycles for the request
// and five for the response, so every extra hop must add exactly 10 cycles,
// as in the document's Table 4.2 (22 cycles for 1 hop up to 132 for 12).
// The fixed part differs: the document counts one cycle per local interface
// (10*(hops+1) + 2); here the local interfaces register each crossing and
// the attached slave answers one cycle after taking the address, which
// gives 10*(hops+1) + 6. Both the slope and this total are checked, and the
// data of every read.
module tb_noc_latency;
  import noc_pkg::*;

  localparam int NX = 7, NY = 7, NN = NX * NY;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  axi_req_t   s_req [NN];
  axi_rsp_t   s_rsp [NN];
  axi_req_t   m_req [NN];
  axi_rsp_t   m_rsp [NN];
  logic [4:0] ev_served [NN], ev_adaptive [NN], ev_blocked [NN];
  int         sl_w [NN], sl_r [NN];

  noc_mesh #(.NX(NX), .NY(NY)) dut (.*);

  for (genvar n = 0; n < NN; n++) begin : g_sl
    tb_axi_slave u_sl (.clk, .rst_n, .req(m_req[n]), .rsp(m_rsp[n]),
                       .n_writes(sl_w[n]), .n_reads(sl_r[n]));
  end

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    for (int n = 0; n < NN; n++) s_req[n] = '0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    for (int h = 1; h <= 12; h++) begin
      int x, y, t0, lat, want;
      logic [31:0] a;
      x = (h <= 6) ? h : 6;
      y = (h <= 6) ? 0 : h - 6;
      a = node_base(NX, NY, x, y) + 32'h0010_0040 + 32'(h);
      @(negedge clk);
      s_req[0].ar_valid = 1'b1;
      s_req[0].ar       = '{addr: a, len: 8'd0, burst: BURST_INCR};
      s_req[0].r_ready  = 1'b1;
      t0 = cyc;
      forever begin #1; if (s_rsp[0].ar_ready) break; @(negedge clk); end
      @(negedge clk);
      s_req[0].ar_valid = 1'b0;
      forever begin #1; if (s_rsp[0].r_valid) break; @(negedge clk); end
      lat  = cyc - t0 + 1;
      want = 10 * (h + 1) + 6;
      checks++;
      if (lat != want) begin
        failures++;
        $display("FAIL hops=%0d latency %0d, want %0d", h, lat, want);
      end else $display("hops=%0d latency=%0d cycles", h, lat);
      checks++;
      if (s_rsp[0].r.data != (a ^ 32'hA5A5_5A5A) || !s_rsp[0].r.last) begin
        failures++;
        $display("FAIL hops=%0d data %h", h, s_rsp[0].r.data);
      end
      @(negedge clk);
      s_req[0].r_ready = 1'b0;
      repeat (4) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
