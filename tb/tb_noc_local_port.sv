// tb_noc_local_port: the local port of node (1,0) of a 2x2 mesh, with its
// request flit outputs looped straight back into its request inputs and its
// response outputs into its response inputs, i.e. as if its own router
// delivered everything back to it. The attached master then reaches (a) the
// local memory through port A (local access), (b) the attached slave,
// through the network side (address in the node's block but past the
// memory). Burst writes to the slave arrive there as single-beat writes
// (6 writes for the 5+1 beats), reads as one burst each. Accesses to the
// memory range must use memory port A and never reach the slave.
module tb_noc_local_port;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  axi_req_t s_req, m_req;
  axi_rsp_t s_rsp, m_rsp;
  int checks = 0, failures = 0, slw, slr;
  logic [31:0] ref_mem [logic [31:0]];
  `include "tb_axi_master_tasks.svh"

  logic aw_v, aw_r, w_v, w_r, ar_v, ar_r, b_v, b_r, r_v, r_r;
  aw_flit_t aw_f; w_flit_t w_f; ar_flit_t ar_f; b_flit_t b_f; r_flit_t r_f;

  noc_local_port #(.NX(2), .NY(2), .MY_X(1), .MY_Y(0), .MEM_DEPTH(256)) dut (
    .clk, .rst_n, .s_req, .s_rsp, .m_req, .m_rsp,
    .aw_o_valid(aw_v), .aw_o_ready(aw_r), .aw_o(aw_f),
    .w_o_valid(w_v), .w_o_ready(w_r), .w_o(w_f),
    .ar_o_valid(ar_v), .ar_o_ready(ar_r), .ar_o(ar_f),
    .b_o_valid(b_v), .b_o_ready(b_r), .b_o(b_f),
    .r_o_valid(r_v), .r_o_ready(r_r), .r_o(r_f),
    .aw_i_valid(aw_v), .aw_i_ready(aw_r), .aw_i(aw_f),
    .w_i_valid(w_v), .w_i_ready(w_r), .w_i(w_f),
    .ar_i_valid(ar_v), .ar_i_ready(ar_r), .ar_i(ar_f),
    .b_i_valid(b_v), .b_i_ready(b_r), .b_i(b_f),
    .r_i_valid(r_v), .r_i_ready(r_r), .r_i(r_f));

  tb_axi_slave u_sl (.clk, .rst_n, .req(m_req), .rsp(m_rsp), .n_writes(slw), .n_reads(slr));

  int a_uses = 0, b_uses = 0;
  always @(posedge clk) begin
    if (dut.a_en) a_uses++;
    if (dut.b_en) b_uses++;
  end

  localparam logic [31:0] BASE = 32'h8000_0000;   // node (1,0) of a 2x2 mesh
  initial begin
    s_req = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    // local memory through port A
    m_write(BASE + 32'h10, 8, BURST_INCR, 1, RESP_OKAY);
    m_read (BASE + 32'h10, 8, BURST_INCR, RESP_OKAY);
    m_write(BASE + 32'hF0, 16, BURST_INCR, 2, RESP_OKAY);   // last 16 words
    m_read (BASE + 32'hF4, 12, BURST_INCR, RESP_OKAY);
    // attached slave through the network side
    m_write(BASE + 32'h100, 5, BURST_INCR, 3, RESP_OKAY);
    m_read (BASE + 32'h100, 5, BURST_INCR, RESP_OKAY);
    m_write(BASE + 32'h0123_4567, 1, BURST_INCR, 4, RESP_OKAY);
    m_read (BASE + 32'h0123_4560, 9, BURST_INCR, RESP_OKAY);
    checks++; if (slw != 6 || slr != 2) begin failures++; $display("FAIL slave use %0d %0d", slw, slr); end
    checks++; if (a_uses == 0) begin failures++; $display("FAIL port A unused"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
