// noc_local_port: the network interface of one node, with its optional
// embedded memory and memory controller.
//
// It holds the AXI slave interface (for an attached master), the AXI master
// interface (for an attached slave) and, when MEM_EN is set, a dual-port
// local memory mapped at the start of the node's address block. Port A of
// the memory serves the attached master, port B requests from the network,
// so local and remote accesses proceed in parallel and both see the same
// data. Which of the three is present in a node is chosen by parameters,
// as the document's per-node customisation asks: HAS_MASTER (a master is
// attached), HAS_SLAVE (a slave is attached), MEM_EN and MEM_DEPTH.
// Without an attached master, the slave-interface side issues no flits and
// its AXI port is ignored. The flit ports face the router's local port.
module noc_local_port
  import noc_pkg::*;
#(
  parameter int unsigned NX         = 4,
  parameter int unsigned NY         = 4,
  parameter int unsigned MY_X       = 0,
  parameter int unsigned MY_Y       = 0,
  parameter bit          HAS_MASTER = 1'b1,
  parameter bit          HAS_SLAVE  = 1'b1,
  parameter bit          MEM_EN     = 1'b1,
  parameter int unsigned MEM_DEPTH  = 4096
) (
  input  logic     clk,
  input  logic     rst_n,
  // attached master
  input  axi_req_t s_req,
  output axi_rsp_t s_rsp,
  // attached slave
  output axi_req_t m_req,
  input  axi_rsp_t m_rsp,
  // flits to the router (local inputs)
  output logic     aw_o_valid, input logic aw_o_ready, output aw_flit_t aw_o,
  output logic     w_o_valid,  input logic w_o_ready,  output w_flit_t  w_o,
  output logic     ar_o_valid, input logic ar_o_ready, output ar_flit_t ar_o,
  output logic     b_o_valid,  input logic b_o_ready,  output b_flit_t  b_o,
  output logic     r_o_valid,  input logic r_o_ready,  output r_flit_t  r_o,
  // flits from the router (local outputs)
  input  logic     aw_i_valid, output logic aw_i_ready, input aw_flit_t aw_i,
  input  logic     w_i_valid,  output logic w_i_ready,  input w_flit_t  w_i,
  input  logic     ar_i_valid, output logic ar_i_ready, input ar_flit_t ar_i,
  input  logic     b_i_valid,  output logic b_i_ready,  input b_flit_t  b_i,
  input  logic     r_i_valid,  output logic r_i_ready,  input r_flit_t  r_i
);

  localparam int unsigned MAW = $clog2(MEM_DEPTH);

  logic              a_en, a_we, b_en, b_we;
  logic [MAW-1:0]    a_addr, b_addr;
  logic [DATA_W-1:0] a_wdata, b_wdata, a_rdata, b_rdata;
  logic [STRB_W-1:0] a_wstrb, b_wstrb;

  if (HAS_MASTER) begin : g_slave_if
    noc_ni_slave #(.NX(NX), .NY(NY), .MY_X(MY_X), .MY_Y(MY_Y),
                   .MEM_EN(MEM_EN), .MEM_DEPTH(MEM_DEPTH)) u_ni_slave (
      .clk, .rst_n, .s_req, .s_rsp,
      .aw_o_valid, .aw_o_ready, .aw_o,
      .w_o_valid, .w_o_ready, .w_o,
      .ar_o_valid, .ar_o_ready, .ar_o,
      .b_i_valid, .b_i_ready, .b_i,
      .r_i_valid, .r_i_ready, .r_i,
      .m_en(a_en), .m_we(a_we), .m_addr(a_addr), .m_wdata(a_wdata), .m_wstrb(a_wstrb),
      .m_rdata(a_rdata)
    );
  end else begin : g_no_slave_if
    assign s_rsp      = '0;
    assign aw_o_valid = 1'b0;
    assign aw_o       = '0;
    assign w_o_valid  = 1'b0;
    assign w_o        = '0;
    assign ar_o_valid = 1'b0;
    assign ar_o       = '0;
    assign b_i_ready  = 1'b1;
    assign r_i_ready  = 1'b1;
    assign {a_en, a_we, a_addr, a_wdata, a_wstrb} = '0;
  end

  noc_ni_master #(.NX(NX), .NY(NY), .MY_X(MY_X), .MY_Y(MY_Y), .MEM_EN(MEM_EN),
                  .HAS_SLAVE(HAS_SLAVE), .MEM_DEPTH(MEM_DEPTH)) u_ni_master (
    .clk, .rst_n, .m_req, .m_rsp,
    .aw_i_valid, .aw_i_ready, .aw_i,
    .w_i_valid, .w_i_ready, .w_i,
    .ar_i_valid, .ar_i_ready, .ar_i,
    .b_o_valid, .b_o_ready, .b_o,
    .r_o_valid, .r_o_ready, .r_o,
    .m_en(b_en), .m_we(b_we), .m_addr(b_addr), .m_wdata(b_wdata), .m_wstrb(b_wstrb),
    .m_rdata(b_rdata)
  );

  if (MEM_EN) begin : g_mem
    noc_local_mem #(.DEPTH(MEM_DEPTH)) u_mem (
      .clk,
      .a_en, .a_we, .a_addr, .a_wdata, .a_wstrb, .a_rdata,
      .b_en, .b_we, .b_addr, .b_wdata, .b_wstrb, .b_rdata
    );
  end else begin : g_no_mem
    assign a_rdata = '0;
    assign b_rdata = '0;
  end

endmodule
