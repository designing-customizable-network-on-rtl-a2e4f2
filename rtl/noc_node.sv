// noc_node: one node of the mesh.
//
// A node has five sets of ports, one per direction (north, east, south, west)
// and the local port. Each network direction has a master and a slave half,
// each with all five AXI channels; here they are grouped by channel: for
// every channel the node has one incoming and one outgoing flit port per
// direction (AW, W, AR travel out on the master half and in on the slave
// half; B and R the other way round). Inside, each channel has its own
// router with a receiver on each input (noc_channel), and all five routers
// share the local port (noc_local_port), where the attached master, the
// attached slave and the optional local memory meet the network.
//
// Per-channel flit ports are arrays indexed 0..3 = N, E, S, W. Every
// transfer is a valid/ready handshake. The ev_* outputs pulse per channel
// (bit order AW, W, B, AR, R) when a router serves a flit, takes the
// adaptive vertical route, or finds its outputs busy.
module noc_node
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
  // AXI port of the attached master (the node is its slave)
  input  axi_req_t s_req,
  output axi_rsp_t s_rsp,
  // AXI port of the attached slave (the node is its master)
  output axi_req_t m_req,
  input  axi_rsp_t m_rsp,
  // AW channel: flits from / to the four neighbours (N,E,S,W)
  input  logic     aw_in_valid [4],
  output logic     aw_in_ready [4],
  input  aw_flit_t aw_in_data  [4],
  output logic     aw_out_valid[4],
  input  logic     aw_out_ready[4],
  output aw_flit_t aw_out_data [4],
  // W channel: flits from / to the four neighbours (N,E,S,W)
  input  logic     w_in_valid [4],
  output logic     w_in_ready [4],
  input  w_flit_t w_in_data  [4],
  output logic     w_out_valid[4],
  input  logic     w_out_ready[4],
  output w_flit_t w_out_data [4],
  // B channel: flits from / to the four neighbours (N,E,S,W)
  input  logic     b_in_valid [4],
  output logic     b_in_ready [4],
  input  b_flit_t b_in_data  [4],
  output logic     b_out_valid[4],
  input  logic     b_out_ready[4],
  output b_flit_t b_out_data [4],
  // AR channel: flits from / to the four neighbours (N,E,S,W)
  input  logic     ar_in_valid [4],
  output logic     ar_in_ready [4],
  input  ar_flit_t ar_in_data  [4],
  output logic     ar_out_valid[4],
  input  logic     ar_out_ready[4],
  output ar_flit_t ar_out_data [4],
  // R channel: flits from / to the four neighbours (N,E,S,W)
  input  logic     r_in_valid [4],
  output logic     r_in_ready [4],
  input  r_flit_t r_in_data  [4],
  output logic     r_out_valid[4],
  input  logic     r_out_ready[4],
  output r_flit_t r_out_data [4],
  output logic [4:0] ev_served,
  output logic [4:0] ev_adaptive,
  output logic [4:0] ev_blocked
);

  logic l_aw_o_valid, l_aw_o_ready, l_aw_i_valid, l_aw_i_ready;
  aw_flit_t l_aw_o, l_aw_i;
  logic l_w_o_valid, l_w_o_ready, l_w_i_valid, l_w_i_ready;
  w_flit_t l_w_o, l_w_i;
  logic l_b_o_valid, l_b_o_ready, l_b_i_valid, l_b_i_ready;
  b_flit_t l_b_o, l_b_i;
  logic l_ar_o_valid, l_ar_o_ready, l_ar_i_valid, l_ar_i_ready;
  ar_flit_t l_ar_o, l_ar_i;
  logic l_r_o_valid, l_r_o_ready, l_r_i_valid, l_r_i_ready;
  r_flit_t l_r_o, l_r_i;

  noc_local_port #(.NX(NX), .NY(NY), .MY_X(MY_X), .MY_Y(MY_Y), .HAS_MASTER(HAS_MASTER),
                   .HAS_SLAVE(HAS_SLAVE), .MEM_EN(MEM_EN), .MEM_DEPTH(MEM_DEPTH)) u_lp (
    .clk, .rst_n, .s_req, .s_rsp, .m_req, .m_rsp,
    .aw_o_valid(l_aw_o_valid), .aw_o_ready(l_aw_o_ready), .aw_o(l_aw_o),
    .w_o_valid(l_w_o_valid), .w_o_ready(l_w_o_ready), .w_o(l_w_o),
    .b_o_valid(l_b_o_valid), .b_o_ready(l_b_o_ready), .b_o(l_b_o),
    .ar_o_valid(l_ar_o_valid), .ar_o_ready(l_ar_o_ready), .ar_o(l_ar_o),
    .r_o_valid(l_r_o_valid), .r_o_ready(l_r_o_ready), .r_o(l_r_o),
    .aw_i_valid(l_aw_i_valid), .aw_i_ready(l_aw_i_ready), .aw_i(l_aw_i),
    .w_i_valid(l_w_i_valid), .w_i_ready(l_w_i_ready), .w_i(l_w_i),
    .b_i_valid(l_b_i_valid), .b_i_ready(l_b_i_ready), .b_i(l_b_i),
    .ar_i_valid(l_ar_i_valid), .ar_i_ready(l_ar_i_ready), .ar_i(l_ar_i),
    .r_i_valid(l_r_i_valid), .r_i_ready(l_r_i_ready), .r_i(l_r_i)
  );

  // ---------------- AW ----------------
  logic            aw_iv [NPORTS];
  logic            aw_ir [NPORTS];
  logic [AW_FLIT_W-1:0] aw_id [NPORTS];
  logic            aw_ov [NPORTS];
  logic            aw_or [NPORTS];
  logic [AW_FLIT_W-1:0] aw_od [NPORTS];
  always_comb begin
    for (int d = 0; d < 4; d++) begin
      aw_iv[d]        = aw_in_valid[d];
      aw_in_ready[d]  = aw_ir[d];
      aw_id[d]        = aw_in_data[d];
      aw_out_valid[d] = aw_ov[d];
      aw_or[d]        = aw_out_ready[d];
      aw_out_data[d]  = aw_od[d];
    end
    aw_iv[DIR_L] = l_aw_o_valid;
    aw_id[DIR_L] = l_aw_o;
    aw_or[DIR_L] = l_aw_i_ready;
  end
  assign l_aw_o_ready = aw_ir[DIR_L];
  assign l_aw_i_valid = aw_ov[DIR_L];
  assign l_aw_i       = aw_od[DIR_L];

  noc_channel #(.WIDTH(AW_FLIT_W), .NX(NX), .NY(NY), .MY_X(MY_X), .MY_Y(MY_Y)) u_aw (
    .clk, .rst_n,
    .in_valid(aw_iv), .in_ready(aw_ir), .in_data(aw_id),
    .out_valid(aw_ov), .out_ready(aw_or), .out_data(aw_od),
    .served(ev_served[0]), .adaptive(ev_adaptive[0]), .blocked(ev_blocked[0])
  );
  // ---------------- W ----------------
  logic            w_iv [NPORTS];
  logic            w_ir [NPORTS];
  logic [W_FLIT_W-1:0] w_id [NPORTS];
  logic            w_ov [NPORTS];
  logic            w_or [NPORTS];
  logic [W_FLIT_W-1:0] w_od [NPORTS];
  always_comb begin
    for (int d = 0; d < 4; d++) begin
      w_iv[d]        = w_in_valid[d];
      w_in_ready[d]  = w_ir[d];
      w_id[d]        = w_in_data[d];
      w_out_valid[d] = w_ov[d];
      w_or[d]        = w_out_ready[d];
      w_out_data[d]  = w_od[d];
    end
    w_iv[DIR_L] = l_w_o_valid;
    w_id[DIR_L] = l_w_o;
    w_or[DIR_L] = l_w_i_ready;
  end
  assign l_w_o_ready = w_ir[DIR_L];
  assign l_w_i_valid = w_ov[DIR_L];
  assign l_w_i       = w_od[DIR_L];

  noc_channel #(.WIDTH(W_FLIT_W), .NX(NX), .NY(NY), .MY_X(MY_X), .MY_Y(MY_Y)) u_w (
    .clk, .rst_n,
    .in_valid(w_iv), .in_ready(w_ir), .in_data(w_id),
    .out_valid(w_ov), .out_ready(w_or), .out_data(w_od),
    .served(ev_served[1]), .adaptive(ev_adaptive[1]), .blocked(ev_blocked[1])
  );
  // ---------------- B ----------------
  logic            b_iv [NPORTS];
  logic            b_ir [NPORTS];
  logic [B_FLIT_W-1:0] b_id [NPORTS];
  logic            b_ov [NPORTS];
  logic            b_or [NPORTS];
  logic [B_FLIT_W-1:0] b_od [NPORTS];
  always_comb begin
    for (int d = 0; d < 4; d++) begin
      b_iv[d]        = b_in_valid[d];
      b_in_ready[d]  = b_ir[d];
      b_id[d]        = b_in_data[d];
      b_out_valid[d] = b_ov[d];
      b_or[d]        = b_out_ready[d];
      b_out_data[d]  = b_od[d];
    end
    b_iv[DIR_L] = l_b_o_valid;
    b_id[DIR_L] = l_b_o;
    b_or[DIR_L] = l_b_i_ready;
  end
  assign l_b_o_ready = b_ir[DIR_L];
  assign l_b_i_valid = b_ov[DIR_L];
  assign l_b_i       = b_od[DIR_L];

  noc_channel #(.WIDTH(B_FLIT_W), .NX(NX), .NY(NY), .MY_X(MY_X), .MY_Y(MY_Y)) u_b (
    .clk, .rst_n,
    .in_valid(b_iv), .in_ready(b_ir), .in_data(b_id),
    .out_valid(b_ov), .out_ready(b_or), .out_data(b_od),
    .served(ev_served[2]), .adaptive(ev_adaptive[2]), .blocked(ev_blocked[2])
  );
  // ---------------- AR ----------------
  logic            ar_iv [NPORTS];
  logic            ar_ir [NPORTS];
  logic [AR_FLIT_W-1:0] ar_id [NPORTS];
  logic            ar_ov [NPORTS];
  logic            ar_or [NPORTS];
  logic [AR_FLIT_W-1:0] ar_od [NPORTS];
  always_comb begin
    for (int d = 0; d < 4; d++) begin
      ar_iv[d]        = ar_in_valid[d];
      ar_in_ready[d]  = ar_ir[d];
      ar_id[d]        = ar_in_data[d];
      ar_out_valid[d] = ar_ov[d];
      ar_or[d]        = ar_out_ready[d];
      ar_out_data[d]  = ar_od[d];
    end
    ar_iv[DIR_L] = l_ar_o_valid;
    ar_id[DIR_L] = l_ar_o;
    ar_or[DIR_L] = l_ar_i_ready;
  end
  assign l_ar_o_ready = ar_ir[DIR_L];
  assign l_ar_i_valid = ar_ov[DIR_L];
  assign l_ar_i       = ar_od[DIR_L];

  noc_channel #(.WIDTH(AR_FLIT_W), .NX(NX), .NY(NY), .MY_X(MY_X), .MY_Y(MY_Y)) u_ar (
    .clk, .rst_n,
    .in_valid(ar_iv), .in_ready(ar_ir), .in_data(ar_id),
    .out_valid(ar_ov), .out_ready(ar_or), .out_data(ar_od),
    .served(ev_served[3]), .adaptive(ev_adaptive[3]), .blocked(ev_blocked[3])
  );
  // ---------------- R ----------------
  logic            r_iv [NPORTS];
  logic            r_ir [NPORTS];
  logic [R_FLIT_W-1:0] r_id [NPORTS];
  logic            r_ov [NPORTS];
  logic            r_or [NPORTS];
  logic [R_FLIT_W-1:0] r_od [NPORTS];
  always_comb begin
    for (int d = 0; d < 4; d++) begin
      r_iv[d]        = r_in_valid[d];
      r_in_ready[d]  = r_ir[d];
      r_id[d]        = r_in_data[d];
      r_out_valid[d] = r_ov[d];
      r_or[d]        = r_out_ready[d];
      r_out_data[d]  = r_od[d];
    end
    r_iv[DIR_L] = l_r_o_valid;
    r_id[DIR_L] = l_r_o;
    r_or[DIR_L] = l_r_i_ready;
  end
  assign l_r_o_ready = r_ir[DIR_L];
  assign l_r_i_valid = r_ov[DIR_L];
  assign l_r_i       = r_od[DIR_L];

  noc_channel #(.WIDTH(R_FLIT_W), .NX(NX), .NY(NY), .MY_X(MY_X), .MY_Y(MY_Y)) u_r (
    .clk, .rst_n,
    .in_valid(r_iv), .in_ready(r_ir), .in_data(r_id),
    .out_valid(r_ov), .out_ready(r_or), .out_data(r_od),
    .served(ev_served[4]), .adaptive(ev_adaptive[4]), .blocked(ev_blocked[4])
  );

endmodule
