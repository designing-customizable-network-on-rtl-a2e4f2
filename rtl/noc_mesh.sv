// noc_mesh: top level of the network-on-chip, an NX-by-NY mesh of nodes.
//
// Node (x,y) sits in column x (east is +x) and row y (north is +y); node 0
// is the bottom-left corner and node n = x*NY + y owns the n-th equal block
// of the 32-bit address space. Every outgoing channel of a node is wired to
// the same channel's incoming port of the neighbour in that direction (the
// east master AW of one node to the west slave AW of the next, and so on).
// Ports at the edge of the mesh are tied off: nothing arrives there and
// minimal routing never sends anything there.
//
// Each node is customised by bit n of three masks, following the document:
// HAS_MASTER_MASK (an AXI master is attached), HAS_SLAVE_MASK (an AXI slave
// is attached) and MEM_MASK (local memory of MEM_DEPTH words). Defaults are
// the document's main configuration: a 4x4 mesh, every node master and
// slave, 4096-word local memory in every node.
//
// Top ports: per node n, the AXI port of its master (s_req/s_rsp) and of its
// slave (m_req/m_rsp), and the router event pulses (see noc_node).
module noc_mesh
  import noc_pkg::*;
#(
  parameter int unsigned           NX              = 4,
  parameter int unsigned           NY              = 4,
  parameter int unsigned           MEM_DEPTH       = 4096,
  parameter logic [NX*NY-1:0]      HAS_MASTER_MASK = '1,
  parameter logic [NX*NY-1:0]      HAS_SLAVE_MASK  = '1,
  parameter logic [NX*NY-1:0]      MEM_MASK        = '1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  axi_req_t   s_req [NX*NY],
  output axi_rsp_t   s_rsp [NX*NY],
  output axi_req_t   m_req [NX*NY],
  input  axi_rsp_t   m_rsp [NX*NY],
  output logic [4:0] ev_served   [NX*NY],
  output logic [4:0] ev_adaptive [NX*NY],
  output logic [4:0] ev_blocked  [NX*NY]
);

  logic     aw_v [NX][NY][4];   // valid of the flit leaving node (x,y) towards d
  logic     aw_r [NX][NY][4];   // ready for it, from the neighbour
  aw_flit_t aw_d [NX][NY][4];
  logic     aw_iv[NX][NY][4];   // what node (x,y) receives from direction d
  logic     aw_ir[NX][NY][4];
  aw_flit_t aw_id[NX][NY][4];
  logic     w_v [NX][NY][4];   // valid of the flit leaving node (x,y) towards d
  logic     w_r [NX][NY][4];   // ready for it, from the neighbour
  w_flit_t w_d [NX][NY][4];
  logic     w_iv[NX][NY][4];   // what node (x,y) receives from direction d
  logic     w_ir[NX][NY][4];
  w_flit_t w_id[NX][NY][4];
  logic     b_v [NX][NY][4];   // valid of the flit leaving node (x,y) towards d
  logic     b_r [NX][NY][4];   // ready for it, from the neighbour
  b_flit_t b_d [NX][NY][4];
  logic     b_iv[NX][NY][4];   // what node (x,y) receives from direction d
  logic     b_ir[NX][NY][4];
  b_flit_t b_id[NX][NY][4];
  logic     ar_v [NX][NY][4];   // valid of the flit leaving node (x,y) towards d
  logic     ar_r [NX][NY][4];   // ready for it, from the neighbour
  ar_flit_t ar_d [NX][NY][4];
  logic     ar_iv[NX][NY][4];   // what node (x,y) receives from direction d
  logic     ar_ir[NX][NY][4];
  ar_flit_t ar_id[NX][NY][4];
  logic     r_v [NX][NY][4];   // valid of the flit leaving node (x,y) towards d
  logic     r_r [NX][NY][4];   // ready for it, from the neighbour
  r_flit_t r_d [NX][NY][4];
  logic     r_iv[NX][NY][4];   // what node (x,y) receives from direction d
  logic     r_ir[NX][NY][4];
  r_flit_t r_id[NX][NY][4];

  for (genvar x = 0; x < NX; x++) begin : g_x
    for (genvar y = 0; y < NY; y++) begin : g_y
      localparam int unsigned N  = x * NY + y;
      localparam int unsigned YN = (y + 1 < NY) ? y + 1 : y;
      localparam int unsigned YS = (y > 0) ? y - 1 : y;
      localparam int unsigned XE = (x + 1 < NX) ? x + 1 : x;
      localparam int unsigned XW = (x > 0) ? x - 1 : x;

      noc_node #(
        .NX(NX), .NY(NY), .MY_X(x), .MY_Y(y),
        .HAS_MASTER(HAS_MASTER_MASK[N]), .HAS_SLAVE(HAS_SLAVE_MASK[N]),
        .MEM_EN(MEM_MASK[N]), .MEM_DEPTH(MEM_DEPTH)
      ) u_node (
        .clk, .rst_n,
        .s_req(s_req[N]), .s_rsp(s_rsp[N]), .m_req(m_req[N]), .m_rsp(m_rsp[N]),
        .aw_in_valid(aw_iv[x][y]), .aw_in_ready(aw_ir[x][y]), .aw_in_data(aw_id[x][y]),
        .aw_out_valid(aw_v[x][y]), .aw_out_ready(aw_r[x][y]), .aw_out_data(aw_d[x][y]),
        .w_in_valid(w_iv[x][y]), .w_in_ready(w_ir[x][y]), .w_in_data(w_id[x][y]),
        .w_out_valid(w_v[x][y]), .w_out_ready(w_r[x][y]), .w_out_data(w_d[x][y]),
        .b_in_valid(b_iv[x][y]), .b_in_ready(b_ir[x][y]), .b_in_data(b_id[x][y]),
        .b_out_valid(b_v[x][y]), .b_out_ready(b_r[x][y]), .b_out_data(b_d[x][y]),
        .ar_in_valid(ar_iv[x][y]), .ar_in_ready(ar_ir[x][y]), .ar_in_data(ar_id[x][y]),
        .ar_out_valid(ar_v[x][y]), .ar_out_ready(ar_r[x][y]), .ar_out_data(ar_d[x][y]),
        .r_in_valid(r_iv[x][y]), .r_in_ready(r_ir[x][y]), .r_in_data(r_id[x][y]),
        .r_out_valid(r_v[x][y]), .r_out_ready(r_r[x][y]), .r_out_data(r_d[x][y]),
        .ev_served(ev_served[N]), .ev_adaptive(ev_adaptive[N]), .ev_blocked(ev_blocked[N])
      );

      always_comb begin
        // from the north neighbour (its south output)
        if (y + 1 < NY) begin
          aw_iv[x][y][0] = aw_v[x][YN][2]; aw_id[x][y][0] = aw_d[x][YN][2]; aw_r[x][y][0] = aw_ir[x][YN][2];
        end else begin
          aw_iv[x][y][0] = 1'b0; aw_id[x][y][0] = '0; aw_r[x][y][0] = 1'b1;
        end
        // from the east neighbour (its west output)
        if (x + 1 < NX) begin
          aw_iv[x][y][1] = aw_v[XE][y][3]; aw_id[x][y][1] = aw_d[XE][y][3]; aw_r[x][y][1] = aw_ir[XE][y][3];
        end else begin
          aw_iv[x][y][1] = 1'b0; aw_id[x][y][1] = '0; aw_r[x][y][1] = 1'b1;
        end
        // from the south neighbour (its north output)
        if (y > 0) begin
          aw_iv[x][y][2] = aw_v[x][YS][0]; aw_id[x][y][2] = aw_d[x][YS][0]; aw_r[x][y][2] = aw_ir[x][YS][0];
        end else begin
          aw_iv[x][y][2] = 1'b0; aw_id[x][y][2] = '0; aw_r[x][y][2] = 1'b1;
        end
        // from the west neighbour (its east output)
        if (x > 0) begin
          aw_iv[x][y][3] = aw_v[XW][y][1]; aw_id[x][y][3] = aw_d[XW][y][1]; aw_r[x][y][3] = aw_ir[XW][y][1];
        end else begin
          aw_iv[x][y][3] = 1'b0; aw_id[x][y][3] = '0; aw_r[x][y][3] = 1'b1;
        end
      end
      always_comb begin
        // from the north neighbour (its south output)
        if (y + 1 < NY) begin
          w_iv[x][y][0] = w_v[x][YN][2]; w_id[x][y][0] = w_d[x][YN][2]; w_r[x][y][0] = w_ir[x][YN][2];
        end else begin
          w_iv[x][y][0] = 1'b0; w_id[x][y][0] = '0; w_r[x][y][0] = 1'b1;
        end
        // from the east neighbour (its west output)
        if (x + 1 < NX) begin
          w_iv[x][y][1] = w_v[XE][y][3]; w_id[x][y][1] = w_d[XE][y][3]; w_r[x][y][1] = w_ir[XE][y][3];
        end else begin
          w_iv[x][y][1] = 1'b0; w_id[x][y][1] = '0; w_r[x][y][1] = 1'b1;
        end
        // from the south neighbour (its north output)
        if (y > 0) begin
          w_iv[x][y][2] = w_v[x][YS][0]; w_id[x][y][2] = w_d[x][YS][0]; w_r[x][y][2] = w_ir[x][YS][0];
        end else begin
          w_iv[x][y][2] = 1'b0; w_id[x][y][2] = '0; w_r[x][y][2] = 1'b1;
        end
        // from the west neighbour (its east output)
        if (x > 0) begin
          w_iv[x][y][3] = w_v[XW][y][1]; w_id[x][y][3] = w_d[XW][y][1]; w_r[x][y][3] = w_ir[XW][y][1];
        end else begin
          w_iv[x][y][3] = 1'b0; w_id[x][y][3] = '0; w_r[x][y][3] = 1'b1;
        end
      end
      always_comb begin
        // from the north neighbour (its south output)
        if (y + 1 < NY) begin
          b_iv[x][y][0] = b_v[x][YN][2]; b_id[x][y][0] = b_d[x][YN][2]; b_r[x][y][0] = b_ir[x][YN][2];
        end else begin
          b_iv[x][y][0] = 1'b0; b_id[x][y][0] = '0; b_r[x][y][0] = 1'b1;
        end
        // from the east neighbour (its west output)
        if (x + 1 < NX) begin
          b_iv[x][y][1] = b_v[XE][y][3]; b_id[x][y][1] = b_d[XE][y][3]; b_r[x][y][1] = b_ir[XE][y][3];
        end else begin
          b_iv[x][y][1] = 1'b0; b_id[x][y][1] = '0; b_r[x][y][1] = 1'b1;
        end
        // from the south neighbour (its north output)
        if (y > 0) begin
          b_iv[x][y][2] = b_v[x][YS][0]; b_id[x][y][2] = b_d[x][YS][0]; b_r[x][y][2] = b_ir[x][YS][0];
        end else begin
          b_iv[x][y][2] = 1'b0; b_id[x][y][2] = '0; b_r[x][y][2] = 1'b1;
        end
        // from the west neighbour (its east output)
        if (x > 0) begin
          b_iv[x][y][3] = b_v[XW][y][1]; b_id[x][y][3] = b_d[XW][y][1]; b_r[x][y][3] = b_ir[XW][y][1];
        end else begin
          b_iv[x][y][3] = 1'b0; b_id[x][y][3] = '0; b_r[x][y][3] = 1'b1;
        end
      end
      always_comb begin
        // from the north neighbour (its south output)
        if (y + 1 < NY) begin
          ar_iv[x][y][0] = ar_v[x][YN][2]; ar_id[x][y][0] = ar_d[x][YN][2]; ar_r[x][y][0] = ar_ir[x][YN][2];
        end else begin
          ar_iv[x][y][0] = 1'b0; ar_id[x][y][0] = '0; ar_r[x][y][0] = 1'b1;
        end
        // from the east neighbour (its west output)
        if (x + 1 < NX) begin
          ar_iv[x][y][1] = ar_v[XE][y][3]; ar_id[x][y][1] = ar_d[XE][y][3]; ar_r[x][y][1] = ar_ir[XE][y][3];
        end else begin
          ar_iv[x][y][1] = 1'b0; ar_id[x][y][1] = '0; ar_r[x][y][1] = 1'b1;
        end
        // from the south neighbour (its north output)
        if (y > 0) begin
          ar_iv[x][y][2] = ar_v[x][YS][0]; ar_id[x][y][2] = ar_d[x][YS][0]; ar_r[x][y][2] = ar_ir[x][YS][0];
        end else begin
          ar_iv[x][y][2] = 1'b0; ar_id[x][y][2] = '0; ar_r[x][y][2] = 1'b1;
        end
        // from the west neighbour (its east output)
        if (x > 0) begin
          ar_iv[x][y][3] = ar_v[XW][y][1]; ar_id[x][y][3] = ar_d[XW][y][1]; ar_r[x][y][3] = ar_ir[XW][y][1];
        end else begin
          ar_iv[x][y][3] = 1'b0; ar_id[x][y][3] = '0; ar_r[x][y][3] = 1'b1;
        end
      end
      always_comb begin
        // from the north neighbour (its south output)
        if (y + 1 < NY) begin
          r_iv[x][y][0] = r_v[x][YN][2]; r_id[x][y][0] = r_d[x][YN][2]; r_r[x][y][0] = r_ir[x][YN][2];
        end else begin
          r_iv[x][y][0] = 1'b0; r_id[x][y][0] = '0; r_r[x][y][0] = 1'b1;
        end
        // from the east neighbour (its west output)
        if (x + 1 < NX) begin
          r_iv[x][y][1] = r_v[XE][y][3]; r_id[x][y][1] = r_d[XE][y][3]; r_r[x][y][1] = r_ir[XE][y][3];
        end else begin
          r_iv[x][y][1] = 1'b0; r_id[x][y][1] = '0; r_r[x][y][1] = 1'b1;
        end
        // from the south neighbour (its north output)
        if (y > 0) begin
          r_iv[x][y][2] = r_v[x][YS][0]; r_id[x][y][2] = r_d[x][YS][0]; r_r[x][y][2] = r_ir[x][YS][0];
        end else begin
          r_iv[x][y][2] = 1'b0; r_id[x][y][2] = '0; r_r[x][y][2] = 1'b1;
        end
        // from the west neighbour (its east output)
        if (x > 0) begin
          r_iv[x][y][3] = r_v[XW][y][1]; r_id[x][y][3] = r_d[XW][y][1]; r_r[x][y][3] = r_ir[XW][y][1];
        end else begin
          r_iv[x][y][3] = 1'b0; r_id[x][y][3] = '0; r_r[x][y][3] = 1'b1;
        end
      end
    end
  end

endmodule
