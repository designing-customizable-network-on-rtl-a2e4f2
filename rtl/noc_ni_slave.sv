// noc_ni_slave: the local port's AXI slave interface (the network acting as
// slave for an AXI master attached to the node, e.g. a processor).
//
// The master's transactions look the same whether their address is local or
// remote; this block decides. An address inside the node's own local memory
// (the first MEM_DEPTH words of the node's address block, when MEM_EN is
// set) is served directly on memory port A. Any other address becomes flits:
//   write: one AW flit, then one W flit per beat carrying the beat's own
//          address and beat number; the transaction ends when the B flit
//          comes back, and its response is passed to the master;
//   read:  one AR flit; the R flits can arrive in any order because beats
//          may take different paths, so each is stored at its beat number in
//          a reorder buffer and the master sees them in order.
// A beat count that disagrees with WLAST gives SLVERR, as AXI asks.
//
// This design's choices: one outstanding write and one outstanding read at a
// time (reads and writes run independently); flit outputs are registered, so
// a request leaves one cycle after the handshake with the master; addresses
// step by one per beat for INCR bursts (the document's example) and stay for
// FIXED bursts. Port A is shared by the two engines, writes first.
module noc_ni_slave
  import noc_pkg::*;
#(
  parameter int unsigned NX        = 4,
  parameter int unsigned NY        = 4,
  parameter int unsigned MY_X      = 0,
  parameter int unsigned MY_Y      = 0,
  parameter bit          MEM_EN    = 1'b1,
  parameter int unsigned MEM_DEPTH = 4096,
  parameter int unsigned MAW       = $clog2(MEM_DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  // AXI slave port towards the attached master
  input  axi_req_t          s_req,
  output axi_rsp_t          s_rsp,
  // request flits into the router's local inputs
  output logic              aw_o_valid,
  input  logic              aw_o_ready,
  output aw_flit_t          aw_o,
  output logic              w_o_valid,
  input  logic              w_o_ready,
  output w_flit_t           w_o,
  output logic              ar_o_valid,
  input  logic              ar_o_ready,
  output ar_flit_t          ar_o,
  // response flits from the router's local outputs
  input  logic              b_i_valid,
  output logic              b_i_ready,
  input  b_flit_t           b_i,
  input  logic              r_i_valid,
  output logic              r_i_ready,
  input  r_flit_t           r_i,
  // local memory port A
  output logic              m_en,
  output logic              m_we,
  output logic [MAW-1:0]    m_addr,
  output logic [DATA_W-1:0] m_wdata,
  output logic [STRB_W-1:0] m_wstrb,
  input  logic [DATA_W-1:0] m_rdata
);

  localparam int unsigned XB = xbits(NX);
  localparam int unsigned YB = xbits(NY);
  localparam int unsigned OFFW = ADDR_W - XB - YB;
  localparam logic [ID_W-1:0] MY_ID = {4'(MY_X), 4'(MY_Y)};
  localparam logic [ADDR_W-1:0] MY_BASE = node_base(NX, NY, MY_X, MY_Y);

  function automatic logic in_mem(logic [ADDR_W-1:0] a);
    return MEM_EN && (a[ADDR_W-1 -: XB+YB] == MY_BASE[ADDR_W-1 -: XB+YB]) &&
           ({{XB+YB{1'b0}}, a[OFFW-1:0]} < ADDR_W'(MEM_DEPTH));
  endfunction

  // ------------------------------------------------------------ writes
  typedef enum logic [2:0] {W_IDLE, W_AWSEND, W_RDATA, W_WAITB, W_LDATA, W_BRESP} wstate_e;
  wstate_e    wst;
  axi_ax_t    aw_q;
  logic [7:0] widx;
  logic [1:0] wresp;
  logic       werr;
  logic       w_hs, l_write;

  assign w_hs    = s_req.w_valid && s_rsp.w_ready;
  assign l_write = (wst == W_LDATA) && w_hs;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wst        <= W_IDLE;
      aw_q       <= '0;
      widx       <= '0;
      wresp      <= RESP_OKAY;
      werr       <= 1'b0;
      aw_o_valid <= 1'b0;
      aw_o       <= '0;
      w_o_valid  <= 1'b0;
      w_o        <= '0;
    end else begin
      if (aw_o_valid && aw_o_ready) aw_o_valid <= 1'b0;
      if (w_o_valid && w_o_ready)   w_o_valid  <= 1'b0;
      unique case (wst)
        W_IDLE: if (s_req.aw_valid) begin
          aw_q <= s_req.aw;
          widx <= '0;
          werr <= 1'b0;
          if (in_mem(s_req.aw.addr)) begin
            wst <= W_LDATA;
          end else begin
            aw_o_valid <= 1'b1;
            aw_o       <= '{len: s_req.aw.len, burst: s_req.aw.burst, src: MY_ID,
                            route: s_req.aw.addr};
            wst        <= W_AWSEND;
          end
        end
        W_AWSEND: if (aw_o_valid && aw_o_ready) wst <= W_RDATA;
        W_RDATA: if (w_hs) begin
          w_o_valid <= 1'b1;
          w_o       <= '{data: s_req.w.data, strb: s_req.w.strb, idx: widx, src: MY_ID,
                         route: beat_addr(aw_q.addr, aw_q.burst, widx)};
          widx      <= widx + 8'd1;
          if (s_req.w.last != (widx == aw_q.len)) werr <= 1'b1;
          if (widx == aw_q.len) wst <= W_WAITB;
        end
        W_WAITB: if (b_i_valid) begin
          wresp <= werr ? RESP_SLVERR : b_i.resp;
          wst   <= W_BRESP;
        end
        W_LDATA: if (w_hs) begin
          widx <= widx + 8'd1;
          if (widx == aw_q.len) begin
            wresp <= (werr || !s_req.w.last) ? RESP_SLVERR : RESP_OKAY;
            wst   <= W_BRESP;
          end else if (s_req.w.last) begin
            werr <= 1'b1;
          end
        end
        W_BRESP: if (s_req.b_ready) wst <= W_IDLE;
        default: wst <= W_IDLE;
      endcase
    end
  end

  assign b_i_ready = (wst == W_WAITB);

  // ------------------------------------------------------------ reads
  typedef enum logic [2:0] {R_IDLE, R_ARSEND, R_REMOTE, R_LADDR, R_LCAP, R_LOUT} rstate_e;
  rstate_e           rst;
  axi_ax_t           ar_q;
  logic [7:0]        ridx;
  logic [DATA_W-1:0] rdata_q;
  logic [DATA_W+1:0] rob     [256];     // {resp, data} per beat number
  logic [255:0]      present;
  logic              r_hs;

  assign r_hs      = s_rsp.r_valid && s_req.r_ready;
  assign r_i_ready = 1'b1;              // the reorder buffer always has room

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rst        <= R_IDLE;
      ar_q       <= '0;
      ridx       <= '0;
      rdata_q    <= '0;
      present    <= '0;
      ar_o_valid <= 1'b0;
      ar_o       <= '0;
    end else begin
      if (ar_o_valid && ar_o_ready) ar_o_valid <= 1'b0;
      if (r_i_valid) begin
        rob[r_i.idx]     <= {r_i.resp, r_i.data};
        present[r_i.idx] <= 1'b1;
      end
      unique case (rst)
        R_IDLE: if (s_req.ar_valid) begin
          ar_q <= s_req.ar;
          ridx <= '0;
          if (in_mem(s_req.ar.addr)) begin
            rst <= R_LADDR;
          end else begin
            ar_o_valid <= 1'b1;
            ar_o       <= '{len: s_req.ar.len, burst: s_req.ar.burst, src: MY_ID,
                            route: s_req.ar.addr};
            rst        <= R_ARSEND;
          end
        end
        R_ARSEND: if (ar_o_valid && ar_o_ready) rst <= R_REMOTE;
        R_REMOTE: if (r_hs) begin
          present[ridx] <= 1'b0;
          ridx          <= ridx + 8'd1;
          if (ridx == ar_q.len) rst <= R_IDLE;
        end
        R_LADDR: if (!l_write) rst <= R_LCAP;
        R_LCAP:  begin
          rdata_q <= m_rdata;
          rst     <= R_LOUT;
        end
        R_LOUT: if (r_hs) begin
          ridx <= ridx + 8'd1;
          rst  <= (ridx == ar_q.len) ? R_IDLE : R_LADDR;
        end
        default: rst <= R_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------------ memory port A
  logic [ADDR_W-1:0] wa, ra;
  always_comb begin
    wa      = beat_addr(aw_q.addr, aw_q.burst, widx);
    ra      = beat_addr(ar_q.addr, ar_q.burst, ridx);
    m_en    = l_write || (rst == R_LADDR);
    m_we    = l_write;
    m_addr  = l_write ? wa[MAW-1:0] : ra[MAW-1:0];
    m_wdata = s_req.w.data;
    m_wstrb = s_req.w.strb;
  end

  // ------------------------------------------------------------ AXI responses
  always_comb begin
    s_rsp          = '0;
    s_rsp.aw_ready = (wst == W_IDLE);
    s_rsp.w_ready  = (wst == W_LDATA) || ((wst == W_RDATA) && (!w_o_valid || w_o_ready));
    s_rsp.b_valid  = (wst == W_BRESP);
    s_rsp.b.resp   = wresp;
    s_rsp.ar_ready = (rst == R_IDLE);
    if (rst == R_REMOTE) begin
      s_rsp.r_valid = present[ridx];
      s_rsp.r.data  = rob[ridx][DATA_W-1:0];
      s_rsp.r.resp  = rob[ridx][DATA_W+1:DATA_W];
      s_rsp.r.last  = (ridx == ar_q.len);
    end else begin
      s_rsp.r_valid = (rst == R_LOUT);
      s_rsp.r.data  = rdata_q;
      s_rsp.r.resp  = RESP_OKAY;
      s_rsp.r.last  = (ridx == ar_q.len);
    end
  end

endmodule
