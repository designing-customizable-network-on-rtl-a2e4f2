// noc_ni_master: the local port's AXI master interface (the network acting
// as master for an AXI slave attached to the node, e.g. an external memory
// controller), together with the network side of the memory controller.
//
// Requests that arrive from the router are served here:
//   * an address inside the node's local memory (first MEM_DEPTH words of the
//     node's block, when MEM_EN is set) is read or written on memory port B;
//   * any other address goes to the attached slave over AXI, if HAS_SLAVE is
//     set; without a slave the request is answered with DECERR.
// Reads: one AR flit at a time; each beat becomes an R flit that carries its
// beat number and the requester's base address as route. Memory reads are
// synchronous, so a memory beat takes three cycles (address, capture,
// send); beats from the attached slave are forwarded as they come.
// Writes: W flits of different requesters may arrive interleaved and before
// their AW flit, because each flit is routed on its own. Each W flit carries
// its own address, so it is written at once (memory) or sent to the slave as
// a single-beat AXI write. A table indexed by requester node counts the beats
// announced by the AW flit and the beats done; when they match, one B flit
// goes back to the requester. These are this design's choices: the document
// does not say how a destination puts the beats of a burst back together.
module noc_ni_master
  import noc_pkg::*;
#(
  parameter int unsigned NX        = 4,
  parameter int unsigned NY        = 4,
  parameter int unsigned MY_X      = 0,
  parameter int unsigned MY_Y      = 0,
  parameter bit          MEM_EN    = 1'b1,
  parameter bit          HAS_SLAVE = 1'b1,
  parameter int unsigned MEM_DEPTH = 4096,
  parameter int unsigned MAW       = $clog2(MEM_DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  // AXI master port towards the attached slave
  output axi_req_t          m_req,
  input  axi_rsp_t          m_rsp,
  // request flits from the router's local outputs
  input  logic              aw_i_valid,
  output logic              aw_i_ready,
  input  aw_flit_t          aw_i,
  input  logic              w_i_valid,
  output logic              w_i_ready,
  input  w_flit_t           w_i,
  input  logic              ar_i_valid,
  output logic              ar_i_ready,
  input  ar_flit_t          ar_i,
  // response flits into the router's local inputs
  output logic              b_o_valid,
  input  logic              b_o_ready,
  output b_flit_t           b_o,
  output logic              r_o_valid,
  input  logic              r_o_ready,
  output r_flit_t           r_o,
  // local memory port B
  output logic              m_en,
  output logic              m_we,
  output logic [MAW-1:0]    m_addr,
  output logic [DATA_W-1:0] m_wdata,
  output logic [STRB_W-1:0] m_wstrb,
  input  logic [DATA_W-1:0] m_rdata
);

  localparam int unsigned XB    = xbits(NX);
  localparam int unsigned YB    = xbits(NY);
  localparam int unsigned OFFW  = ADDR_W - XB - YB;
  localparam int unsigned NN    = NX * NY;
  localparam logic [ADDR_W-1:0] MY_BASE = node_base(NX, NY, MY_X, MY_Y);

  function automatic logic in_mem(logic [ADDR_W-1:0] a);
    return MEM_EN && (a[ADDR_W-1 -: XB+YB] == MY_BASE[ADDR_W-1 -: XB+YB]) &&
           ({{XB+YB{1'b0}}, a[OFFW-1:0]} < ADDR_W'(MEM_DEPTH));
  endfunction

  function automatic int unsigned node_of(logic [ID_W-1:0] id);
    return int'(id[7:4]) * NY + int'(id[3:0]);
  endfunction

  function automatic logic [ADDR_W-1:0] base_of(logic [ID_W-1:0] id);
    return node_base(NX, NY, int'(id[7:4]), int'(id[3:0]));
  endfunction

  // ------------------------------------------------------------ writes
  typedef enum logic [1:0] {WX_IDLE, WX_AW, WX_W, WX_B} wxstate_e;
  wxstate_e          wx;
  w_flit_t           wq;
  logic              aw_seen [NN];
  logic [8:0]        exp_cnt [NN];
  logic [8:0]        got_cnt [NN];
  logic              werr    [NN];
  logic [ID_W-1:0]   src_id  [NN];
  logic              w_take, w_mem, w_done, w_bad;
  int unsigned       w_src;

  assign w_take    = w_i_valid && w_i_ready;
  assign w_i_ready = (wx == WX_IDLE);
  assign w_mem     = w_take && in_mem(w_i.route);
  assign aw_i_ready = 1'b1;

  // completion of a beat: memory write, slave answer, or no target at all
  always_comb begin
    w_done = 1'b0;
    w_bad  = 1'b0;
    w_src  = node_of(w_i.src);
    if (w_take && (w_mem || !HAS_SLAVE)) begin
      w_done = 1'b1;
      w_bad  = !w_mem;
    end else if (wx == WX_B && m_rsp.b_valid) begin
      w_done = 1'b1;
      w_bad  = (m_rsp.b.resp != RESP_OKAY);
      w_src  = node_of(wq.src);
    end
  end

  // pick a requester whose burst is complete
  logic        cmp_any;
  int unsigned cmp_n;
  always_comb begin
    cmp_any = 1'b0;
    cmp_n   = 0;
    for (int n = NN - 1; n >= 0; n--) begin
      if (aw_seen[n] && got_cnt[n] == exp_cnt[n]) begin
        cmp_any = 1'b1;
        cmp_n   = n;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wx        <= WX_IDLE;
      wq        <= '0;
      b_o_valid <= 1'b0;
      b_o       <= '0;
      for (int n = 0; n < NN; n++) begin
        aw_seen[n] <= 1'b0;
        exp_cnt[n] <= '0;
        got_cnt[n] <= '0;
        werr[n]    <= 1'b0;
        src_id[n]  <= '0;
      end
    end else begin
      if (b_o_valid && b_o_ready) b_o_valid <= 1'b0;
      if (aw_i_valid) begin
        aw_seen[node_of(aw_i.src)] <= 1'b1;
        exp_cnt[node_of(aw_i.src)] <= 9'(aw_i.len) + 9'd1;
        src_id[node_of(aw_i.src)]  <= aw_i.src;
      end
      if (w_done) begin
        got_cnt[w_src] <= got_cnt[w_src] + 9'd1;
        if (w_bad) werr[w_src] <= 1'b1;
      end
      if (cmp_any && (!b_o_valid || b_o_ready)) begin
        b_o_valid        <= 1'b1;
        b_o.route        <= base_of(src_id[cmp_n]);
        b_o.resp         <= werr[cmp_n] ? (HAS_SLAVE ? RESP_SLVERR : RESP_DECERR) : RESP_OKAY;
        aw_seen[cmp_n]   <= 1'b0;
        got_cnt[cmp_n]   <= '0;
        werr[cmp_n]      <= 1'b0;
      end
      unique case (wx)
        WX_IDLE: if (w_take && !w_mem && HAS_SLAVE) begin
          wq <= w_i;
          wx <= WX_AW;
        end
        WX_AW:   if (m_rsp.aw_ready) wx <= WX_W;
        WX_W:    if (m_rsp.w_ready)  wx <= WX_B;
        WX_B:    if (m_rsp.b_valid)  wx <= WX_IDLE;
        default: wx <= WX_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------------ reads
  typedef enum logic [2:0] {RX_IDLE, RX_MADDR, RX_MCAP, RX_MOUT, RX_SAR, RX_SR, RX_ERR} rxstate_e;
  rxstate_e          rx;
  ar_flit_t          arq;
  logic [7:0]        ridx;
  logic [DATA_W-1:0] rdata_q;
  logic              r_slot;

  assign ar_i_ready = (rx == RX_IDLE);
  assign r_slot     = !r_o_valid || r_o_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rx        <= RX_IDLE;
      arq       <= '0;
      ridx      <= '0;
      rdata_q   <= '0;
      r_o_valid <= 1'b0;
      r_o       <= '0;
    end else begin
      if (r_o_valid && r_o_ready) r_o_valid <= 1'b0;
      unique case (rx)
        RX_IDLE: if (ar_i_valid) begin
          arq  <= ar_i;
          ridx <= '0;
          rx   <= in_mem(ar_i.route) ? RX_MADDR : (HAS_SLAVE ? RX_SAR : RX_ERR);
        end
        RX_MADDR: if (!w_mem) rx <= RX_MCAP;
        RX_MCAP: begin
          rdata_q <= m_rdata;
          rx      <= RX_MOUT;
        end
        RX_MOUT: if (r_slot) begin
          r_o_valid <= 1'b1;
          r_o       <= '{data: rdata_q, resp: RESP_OKAY, idx: ridx, last: ridx == arq.len,
                         route: base_of(arq.src)};
          ridx      <= ridx + 8'd1;
          rx        <= (ridx == arq.len) ? RX_IDLE : RX_MADDR;
        end
        RX_SAR: if (m_rsp.ar_ready) rx <= RX_SR;
        RX_SR: if (m_rsp.r_valid && r_slot) begin
          r_o_valid <= 1'b1;
          r_o       <= '{data: m_rsp.r.data, resp: m_rsp.r.resp, idx: ridx,
                         last: ridx == arq.len, route: base_of(arq.src)};
          ridx      <= ridx + 8'd1;
          if (ridx == arq.len) rx <= RX_IDLE;
        end
        RX_ERR: if (r_slot) begin
          r_o_valid <= 1'b1;
          r_o       <= '{data: '0, resp: RESP_DECERR, idx: ridx, last: ridx == arq.len,
                         route: base_of(arq.src)};
          ridx      <= ridx + 8'd1;
          if (ridx == arq.len) rx <= RX_IDLE;
        end
        default: rx <= RX_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------------ memory port B
  logic [ADDR_W-1:0] ra;
  always_comb begin
    ra      = beat_addr(arq.route, arq.burst, ridx);
    m_en    = w_mem || (rx == RX_MADDR);
    m_we    = w_mem;
    m_addr  = w_mem ? w_i.route[MAW-1:0] : ra[MAW-1:0];
    m_wdata = w_i.data;
    m_wstrb = w_i.strb;
  end

  // ------------------------------------------------------------ AXI master port
  always_comb begin
    m_req          = '0;
    m_req.aw_valid = (wx == WX_AW);
    m_req.aw.addr  = wq.route;
    m_req.aw.len   = 8'd0;
    m_req.aw.burst = BURST_INCR;
    m_req.w_valid  = (wx == WX_W);
    m_req.w.data   = wq.data;
    m_req.w.strb   = wq.strb;
    m_req.w.last   = 1'b1;
    m_req.b_ready  = (wx == WX_B);
    m_req.ar_valid = (rx == RX_SAR);
    m_req.ar.addr  = arq.route;
    m_req.ar.len   = arq.len;
    m_req.ar.burst = arq.burst;
    m_req.r_ready  = (rx == RX_SR) && r_slot;
  end

endmodule
