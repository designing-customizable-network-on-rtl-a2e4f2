// tb_axi_slave: behavioural AXI4 slave used by the testbenches as the
// component attached to a node's master interface (an external memory).
// It answers at once: AW/AR are accepted in the cycle they are offered, W
// beats are written as they come, B follows the last beat, R beats stream
// one per cycle. Storage is a sparse associative array; a word never written
// reads as its address XOR 0xA5A55A5A. Addresses step by one per INCR beat.
// Counters report how many writes and reads it served.
module tb_axi_slave
  import noc_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  axi_req_t req,
  output axi_rsp_t rsp,
  output int       n_writes,
  output int       n_reads
);

  logic [DATA_W-1:0] mem [logic [ADDR_W-1:0]];
  logic [1:0]        wst;
  logic              rbusy;
  axi_ax_t           awq, arq;
  logic [7:0]        wcnt, rcnt;

  function automatic logic [DATA_W-1:0] rd(logic [ADDR_W-1:0] a);
    return mem.exists(a) ? mem[a] : (a ^ 32'hA5A5_5A5A);
  endfunction

  always @(posedge clk) begin
    if (!rst_n) begin
      wst <= 0; rbusy <= 0; wcnt <= 0; rcnt <= 0; awq <= '0; arq <= '0;
      n_writes <= 0; n_reads <= 0;
    end else begin
      case (wst)
        2'd0: if (req.aw_valid) begin awq <= req.aw; wcnt <= 0; wst <= 2'd1; end
        2'd1: if (req.w_valid) begin
          logic [ADDR_W-1:0] a;
          logic [DATA_W-1:0] d;
          a = beat_addr(awq.addr, awq.burst, wcnt);
          d = rd(a);
          for (int i = 0; i < STRB_W; i++) if (req.w.strb[i]) d[8*i +: 8] = req.w.data[8*i +: 8];
          mem[a] = d;
          wcnt <= wcnt + 1;
          if (req.w.last) wst <= 2'd2;
        end
        2'd2: if (req.b_ready) begin wst <= 2'd0; n_writes <= n_writes + 1; end
        default: wst <= 2'd0;
      endcase
      if (!rbusy) begin
        if (req.ar_valid) begin arq <= req.ar; rcnt <= 0; rbusy <= 1; end
      end else if (req.r_ready) begin
        rcnt <= rcnt + 1;
        if (rcnt == arq.len) begin rbusy <= 0; n_reads <= n_reads + 1; end
      end
    end
  end

  always_comb begin
    rsp          = '0;
    rsp.aw_ready = (wst == 2'd0);
    rsp.w_ready  = (wst == 2'd1);
    rsp.b_valid  = (wst == 2'd2);
    rsp.b.resp   = RESP_OKAY;
    rsp.ar_ready = !rbusy;
    rsp.r_valid  = rbusy;
    rsp.r.data   = rd(beat_addr(arq.addr, arq.burst, rcnt));
    rsp.r.resp   = RESP_OKAY;
    rsp.r.last   = (rcnt == arq.len);
  end

endmodule
