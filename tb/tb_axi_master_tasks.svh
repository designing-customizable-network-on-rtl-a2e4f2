// Shared AXI master tasks for the single-port testbenches. The including
// module declares clk, s_req (axi_req_t), s_rsp (axi_rsp_t), checks,
// failures and an associative reference memory ref_mem. Signals change on
// the falling clock edge; a handshake completes on the next rising edge.
function automatic logic [31:0] pat(logic [31:0] a, int salt);
  return (a * 32'h9E37_79B1) ^ 32'(salt);
endfunction

function automatic logic [31:0] ref_rd(logic [31:0] a);
  return ref_mem.exists(a) ? ref_mem[a] : (a ^ 32'hA5A5_5A5A);
endfunction

task automatic m_write(logic [31:0] addr, int len, logic [1:0] burst, int salt,
                       logic [1:0] want_resp);
  @(negedge clk);
  s_req.aw_valid = 1'b1;
  s_req.aw       = '{addr: addr, len: 8'(len - 1), burst: burst};
  forever begin #1; if (s_rsp.aw_ready) break; @(negedge clk); end
  @(negedge clk);
  s_req.aw_valid = 1'b0;
  for (int i = 0; i < len; i++) begin
    logic [31:0] a;
    a = beat_addr(addr, burst, 8'(i));
    s_req.w_valid = 1'b1;
    s_req.w       = '{data: pat(a, salt), strb: '1, last: (i == len - 1)};
    forever begin #1; if (s_rsp.w_ready) break; @(negedge clk); end
    if (want_resp == RESP_OKAY) ref_mem[a] = pat(a, salt);
    @(negedge clk);
  end
  s_req.w_valid = 1'b0;
  s_req.b_ready = 1'b1;
  forever begin #1; if (s_rsp.b_valid) break; @(negedge clk); end
  checks++;
  if (s_rsp.b.resp != want_resp) begin
    failures++; $display("FAIL write %h resp %0d want %0d", addr, s_rsp.b.resp, want_resp);
  end
  @(negedge clk);
  s_req.b_ready = 1'b0;
endtask

task automatic m_read(logic [31:0] addr, int len, logic [1:0] burst, logic [1:0] want_resp);
  int beat;
  @(negedge clk);
  s_req.ar_valid = 1'b1;
  s_req.ar       = '{addr: addr, len: 8'(len - 1), burst: burst};
  forever begin #1; if (s_rsp.ar_ready) break; @(negedge clk); end
  @(negedge clk);
  s_req.ar_valid = 1'b0;
  s_req.r_ready  = 1'b1;
  beat = 0;
  while (beat < len) begin
    #1;
    if (s_rsp.r_valid) begin
      logic [31:0] a;
      a = beat_addr(addr, burst, 8'(beat));
      checks++;
      if ((want_resp == RESP_OKAY && s_rsp.r.data !== ref_rd(a)) || s_rsp.r.resp != want_resp ||
          s_rsp.r.last != (beat == len - 1)) begin
        failures++;
        $display("FAIL read %h beat %0d: %h resp %0d last %0d, want %h", a, beat,
                 s_rsp.r.data, s_rsp.r.resp, s_rsp.r.last, ref_rd(a));
      end
      beat++;
    end
    @(negedge clk);
  end
  s_req.r_ready = 1'b0;
endtask
