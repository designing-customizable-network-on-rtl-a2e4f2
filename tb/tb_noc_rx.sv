// tb_noc_rx: checks the receiver's two-state behaviour: ready only when
// empty, the stored flit offered to the router until taken, no new flit
// taken in the cycle one is handed on, and every flit passed exactly once in
// order under random valid/ready on both sides.
module tb_noc_rx;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic pv, pr, rv, rr;
  logic [15:0] pd, rd;
  noc_rx #(.WIDTH(16)) dut (.clk, .rst_n, .port_valid(pv), .port_ready(pr), .port_data(pd),
                            .router_valid(rv), .router_ready(rr), .router_data(rd));
  int checks = 0, failures = 0;
  logic [15:0] q [$];
  int sent = 0, got = 0;
  logic hold;
  initial begin
    pv = 0; rr = 0; pd = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (!(pr && !rv)) begin failures++; $display("FAIL idle outputs"); end
    hold = 0;
    repeat (2000) begin
      @(negedge clk);
      if (!hold) begin pv = ($urandom % 3) != 0; pd = 16'($urandom); end
      rr = ($urandom % 2) == 0;
      #1;
      // state-chart rule: exactly one of port_ready / router_valid
      checks++; if (pr == rv) begin failures++; $display("FAIL pr=%0d rv=%0d", pr, rv); end
      if (rv && rr) begin
        checks++;
        if (q.size() == 0 || rd != q[0]) begin failures++; $display("FAIL data %h", rd); end
        else void'(q.pop_front());
        got++;
      end
      if (pv && pr) begin q.push_back(pd); sent++; end
      hold = pv && !pr;
    end
    checks++; if (got < 300) begin failures++; $display("FAIL too few transfers %0d", got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
