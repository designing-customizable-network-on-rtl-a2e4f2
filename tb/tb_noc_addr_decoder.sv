// tb_noc_addr_decoder: checks the address map of the document's 4x4 example
// (node n = x*4+y owns 0xn0000000-0xnFFFFFFF, so 0xED00804C belongs to node
// 14 = (3,2)) and, for random addresses and every node position, the five
// direction flags against an independent computation. Also a 2x2 mesh
// (0xD8AD0080 belongs to the top-right node (1,1)).
module tb_noc_addr_decoder;
  import noc_pkg::*;
  logic [31:0] addr;
  logic [3:0]  mx, my, dx, dy, dx2, dy2;
  logic e, w, n, s, h, e2, w2, n2, s2, h2;
  noc_addr_decoder #(.NX(4), .NY(4)) dut (.addr, .my_x(mx), .my_y(my), .dst_x(dx), .dst_y(dy),
                                          .go_e(e), .go_w(w), .go_n(n), .go_s(s), .here(h));
  noc_addr_decoder #(.NX(2), .NY(2)) dut2 (.addr, .my_x(mx), .my_y(my), .dst_x(dx2), .dst_y(dy2),
                                           .go_e(e2), .go_w(w2), .go_n(n2), .go_s(s2), .here(h2));
  int checks = 0, failures = 0;
  initial begin
    mx = 1; my = 0; addr = 32'hED00804C; #1;
    checks++; if (dx != 3 || dy != 2 || !e || !n || w || s || h) begin failures++; $display("FAIL example"); end
    mx = 0; my = 0; addr = 32'hD8AD0080; #1;
    checks++; if (dx2 != 1 || dy2 != 1 || !e2 || !n2) begin failures++; $display("FAIL 2x2 example"); end
    for (int node = 0; node < 16; node++) begin
      addr = {4'(node), 28'h0000000}; #1;
      checks++; if (dx != 4'(node / 4) || dy != 4'(node % 4)) begin failures++; $display("FAIL node %0d", node); end
      addr = {4'(node), 28'hFFFFFFF}; #1;
      checks++; if (dx != 4'(node / 4) || dy != 4'(node % 4)) begin failures++; $display("FAIL node end %0d", node); end
    end
    repeat (2000) begin
      int tx, ty;
      addr = $urandom; mx = 4'($urandom % 4); my = 4'($urandom % 4); #1;
      tx = int'(addr[31:30]); ty = int'(addr[29:28]);
      checks++;
      if (e != (tx > mx) || w != (tx < mx) || n != (ty > my) || s != (ty < my) ||
          h != (tx == mx && ty == my)) begin failures++; $display("FAIL %h", addr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
