// tb_noc_port_allocator: every combination of needed moves and busy outputs,
// compared with the routing rule: X first; local when arrived; vertical for
// an east-bound flit whose east output is busy; west-bound flits wait for
// west. No grant while the chosen output is busy.
module tb_noc_port_allocator;
  import noc_pkg::*;
  logic e, w, n, s, h, ok, ad;
  logic [4:0] busy;
  dir_e dir;
  noc_port_allocator dut (.go_e(e), .go_w(w), .go_n(n), .go_s(s), .here(h), .busy,
                          .ok, .dir, .adaptive(ad));
  int checks = 0, failures = 0;
  initial begin
    for (int hx = 0; hx < 3; hx++)        // 0 east, 1 west, 2 same column
      for (int vy = 0; vy < 3; vy++)      // 0 north, 1 south, 2 same row
        for (int b = 0; b < 32; b++) begin
          logic eok; int edir; logic ead;
          e = (hx == 0); w = (hx == 1); n = (vy == 0); s = (vy == 1);
          h = (hx == 2 && vy == 2); busy = 5'(b); #1;
          ead = 0;
          if (h) begin edir = DIR_L; eok = !busy[DIR_L]; end
          else if (hx == 0) begin
            edir = DIR_E; eok = !busy[DIR_E];
            if (!eok && vy != 2) begin edir = (vy == 0) ? DIR_N : DIR_S; eok = !busy[edir]; ead = eok; end
          end else if (hx == 1) begin edir = DIR_W; eok = !busy[DIR_W]; end
          else begin edir = (vy == 0) ? DIR_N : DIR_S; eok = !busy[edir]; end
          checks++;
          if (ok != eok || (eok && int'(dir) != edir) || ad != ead) begin
            failures++; $display("FAIL hx=%0d vy=%0d busy=%b: ok=%0d dir=%0d", hx, vy, busy, ok, dir);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
