// tb_noc_service_arbiter: replays the document's example (north, west and
// local request on a fresh start: north is served at once, east and south
// are each checked for one cycle and skipped, west is served, then local is
// reached directly as the only request), then compares the arbiter with a
// reference model of the same rules under random requests, and checks that
// no requesting port waits longer than one round.
module tb_noc_service_arbiter;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0, en;
  always #5 clk = ~clk;
  logic [4:0] req;
  logic gv, skip;
  logic [2:0] g;
  noc_service_arbiter dut (.clk, .rst_n, .en, .req, .gnt_valid(gv), .gnt(g), .scan_skip(skip));
  int checks = 0, failures = 0;
  // reference model
  int mptr = 0; bit mscan = 0;
  task automatic step_expect(output bit ev, output int eg, output bit esk);
    int cnt = 0, first = -1;
    for (int i = 0; i < 5; i++) if (req[i]) begin cnt++; if (first < 0) first = i; end
    ev = 0; eg = -1; esk = 0;
    if (!en || cnt == 0) begin if (en) mscan = 0; return; end
    if (cnt == 1 || !mscan) begin ev = 1; eg = first; end
    else if (req[mptr]) begin ev = 1; eg = mptr; end
    else begin esk = 1; mptr = (mptr + 1) % 5; return; end
    mptr = (eg + 1) % 5; mscan = 1;
  endtask
  task automatic cycle(logic [4:0] r, output bit gvo, output int go);
    bit ev, esk; int eg;
    @(negedge clk); req = r; en = 1; #1;
    step_expect(ev, eg, esk);
    checks++;
    if (gv != ev || (ev && int'(g) != eg) || skip != esk) begin
      failures++; $display("FAIL req=%b gv=%0d g=%0d skip=%0d want %0d %0d %0d", r, gv, g, skip, ev, eg, esk);
    end
    gvo = gv; go = int'(g);
  endtask
  initial begin
    bit v; int gg; int wait_cnt [5]; logic [4:0] pend;
    en = 0; req = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    // document example: N(0), W(3), L(4) request
    cycle(5'b11001, v, gg); checks++; if (!(v && gg == 0)) begin failures++; $display("FAIL ex north"); end
    cycle(5'b11000, v, gg); checks++; if (v) begin failures++; $display("FAIL ex east skip"); end
    cycle(5'b11000, v, gg); checks++; if (v) begin failures++; $display("FAIL ex south skip"); end
    cycle(5'b11000, v, gg); checks++; if (!(v && gg == 3)) begin failures++; $display("FAIL ex west"); end
    cycle(5'b10000, v, gg); checks++; if (!(v && gg == 4)) begin failures++; $display("FAIL ex local"); end
    cycle(5'b00000, v, gg);
    // random: requests stay up until granted (as receivers do)
    pend = 0;
    for (int i = 0; i < 5; i++) wait_cnt[i] = 0;
    repeat (3000) begin
      logic [4:0] r;
      r = pend;
      for (int i = 0; i < 5; i++) if (!r[i] && ($urandom % 4 == 0)) r[i] = 1;
      cycle(r, v, gg);
      for (int i = 0; i < 5; i++) if (r[i]) wait_cnt[i]++;
      if (v) begin r[gg] = 0; wait_cnt[gg] = 0; end
      for (int i = 0; i < 5; i++) if (wait_cnt[i] > 10) begin
        checks++; failures++; $display("FAIL port %0d starves", i); wait_cnt[i] = 0;
      end
      pend = r;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
