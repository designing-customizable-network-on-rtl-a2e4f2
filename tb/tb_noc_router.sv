// tb_noc_router: one router at (1,1) of a 4x4 mesh, driven directly on its
// five inputs (as the receivers would) with random flits to random
// destinations and random back-pressure on the outputs. Every flit must
// leave exactly once, unchanged, on an allowed port: local when it has
// arrived, west for west-bound flits, east or (when east was busy) the
// needed vertical port for east-bound flits, north/south otherwise. With no
// traffic a flit must appear on its output four cycles after it is offered
// (the router's share of the five cycles per node). Adaptive choices and
// busy outputs must both occur.
module tb_noc_router;
  import noc_pkg::*;
  localparam int W = 48;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic iv [5], ir [5], ov [5], orr [5];
  logic [W-1:0] id [5], od [5];
  logic served, adaptive, blocked;
  noc_router #(.WIDTH(W), .NX(4), .NY(4), .MY_X(1), .MY_Y(1)) dut (
    .clk, .rst_n, .in_valid(iv), .in_ready(ir), .in_data(id), .out_valid(ov), .out_ready(orr),
    .out_data(od), .served, .adaptive, .blocked);
  int checks = 0, failures = 0, n_adapt = 0, n_block = 0, n_out = 0;
  logic [W-1:0] pending [int];   // tag -> flit
  int tag = 0;

  function automatic bit allowed(logic [W-1:0] f, int p);
    int dx, dy;
    dx = int'(f[31:30]); dy = int'(f[29:28]);
    if (dx == 1 && dy == 1) return p == DIR_L;
    if (dx < 1) return p == DIR_W;
    if (dx > 1) return p == DIR_E || (dy > 1 && p == DIR_N) || (dy < 1 && p == DIR_S);
    return (dy > 1) ? p == DIR_N : p == DIR_S;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (adaptive) n_adapt++;
    if (blocked) n_block++;
  end

  initial begin
    bit hold [5];
    for (int p = 0; p < 5; p++) begin iv[p] = 0; id[p] = '0; orr[p] = 1; hold[p] = 0; end
    repeat (3) @(negedge clk); rst_n = 1;
    // zero-load timing: one flit from west input to east
    @(negedge clk);
    iv[DIR_W] = 1; id[DIR_W] = {16'hBEEF, 32'hC000_0000};
    begin
      int t = 0;
      bit taken = 0;
      #1;
      while (!ov[DIR_E]) begin
        taken = ir[DIR_W];
        @(negedge clk);
        if (taken) iv[DIR_W] = 0;
        #1;
        t++;
      end
      checks++;
      if (t != 4 || od[DIR_E][47:32] != 16'hBEEF) begin failures++; $display("FAIL zero-load t=%0d", t); end
    end
    @(negedge clk); iv[DIR_W] = 0;
    repeat (3) @(negedge clk);
    // random traffic
    repeat (6000) begin
      @(negedge clk);
      for (int p = 0; p < 5; p++) begin
        if (!hold[p] && ($urandom % 3 == 0)) begin
          iv[p] = 1;
          id[p] = {16'(tag), $urandom};
          // inputs only ever carry flits that can legally arrive there; keep it simple: any
          pending[tag] = id[p];
          tag++;
        end else if (!hold[p]) iv[p] = 0;
        orr[p] = ($urandom % 3) != 0;
      end
      #1;
      for (int p = 0; p < 5; p++) begin
        if (ov[p] && orr[p]) begin
          int t;
          t = int'(od[p][47:32]);
          checks++;
          if (!pending.exists(t) || pending[t] != od[p] || !allowed(od[p], p)) begin
            failures++; $display("FAIL out port %0d flit %h", p, od[p]);
          end else pending.delete(t);
          n_out++;
        end
        hold[p] = iv[p] && !ir[p];
      end
    end
    repeat (200) begin
      @(negedge clk);
      for (int p = 0; p < 5; p++) begin
        if (!hold[p]) iv[p] = 0;
        orr[p] = 1;
      end
      #1;
      for (int p = 0; p < 5; p++) hold[p] = iv[p] && !ir[p];
      for (int p = 0; p < 5; p++) if (ov[p]) begin
        int t; t = int'(od[p][47:32]);
        checks++;
        if (!pending.exists(t) || !allowed(od[p], p)) begin failures++; $display("FAIL drain %h", od[p]); end
        else pending.delete(t);
      end
    end
    checks++; if (pending.size() != 0) begin failures++; $display("FAIL %0d flits lost", pending.size()); end
    checks++; if (n_adapt == 0) begin failures++; $display("FAIL no adaptive choice"); end
    checks++; if (n_block == 0) begin failures++; $display("FAIL no busy output"); end
    $display("flits out=%0d adaptive=%0d blocked=%0d", n_out, n_adapt, n_block);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
