// tb_noc_local_mem: random reads and byte-masked writes on both ports of the
// dual-port memory, compared with a reference array: one-cycle read latency
// on each port, independent ports, and port B winning a same-word write
// collision.
module tb_noc_local_mem;
  import noc_pkg::*;
  localparam int D = 64;
  logic clk = 0;
  always #5 clk = ~clk;
  logic ae, awe, be, bwe;
  logic [5:0] aa, ba;
  logic [31:0] awd, bwd, ard, brd;
  logic [3:0] as, bs;
  noc_local_mem #(.DEPTH(D)) dut (.clk, .a_en(ae), .a_we(awe), .a_addr(aa), .a_wdata(awd), .a_wstrb(as),
    .a_rdata(ard), .b_en(be), .b_we(bwe), .b_addr(ba), .b_wdata(bwd), .b_wstrb(bs), .b_rdata(brd));
  int checks = 0, failures = 0;
  logic [31:0] refm [D];
  initial begin
    logic [31:0] ea, eb; bit ca, cb;
    // fill through port A
    for (int i = 0; i < D; i++) begin
      @(negedge clk); ae = 1; awe = 1; aa = 6'(i); awd = $urandom; as = '1; be = 0; bwe = 0;
      refm[i] = awd;
    end
    ca = 0; cb = 0;
    repeat (3000) begin
      @(negedge clk);
      if (ca) begin checks++; if (ard != ea) begin failures++; $display("FAIL A %h %h", ard, ea); end end
      if (cb) begin checks++; if (brd != eb) begin failures++; $display("FAIL B %h %h", brd, eb); end end
      ae = $urandom % 2; awe = $urandom % 2; aa = 6'($urandom % 8); awd = $urandom; as = 4'($urandom);
      be = $urandom % 2; bwe = $urandom % 2; ba = 6'($urandom % 8); bwd = $urandom; bs = 4'($urandom);
      ca = ae; cb = be; ea = refm[aa]; eb = refm[ba];
      for (int k = 0; k < 4; k++) begin
        if (ae && awe && as[k]) refm[aa][8*k +: 8] = awd[8*k +: 8];
        if (be && bwe && bs[k]) refm[ba][8*k +: 8] = bwd[8*k +: 8];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
