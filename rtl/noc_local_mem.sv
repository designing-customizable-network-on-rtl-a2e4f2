// noc_local_mem: the private memory embedded in a node's local port.
//
// A dual-port RAM, as the document builds it from FPGA block RAM: port A is
// used by the component attached to the node (local accesses), port B by
// requests arriving from the network (remote accesses). Both ports can read
// and write in every cycle. Reads are synchronous: the word addressed in
// cycle t appears on rdata in cycle t+1. Writes use per-byte strobes. If both
// ports write the same word in the same cycle, port B (the network) wins;
// the document does not say how such a collision resolves.
//
// DEPTH is the number of words; the default, 4096, covers the offsets
// 0x000-0xFFF of the document's 4 KB example, one address per word.
module noc_local_mem
  import noc_pkg::*;
#(
  parameter int unsigned DEPTH = 4096,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic              clk,
  // port A: local component
  input  logic              a_en,
  input  logic              a_we,
  input  logic [AW-1:0]     a_addr,
  input  logic [DATA_W-1:0] a_wdata,
  input  logic [STRB_W-1:0] a_wstrb,
  output logic [DATA_W-1:0] a_rdata,
  // port B: network
  input  logic              b_en,
  input  logic              b_we,
  input  logic [AW-1:0]     b_addr,
  input  logic [DATA_W-1:0] b_wdata,
  input  logic [STRB_W-1:0] b_wstrb,
  output logic [DATA_W-1:0] b_rdata
);

  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    for (int i = 0; i < STRB_W; i++) begin
      if (a_en && a_we && a_wstrb[i] && !(b_en && b_we && b_wstrb[i] && b_addr == a_addr))
        mem[a_addr][8*i +: 8] <= a_wdata[8*i +: 8];
      if (b_en && b_we && b_wstrb[i])
        mem[b_addr][8*i +: 8] <= b_wdata[8*i +: 8];
    end
    if (a_en) a_rdata <= mem[a_addr];
    if (b_en) b_rdata <= mem[b_addr];
  end

endmodule
