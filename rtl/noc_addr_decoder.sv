// noc_addr_decoder: address to mesh position and relative direction.
//
// The address space is split evenly over the nodes (document, address-based
// routing): the top XB address bits are the destination column and the next
// YB bits the destination row, XB = clog2(NX), YB = clog2(NY). Comparing them
// with the node's own column and row gives the four "a move is needed"
// flags and the "this node" flag that the port allocator works from.
// Purely combinational; my_x/my_y are inputs so one decoder serves any node.
// North is increasing y and east increasing x, as in the document's 4x4 map
// (node 0 bottom left, node 15 top right).
module noc_addr_decoder
  import noc_pkg::*;
#(
  parameter int unsigned NX = 4,
  parameter int unsigned NY = 4
) (
  input  logic [ADDR_W-1:0] addr,
  input  logic [3:0]        my_x,
  input  logic [3:0]        my_y,
  output logic [3:0]        dst_x,
  output logic [3:0]        dst_y,
  output logic              go_e,
  output logic              go_w,
  output logic              go_n,
  output logic              go_s,
  output logic              here
);

  localparam int unsigned XB = xbits(NX);
  localparam int unsigned YB = xbits(NY);

  always_comb begin
    dst_x = 4'(addr[ADDR_W-1 -: XB]);
    dst_y = 4'(addr[ADDR_W-1-XB -: YB]);
    go_e  = dst_x > my_x;
    go_w  = dst_x < my_x;
    go_n  = dst_y > my_y;
    go_s  = dst_y < my_y;
    here  = (dst_x == my_x) && (dst_y == my_y);
  end

endmodule
