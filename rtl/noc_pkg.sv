// noc_pkg: types and constants shared by the AXI4 mesh network-on-chip.
//
// The network carries the five AXI4 channels (AW, W, B, AR, R) on five
// separate sub-networks, one router per channel in every node. A value on
// one of those sub-networks is a "flit": one AXI transfer plus the routing
// information it needs. Every flit struct ends (least significant bits) with
// a 32-bit `route` field. Request flits (AW, W, AR) carry the target address
// there; response flits (B, R) carry the base address of the node that
// issued the request. Routers therefore need only one decoder, which takes
// the node coordinates from the top bits of `route`.
//
// Address map (follows the document): the 32-bit space is split evenly over
// the nodes; the top XB bits give the column x and the next YB bits the row
// y, so node (x,y) owns the block numbered x*NY+y (node 14 = (3,2) owns
// 0xE0000000-0xEFFFFFFF in a 4x4 mesh).
//
// Choices of this design, not the document's: 32-bit data, one AXI ID (no
// ID field), a beat index in W and R flits so that beats that take different
// paths can be put back in order, and the requester's node id in AW/W/AR.
package noc_pkg;

  localparam int unsigned ADDR_W = 32;
  localparam int unsigned DATA_W = 32;
  localparam int unsigned STRB_W = DATA_W / 8;
  // Node id field of the flits: wide enough for a 16x16 mesh.
  localparam int unsigned ID_W   = 8;

  // Port / direction numbering of a router. The order is the service
  // arbiter's priority order: north, east, south, west, local.
  localparam int unsigned NPORTS = 5;
  typedef enum logic [2:0] {
    DIR_N = 3'd0,
    DIR_E = 3'd1,
    DIR_S = 3'd2,
    DIR_W = 3'd3,
    DIR_L = 3'd4
  } dir_e;

  // AXI burst types and responses.
  localparam logic [1:0] BURST_FIXED = 2'b00;
  localparam logic [1:0] BURST_INCR  = 2'b01;
  localparam logic [1:0] RESP_OKAY   = 2'b00;
  localparam logic [1:0] RESP_SLVERR = 2'b10;
  localparam logic [1:0] RESP_DECERR = 2'b11;

  // ---------------- AXI4 channel payloads (component side) ----------------
  typedef struct packed {
    logic [ADDR_W-1:0] addr;
    logic [7:0]        len;    // beats - 1
    logic [1:0]        burst;
  } axi_ax_t;                  // AW and AR

  typedef struct packed {
    logic [DATA_W-1:0] data;
    logic [STRB_W-1:0] strb;
    logic              last;
  } axi_w_t;

  typedef struct packed {
    logic [1:0] resp;
  } axi_b_t;

  typedef struct packed {
    logic [DATA_W-1:0] data;
    logic [1:0]        resp;
    logic              last;
  } axi_r_t;

  // Signals a master drives.
  typedef struct packed {
    axi_ax_t aw;
    logic    aw_valid;
    axi_w_t  w;
    logic    w_valid;
    logic    b_ready;
    axi_ax_t ar;
    logic    ar_valid;
    logic    r_ready;
  } axi_req_t;

  // Signals a slave drives.
  typedef struct packed {
    logic    aw_ready;
    logic    w_ready;
    axi_b_t  b;
    logic    b_valid;
    logic    ar_ready;
    axi_r_t  r;
    logic    r_valid;
  } axi_rsp_t;

  // ---------------- flits on the network ----------------
  typedef struct packed {
    logic [7:0]        len;
    logic [1:0]        burst;
    logic [ID_W-1:0]   src;    // requester node id {x,y}
    logic [ADDR_W-1:0] route;  // target address
  } aw_flit_t;

  typedef aw_flit_t ar_flit_t;

  typedef struct packed {
    logic [DATA_W-1:0] data;
    logic [STRB_W-1:0] strb;
    logic [7:0]        idx;    // beat number within the burst
    logic [ID_W-1:0]   src;
    logic [ADDR_W-1:0] route;  // address of this beat
  } w_flit_t;

  typedef struct packed {
    logic [1:0]        resp;
    logic [ADDR_W-1:0] route;  // base address of the requester node
  } b_flit_t;

  typedef struct packed {
    logic [DATA_W-1:0] data;
    logic [1:0]        resp;
    logic [7:0]        idx;
    logic              last;
    logic [ADDR_W-1:0] route;  // base address of the requester node
  } r_flit_t;

  localparam int unsigned AW_FLIT_W = $bits(aw_flit_t);
  localparam int unsigned W_FLIT_W  = $bits(w_flit_t);
  localparam int unsigned B_FLIT_W  = $bits(b_flit_t);
  localparam int unsigned AR_FLIT_W = $bits(ar_flit_t);
  localparam int unsigned R_FLIT_W  = $bits(r_flit_t);

  // Bits of the address that select the column and the row.
  function automatic int unsigned xbits(int unsigned nx);
    int unsigned b;
    b = 1;
    while ((1 << b) < nx) b++;
    return b;
  endfunction

  // Base address of node (x,y) in an nx-by-ny mesh.
  function automatic logic [ADDR_W-1:0] node_base(int unsigned nx, int unsigned ny,
                                                  int unsigned x, int unsigned y);
    logic [ADDR_W-1:0] a;
    a = (ADDR_W'(x) << (ADDR_W - xbits(nx))) |
        (ADDR_W'(y) << (ADDR_W - xbits(nx) - xbits(ny)));
    return a;
  endfunction

  // Address of beat `idx` of a burst (the document's example steps the
  // address by one per beat: 0xED00804C then 0xED00804D).
  function automatic logic [ADDR_W-1:0] beat_addr(logic [ADDR_W-1:0] base,
                                                  logic [1:0] burst, logic [7:0] idx);
    return (burst == BURST_FIXED) ? base : base + ADDR_W'(idx);
  endfunction

endpackage
