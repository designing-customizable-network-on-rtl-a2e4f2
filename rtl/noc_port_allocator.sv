// noc_port_allocator: picks the outgoing port of a router for one flit.
//
// Routing rule of the document: with no traffic, dimension-order routing,
// X before Y (east or west while the column differs, then north or south,
// local when both match). Adaptive step: when the flit needs both a
// horizontal and a vertical move and the horizontal output is busy, it takes
// the vertical one if that is free. If every admissible output is busy, no
// port is granted (`ok` low) and the router tries again later.
//
// Departure from the document: the adaptive step is only taken by flits that
// move east. A flit that must move west always goes west first. Without this
// restriction the network deadlocked in simulation under all-to-all traffic
// (cyclic waits through turns into the west direction); with it the rule is
// the West-First turn model, which cannot form such a cycle.
//
// Combinational. `busy` is indexed by noc_pkg::dir_e (N,E,S,W,L).
module noc_port_allocator
  import noc_pkg::*;
(
  input  logic              go_e,
  input  logic              go_w,
  input  logic              go_n,
  input  logic              go_s,
  input  logic              here,
  input  logic [NPORTS-1:0] busy,
  output logic              ok,
  output dir_e              dir,
  output logic              adaptive   // vertical taken because X was busy
);

  always_comb begin
    ok       = 1'b0;
    dir      = DIR_L;
    adaptive = 1'b0;
    if (here) begin
      ok  = !busy[DIR_L];
      dir = DIR_L;
    end else if (go_e || go_w) begin
      dir = go_e ? DIR_E : DIR_W;
      ok  = !busy[dir];
      if (!ok && go_e && (go_n || go_s)) begin
        dir      = go_n ? DIR_N : DIR_S;
        ok       = !busy[dir];
        adaptive = ok;
      end
    end else begin
      dir = go_n ? DIR_N : DIR_S;
      ok  = !busy[dir];
    end
  end

endmodule
