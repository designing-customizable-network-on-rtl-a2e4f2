// noc_channel: everything one AXI channel needs inside a node: a receiver
// on each of the five incoming ports (N, E, S, W from the neighbours, L from
// the local port) and the channel's router. The router's output registers
// drive the outgoing ports directly. Flits are WIDTH-bit vectors whose low
// ADDR_W bits are the route field. Ports are indexed by noc_pkg::dir_e.
module noc_channel
  import noc_pkg::*;
#(
  parameter int unsigned WIDTH = 64,
  parameter int unsigned NX    = 4,
  parameter int unsigned NY    = 4,
  parameter int unsigned MY_X  = 0,
  parameter int unsigned MY_Y  = 0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid [NPORTS],
  output logic             in_ready [NPORTS],
  input  logic [WIDTH-1:0] in_data  [NPORTS],
  output logic             out_valid[NPORTS],
  input  logic             out_ready[NPORTS],
  output logic [WIDTH-1:0] out_data [NPORTS],
  output logic             served,
  output logic             adaptive,
  output logic             blocked
);

  logic             rv [NPORTS];
  logic             rr [NPORTS];
  logic [WIDTH-1:0] rd [NPORTS];

  for (genvar p = 0; p < NPORTS; p++) begin : g_rx
    noc_rx #(.WIDTH(WIDTH)) u_rx (
      .clk, .rst_n,
      .port_valid(in_valid[p]), .port_ready(in_ready[p]), .port_data(in_data[p]),
      .router_valid(rv[p]), .router_ready(rr[p]), .router_data(rd[p])
    );
  end

  noc_router #(.WIDTH(WIDTH), .NX(NX), .NY(NY), .MY_X(MY_X), .MY_Y(MY_Y)) u_router (
    .clk, .rst_n,
    .in_valid(rv), .in_ready(rr), .in_data(rd),
    .out_valid, .out_ready, .out_data,
    .served, .adaptive, .blocked
  );

endmodule
