// noc_rx: channel receiver between a node's incoming port and a router input.
//
// A two-state machine (the document's receiver state chart): in IDLE the port
// is ready and the router sees no valid data; when the port presents valid
// data it is stored in a register and the machine moves to TRANSFER, where
// the port is not ready and the router sees the stored flit as valid. When
// the router answers with ready the machine returns to IDLE in the same
// edge. So the receiver is a one-flit buffer that alternates: it never takes
// a new flit in the cycle it hands one on (a flit spends at least one cycle
// here), which is what the state chart prints.
//
// Interface: port_* is a valid/ready slave, router_* a valid/ready master.
// Reset (active low, synchronous to clk as in AXI) goes to IDLE. The
// register width is a parameter; the design uses one receiver per incoming
// channel per direction.
module noc_rx #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  // node side
  input  logic             port_valid,
  output logic             port_ready,
  input  logic [WIDTH-1:0] port_data,
  // router side
  output logic             router_valid,
  input  logic             router_ready,
  output logic [WIDTH-1:0] router_data
);

  typedef enum logic {IDLE, TRANSFER} state_e;
  state_e state;
  logic [WIDTH-1:0] buffer;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= IDLE;
      buffer <= '0;
    end else begin
      unique case (state)
        IDLE:     if (port_valid) begin
                    buffer <= port_data;
                    state  <= TRANSFER;
                  end
        TRANSFER: if (router_ready) state <= IDLE;
        default:  state <= IDLE;
      endcase
    end
  end

  assign port_ready   = (state == IDLE);
  assign router_valid = (state == TRANSFER);
  assign router_data  = buffer;

`ifndef SYNTHESIS
  // A flit offered to the router stays stable until it is taken.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           router_valid && !router_ready |=> router_valid && $stable(router_data));
`endif

endmodule
