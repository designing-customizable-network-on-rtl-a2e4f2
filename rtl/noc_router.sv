// noc_router: the router of one AXI channel inside one node.
//
// Five inputs (N, E, S, W, L) come from the node's receivers, five outputs
// go to the neighbours (or to the local port). The router serves one flit at
// a time, as a sequence of single-cycle steps:
//   ARB   the service arbiter picks an input port;
//   DEC   the address decoder reads the chosen flit's route field and
//         works out which moves it still needs;
//   ALLOC the port allocator picks a free output (X first, Y when X is busy);
//   SEND  the flit is copied into that output's register and the input
//         receiver is released.
// With the receiver's own cycle this gives five cycles per node, the figure
// the document measures per hop. Each output register holds its flit until
// the downstream side takes it; an output that still holds a flit is "busy"
// for the allocator.
//
// If no admissible output is free in ALLOC, the flit is left in its receiver
// and the router returns to ARB, which moves on to the next port. The
// document does not say what happens then; leaving the flit in place avoids
// one blocked flit holding the whole router (head-of-line blocking).
//
// The route field is the low ADDR_W bits of
// every flit (see noc_pkg). Event outputs pulse once per served flit
// (`served`), per adaptive vertical choice (`adaptive`) and per allocation
// that found all admissible outputs busy (`blocked`).
module noc_router
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

  typedef enum logic [1:0] {ARB, DEC, ALLOC, SEND} state_e;
  state_e state;

  logic [2:0] sel;
  dir_e       dir_q;
  logic       go_e_q, go_w_q, go_n_q, go_s_q, here_q;

  // ---- service arbiter ----
  logic [NPORTS-1:0] req;
  logic              gnt_valid, scan_skip;
  logic [2:0]        gnt;
  always_comb for (int i = 0; i < NPORTS; i++) req[i] = in_valid[i];

  noc_service_arbiter u_arb (
    .clk, .rst_n, .en(state == ARB), .req, .gnt_valid, .gnt, .scan_skip
  );

  // ---- address decoder ----
  logic [3:0] dst_x, dst_y;
  logic       go_e, go_w, go_n, go_s, here;
  noc_addr_decoder #(.NX(NX), .NY(NY)) u_dec (
    .addr(in_data[sel][ADDR_W-1:0]), .my_x(4'(MY_X)), .my_y(4'(MY_Y)),
    .dst_x, .dst_y, .go_e, .go_w, .go_n, .go_s, .here
  );

  // ---- port allocator ----
  logic [NPORTS-1:0] busy;
  logic              alloc_ok, alloc_adapt;
  dir_e              alloc_dir;
  always_comb for (int i = 0; i < NPORTS; i++) busy[i] = out_valid[i];

  noc_port_allocator u_alloc (
    .go_e(go_e_q), .go_w(go_w_q), .go_n(go_n_q), .go_s(go_s_q), .here(here_q),
    .busy, .ok(alloc_ok), .dir(alloc_dir), .adaptive(alloc_adapt)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= ARB;
      sel    <= '0;
      dir_q  <= DIR_L;
      {go_e_q, go_w_q, go_n_q, go_s_q, here_q} <= '0;
    end else begin
      unique case (state)
        ARB:   if (gnt_valid) begin
                 sel   <= gnt;
                 state <= DEC;
               end
        DEC:   begin
                 {go_e_q, go_w_q, go_n_q, go_s_q, here_q} <= {go_e, go_w, go_n, go_s, here};
                 state <= ALLOC;
               end
        ALLOC: begin
                 dir_q <= alloc_dir;
                 state <= alloc_ok ? SEND : ARB;
               end
        SEND:  state <= ARB;
        default: state <= ARB;
      endcase
    end
  end

  // ---- output registers ----
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NPORTS; i++) begin
        out_valid[i] <= 1'b0;
        out_data[i]  <= '0;
      end
    end else begin
      for (int i = 0; i < NPORTS; i++) begin
        if (out_valid[i] && out_ready[i]) out_valid[i] <= 1'b0;
        if (state == SEND && 3'(dir_q) == 3'(i)) begin
          out_valid[i] <= 1'b1;
          out_data[i]  <= in_data[sel];
        end
      end
    end
  end

  always_comb begin
    for (int i = 0; i < NPORTS; i++) in_ready[i] = (state == SEND) && (sel == 3'(i));
  end

  assign served   = (state == SEND);
  assign adaptive = (state == ALLOC) && alloc_ok && alloc_adapt;
  assign blocked  = (state == ALLOC) && !alloc_ok;

`ifndef SYNTHESIS
  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
      out_valid[0] && !out_ready[0] |=> out_valid[0] && $stable(out_data[0]));
  a_sel_valid: assert property (@(posedge clk) disable iff (!rst_n)
      state != ARB |-> in_valid[sel]);
`endif

endmodule
