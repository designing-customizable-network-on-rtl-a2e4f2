// noc_service_arbiter: schedules the five incoming ports of one router.
//
// Behaviour taken from the document:
//  * one request only: it is granted at once, wherever it is;
//  * several requests seen from a fresh start: the highest fixed priority
//    wins, in the order north, east, south, west, local;
//  * after a port has been served, the arbiter looks at the ports after it in
//    that order, one port per clock cycle, and stops at the first one that
//    requests. It moves on after every service even if the same port still
//    has data waiting, so no port starves.
// "Fresh start" is this design's reading: the arbiter starts fresh when it
// has seen no request at all for a cycle.
//
// Interface: when `en` is high the arbiter makes one decision step;
// `gnt_valid`/`gnt` (combinational) name the port chosen in this cycle, and
// the scan pointer moves to the port after it. `scan_skip` pulses for each
// cycle spent checking a port that had no request (used for coverage).
module noc_service_arbiter
  import noc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic [NPORTS-1:0] req,
  output logic              gnt_valid,
  output logic [2:0]        gnt,
  output logic              scan_skip
);

  logic [2:0] ptr;
  logic       scanning;
  logic [2:0] nreq;
  logic [2:0] first;

  function automatic logic [2:0] next_port(logic [2:0] p);
    return (p == 3'(NPORTS - 1)) ? 3'd0 : p + 3'd1;
  endfunction

  always_comb begin
    nreq  = '0;
    first = '0;
    for (int i = NPORTS - 1; i >= 0; i--) begin
      nreq = nreq + 3'(req[i]);
      if (req[i]) first = 3'(i);
    end
    gnt_valid = 1'b0;
    gnt       = first;
    scan_skip = 1'b0;
    if (en && nreq != 0) begin
      if (nreq == 1 || !scanning) begin
        gnt_valid = 1'b1;            // single request or fresh start
        gnt       = first;
      end else if (req[ptr]) begin
        gnt_valid = 1'b1;            // scan reached a requesting port
        gnt       = ptr;
      end else begin
        scan_skip = 1'b1;            // this port has nothing: check the next
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ptr      <= '0;
      scanning <= 1'b0;
    end else if (en) begin
      if (nreq == 0) begin
        scanning <= 1'b0;
      end else if (gnt_valid) begin
        ptr      <= next_port(gnt);
        scanning <= 1'b1;
      end else begin
        ptr <= next_port(ptr);
      end
    end
  end

endmodule
