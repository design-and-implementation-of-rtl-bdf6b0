// noc_router: five-port packet-switched mesh router without virtual
// channels or pipelining.
//
// Ports, in round-robin order: local (to the node's network interface),
// west, south, east, north.  A packet arriving at a port is stored in that
// port's buffer (port_buffer, BUF_DEPTH whole packets).  Each cycle the
// X-Y routing unit (xy_route) works out the output port for the packet at
// the head of every buffer; a buffer requests arbitration when it holds a
// packet and that output can take it.  One round-robin arbiter (rr_arbiter)
// then grants one input port, whose head packet is driven onto its output
// port and removed from the buffer.  A packet whose destination matches
// this router's address leaves by the local port.
//
// Interface: per port, in_valid/in_pkt/in_ready towards the upstream
// neighbour and out_valid/out_pkt/out_ready towards the downstream one; a
// packet moves on a clock edge where valid and ready are both high.
// in_ready is "buffer not full", registered state, so ready never depends
// on valid.  out_valid depends combinationally on out_ready (a port only
// requests an output that is ready).
// Timing: a packet written into a buffer on one edge can leave on the next,
// so a hop takes one clock when the path is free; at most one packet leaves
// the router per clock.
//
// Buffer per port, single round-robin arbiter, X-Y routing and the port
// order follow the document; the buffer depth, the valid/ready handshake
// and the one-packet-per-clock forwarding are this design's choices.
module noc_router
  import noc_pkg::*;
#(
  parameter int MY_X      = 0,
  parameter int MY_Y      = 0,
  parameter int BUF_DEPTH = 2
) (
  input  logic              clk,
  input  logic              rst,    // synchronous, active high
  input  logic    [NPORTS-1:0] in_valid,
  input  packet_t [NPORTS-1:0] in_pkt,
  output logic    [NPORTS-1:0] in_ready,
  output logic    [NPORTS-1:0] out_valid,
  output packet_t [NPORTS-1:0] out_pkt,
  input  logic    [NPORTS-1:0] out_ready
);

  localparam addr_t MY_ADDR = '{x: COORD_W'(MY_X), y: COORD_W'(MY_Y)};

  packet_t [NPORTS-1:0] head;
  logic    [NPORTS-1:0] empty, full, req, grant;
  port_e                route [NPORTS];

  for (genvar p = 0; p < NPORTS; p++) begin : g_port
    logic [PKT_W-1:0] head_bits;

    port_buffer #(.WIDTH(PKT_W), .DEPTH(BUF_DEPTH)) u_buf (
      .clk  (clk),
      .rst  (rst),
      .push (in_valid[p] && in_ready[p]),
      .din  (in_pkt[p]),
      .pop  (grant[p]),
      .head (head_bits),
      .empty(empty[p]),
      .full (full[p])
    );
    assign head[p]     = head_bits;
    assign in_ready[p] = !full[p];

    xy_route u_route (
      .cur (MY_ADDR),
      .dest(head[p].dest),
      .port(route[p])
    );

    assign req[p] = !empty[p] && out_ready[route[p]];
  end

  rr_arbiter #(.N(NPORTS)) u_arb (
    .clk  (clk),
    .rst  (rst),
    .req  (req),
    .grant(grant)
  );

  // Crossbar: the granted input drives the output its packet is routed to.
  always_comb begin
    out_valid = '0;
    out_pkt   = '0;
    for (int p = 0; p < NPORTS; p++) begin
      if (grant[p]) begin
        out_valid[route[p]] = 1'b1;
        out_pkt[route[p]]   = head[p];
      end
    end
  end

  assert property (@(posedge clk) disable iff (rst) $onehot0(out_valid));
  assert property (@(posedge clk) disable iff (rst) (out_valid & ~out_ready) == '0);

endmodule
