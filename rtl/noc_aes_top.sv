// noc_aes_top: MESH_X x MESH_Y mesh network-on-chip whose every node holds
// an AES-128 encryption unit, so that many blocks are encrypted in parallel.
//
// Node n = y*MESH_X + x sits at address (x, y); on the default 4x4 mesh the
// nodes numbered 1..16 row by row in the usual drawing are n = 0..15, node 1
// at (0,0) and node 16 at (3,3).  Neighbours are joined by a pair of
// opposite one-way links: the west port of (x,y) feeds the east port of
// (x+1,y), its north port feeds the south port of (x,y+1), and the reverse
// links close each pair.  Ports on the mesh boundary are tied off; X-Y
// routing never selects them.
//
// Use: on any node, drive ld[n] for one clock with destadd[n] (the node
// that should do the work, {x, y}), key[n] and text_in[n] while ld_ready[n]
// is high.  The request travels as one packet, one hop per clock when the
// path is free, is buffered where its path is busy, and at the destination
// starts that node's AES unit as soon as it is idle.  Ten clocks later the
// destination raises done[d]; f_out[d] holds the ciphertext and res_src[d]
// the address of the node that sent the request, until the next request
// starts there.  done[d] is high for at least one clock per result.
//
// Mesh size, X-Y routing, round-robin arbitration and AES as the processing
// element are the document's; the single-packet request format, the buffer
// depth and delivering the result at the destination node are this
// design's choices.
module noc_aes_top
  import noc_pkg::*;
#(
  parameter int MESH_X    = 4,
  parameter int MESH_Y    = 4,
  parameter int BUF_DEPTH = 2,
  localparam int NODES    = MESH_X * MESH_Y
) (
  input  logic                        clk,
  input  logic                        rst,    // synchronous, active high
  input  logic [NODES-1:0]            ld,
  input  addr_t [NODES-1:0]           destadd,
  input  logic [NODES-1:0][AES_W-1:0] key,
  input  logic [NODES-1:0][AES_W-1:0] text_in,
  output logic [NODES-1:0]            ld_ready,
  output logic [NODES-1:0][AES_W-1:0] f_out,
  output logic [NODES-1:0]            done,
  output addr_t [NODES-1:0]           res_src
);

  if (MESH_X > 2**COORD_W || MESH_Y > 2**COORD_W) begin : g_size_check
    $error("mesh larger than the address coordinates (noc_pkg::COORD_W) allow");
  end

  // Per node, per port: what the node drives out and what it receives.
  logic    [NODES-1:0][NPORTS-1:0] o_valid, o_ready, i_valid, i_ready;
  packet_t [NODES-1:0][NPORTS-1:0] o_pkt, i_pkt;

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int N = y * MESH_X + x;

      // Input of this node at port p comes from the neighbour on that side;
      // o_ready of this node at port p is that neighbour's input ready.
      // West side neighbour is (x+1,y), east (x-1,y), north (x,y+1), south (x,y-1).
      if (x < MESH_X - 1) begin : g_w
        assign i_valid[N][P_WEST] = o_valid[N+1][P_EAST];
        assign i_pkt[N][P_WEST]   = o_pkt[N+1][P_EAST];
        assign o_ready[N][P_WEST] = i_ready[N+1][P_EAST];
      end else begin : g_w_edge
        assign i_valid[N][P_WEST] = 1'b0;
        assign i_pkt[N][P_WEST]   = '0;
        assign o_ready[N][P_WEST] = 1'b0;
      end
      if (x > 0) begin : g_e
        assign i_valid[N][P_EAST] = o_valid[N-1][P_WEST];
        assign i_pkt[N][P_EAST]   = o_pkt[N-1][P_WEST];
        assign o_ready[N][P_EAST] = i_ready[N-1][P_WEST];
      end else begin : g_e_edge
        assign i_valid[N][P_EAST] = 1'b0;
        assign i_pkt[N][P_EAST]   = '0;
        assign o_ready[N][P_EAST] = 1'b0;
      end
      if (y < MESH_Y - 1) begin : g_n
        assign i_valid[N][P_NORTH] = o_valid[N+MESH_X][P_SOUTH];
        assign i_pkt[N][P_NORTH]   = o_pkt[N+MESH_X][P_SOUTH];
        assign o_ready[N][P_NORTH] = i_ready[N+MESH_X][P_SOUTH];
      end else begin : g_n_edge
        assign i_valid[N][P_NORTH] = 1'b0;
        assign i_pkt[N][P_NORTH]   = '0;
        assign o_ready[N][P_NORTH] = 1'b0;
      end
      if (y > 0) begin : g_s
        assign i_valid[N][P_SOUTH] = o_valid[N-MESH_X][P_NORTH];
        assign i_pkt[N][P_SOUTH]   = o_pkt[N-MESH_X][P_NORTH];
        assign o_ready[N][P_SOUTH] = i_ready[N-MESH_X][P_NORTH];
      end else begin : g_s_edge
        assign i_valid[N][P_SOUTH] = 1'b0;
        assign i_pkt[N][P_SOUTH]   = '0;
        assign o_ready[N][P_SOUTH] = 1'b0;
      end
      // The local port is served inside the node.
      assign i_valid[N][P_LOCAL] = 1'b0;
      assign i_pkt[N][P_LOCAL]   = '0;
      assign o_ready[N][P_LOCAL] = 1'b0;

      noc_node #(.MY_X(x), .MY_Y(y), .BUF_DEPTH(BUF_DEPTH)) u_node (
        .clk, .rst,
        .ld            (ld[N]),
        .destadd       (destadd[N]),
        .key           (key[N]),
        .text_in       (text_in[N]),
        .ld_ready      (ld_ready[N]),
        .f_out         (f_out[N]),
        .done          (done[N]),
        .res_src       (res_src[N]),
        .link_in_valid (i_valid[N]),
        .link_in_pkt   (i_pkt[N]),
        .link_in_ready (i_ready[N]),
        .link_out_valid(o_valid[N]),
        .link_out_pkt  (o_pkt[N]),
        .link_out_ready(o_ready[N])
      );
    end
  end

endmodule
