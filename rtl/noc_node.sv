// noc_node: one tile of the mesh: router, network interface and AES-128
// processing element.
//
// The router's local port connects to the network interface, which injects
// the host's requests and hands arriving requests to the PE.  The four
// mesh ports (west, south, east, north, indices 1..4 of the port arrays)
// are brought out for the neighbours.  Results leave on f_out/done with the
// requesting node's address on res_src.  See noc_router, network_interface
// and aes_core for the timing of each part.
module noc_node
  import noc_pkg::*;
#(
  parameter int MY_X      = 0,
  parameter int MY_Y      = 0,
  parameter int BUF_DEPTH = 2
) (
  input  logic             clk,
  input  logic             rst,
  // host
  input  logic             ld,
  input  addr_t            destadd,
  input  logic [AES_W-1:0] key,
  input  logic [AES_W-1:0] text_in,
  output logic             ld_ready,
  output logic [AES_W-1:0] f_out,
  output logic             done,
  output addr_t            res_src,
  // mesh links; index 0 (local) is unused here
  input  logic    [NPORTS-1:0] link_in_valid,
  input  packet_t [NPORTS-1:0] link_in_pkt,
  output logic    [NPORTS-1:0] link_in_ready,
  output logic    [NPORTS-1:0] link_out_valid,
  output packet_t [NPORTS-1:0] link_out_pkt,
  input  logic    [NPORTS-1:0] link_out_ready
);

  logic    [NPORTS-1:0] r_in_valid, r_in_ready, r_out_valid, r_out_ready;
  packet_t [NPORTS-1:0] r_in_pkt, r_out_pkt;

  logic             inj_valid, ej_ready, pe_ld, pe_busy;
  packet_t          inj_pkt;
  logic [AES_W-1:0] pe_key, pe_text;

  always_comb begin
    r_in_valid  = link_in_valid;
    r_in_pkt    = link_in_pkt;
    r_out_ready = link_out_ready;
    r_in_valid[P_LOCAL]  = inj_valid;
    r_in_pkt[P_LOCAL]    = inj_pkt;
    r_out_ready[P_LOCAL] = ej_ready;
  end

  always_comb begin
    link_in_ready  = r_in_ready;
    link_out_valid = r_out_valid;
    link_out_pkt   = r_out_pkt;
    link_in_ready[P_LOCAL]  = 1'b0;
    link_out_valid[P_LOCAL] = 1'b0;
    link_out_pkt[P_LOCAL]   = '0;
  end

  noc_router #(.MY_X(MY_X), .MY_Y(MY_Y), .BUF_DEPTH(BUF_DEPTH)) u_router (
    .clk, .rst,
    .in_valid (r_in_valid),
    .in_pkt   (r_in_pkt),
    .in_ready (r_in_ready),
    .out_valid(r_out_valid),
    .out_pkt  (r_out_pkt),
    .out_ready(r_out_ready)
  );

  network_interface #(.MY_X(MY_X), .MY_Y(MY_Y)) u_ni (
    .clk, .rst,
    .ld, .destadd, .key, .text_in, .ld_ready,
    .inj_valid, .inj_pkt, .inj_ready(r_in_ready[P_LOCAL]),
    .ej_valid(r_out_valid[P_LOCAL]), .ej_pkt(r_out_pkt[P_LOCAL]), .ej_ready,
    .pe_ld, .pe_key, .pe_text, .pe_busy,
    .res_src
  );

  aes_core u_pe (
    .clk, .rst,
    .ld     (pe_ld),
    .key    (pe_key),
    .text_in(pe_text),
    .f_out  (f_out),
    .done   (done),
    .busy   (pe_busy)
  );

endmodule
