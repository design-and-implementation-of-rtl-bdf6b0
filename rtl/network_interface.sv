// network_interface: mediator between a node's AES processing element, its
// host port and the local port of its router.
//
// Injection: the host presents ld with destadd, key and text_in; when
// ld_ready is high the request is captured into a one-packet register as
// {dest, src = this node, key, text} and offered to the router's local input
// (inj_valid/inj_pkt/inj_ready).  ld_ready is low while that packet waits.
// Ejection: a packet the router delivers on its local output is accepted
// (ej_ready) only while the PE is idle; on acceptance the NI pulses pe_ld
// with the packet's key and text, in the same cycle, and keeps the packet's
// source address on res_src for the result.  The PE's output and done
// flag go to the host unchanged.
// Timing: one clock from ld to inj_valid; zero clocks from an accepted
// packet to pe_ld.
//
// The NI's role between PE and router is the document's; the packet layout,
// the single injection register, the rule that the PE takes a new packet
// only when idle, and the source tag are this design's choices.
module network_interface
  import noc_pkg::*;
#(
  parameter int MY_X = 0,
  parameter int MY_Y = 0
) (
  input  logic             clk,
  input  logic             rst,      // synchronous, active high
  // host request side
  input  logic             ld,
  input  addr_t            destadd,
  input  logic [AES_W-1:0] key,
  input  logic [AES_W-1:0] text_in,
  output logic             ld_ready,
  // router local input (injection)
  output logic             inj_valid,
  output packet_t          inj_pkt,
  input  logic             inj_ready,
  // router local output (ejection)
  input  logic             ej_valid,
  input  packet_t          ej_pkt,
  output logic             ej_ready,
  // processing element
  output logic             pe_ld,
  output logic [AES_W-1:0] pe_key,
  output logic [AES_W-1:0] pe_text,
  input  logic             pe_busy,
  // result tag
  output addr_t            res_src
);

  localparam addr_t MY_ADDR = '{x: COORD_W'(MY_X), y: COORD_W'(MY_Y)};

  logic inj_hold_q;

  assign ld_ready  = !inj_hold_q;
  assign inj_valid = inj_hold_q;

  always_ff @(posedge clk) begin
    if (ld && ld_ready) inj_pkt <= '{dest: destadd, src: MY_ADDR, key: key, text: text_in};
  end

  always_ff @(posedge clk) begin
    if (rst)                    inj_hold_q <= 1'b0;
    else if (ld && ld_ready)    inj_hold_q <= 1'b1;
    else if (inj_ready)         inj_hold_q <= 1'b0;
  end

  assign ej_ready = !pe_busy;
  assign pe_ld    = ej_valid && ej_ready;
  assign pe_key   = ej_pkt.key;
  assign pe_text  = ej_pkt.text;

  always_ff @(posedge clk) begin
    if (rst)        res_src <= '0;
    else if (pe_ld) res_src <= ej_pkt.src;
  end

  assert property (@(posedge clk) disable iff (rst) ej_valid |-> ej_pkt.dest == MY_ADDR);

endmodule
