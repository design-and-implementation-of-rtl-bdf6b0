// port_buffer: packet FIFO behind one router input port.
//
// Holds up to DEPTH whole packets of WIDTH bits in arrival order.  A packet
// is written when `push` is high on a clock edge and read from `head`
// (valid while `empty` is low, no read latency) and removed when `pop` is
// high.  `full` is registered state only, so a neighbour can use it as its
// ready signal without a combinational path through this router.  Push and
// pop may happen on the same edge.
//
// That every input port stores arriving packets in its own buffer is the
// document's; the depth is this design's choice.
module port_buffer #(
  parameter int WIDTH = 16,
  parameter int DEPTH = 2
) (
  input  logic             clk,
  input  logic             rst,    // synchronous, active high
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  input  logic             pop,
  output logic [WIDTH-1:0] head,
  output logic             empty,
  output logic             full
);

  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    rd_q, wr_q;
  logic [AW:0]      cnt_q;

  assign empty = (cnt_q == 0);
  assign full  = (cnt_q == (AW+1)'(DEPTH));
  assign head  = mem[rd_q];

  function automatic logic [AW-1:0] incr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (push) mem[wr_q] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_q  <= '0;
      wr_q  <= '0;
      cnt_q <= '0;
    end else begin
      if (push) wr_q <= incr(wr_q);
      if (pop)  rd_q <= incr(rd_q);
      cnt_q <= cnt_q + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  assert property (@(posedge clk) disable iff (rst) !(push && full && !pop));
  assert property (@(posedge clk) disable iff (rst) !(pop && empty));

endmodule
