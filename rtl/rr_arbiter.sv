// rr_arbiter: round-robin arbiter that lets one router input port at a time
// forward a packet.
//
// Requests are indexed in the ring order local(0), west(1), south(2),
// east(3), north(4).  The search starts at the port after the one granted
// last and walks the ring, so every requesting port is served once before
// any port is served twice.  `grant` is one-hot (or zero when nothing is
// requested) and combinational from `req`; the pointer moves on the clock
// edge on which a grant is given.  After reset the search starts at the
// local port.
//
// The ring order is the document's; the rotating pointer is this design's
// way of giving each port an equal share.
module rr_arbiter #(
  parameter int N = 5
) (
  input  logic         clk,
  input  logic         rst,     // synchronous, active high
  input  logic [N-1:0] req,
  output logic [N-1:0] grant
);

  logic [$clog2(N)-1:0] ptr_q;   // highest-priority port this cycle

  localparam int IW = $clog2(N) + 1;   // wide enough for ptr_q + k < 2N

  always_comb begin
    grant = '0;
    for (int k = 0; k < N; k++) begin
      logic [IW-1:0] idx;
      idx = IW'(ptr_q) + IW'(k);
      if (idx >= IW'(N)) idx = idx - IW'(N);
      if (req[idx[IW-2:0]] && grant == '0) grant[idx[IW-2:0]] = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) ptr_q <= '0;
    else begin
      for (int i = 0; i < N; i++)
        if (grant[i]) ptr_q <= ($clog2(N))'((i + 1) % N);
    end
  end

  assert property (@(posedge clk) disable iff (rst) $onehot0(grant));
  assert property (@(posedge clk) disable iff (rst) (grant & ~req) == '0);

endmodule
