// tb_noc_router: self-checking test of one router, placed at (1,1).
//
// Part 1: packets with the data words adc, 909, 611, b02, e25 enter the
// local, west, south, east and north ports on the same edge, all addressed
// to (3,3).  All must leave by the west port, one per clock, in the
// round-robin order local, west, south, east, north, the first one clock
// after they were written.
// Part 2: random traffic.  Each input is fed from its own queue of packets
// with random destinations; each output's ready is random.  A monitor checks
// that every packet leaves by the port X-Y routing names, that packets of
// one input leave in arrival order, that none is lost, and that at most one
// packet leaves per clock.  It also counts buffer-full backpressure and
// blocked outputs, and fails if either never happened.
module tb_noc_router;
  import noc_pkg::*;
  logic clk = 0, rst;
  logic    [NPORTS-1:0] in_valid, in_ready, out_valid, out_ready;
  packet_t [NPORTS-1:0] in_pkt, out_pkt;
  int checks = 0, failures = 0;

  noc_router #(.MY_X(1), .MY_Y(1), .BUF_DEPTH(2)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic port_e ref_port(input addr_t d);
    if (d.x > 1) return P_WEST;
    if (d.x < 1) return P_EAST;
    if (d.y > 1) return P_NORTH;
    if (d.y < 1) return P_SOUTH;
    return P_LOCAL;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  packet_t src_q[NPORTS][$];   // packets still to be offered, per input
  int      exp_q[NPORTS][$];   // ids written into each input buffer
  port_e   exp_port[NPORTS][$];   // and the output each one needs
  int      sent = 0, received = 0, full_seen = 0, blocked_seen = 0;
  bit      random_phase = 0;

  // driver: offer the head of each source queue
  always_comb begin
    for (int p = 0; p < NPORTS; p++) begin
      in_valid[p] = src_q[p].size() > 0;
      in_pkt[p]   = in_valid[p] ? src_q[p][0] : '0;
    end
  end

  // monitor
  always @(posedge clk) if (!rst) begin
    int nout;
    nout = 0;
    for (int p = 0; p < NPORTS; p++) begin
      if (out_valid[p]) begin
        int id, from;
        nout++;
        id = int'(out_pkt[p].text[31:0]);
        from = int'(out_pkt[p].text[35:32]);
        check(out_ready[p], "valid without ready");
        check(p == int'(ref_port(out_pkt[p].dest)),
              $sformatf("packet %0d to (%0d,%0d) left by port %0d", id,
                        out_pkt[p].dest.x, out_pkt[p].dest.y, p));
        if (exp_q[from].size() > 0) begin
          check(exp_q[from][0] == id, $sformatf("input %0d order: got %0d expected %0d",
                                                from, id, exp_q[from][0]));
          void'(exp_q[from].pop_front());
          void'(exp_port[from].pop_front());
        end else check(0, "packet from nowhere");
        received++;
      end
    end
    check(nout <= 1, "more than one packet per clock");
    for (int p = 0; p < NPORTS; p++) begin
      if (in_valid[p] && !in_ready[p]) full_seen++;
      if (in_valid[p] && in_ready[p]) begin
        exp_q[p].push_back(int'(in_pkt[p].text[31:0]));
        exp_port[p].push_back(ref_port(in_pkt[p].dest));
        void'(src_q[p].pop_front());
        sent++;
      end
    end
    if (random_phase) out_ready <= NPORTS'($urandom) | NPORTS'($urandom);
    for (int p = 0; p < NPORTS; p++)
      if (exp_port[p].size() > 0 && !out_ready[exp_port[p][0]]) blocked_seen++;
  end

  initial begin
    logic [11:0] fig_data[NPORTS] = '{12'hadc, 12'h909, 12'h611, 12'hb02, 12'he25};
    int id;
    rst = 1; out_ready = '1;
    repeat (2) @(negedge clk);
    rst = 0;
    // Part 1
    for (int p = 0; p < NPORTS; p++) begin
      packet_t k;
      k = '0;
      k.dest = '{x: 2'd3, y: 2'd3};
      k.src  = '{x: 2'd1, y: 2'd1};
      k.text = {92'(fig_data[p]), 4'(p), 32'(p)};
      src_q[p].push_back(k);
    end
    @(negedge clk);   // all five written on this edge
    for (int i = 0; i < NPORTS; i++) begin
      check(out_valid == 5'(1 << P_WEST), $sformatf("step %0d: out_valid %b", i, out_valid));
      check(out_pkt[P_WEST].text[127:36] == 92'(fig_data[i]),
            $sformatf("step %0d: data %h expected %h", i, out_pkt[P_WEST].text[47:36], fig_data[i]));
      @(negedge clk);
    end
    check(out_valid == '0, "router idle after the five packets");
    // Part 2
    random_phase = 1;
    id = 100;
    for (int n = 0; n < 400; n++) begin
      packet_t k;
      int p;
      p = $urandom % NPORTS;
      k.dest = '{x: 2'($urandom), y: 2'($urandom)};
      k.src  = '0;
      k.key  = {$urandom, $urandom, $urandom, $urandom};
      k.text = {92'($urandom), 4'(p), 32'(id)};
      src_q[p].push_back(k);
      id++;
      if ($urandom % 4 == 0) @(negedge clk);
    end
    while (received < sent || src_q[0].size() + src_q[1].size() + src_q[2].size()
           + src_q[3].size() + src_q[4].size() > 0) @(negedge clk);
    repeat (5) @(negedge clk);
    check(received == 405, $sformatf("%0d packets received of 405", received));
    check(full_seen > 0, "no buffer ever filled");
    check(blocked_seen > 0, "no output was ever blocked");
    $display("buffer-full stalls %0d, blocked heads %0d", full_seen, blocked_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
