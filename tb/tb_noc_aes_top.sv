// tb_noc_aes_top: end-to-end test of the 4x4 AES mesh at its default size.
//
// Phase A: node (0,0) sends the FIPS-197 Appendix B key and plaintext to
// node (3,3), alone in the network.  The ciphertext must appear at (3,3)
// with source tag (0,0), 6 + 2 + 10 clocks after ld: one clock into the
// network interface, one per router visited on the 6-hop X-Y path plus the
// local hand-over, and ten AES rounds.
// Phase B: every node sends one random request to every node (256 requests,
// injected as fast as each node accepts them).
// Phase C: every node sends three requests to node (1,2), a hot spot.
// A scoreboard checks every result (ciphertext from an independent AES
// model, source tag, per source-destination order) and that all arrive.
// It counts, and fails if any never happened: paths that turn from x to y,
// deliveries to the sending node itself, routers arbitrating between two or
// more requests, full port buffers on mesh ports, requests buffered while
// their AES unit is busy, hosts held back by ld_ready, and cycles with
// several AES units busy at once.  The counters look inside the mesh by
// hierarchical names.
module tb_noc_aes_top;
  import noc_pkg::*;
  localparam int NODES = 16;

  logic clk = 0, rst;
  logic [NODES-1:0] ld, ld_ready, done;
  addr_t [NODES-1:0] destadd, res_src;
  logic [NODES-1:0][AES_W-1:0] key, text_in, f_out;
  int checks = 0, failures = 0;

  noc_aes_top dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  typedef struct {
    int dest;
    logic [127:0] key, text;
  } req_t;

  req_t             host_q[NODES][$];          // requests each host still has to send
  logic [127:0]     exp_q[NODES][NODES][$];    // [src][dst] expected ciphertexts in order
  int sent = 0, delivered = 0;
  int cnt_turn = 0, cnt_self = 0, cnt_arb = 0, cnt_full = 0, cnt_pe_wait = 0;
  int cnt_ld_stall = 0, cnt_parallel = 0;
  logic [NODES-1:0] done_q;
  int cycle = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic addr_t addr_of(input int n);
    return '{x: 2'(n % 4), y: 2'(n / 4)};
  endfunction

  task automatic queue_req(input int s, input int d, input logic [127:0] k, input logic [127:0] t);
    req_t r;
    r.dest = d; r.key = k; r.text = t;
    host_q[s].push_back(r);
    exp_q[s][d].push_back(aes_ref_pkg::encrypt(k, t));
    if (s % 4 != d % 4 && s / 4 != d / 4) cnt_turn++;
    if (s == d) cnt_self++;
  endtask

  // hosts: offer the head request whenever the node can take it
  always @(negedge clk) begin
    for (int n = 0; n < NODES; n++) begin
      ld[n] = !rst && host_q[n].size() > 0 && ld_ready[n];
      if (!rst && host_q[n].size() > 0 && !ld_ready[n]) cnt_ld_stall++;
      if (host_q[n].size() > 0) begin
        destadd[n] = addr_of(host_q[n][0].dest);
        key[n]     = host_q[n][0].key;
        text_in[n] = host_q[n][0].text;
      end else begin
        destadd[n] = '0; key[n] = '0; text_in[n] = '0;
      end
    end
  end

  // accepted requests leave the host queues; results are checked
  always @(posedge clk) begin
    cycle++;
    if (rst) done_q <= '0;
    else begin
      for (int n = 0; n < NODES; n++) begin
        if (ld[n] && ld_ready[n]) begin
          void'(host_q[n].pop_front());
          sent++;
        end
        if (done[n] && !done_q[n]) begin
          int s;
          s = int'(res_src[n].y) * 4 + int'(res_src[n].x);
          if (exp_q[s][n].size() == 0) check(0, $sformatf("unexpected result at node %0d from %0d", n, s));
          else begin
            check(f_out[n] == exp_q[s][n][0],
                  $sformatf("node %0d from %0d: got %h expected %h", n, s, f_out[n], exp_q[s][n][0]));
            void'(exp_q[s][n].pop_front());
          end
          delivered++;
        end
      end
      done_q <= done;
    end
  end

  // mechanism counters, observed inside the mesh
  for (genvar y = 0; y < 4; y++) begin : g_mon_y
    for (genvar x = 0; x < 4; x++) begin : g_mon_x
      always @(posedge clk) if (!rst) begin
        if ($countones(dut.g_y[y].g_x[x].u_node.u_router.req) > 1) cnt_arb++;
        // a full buffer on a mesh port holds back the neighbour feeding it
        if (|dut.g_y[y].g_x[x].u_node.u_router.full[NPORTS-1:1]) cnt_full++;
        // a buffered packet for this node waits while its AES unit is busy
        for (int p = 0; p < NPORTS; p++)
          if (!dut.g_y[y].g_x[x].u_node.u_router.empty[p]
              && dut.g_y[y].g_x[x].u_node.u_router.route[p] == P_LOCAL
              && dut.g_y[y].g_x[x].u_node.u_pe.busy)
            cnt_pe_wait++;
      end
    end
  end
  always @(posedge clk) if (!rst) begin
    int nbusy;
    nbusy = 0;
    for (int n = 0; n < NODES; n++) if (!done[n] && f_out[n] != 128'(0) && ld_busy(n)) nbusy++;
    if (nbusy > 1) cnt_parallel++;
  end

  function automatic bit ld_busy(input int n);
    case (n)
      0: return dut.g_y[0].g_x[0].u_node.u_pe.busy;   1: return dut.g_y[0].g_x[1].u_node.u_pe.busy;
      2: return dut.g_y[0].g_x[2].u_node.u_pe.busy;   3: return dut.g_y[0].g_x[3].u_node.u_pe.busy;
      4: return dut.g_y[1].g_x[0].u_node.u_pe.busy;   5: return dut.g_y[1].g_x[1].u_node.u_pe.busy;
      6: return dut.g_y[1].g_x[2].u_node.u_pe.busy;   7: return dut.g_y[1].g_x[3].u_node.u_pe.busy;
      8: return dut.g_y[2].g_x[0].u_node.u_pe.busy;   9: return dut.g_y[2].g_x[1].u_node.u_pe.busy;
      10: return dut.g_y[2].g_x[2].u_node.u_pe.busy;  11: return dut.g_y[2].g_x[3].u_node.u_pe.busy;
      12: return dut.g_y[3].g_x[0].u_node.u_pe.busy;  13: return dut.g_y[3].g_x[1].u_node.u_pe.busy;
      14: return dut.g_y[3].g_x[2].u_node.u_pe.busy;  default: return dut.g_y[3].g_x[3].u_node.u_pe.busy;
    endcase
  endfunction

  task automatic wait_drain();
    int guard;
    guard = 0;
    while ((sent < delivered || delivered < sent || host_q_total() > 0) && guard < 50000) begin
      @(negedge clk);
      guard++;
    end
    repeat (30) @(negedge clk);
  endtask

  function automatic int host_q_total();
    int t;
    t = 0;
    for (int n = 0; n < NODES; n++) t += host_q[n].size();
    return t;
  endfunction

  initial begin
    int t0, lat;
    rst = 1;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);

    // Phase A
    queue_req(0, 15, 128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734);
    check(exp_q[0][15][0] == 128'h3925841d02dc09fbdc118597196a0b32, "reference model vector");
    t0 = cycle;            // ld is sampled on the next rising edge
    @(posedge done[15]);
    lat = cycle - t0 - 1;
    check(lat == 18, $sformatf("(0,0)->(3,3) latency %0d, expected 18", lat));
    #1;
    check(f_out[15] == 128'h3925841d02dc09fbdc118597196a0b32 && res_src[15] == addr_of(0),
          "FIPS-197 vector through the mesh");
    wait_drain();

    // Phase B: all-to-all
    for (int s = 0; s < NODES; s++)
      for (int i = 0; i < NODES; i++) begin
        int d;
        d = (s + i) % NODES;
        queue_req(s, d, {$urandom, $urandom, $urandom, $urandom}, {$urandom, $urandom, $urandom, $urandom});
      end
    wait_drain();

    // Phase C: hot spot at (1,2)
    for (int i = 0; i < 3; i++)
      for (int s = 0; s < NODES; s++)
        queue_req(s, 9, {$urandom, $urandom, $urandom, $urandom}, {$urandom, $urandom, $urandom, $urandom});
    wait_drain();

    check(sent == 1 + 256 + 48 && delivered == sent,
          $sformatf("sent %0d delivered %0d, expected %0d", sent, delivered, 1 + 256 + 48));
    for (int s = 0; s < NODES; s++) for (int d = 0; d < NODES; d++)
      check(exp_q[s][d].size() == 0, $sformatf("%0d results from %0d to %0d missing", exp_q[s][d].size(), s, d));
    $display("turns %0d, self %0d, arbitration %0d, buffer-full %0d, PE-busy waits %0d, ld stalls %0d, parallel cycles %0d, cycles %0d",
             cnt_turn, cnt_self, cnt_arb, cnt_full, cnt_pe_wait, cnt_ld_stall, cnt_parallel, cycle);
    check(cnt_turn > 0, "no X-to-Y turn");
    check(cnt_self > 0, "no delivery to the sending node");
    check(cnt_arb > 0, "no arbitration between requests");
    check(cnt_full > 0, "no full port buffer");
    check(cnt_pe_wait > 0, "no request waited for a busy AES unit");
    check(cnt_ld_stall > 0, "no host was held back");
    check(cnt_parallel > 0, "no two AES units busy together");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
