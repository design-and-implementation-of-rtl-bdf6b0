// tb_rr_arbiter: self-checking test of the five-port round-robin arbiter.
//
// A reference pointer tracks the port after the last grant; every cycle the
// expected grant is the first requesting port found walking the ring
// local, west, south, east, north from that pointer.  With all five ports
// requesting, the grants must follow that ring order exactly; a port that
// keeps requesting must be served within five grants.
module tb_rr_arbiter;
  logic clk = 0, rst;
  logic [4:0] req, grant;
  int checks = 0, failures = 0;
  int ptr;

  rr_arbiter #(.N(5)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [4:0] expect_grant(input logic [4:0] r, input int p);
    for (int k = 0; k < 5; k++)
      if (r[(p + k) % 5]) return 5'(1 << ((p + k) % 5));
    return '0;
  endfunction

  function automatic int index_of(input logic [4:0] g);
    for (int i = 0; i < 5; i++) if (g[i]) return i;
    return -1;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int wait_cnt[5];
    rst = 1; req = '0; ptr = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    // all ports requesting: strict ring order from local
    req = 5'b11111;
    for (int i = 0; i < 10; i++) begin
      #1;
      check(grant == 5'(1 << (i % 5)), $sformatf("ring step %0d: grant %b", i, grant));
      @(negedge clk);
    end
    ptr = 0;
    // random requests against the reference pointer
    for (int i = 0; i < 5; i++) wait_cnt[i] = 0;
    for (int i = 0; i < 1000; i++) begin
      req = 5'($urandom);
      #1;
      check(grant == expect_grant(req, ptr), $sformatf("req %b ptr %0d: grant %b", req, ptr, grant));
      for (int p = 0; p < 5; p++) begin
        if (req[p] && !grant[p]) wait_cnt[p]++;
        else wait_cnt[p] = 0;
        check(wait_cnt[p] < 5, $sformatf("port %0d starved", p));
      end
      if (grant != '0) ptr = (index_of(grant) + 1) % 5;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
