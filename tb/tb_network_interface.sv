// tb_network_interface: self-checking test of the network interface of
// node (2,1).
//
// Injection: random host requests; each must appear on the router side one
// clock after ld, as a packet {dest, src = (2,1), key, text}, and stay there
// (with ld_ready low) while the router holds inj_ready low.
// Ejection: packets for (2,1) are offered while a simple PE model is busy
// for ten clocks after each pe_ld; the NI may accept only while the PE is
// idle, must start the PE with the packet's key and text in the accepting
// cycle, and must then show the packet's source on res_src.
module tb_network_interface;
  import noc_pkg::*;
  logic clk = 0, rst;
  logic ld, ld_ready, inj_valid, inj_ready, ej_valid, ej_ready, pe_ld, pe_busy;
  addr_t destadd, res_src;
  logic [AES_W-1:0] key, text_in, pe_key, pe_text;
  packet_t inj_pkt, ej_pkt;
  int checks = 0, failures = 0;
  int busy_cnt = 0, inj_stalls = 0, ej_stalls = 0;

  network_interface #(.MY_X(2), .MY_Y(1)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // PE model: busy for ten clocks after a start
  assign pe_busy = busy_cnt > 0;
  always @(posedge clk) begin
    if (rst) busy_cnt <= 0;
    else if (pe_ld) begin
      check(!pe_busy, "PE started while busy");
      busy_cnt <= 10;
    end
    else if (busy_cnt > 0) busy_cnt <= busy_cnt - 1;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // injection side
  initial begin : inject
    packet_t exp;
    rst = 1; ld = 0; destadd = '0; key = '0; text_in = '0; inj_ready = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 100; n++) begin
      check(ld_ready && !inj_valid, "idle before a request");
      destadd = '{x: 2'($urandom), y: 2'($urandom)};
      key = {$urandom, $urandom, $urandom, $urandom};
      text_in = {$urandom, $urandom, $urandom, $urandom};
      exp = '{dest: destadd, src: '{x: 2'd2, y: 2'd1}, key: key, text: text_in};
      ld = 1;
      @(negedge clk);
      ld = 0; key = '0; text_in = '0;
      inj_ready = 0;
      repeat ($urandom % 4) begin
        check(inj_valid && !ld_ready && inj_pkt == exp, "request held while router not ready");
        inj_stalls++;
        @(negedge clk);
      end
      check(inj_valid && inj_pkt == exp, "injected packet");
      inj_ready = 1;
      @(negedge clk);
      inj_ready = 0;
    end
  end

  // ejection side
  initial begin : eject
    int started = 0;
    ej_valid = 0; ej_pkt = '0;
    @(negedge clk);
    wait (!rst);
    @(negedge clk);
    while (started < 30) begin
      packet_t k;
      k.dest = '{x: 2'd2, y: 2'd1};
      k.src  = '{x: 2'($urandom), y: 2'($urandom)};
      k.key  = {$urandom, $urandom, $urandom, $urandom};
      k.text = {$urandom, $urandom, $urandom, $urandom};
      ej_pkt = k; ej_valid = 1;
      #1;
      while (!ej_ready) begin
        check(!pe_ld, "PE started while busy");
        ej_stalls++;
        @(negedge clk);
        #1;
      end
      check(pe_ld && pe_key == k.key && pe_text == k.text, "PE start with packet operands");
      @(negedge clk);
      ej_valid = 0;
      check(res_src == k.src, "source tag");
      started++;
      repeat ($urandom % 3) @(negedge clk);
    end
    repeat (1200) @(negedge clk);
    check(inj_stalls > 0 && ej_stalls > 0, "both stall cases happened");
    $display("injection stalls %0d, ejection stalls %0d", inj_stalls, ej_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
