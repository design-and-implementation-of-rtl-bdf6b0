// tb_port_buffer: self-checking test of the packet FIFO.
//
// Random pushes (only when not full, as a router's ready rule allows) and
// pops (only when not empty) against a queue model: the head, the empty
// and full flags and the packet order are checked every cycle, including
// simultaneous push and pop on a full and on an empty-but-one buffer.
module tb_port_buffer;
  localparam int W = 24, D = 3;
  logic clk = 0, rst;
  logic push, pop, empty, full;
  logic [W-1:0] din, head;
  logic [W-1:0] model[$];
  int checks = 0, failures = 0;
  int saw_full = 0;

  port_buffer #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; push = 0; pop = 0; din = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 3000; i++) begin
      check(empty == (model.size() == 0), "empty flag");
      check(full == (model.size() == D), "full flag");
      if (model.size() > 0) check(head == model[0], $sformatf("head %h expected %h", head, model[0]));
      if (full) saw_full++;
      // bias towards filling in the first half, draining in the second
      push = !full && ($urandom % 100 < (i < 1500 ? 70 : 40));
      pop  = !empty && ($urandom % 100 < (i < 1500 ? 40 : 70));
      din  = W'($urandom);
      @(posedge clk);
      if (pop) void'(model.pop_front());
      if (push) model.push_back(din);
      @(negedge clk);
    end
    check(saw_full > 0, "buffer never filled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
