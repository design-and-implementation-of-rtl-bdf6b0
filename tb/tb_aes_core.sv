// tb_aes_core: self-checking test of the AES-128 processing element.
//
// Checks the FIPS-197 Appendix B and C.1 vectors and the all-zero vector
// against their published ciphertexts, then 40 random key/plaintext pairs
// against an independent byte-level reference model.  Every operation also
// checks the latency: done must rise exactly 10 clocks after ld, the ten
// AES rounds.  One operation is restarted mid-way by a second ld.
module tb_aes_core;
  logic         clk = 0;
  logic         rst;
  logic         ld;
  logic [127:0] key, text_in, f_out;
  logic         done, busy;
  int checks = 0, failures = 0;

  aes_core dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run(input logic [127:0] k, input logic [127:0] pt, input logic [127:0] exp);
    int cyc;
    @(negedge clk);
    key = k; text_in = pt; ld = 1;
    @(negedge clk);
    ld = 0;
    key = '0; text_in = '0;   // operands must be captured at ld
    cyc = 0;   // clock edges since the one that sampled ld
    while (!done && cyc < 50) begin
      @(negedge clk);
      cyc++;
    end
    check(cyc == 10, $sformatf("latency %0d cycles, expected 10", cyc));
    check(f_out == exp, $sformatf("key %h pt %h: got %h expected %h", k, pt, f_out, exp));
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] k, p;
    rst = 1; ld = 0; key = '0; text_in = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    check(!done && !busy, "idle after reset");
    // Published FIPS-197 vectors
    run(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734,
        128'h3925841d02dc09fbdc118597196a0b32);
    run(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff,
        128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    run('0, '0, 128'h66e94bd4ef8a2c3b884cfa59ca342b2e);
    // Reference model agrees with the published vectors
    check(aes_ref_pkg::encrypt(128'h2b7e151628aed2a6abf7158809cf4f3c,
          128'h3243f6a8885a308d313198a2e0370734) == 128'h3925841d02dc09fbdc118597196a0b32,
          "reference model");
    // done holds until the next ld
    repeat (5) @(negedge clk);
    check(done && f_out == 128'h66e94bd4ef8a2c3b884cfa59ca342b2e, "result held");
    // restart in the middle of an operation
    @(negedge clk);
    key = 128'h1; text_in = 128'h2; ld = 1;
    @(negedge clk); ld = 0;
    repeat (4) @(negedge clk);
    check(busy && !done, "busy mid-operation");
    for (int i = 0; i < 40; i++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      p = {$urandom, $urandom, $urandom, $urandom};
      run(k, p, aes_ref_pkg::encrypt(k, p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
