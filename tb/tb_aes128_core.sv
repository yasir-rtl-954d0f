// tb_aes128_core: self-checking test of the iterative AES-128 encryption core.
//
// Checks the behavioural reference against the FIPS-197 appendix C.1 and B vectors,
// then drives the core with those vectors and 40 random key/block pairs, comparing
// each result with the reference and checking the 11-clock start-to-done latency.
module tb_aes128_core;
  import yasir_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, busy, done;
  logic [127:0] key = '0, block = '0, result;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  aes128_core dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run(input logic [127:0] k, input logic [127:0] b, input logic [127:0] exp);
    int cyc;
    @(negedge clk);
    key = k; block = b; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done && cyc < 100) begin @(negedge clk); cyc++; end
    check(result == exp, $sformatf("AES(%h,%h)=%h expected %h", k, b, result, exp));
    check(cyc == 11, $sformatf("latency %0d clocks, expected 11", cyc));
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] k, b;
    check(aes128(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff)
          == 128'h69c4e0d86a7b0430d8cdb78070b4c55a, "reference model, FIPS-197 C.1");
    check(aes128(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734)
          == 128'h3925841d02dc09fbdc118597196a0b32, "reference model, FIPS-197 B");
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff,
        128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    run(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734,
        128'h3925841d02dc09fbdc118597196a0b32);
    for (int i = 0; i < 40; i++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      b = {$urandom, $urandom, $urandom, $urandom};
      run(k, b, aes128(k, b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
