// tb_sha1_core: self-checking test of the SHA-1 compression core.
//
// Checks the behavioural reference against the FIPS 180 "abc" digest and RFC 2202
// HMAC-SHA-1 test case 1, then feeds the core padded single-block messages (empty,
// "abc", random lengths up to 55 octets) and two-block messages (64 random octets plus
// a padding block, chaining the first result), comparing with the reference SHA-1,
// and checks the 81-clock start-to-done latency.
module tb_sha1_core;
  import yasir_ref_pkg::*;

  localparam logic [159:0] IV = 160'h67452301_EFCDAB89_98BADCFE_10325476_C3D2E1F0;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, busy, done;
  logic [159:0] h_in = '0, h_out;
  logic [511:0] block = '0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sha1_core dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic compress(input logic [159:0] h, input logic [511:0] b, output logic [159:0] r);
    int cyc;
    @(negedge clk);
    h_in = h; block = b; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done && cyc < 200) begin @(negedge clk); cyc++; end
    check(cyc == 81, $sformatf("latency %0d clocks, expected 81", cyc));
    r = h_out;
  endtask

  // Pad a message of at most 55 octets into one block.
  function automatic logic [511:0] pad1(input bytes_t m);
    logic [511:0] b;
    b = '0;
    foreach (m[i]) b[511 - 8*i -: 8] = m[i];
    b[511 - 8*m.size() -: 8] = 8'h80;
    b[63:0] = 64'(m.size()) * 8;
    return b;
  endfunction

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bytes_t m, key;
    logic [159:0] r, r2;
    logic [511:0] b;
    check(sha1(str_bytes("abc")) == 160'ha9993e364706816aba3e25717850c26c9cd0d89d,
          "reference SHA-1(abc)");
    key = {};
    for (int i = 0; i < 20; i++) key.push_back(8'h0b);
    check(hmac_sha1(key, str_bytes("Hi There")) == 160'hb617318655057264e28bc0b6fb378c8ef146be00,
          "reference HMAC-SHA-1, RFC 2202 case 1");
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    m = {};
    compress(IV, pad1(m), r);
    check(r == 160'hda39a3ee5e6b4b0d3255bfef95601890afd80709, "SHA-1 of empty string");
    m = str_bytes("abc");
    compress(IV, pad1(m), r);
    check(r == 160'ha9993e364706816aba3e25717850c26c9cd0d89d, "SHA-1 of abc");
    for (int t = 0; t < 8; t++) begin
      m = rand_bytes($urandom_range(55, 0));
      compress(IV, pad1(m), r);
      check(r == sha1(m), $sformatf("SHA-1 of %0d random octets", m.size()));
    end
    for (int t = 0; t < 3; t++) begin
      m = rand_bytes(64);
      foreach (m[i]) b[511 - 8*i -: 8] = m[i];
      compress(IV, b, r);
      compress(r, {8'h80, 440'd0, 64'd512}, r2);
      check(r2 == sha1(m), "SHA-1 of 64 random octets (two blocks)");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
