// tb_yasir_auth: self-checking test of the streaming SHA-1 / HMAC-SHA-1-80 unit.
//
// For frames of 0..200 random octets (covering the one- and two-block padding cases
// and block boundaries) it streams the octets with gaps of 2..4 clocks, issues the
// hash finish and the HMAC request together as the controllers do, and compares the
// digest with the reference SHA-1 and the 80-bit tag with the reference
// HMAC-SHA-1(seq || digest). Every frame uses a fresh key, so its HMAC computes the
// key blocks (329 clocks); a second HMAC on the kept digest with another sequence
// number then finds the key cached (165 clocks, two compressions). Neither time may
// depend on the frame length. A final sequence with three keys checks the two-entry
// cache: hits, least-recently-used replacement and correct tags after each.
module tb_yasir_auth;
  import yasir_pkg::*;
  import yasir_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  auth_req_t req;
  auth_rsp_t rsp;
  int checks = 0, failures = 0;
  int mac_cycles = -1;     // HMAC with a new key
  int hit_cycles = -1;     // HMAC with a cached key
  bytes_t last_m;

  always #5 clk = ~clk;

  yasir_auth dut (.clk, .rst_n, .req, .rsp);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic one_frame(input int n);
    bytes_t m;
    logic [159:0] hk, dg;
    logic [31:0] seq, seq2;
    int cyc;
    m   = rand_bytes(n);
    hk  = {$urandom, $urandom, $urandom, $urandom, $urandom};
    seq = $urandom;
    @(negedge clk);
    req = '0; req.init = 1'b1;
    @(negedge clk);
    req = '0;
    foreach (m[i]) begin
      repeat ($urandom_range(3, 1)) @(negedge clk);
      req.upd_valid = 1'b1; req.upd_data = m[i];
      @(negedge clk);
      req = '0;
    end
    repeat (2) @(negedge clk);
    req.fin = 1'b1; req.mac_start = 1'b1; req.mac_seq = seq; req.mac_key = hk;
    @(negedge clk);
    req = '0;
    cyc = 0;
    while (!rsp.digest_done && cyc < 1000) begin @(negedge clk); cyc++; end
    dg = sha1(m);
    check(rsp.digest == dg, $sformatf("digest of %0d octets", n));
    cyc = 0;
    while (!rsp.mac_done && cyc < 1000) begin @(negedge clk); cyc++; end
    check(rsp.mac == yasir_mac(hk, seq, dg), $sformatf("tag of %0d octets", n));
    if (mac_cycles < 0) mac_cycles = cyc;
    check(cyc == mac_cycles, $sformatf("HMAC took %0d clocks, earlier %0d", cyc, mac_cycles));
    // second tag on the same digest, as in the Receiver's re-synchronisation
    seq2 = $urandom;
    req.mac_start = 1'b1; req.mac_seq = seq2; req.mac_key = hk;
    @(negedge clk);
    req = '0;
    cyc = 0;
    while (!rsp.mac_done && cyc < 1000) begin @(negedge clk); cyc++; end
    check(rsp.mac == yasir_mac(hk, seq2, dg), "second tag on kept digest");
    if (hit_cycles < 0) hit_cycles = cyc;
    check(cyc == hit_cycles, $sformatf("cached-key HMAC took %0d clocks, earlier %0d", cyc, hit_cycles));
    last_m = m;
  endtask

  // HMAC on the kept digest with key hk; returns the clocks it took.
  task automatic mac_only(input logic [159:0] hk, output int cyc);
    logic [31:0] seq;
    seq = $urandom;
    @(negedge clk);
    req = '0; req.mac_start = 1'b1; req.mac_seq = seq; req.mac_key = hk;
    @(negedge clk);
    req = '0;
    cyc = 0;
    while (!rsp.mac_done && cyc < 1000) begin @(negedge clk); cyc++; end
    check(rsp.mac == yasir_mac(hk, seq, sha1(last_m)), "tag in key-cache sequence");
  endtask

  task automatic key_cache_test();
    logic [159:0] ka, kb, kc;
    int c;
    ka = {5{$urandom}}; kb = ~ka; kc = ka ^ 160'h1;
    mac_only(ka, c); check(c == mac_cycles, "key A first use computes key blocks");
    mac_only(kb, c); check(c == mac_cycles, "key B first use computes key blocks");
    mac_only(ka, c); check(c == hit_cycles, "key A cached");
    mac_only(kb, c); check(c == hit_cycles, "key B cached");
    mac_only(ka, c); check(c == hit_cycles, "key A still cached");
    mac_only(kc, c); check(c == mac_cycles, "key C replaces least recently used B");
    mac_only(ka, c); check(c == hit_cycles, "key A kept");
    mac_only(kb, c); check(c == mac_cycles, "key B was evicted");
    mac_only(kc, c); check(c == mac_cycles, "key C was evicted by B");
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int lens[] = '{0, 1, 20, 55, 56, 63, 64, 65, 119, 120, 128, 200};
    req = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    foreach (lens[i]) one_frame(lens[i]);
    key_cache_test();
    check(hit_cycles < mac_cycles, "cached key saves compressions");
    $display("HMAC time %0d clocks with a new key, %0d with a cached key", mac_cycles, hit_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
