// tb_yasir_rx: self-checking test of the Receiver controller with its AES core and
// SHA-1/HMAC unit.
//
// Protected frames are built with the reference Transmitter transform and sent one
// token per 20 clocks. The test compares every relayed token with the reference and
// counts the Receiver's decisions:
//  * intact frames of 0..150 octets: S || H || P || E relayed, SEQ_R advances
//    (Case I); each content octet must leave on the clock the token 10 positions
//    later arrives (the 10-octet delay);
//  * a flipped ciphertext octet, a flipped tag octet, a replayed frame, a forged tag
//    with a higher sequence number and a truncated tag: content || err || E relayed
//    with err the complement of the CRC-16 of the relayed content (Case II), SEQ_R
//    unchanged;
//  * frames lost on the link (sequence number ahead of SEQ_R): Case II for that frame,
//    then SEQ_R re-synchronised to seq' + 1 and the next frame accepted;
//  * the integrity-only mode and `rekey`.
module tb_yasir_rx;
  import yasir_pkg::*;
  import yasir_ref_pkg::*;

  localparam int GAP = 20;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [127:0] sk;
  logic [159:0] hk;
  logic encrypt_en = 1'b1, rekey = 1'b0;
  logic in_valid = 1'b0;
  token_t in_tok;
  logic out_valid, active, mac_ok, mac_bad, resync;
  token_t out_tok;
  logic [31:0] seq_r;
  aes_req_t aes_req;
  aes_rsp_t aes_rsp;
  auth_req_t auth_req;
  auth_rsp_t auth_rsp;
  int checks = 0, failures = 0;
  int n_ok = 0, n_bad = 0, n_resync = 0;
  longint cyc = 0;
  toks_t got;
  longint got_t[$];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  yasir_rx dut (.*);
  aes128_core u_aes (.clk, .rst_n, .start(aes_req.start), .key(aes_req.key),
                     .block(aes_req.block), .busy(aes_rsp.busy), .done(aes_rsp.done),
                     .result(aes_rsp.result));
  yasir_auth u_auth (.clk, .rst_n, .req(auth_req), .rsp(auth_rsp));

  always @(posedge clk) begin
    if (out_valid) begin got.push_back(out_tok); got_t.push_back(cyc); end
    if (rst_n) n_ok += int'(mac_ok);
    if (rst_n) n_bad += int'(mac_bad);
    if (rst_n) n_resync += int'(resync);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Feed protected tokens; t_in gets the clock at which each was accepted.
  task automatic feed(input toks_t f, output longint t_in[$]);
    got = {}; got_t = {}; t_in = {};
    foreach (f[i]) begin
      @(negedge clk);
      in_valid = 1'b1; in_tok = f[i];
      t_in.push_back(cyc);
      @(negedge clk);
      in_valid = 1'b0;
      repeat (GAP - 2) @(negedge clk);
    end
    repeat (800) @(negedge clk);
  endtask

  task automatic expect_relay(input toks_t exp, input string what);
    check(got.size() == exp.size(), $sformatf("%s: %0d tokens relayed, expected %0d",
                                              what, got.size(), exp.size()));
    for (int i = 0; i < exp.size() && i < got.size(); i++)
      if (got[i] != exp[i]) begin
        check(1'b0, $sformatf("%s: token %0d is %h, expected %h", what, i, got[i], exp[i]));
        break;
      end
    checks++;
  endtask

  // Intact frame: relay must match and be delayed by exactly 10 octets.
  task automatic good_frame(input int n, input bit enc);
    bytes_t p;
    longint t_in[$];
    logic [31:0] s0;
    int ok0, idx;
    s0 = seq_r; ok0 = n_ok;
    p = rand_bytes(n);
    feed(tx_frame(sk, hk, s0, enc, p), t_in);
    expect_relay(rx_relay(p, 1'b1), $sformatf("intact %0d-octet frame", n));
    check(n_ok == ok0 + 1 && seq_r == s0 + 1, "Case I taken and SEQ_R advanced");
    for (int i = 0; i < n && i + 1 < got_t.size(); i++) begin
      idx = (i + 10 < n) ? 11 + i : 12 + i;
      if (got_t[i + 1] != t_in[idx]) begin
        check(1'b0, $sformatf("octet %0d relayed at clock %0d, expected %0d", i, got_t[i+1], t_in[idx]));
        break;
      end
    end
    checks++;
  endtask

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bytes_t p, c;
    toks_t f;
    longint t_in[$];
    logic [31:0] s0;
    int bad0, n;
    automatic int lens[] = '{0, 3, 9, 10, 11, 16, 20, 64, 65, 150};
    sk = {$urandom, $urandom, $urandom, $urandom};
    hk = {$urandom, $urandom, $urandom, $urandom, $urandom};
    in_tok = tk(TOK_DATA);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    foreach (lens[i]) good_frame(lens[i], 1'b1);

    // flipped ciphertext octet: content relayed decrypted, then err, SEQ_R unchanged
    s0 = seq_r; bad0 = n_bad;
    p = rand_bytes(25);
    f = tx_frame(sk, hk, s0, 1'b1, p);
    f[8].data ^= 8'h04;
    p[7] ^= 8'h04;
    feed(f, t_in);
    expect_relay(rx_relay(p, 1'b0), "tampered ciphertext");
    check(n_bad == bad0 + 1 && seq_r == s0, "tampered ciphertext: Case II, SEQ_R kept");

    // flipped tag octet
    bad0 = n_bad;
    p = rand_bytes(12);
    f = tx_frame(sk, hk, s0, 1'b1, p);
    f[12 + 1 + 3].data ^= 8'h80;
    feed(f, t_in);
    expect_relay(rx_relay(p, 1'b0), "tampered tag");
    check(n_bad == bad0 + 1 && seq_r == s0, "tampered tag: Case II, SEQ_R kept");

    good_frame(18, 1'b1);

    // replay of an accepted frame (older sequence number): rejected, no re-sync
    s0 = seq_r; bad0 = n_bad; n = n_resync;
    p = rand_bytes(14);
    f = tx_frame(sk, hk, s0 - 2, 1'b1, p);
    feed(f, t_in);
    c = ctr_xor(sk, s0, ctr_xor(sk, s0 - 2, p, 1'b1), 1'b1);
    expect_relay(rx_relay(c, 1'b0), "replayed frame");
    check(n_bad == bad0 + 1 && seq_r == s0 && n_resync == n, "replay: rejected, SEQ_R kept");

    // forged tag claiming a higher sequence number: rejected, no re-sync
    bad0 = n_bad;
    p = rand_bytes(14);
    f = tx_frame(sk, hk, s0 + 5, 1'b1, p);
    f[14 + 2].data ^= 8'h01;
    feed(f, t_in);
    check(n_bad == bad0 + 1 && seq_r == s0 && n_resync == n, "forged seq: rejected, SEQ_R kept");

    // two frames lost on the link: the third is rejected but re-synchronises SEQ_R
    bad0 = n_bad;
    p = rand_bytes(22);
    feed(tx_frame(sk, hk, s0 + 2, 1'b1, p), t_in);
    c = ctr_xor(sk, s0, ctr_xor(sk, s0 + 2, p, 1'b1), 1'b1);
    expect_relay(rx_relay(c, 1'b0), "frame after losses");
    check(n_bad == bad0 + 1 && n_resync == n + 1 && seq_r == s0 + 3,
          $sformatf("re-sync: SEQ_R=%0d expected %0d", seq_r, s0 + 3));
    good_frame(30, 1'b1);

    // truncated tag: E after 4 tag octets
    bad0 = n_bad; s0 = seq_r;
    p = rand_bytes(15);
    f = tx_frame(sk, hk, s0, 1'b1, p);
    f = f[0:15 + 1 + 4];
    f.push_back(tk(TOK_END));
    feed(f, t_in);
    check(n_bad == bad0 + 1 && seq_r == s0, "truncated tag: Case II");
    check(got.size() >= 3 && got[got.size()-1].kind == TOK_END, "truncated tag: frame closed");

    // integrity only
    encrypt_en = 1'b0;
    good_frame(33, 1'b0);
    encrypt_en = 1'b1;

    // rekey
    @(negedge clk); rekey = 1'b1; @(negedge clk); rekey = 1'b0;
    check(seq_r == 0, "rekey resets SEQ_R");
    good_frame(7, 1'b1);

    check(n_ok > 0 && n_bad > 0 && n_resync > 0, "all three outcomes seen");
    $display("Case I %0d, Case II %0d, re-sync %0d", n_ok, n_bad, n_resync);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
