// tb_yasir_bitw: end-to-end test of two YASIR modules on one insecure link.
//
// Module A sits at a master (control centre) device, module B at a slave (RTU)
// device; A's link output feeds B's link input and back, through a link model that
// paces tokens at one per byte-time (GAP clocks) and through which an adversary can
// flip a bit or drop a whole protected frame. The devices poll and answer in turn, so
// each module switches between its Transmitter and Receiver roles on the shared
// crypto cores. Every frame a device receives is compared with the reference relay:
// the original frame when intact, the content followed by err and E when the tag
// fails. The test counts, and requires at least once, each mechanism: Case I relay,
// Case II err injection, sequence re-synchronisation after lost frames, a role
// switch in each module, the integrity-only mode, a rekey, and a collision between
// the two roles. It also checks the 10-octet relay delay across the link.
module tb_yasir_bitw;
  import yasir_pkg::*;
  import yasir_ref_pkg::*;

  localparam int GAP = 24;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [127:0] sk_ab, sk_ba;
  logic [159:0] hk_ab, hk_ba;
  logic encrypt_en = 1'b1, rekey = 1'b0;

  // device-side and link-side streams of the two modules
  logic   a_din_v = 1'b0, b_din_v = 1'b0, a_lin_v = 1'b0, b_lin_v = 1'b0;
  token_t a_din, b_din, a_lin, b_lin;
  logic   a_lout_v, b_lout_v, a_dout_v, b_dout_v;
  token_t a_lout, b_lout, a_dout, b_dout;
  logic [31:0] a_txs, a_rxs, b_txs, b_rxs;
  logic a_fd, a_ok, a_bad, a_rs, a_ov, a_col;
  logic b_fd, b_ok, b_bad, b_rs, b_ov, b_col;

  int checks = 0, failures = 0;
  int n_ok = 0, n_bad = 0, n_resync = 0, n_coll = 0, n_plain = 0, n_rekey = 0;
  int n_role_a = 0, n_role_b = 0;
  longint cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  yasir_bitw u_a (
    .clk, .rst_n, .tx_sk(sk_ab), .tx_hk(hk_ab), .rx_sk(sk_ba), .rx_hk(hk_ba),
    .encrypt_en, .rekey,
    .dev_in_valid(a_din_v), .dev_in_tok(a_din), .link_out_valid(a_lout_v), .link_out_tok(a_lout),
    .link_in_valid(a_lin_v), .link_in_tok(a_lin), .dev_out_valid(a_dout_v), .dev_out_tok(a_dout),
    .tx_seq(a_txs), .rx_seq(a_rxs), .tx_frame_done(a_fd), .rx_mac_ok(a_ok), .rx_mac_bad(a_bad),
    .rx_resync(a_rs), .tx_overrun(a_ov), .collision(a_col));

  yasir_bitw u_b (
    .clk, .rst_n, .tx_sk(sk_ba), .tx_hk(hk_ba), .rx_sk(sk_ab), .rx_hk(hk_ab),
    .encrypt_en, .rekey,
    .dev_in_valid(b_din_v), .dev_in_tok(b_din), .link_out_valid(b_lout_v), .link_out_tok(b_lout),
    .link_in_valid(b_lin_v), .link_in_tok(b_lin), .dev_out_valid(b_dout_v), .dev_out_tok(b_dout),
    .tx_seq(b_txs), .rx_seq(b_rxs), .tx_frame_done(b_fd), .rx_mac_ok(b_ok), .rx_mac_bad(b_bad),
    .rx_resync(b_rs), .tx_overrun(b_ov), .collision(b_col));

  // ---------------- link model with adversary ----------------
  toks_t  q_ab, q_ba;            // tokens in flight
  int     flip_ab = -1;          // index within next A->B frame whose octet is flipped
  bit     drop_ab = 1'b0;        // drop the next A->B frame entirely
  int     idx_ab = 0;
  bit     dropping = 1'b0;
  int     e_seen = 0;

  always @(posedge clk) begin
    if (a_lout_v) begin
      token_t t;
      t = a_lout;
      if (t.kind == TOK_START) begin
        idx_ab = 0; e_seen = 0;
        dropping = drop_ab; drop_ab = 1'b0;
      end
      if (flip_ab >= 0 && idx_ab == flip_ab) begin
        t.data ^= 8'h10; flip_ab = -1;
      end
      if (!dropping) q_ab.push_back(t);
      if (t.kind == TOK_END) e_seen++;
      if (e_seen == 2) dropping = 1'b0;
      idx_ab++;
    end
    if (b_lout_v) q_ba.push_back(b_lout);
  end

  longint tin_ab[$];   // clock at which each A->B token reached B

  initial begin : pump_ab
    forever begin
      @(negedge clk);
      if (q_ab.size() > 0) begin
        b_lin = q_ab.pop_front(); b_lin_v = 1'b1;
        tin_ab.push_back(cyc);
        @(negedge clk);
        b_lin_v = 1'b0;
        repeat (GAP - 2) @(negedge clk);
      end
    end
  end

  initial begin : pump_ba
    forever begin
      @(negedge clk);
      if (q_ba.size() > 0) begin
        a_lin = q_ba.pop_front(); a_lin_v = 1'b1;
        @(negedge clk);
        a_lin_v = 1'b0;
        repeat (GAP - 2) @(negedge clk);
      end
    end
  end

  // ---------------- devices ----------------
  toks_t  a_got, b_got;
  longint b_got_t[$];
  always @(posedge clk) begin
    if (a_dout_v) a_got.push_back(a_dout);
    if (b_dout_v) begin b_got.push_back(b_dout); b_got_t.push_back(cyc); end
    if (rst_n) begin
      n_ok     += int'(a_ok) + int'(b_ok);
      n_bad    += int'(a_bad) + int'(b_bad);
      n_resync += int'(a_rs) + int'(b_rs);
      n_coll   += int'(a_col) + int'(b_col);
    end
  end

  // Role switches: Receiver role right after Transmitter role in the same module.
  logic a_was_tx = 1'b0, b_was_tx = 1'b0;
  always @(posedge clk) if (rst_n) begin
    if (a_fd) a_was_tx <= 1'b1;
    if (b_fd) b_was_tx <= 1'b1;
    if ((a_ok || a_bad) && a_was_tx) begin n_role_a++; a_was_tx <= 1'b0; end
    if ((b_ok || b_bad) && b_was_tx) begin n_role_b++; b_was_tx <= 1'b0; end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic dev_send(input bit from_a, input bytes_t m);
    toks_t f;
    f.push_back(tk(TOK_START));
    foreach (m[i]) f.push_back(tk(TOK_DATA, m[i]));
    f.push_back(tk(TOK_END));
    foreach (f[i]) begin
      @(negedge clk);
      if (from_a) begin a_din_v = 1'b1; a_din = f[i]; end
      else        begin b_din_v = 1'b1; b_din = f[i]; end
      @(negedge clk);
      a_din_v = 1'b0; b_din_v = 1'b0;
      repeat (GAP - 2) @(negedge clk);
    end
  endtask

  task automatic settle();
    int k, quiet;
    k = 0; quiet = 0;
    // wait for both Transmitters to finish and the link to drain, then give the
    // Receivers time to decide
    while (quiet < 4 * GAP && k < 200000) begin
      @(negedge clk); k++;
      if (q_ab.size() > 0 || q_ba.size() > 0 || u_a.tx_active || u_b.tx_active) quiet = 0;
      else quiet++;
    end
    repeat (30 * GAP) @(negedge clk);
  endtask

  task automatic expect_frame(input toks_t got, input toks_t exp, input string what);
    check(got.size() == exp.size(), $sformatf("%s: %0d tokens, expected %0d", what, got.size(), exp.size()));
    for (int i = 0; i < exp.size() && i < got.size(); i++)
      if (got[i] != exp[i]) begin
        check(1'b0, $sformatf("%s: token %0d %h expected %h", what, i, got[i], exp[i]));
        break;
      end
    checks++;
  endtask

  // Master polls, slave answers; both frames checked at the receiving device.
  task automatic exchange(input int n_poll, input int n_resp, input bit poll_ok);
    bytes_t p, r;
    int lat_bad;
    p = rand_bytes(n_poll);
    r = rand_bytes(n_resp);
    b_got = {}; b_got_t = {}; tin_ab = {};
    dev_send(1'b1, p);
    settle();
    if (poll_ok) begin
      expect_frame(b_got, rx_relay(p, 1'b1), $sformatf("poll of %0d octets", n_poll));
      // octet i (i+10 < n) leaves B when the A->B token 10 places later reaches it
      lat_bad = 0;
      for (int i = 0; i + 10 < n_poll && i + 1 < b_got_t.size(); i++)
        if (b_got_t[i + 1] != tin_ab[i + 11]) lat_bad++;
      check(lat_bad == 0, "poll relayed with a delay of 10 octets");
    end
    a_got = {};
    dev_send(1'b0, r);
    settle();
    expect_frame(a_got, rx_relay(r, 1'b1), $sformatf("response of %0d octets", n_resp));
  endtask

  initial begin
    #60000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bytes_t p;
    logic [31:0] s0;
    sk_ab = {$urandom, $urandom, $urandom, $urandom};
    sk_ba = {$urandom, $urandom, $urandom, $urandom};
    hk_ab = {$urandom, $urandom, $urandom, $urandom, $urandom};
    hk_ba = {$urandom, $urandom, $urandom, $urandom, $urandom};
    a_din = tk(TOK_DATA); b_din = tk(TOK_DATA); a_lin = tk(TOK_DATA); b_lin = tk(TOK_DATA);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // normal polling
    exchange(8, 21, 1'b1);
    exchange(17, 70, 1'b1);
    exchange(3, 12, 1'b1);
    // the frame sizes the document discusses: a typical 20-octet frame, a 256-octet one
    exchange(256, 20, 1'b1);

    // tampered poll: B's device gets content || err || E and drops it
    p = rand_bytes(20);
    flip_ab = 6;
    b_got = {};
    dev_send(1'b1, p);
    settle();
    p[5] ^= 8'h10;
    expect_frame(b_got, rx_relay(p, 1'b0), "tampered poll");
    check(b_rxs == a_txs - 1, "tampered poll does not advance B's SEQ_R");

    // two polls lost on the link, the third re-synchronises
    s0 = b_rxs;
    drop_ab = 1'b1; dev_send(1'b1, rand_bytes(10)); settle();
    drop_ab = 1'b1; dev_send(1'b1, rand_bytes(10)); settle();
    b_got = {};
    dev_send(1'b1, rand_bytes(10)); settle();
    check(b_rxs == a_txs, $sformatf("re-synchronised: SEQ_R=%0d SEQ_T=%0d", b_rxs, a_txs));
    exchange(25, 9, 1'b1);

    // integrity-only mode at both ends
    encrypt_en = 1'b0;
    exchange(14, 30, 1'b1);
    n_plain++;
    encrypt_en = 1'b1;

    // new keys: both ends restart their sequence numbers
    @(negedge clk); rekey = 1'b1; @(negedge clk); rekey = 1'b0;
    n_rekey++;
    check(a_txs == 0 && b_rxs == 0 && b_txs == 0 && a_rxs == 0, "rekey resets sequence numbers");
    exchange(40, 5, 1'b1);

    // collision: B's device talks while B is receiving a poll
    fork
      dev_send(1'b1, rand_bytes(30));
      begin
        repeat (20 * GAP) @(negedge clk);
        @(negedge clk); b_din_v = 1'b1; b_din = tk(TOK_START);
        @(negedge clk); b_din_v = 1'b0;
      end
    join
    settle();
    exchange(6, 6, 1'b1);

    check(n_ok > 0,     "Case I relay happened");
    check(n_bad > 0,    "Case II err injection happened");
    check(n_resync > 0, "sequence re-synchronisation happened");
    check(n_role_a > 0 && n_role_b > 0, "both modules switched roles");
    check(n_plain > 0,  "integrity-only mode exercised");
    check(n_rekey > 0,  "rekey exercised");
    check(n_coll > 0,   "role collision flagged");
    $display("Case I %0d, Case II %0d, re-sync %0d, role switches %0d/%0d, collisions %0d",
             n_ok, n_bad, n_resync, n_role_a, n_role_b, n_coll);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
