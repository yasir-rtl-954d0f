// tb_yasir_line: end-to-end latency of two YASIR modules at serial-line speed.
//
// Runs the latency workloads: typical 20-octet SCADA frames and the longest
// 256-octet frames, at the slowest and fastest usual line rates (9600 and
// 115200 baud). The module clock is taken as 10 MHz, so one byte-time (8 bits) is
// 8333 or 694 clocks. Module A's device sends a frame, which goes through A's
// Transmitter, then a link paced at one token per byte-time, then B's Receiver to
// B's device. B answers the other way. Devices send one token per byte-time. The
// 10 MHz clock is this testbench's choice; the rates and frame sizes are the usual
// ones for serial SCADA.
//
// For every frame it checks:
//  * the frame reaches the far device intact;
//  * the Transmitter adds no delay: each token leaves on the link in the clock it
//    arrives from the device;
//  * the tag is ready in time: the first tag octet follows the middle E on the link
//    exactly one byte-time later;
//  * the Receiver's delay: an octet whose successor 10 places later is ciphertext
//    leaves 10 byte-times after it entered the far module; the last 10 octets, which
//    wait for tag octets, leave 11 byte-times after (the middle E takes one slot);
//  * no token is delayed by more than 18 byte-times, the bound claimed for the
//    scheme.
// The largest delay seen is printed, in byte-times, for each rate.
module tb_yasir_line;
  import yasir_pkg::*;
  import yasir_ref_pkg::*;

  localparam longint CLK_HZ = 10_000_000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [127:0] sk_ab, sk_ba;
  logic [159:0] hk_ab, hk_ba;
  logic encrypt_en = 1'b1, rekey = 1'b0;
  int   bt = 694;                 // clocks per byte-time at the current rate

  logic   a_din_v = 1'b0, b_din_v = 1'b0, a_lin_v = 1'b0, b_lin_v = 1'b0;
  token_t a_din, b_din, a_lin, b_lin;
  logic   a_lout_v, b_lout_v, a_dout_v, b_dout_v;
  token_t a_lout, b_lout, a_dout, b_dout;
  logic [31:0] a_txs, a_rxs, b_txs, b_rxs;
  logic a_fd, a_ok, a_bad, a_rs, a_ov, a_col;
  logic b_fd, b_ok, b_bad, b_rs, b_ov, b_col;

  int checks = 0, failures = 0;
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

  // Time stamps of the current frame, for whichever direction is in use.
  longint t_din[$];    // token entered the sending module from its device
  longint t_lout[$];   // token left the sending module onto the link
  longint t_lin[$];    // token reached the receiving module from the link
  longint t_dout[$];   // token left the receiving module to its device
  toks_t  got;
  toks_t  q_ab, q_ba;
  int     n_ok = 0, n_bad = 0;

  always @(posedge clk) begin
    if (a_din_v || b_din_v) t_din.push_back(cyc);
    if (a_lout_v) begin q_ab.push_back(a_lout); t_lout.push_back(cyc); end
    if (b_lout_v) begin q_ba.push_back(b_lout); t_lout.push_back(cyc); end
    if (a_lin_v || b_lin_v) t_lin.push_back(cyc);
    if (a_dout_v) begin got.push_back(a_dout); t_dout.push_back(cyc); end
    if (b_dout_v) begin got.push_back(b_dout); t_dout.push_back(cyc); end
    if (rst_n) begin
      n_ok  += int'(a_ok) + int'(b_ok);
      n_bad += int'(a_bad) + int'(b_bad);
    end
  end

  // Link: one token per byte-time in each direction.
  initial begin : pump_ab
    forever begin
      @(negedge clk);
      if (q_ab.size() > 0) begin
        b_lin = q_ab.pop_front(); b_lin_v = 1'b1;
        @(negedge clk);
        b_lin_v = 1'b0;
        repeat (bt - 2) @(negedge clk);
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
        repeat (bt - 2) @(negedge clk);
      end
    end
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
      repeat (bt - 2) @(negedge clk);
    end
  endtask

  // One frame of n octets from A to B (from_a) or from B to A; returns the largest
  // device-to-device delay of a token, in clocks.
  task automatic frame(input bit from_a, input int n, output longint worst);
    bytes_t m;
    toks_t  exp;
    longint d;
    int     tx_bad, rx_bad;
    m = rand_bytes(n);
    t_din = {}; t_lout = {}; t_lin = {}; t_dout = {}; got = {};
    dev_send(from_a, m);
    // wait until the tail has crossed the link and the far side has decided
    repeat (17 * bt) @(negedge clk);
    exp = rx_relay(m, 1'b1);
    check(got == exp, $sformatf("%0d-octet frame reaches the far device intact", n));
    // Transmitter: S, content and middle E leave in the clock they arrive
    tx_bad = 0;
    for (int j = 0; j < n + 2; j++)
      if (j >= t_lout.size() || t_lout[j] != t_din[j]) tx_bad++;
    check(tx_bad == 0, $sformatf("Transmitter adds no delay (%0d-octet frame)", n));
    check(t_lout.size() == n + 17, $sformatf("%0d tokens sent on the link, expected %0d",
                                             t_lout.size(), n + 17));
    // tag ready within one byte-time: first tag octet one link slot after the middle E
    if (t_lin.size() > n + 2)
      check(t_lin[n + 2] - t_lin[n + 1] == longint'(bt),
            $sformatf("tag follows the middle E after %0d clocks, byte-time %0d",
                      t_lin[n + 2] - t_lin[n + 1], bt));
    else check(1'b0, "tag octets missing on the link");
    // Receiver delay per content octet; link transit is one clock
    rx_bad = 0;
    worst = 0;
    if (t_dout.size() == n + 2) begin
      for (int k = 0; k < n; k++) begin
        d = t_dout[k + 1] - t_din[k + 1];
        if (d > worst) worst = d;
        if (k + 10 < n) begin
          if (d != 10 * longint'(bt) + 1) rx_bad++;
        end else if (d != 11 * longint'(bt) + 1) rx_bad++;
      end
      d = t_dout[n + 1] - t_din[n + 1];
      if (d > worst) worst = d;
      check(d <= 10 * longint'(bt) + 4, $sformatf("closing E delayed %0d clocks", d));
    end else rx_bad++;
    check(rx_bad == 0, $sformatf("Receiver delay of 10 (last ten: 11) byte-times, %0d-octet frame", n));
    check(worst <= 18 * longint'(bt), $sformatf("worst delay %0d clocks within 18 byte-times", worst));
  endtask

  task automatic run_rate(input int baud);
    longint w, worst;
    bt = int'((CLK_HZ * 8 + longint'(baud) / 2) / longint'(baud));
    worst = 0;
    frame(1'b1, 20, w);  if (w > worst) worst = w;   // poll
    frame(1'b0, 256, w); if (w > worst) worst = w;   // long answer
    frame(1'b1, 256, w); if (w > worst) worst = w;
    frame(1'b0, 20, w);  if (w > worst) worst = w;
    $display("%0d baud: byte-time %0d clocks, worst device-to-device delay %0d clocks = %0d.%02d byte-times",
             baud, bt, worst, worst / longint'(bt), (worst % longint'(bt)) * 100 / longint'(bt));
  endtask

  initial begin
    repeat (12_000_000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sk_ab = {$urandom, $urandom, $urandom, $urandom};
    sk_ba = {$urandom, $urandom, $urandom, $urandom};
    hk_ab = {$urandom, $urandom, $urandom, $urandom, $urandom};
    hk_ba = {$urandom, $urandom, $urandom, $urandom, $urandom};
    a_din = tk(TOK_DATA); b_din = tk(TOK_DATA); a_lin = tk(TOK_DATA); b_lin = tk(TOK_DATA);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    run_rate(115200);
    run_rate(9600);
    check(n_ok == 8 && n_bad == 0, $sformatf("%0d frames accepted, %0d rejected", n_ok, n_bad));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
