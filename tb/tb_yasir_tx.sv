// tb_yasir_tx: self-checking test of the Transmitter controller with its AES core and
// SHA-1/HMAC unit.
//
// Sends frames of 0..150 random content octets, one token per 20 clocks, and compares
// every token the Transmitter emits with the reference transform
// S || AES-CTR(content) || E || HMAC-SHA-1-80(seq || SHA-1(CTXT)) || seq || E.
// It also checks that content octets and the middle E leave on the clock they arrive
// (no added latency), that the tail starts within 500 clocks of the E, that the
// sequence number counts frames and restarts at zero after `rekey`, the integrity-only
// mode (`encrypt_en` low), a frame abandoned by a new start symbol, and the overrun
// flag for a token arriving while the tail is pending.
module tb_yasir_tx;
  import yasir_pkg::*;
  import yasir_ref_pkg::*;

  localparam int GAP = 20;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [127:0] sk;
  logic [159:0] hk;
  logic encrypt_en = 1'b1, rekey = 1'b0;
  logic in_valid = 1'b0;
  token_t in_tok;
  logic out_valid, active, overrun, frame_done;
  token_t out_tok;
  logic [31:0] seq_t;
  aes_req_t aes_req;
  aes_rsp_t aes_rsp;
  auth_req_t auth_req;
  auth_rsp_t auth_rsp;
  int checks = 0, failures = 0, overruns = 0;
  longint cyc = 0;
  toks_t got;
  longint got_t[$];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  yasir_tx dut (.*);
  aes128_core u_aes (.clk, .rst_n, .start(aes_req.start), .key(aes_req.key),
                     .block(aes_req.block), .busy(aes_rsp.busy), .done(aes_rsp.done),
                     .result(aes_rsp.result));
  yasir_auth u_auth (.clk, .rst_n, .req(auth_req), .rsp(auth_rsp));

  always @(posedge clk) begin
    if (out_valid) begin got.push_back(out_tok); got_t.push_back(cyc); end
    if (overrun && rst_n) overruns++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic send(input token_t t);
    @(negedge clk);
    in_valid = 1'b1; in_tok = t;
    @(negedge clk);
    in_valid = 1'b0;
    repeat (GAP - 2) @(negedge clk);
  endtask

  // Send one frame, return the clock of each input token.
  task automatic frame(input bytes_t m, input logic [31:0] seq, input bit enc);
    toks_t exp;
    longint t_in[$];
    int k;
    got = {}; got_t = {};
    send(tk(TOK_START)); t_in.push_back(cyc - GAP + 1);
    foreach (m[i]) begin send(tk(TOK_DATA, m[i])); t_in.push_back(cyc - GAP + 1); end
    send(tk(TOK_END)); t_in.push_back(cyc - GAP + 1);
    k = 0;
    while (!frame_done && k < 2000) begin @(negedge clk); k++; end
    @(negedge clk);
    exp = tx_frame(sk, hk, seq, enc, m);
    check(got.size() == exp.size(), $sformatf("frame of %0d octets: %0d tokens, expected %0d",
                                              m.size(), got.size(), exp.size()));
    for (int i = 0; i < exp.size() && i < got.size(); i++)
      if (got[i] != exp[i]) begin
        check(1'b0, $sformatf("token %0d of %0d-octet frame: %h expected %h", i, m.size(), got[i], exp[i]));
        break;
      end
    checks++;
    // S, content and the middle E: emitted on the clock they were accepted
    for (int i = 0; i < t_in.size() && i < got_t.size(); i++)
      if (got_t[i] != t_in[i]) begin
        check(1'b0, $sformatf("token %0d delayed %0d clocks", i, got_t[i] - t_in[i]));
        break;
      end
    checks++;
    if (got_t.size() > m.size() + 2)
      check(got_t[m.size() + 2] - got_t[m.size() + 1] <= 500,
            $sformatf("tail started %0d clocks after E", got_t[m.size() + 2] - got_t[m.size() + 1]));
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bytes_t m;
    automatic int lens[] = '{0, 1, 5, 15, 16, 17, 20, 63, 64, 100, 150};
    sk = {$urandom, $urandom, $urandom, $urandom};
    hk = {$urandom, $urandom, $urandom, $urandom, $urandom};
    in_tok = tk(TOK_DATA);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    foreach (lens[i]) begin
      frame(rand_bytes(lens[i]), 32'(i), 1'b1);
      check(seq_t == 32'(i + 1), "SEQ_T counts frames");
    end
    // integrity only
    encrypt_en = 1'b0;
    frame(rand_bytes(30), 32'(lens.size()), 1'b0);
    encrypt_en = 1'b1;
    // rekey: sequence numbers restart at zero
    @(negedge clk); rekey = 1'b1; @(negedge clk); rekey = 1'b0;
    check(seq_t == 0, "rekey resets SEQ_T");
    frame(rand_bytes(12), 0, 1'b1);
    // a frame abandoned by a new start symbol: the restarted frame takes the next number
    send(tk(TOK_START)); send(tk(TOK_DATA, 8'h55)); send(tk(TOK_DATA, 8'hAA));
    m = rand_bytes(9);
    frame(m, 2, 1'b1);
    // a start symbol during the tail is dropped and flagged
    got = {};
    send(tk(TOK_START)); send(tk(TOK_DATA, 8'h11)); send(tk(TOK_END));
    @(negedge clk); in_valid = 1'b1; in_tok = tk(TOK_START); @(negedge clk); in_valid = 1'b0;
    repeat (600) @(negedge clk);
    check(overruns == 1, $sformatf("overrun flagged %0d times", overruns));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
