// yasir_bitw: one YASIR bump-in-the-wire module, placed between a legacy SCADA device
// and an insecure serial link.
//
// Frames the local device sends are protected by the Transmitter role (yasir_tx) on
// their way to the link; protected frames arriving from the link are checked and
// relayed to the device by the Receiver role (yasir_rx). Serial SCADA links are
// polled and half-duplex, so a module never plays both roles at once, and the two
// controllers share one AES-128 core (aes128_core) and one SHA-1/HMAC unit
// (yasir_auth), as the document proposes. A role owns the shared cores from its start
// symbol until its controller is idle again; the side that is not the owner has its
// tokens dropped and `collision` pulses. If both start symbols arrive on the same
// clock the Transmitter wins.
//
// Key management is outside this design: the 128-bit AES key and the 160-bit HMAC
// key of each direction are inputs (separate inputs per direction are this design's
// choice; the document has one key pair shared by a Transmitter and its Receiver),
// and `rekey` resets both sequence numbers to zero when new keys are loaded.
// `encrypt_en` selects confidentiality plus integrity (1) or integrity only (0) and
// must match at both ends. Recognising S and E on the wire and the line drivers are
// protocol specific and sit outside: all four streams are tokens (yasir_pkg::token_t)
// with a valid strobe, at most one per clock, and tokens of a frame at least 12
// clocks apart (e.g. one per byte-time of a serial line).
//
// Latency: the Transmitter adds no delay to content octets; the Receiver relays each
// content octet when the octet 10 positions later arrives, so the end-to-end
// overhead is 10 octets plus the symbol recognition outside.
module yasir_bitw
  import yasir_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic [127:0] tx_sk,      // AES key, device -> link direction
  input  logic [159:0] tx_hk,      // HMAC key, device -> link direction
  input  logic [127:0] rx_sk,      // AES key, link -> device direction
  input  logic [159:0] rx_hk,      // HMAC key, link -> device direction
  input  logic         encrypt_en,
  input  logic         rekey,
  // local SCADA device -> module
  input  logic         dev_in_valid,
  input  token_t       dev_in_tok,
  // module -> insecure link
  output logic         link_out_valid,
  output token_t       link_out_tok,
  // insecure link -> module
  input  logic         link_in_valid,
  input  token_t       link_in_tok,
  // module -> local SCADA device
  output logic         dev_out_valid,
  output token_t       dev_out_tok,
  // status
  output logic [31:0]  tx_seq,
  output logic [31:0]  rx_seq,
  output logic         tx_frame_done,
  output logic         rx_mac_ok,
  output logic         rx_mac_bad,
  output logic         rx_resync,
  output logic         tx_overrun,
  output logic         collision
);

  logic      tx_active, rx_active;
  logic      tx_in_valid, rx_in_valid;
  logic      dev_s, link_s, sel_rx;
  aes_req_t  tx_aes_req, rx_aes_req, aes_req;
  aes_rsp_t  aes_rsp, tx_aes_rsp, rx_aes_rsp;
  auth_req_t tx_auth_req, rx_auth_req, auth_req;
  auth_rsp_t auth_rsp, tx_auth_rsp, rx_auth_rsp;

  assign dev_s  = dev_in_valid && dev_in_tok.kind == TOK_START;
  assign link_s = link_in_valid && link_in_tok.kind == TOK_START;

  // Role arbitration: a controller may start only while the other one is idle.
  assign tx_in_valid = dev_in_valid && !rx_active;
  assign rx_in_valid = link_in_valid && !tx_active && !(dev_s && !rx_active);
  assign sel_rx      = rx_active || (rx_in_valid && link_s);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) collision <= 1'b0;
    else        collision <= (dev_in_valid && !tx_in_valid) || (link_s && !rx_in_valid);
  end

  assign aes_req  = sel_rx ? rx_aes_req  : tx_aes_req;
  assign auth_req = sel_rx ? rx_auth_req : tx_auth_req;

  always_comb begin
    tx_aes_rsp  = aes_rsp;
    rx_aes_rsp  = aes_rsp;
    tx_auth_rsp = auth_rsp;
    rx_auth_rsp = auth_rsp;
    tx_aes_rsp.done          = aes_rsp.done && !sel_rx;
    rx_aes_rsp.done          = aes_rsp.done && sel_rx;
    tx_auth_rsp.mac_done     = auth_rsp.mac_done && !sel_rx;
    rx_auth_rsp.mac_done     = auth_rsp.mac_done && sel_rx;
    tx_auth_rsp.digest_done  = auth_rsp.digest_done && !sel_rx;
    rx_auth_rsp.digest_done  = auth_rsp.digest_done && sel_rx;
  end

  yasir_tx u_tx (
    .clk        (clk),
    .rst_n      (rst_n),
    .sk         (tx_sk),
    .hk         (tx_hk),
    .encrypt_en (encrypt_en),
    .rekey      (rekey),
    .in_valid   (tx_in_valid),
    .in_tok     (dev_in_tok),
    .out_valid  (link_out_valid),
    .out_tok    (link_out_tok),
    .aes_req    (tx_aes_req),
    .aes_rsp    (tx_aes_rsp),
    .auth_req   (tx_auth_req),
    .auth_rsp   (tx_auth_rsp),
    .active     (tx_active),
    .overrun    (tx_overrun),
    .seq_t      (tx_seq),
    .frame_done (tx_frame_done)
  );

  yasir_rx u_rx (
    .clk        (clk),
    .rst_n      (rst_n),
    .sk         (rx_sk),
    .hk         (rx_hk),
    .encrypt_en (encrypt_en),
    .rekey      (rekey),
    .in_valid   (rx_in_valid),
    .in_tok     (link_in_tok),
    .out_valid  (dev_out_valid),
    .out_tok    (dev_out_tok),
    .aes_req    (rx_aes_req),
    .aes_rsp    (rx_aes_rsp),
    .auth_req   (rx_auth_req),
    .auth_rsp   (rx_auth_rsp),
    .active     (rx_active),
    .seq_r      (rx_seq),
    .mac_ok     (rx_mac_ok),
    .mac_bad    (rx_mac_bad),
    .resync     (rx_resync)
  );

  aes128_core u_aes (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (aes_req.start),
    .key    (aes_req.key),
    .block  (aes_req.block),
    .busy   (aes_rsp.busy),
    .done   (aes_rsp.done),
    .result (aes_rsp.result)
  );

  yasir_auth u_auth (
    .clk   (clk),
    .rst_n (rst_n),
    .req   (auth_req),
    .rsp   (auth_rsp)
  );

  assert property (@(posedge clk) disable iff (!rst_n) !(tx_active && rx_active))
    else $error("yasir_bitw: both roles active");

endmodule
