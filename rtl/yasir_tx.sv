// yasir_tx: YASIR Transmitter controller.
//
// Turns a frame S || H || P || E from the local SCADA device into the protected frame
// S || CTXT || E || mac || seq || E for the insecure link, without holding the frame
// back. Each content octet leaves on the same clock it arrives, XORed with the next
// octet of an AES-128 counter-mode keystream (CTXT = Encrypt_SK(SEQ_T, H || P)); the
// ciphertext octet is also fed to the running SHA-1. When E arrives it is forwarded at
// once, the hash is finished and mac = first 10 octets of HMAC-SHA-1_HK(seq || digest)
// is computed; then the 10 mac octets, the 4 sequence-number octets (most significant
// first) and a closing E go out on consecutive clocks. SEQ_T is taken for the frame at
// its start symbol and incremented, so no sequence number is reused under one key;
// `rekey` resets it to zero, as the document prescribes when keys are renegotiated.
//
// Keystream: block i of a frame is AES_SK(seq || i || 0^64) (seq and i 32-bit,
// big-endian), requested at S for block 0 and when octet 16i-1 has been used for
// block i, so the AES core works in the background and the per-octet work is one XOR.
// With `encrypt_en` low the content is sent in clear (integrity only), the option the
// document describes for broadcast or audited links.
//
// Interfaces: tokens (yasir_pkg::token_t) in and out with a valid strobe and no
// back-pressure; the output may carry a burst of one token per clock (the tail), which
// a line serialiser downstream paces. `aes_req/aes_rsp` and `auth_req/auth_rsp` drive
// an aes128_core and a yasir_auth. Timing assumptions: input tokens at least
// 12 clocks apart (AES keystream ready in time; asserted), and the next start symbol
// not before the tail has been sent (`overrun` pulses and the token is dropped).
// Following the document's text over its FSM listing: the sequence number used for a
// frame is SEQ_T before the increment, and the ciphertext (not the plaintext) is hashed.
module yasir_tx
  import yasir_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic [127:0] sk,
  input  logic [159:0] hk,
  input  logic         encrypt_en,
  input  logic         rekey,
  input  logic         in_valid,
  input  token_t       in_tok,
  output logic         out_valid,
  output token_t       out_tok,
  output aes_req_t     aes_req,
  input  aes_rsp_t     aes_rsp,
  output auth_req_t    auth_req,
  input  auth_rsp_t    auth_rsp,
  output logic         active,     // a frame is being handled (for role arbitration)
  output logic         overrun,    // token dropped while the tail was pending
  output logic [31:0]  seq_t,      // next sequence number SEQ_T
  output logic         frame_done  // pulse with the closing E of a protected frame
);

  typedef enum logic [1:0] {T_IDLE, T_MAIN, T_WAITMAC, T_TAIL} tstate_e;

  tstate_e      st_q;
  logic [31:0]  fseq_q;     // sequence number of the current frame
  logic [31:0]  ctr_q;      // content octets so far
  logic [127:0] otp_q;
  logic         otp_ok_q;   // otp_q holds the keystream block for ctr_q
  logic [31:0]  blk_q;      // keystream block index requested last
  logic         aes_go_q;
  logic [79:0]  mac_q;
  logic [3:0]   tail_q;     // 0..9 mac, 10..13 seq, 14 closing E

  logic         is_s, is_e, is_d;
  logic [7:0]   ks, ct;

  assign is_s = in_valid && in_tok.kind == TOK_START;
  assign is_e = in_valid && in_tok.kind == TOK_END;
  assign is_d = in_valid && in_tok.kind == TOK_DATA;
  assign ks   = otp_q[127 - 8*ctr_q[3:0] -: 8];
  assign ct   = encrypt_en ? (in_tok.data ^ ks) : in_tok.data;

  assign aes_req.start = aes_go_q;
  assign aes_req.key   = sk;
  assign aes_req.block = {fseq_q, blk_q, 64'd0};

  always_comb begin
    auth_req           = '0;
    auth_req.mac_seq   = fseq_q;
    auth_req.mac_key   = hk;
    auth_req.upd_data  = ct;
    auth_req.init      = (st_q != T_WAITMAC && st_q != T_TAIL) && is_s;
    auth_req.upd_valid = (st_q == T_MAIN) && is_d;
    auth_req.fin       = (st_q == T_MAIN) && is_e;
    auth_req.mac_start = (st_q == T_MAIN) && is_e;
  end

  always_comb begin
    out_valid = 1'b0;
    out_tok   = '{kind: TOK_DATA, data: 8'h00};
    unique case (st_q)
      T_IDLE: if (is_s) begin
        out_valid = 1'b1; out_tok.kind = TOK_START;
      end
      T_MAIN: begin
        if (is_s) begin
          out_valid = 1'b1; out_tok.kind = TOK_START;
        end else if (is_e) begin
          out_valid = 1'b1; out_tok.kind = TOK_END;
        end else if (is_d) begin
          out_valid = 1'b1; out_tok.data = ct;
        end
      end
      T_TAIL: begin
        out_valid = 1'b1;
        if (tail_q < 4'd10)      out_tok.data = mac_q[79 - 8*tail_q -: 8];
        else if (tail_q < 4'd14) out_tok.data = fseq_q[31 - 8*(tail_q - 4'd10) -: 8];
        else                     out_tok.kind = TOK_END;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q       <= T_IDLE;
      fseq_q     <= '0;
      seq_t      <= '0;
      ctr_q      <= '0;
      otp_q      <= '0;
      otp_ok_q   <= 1'b0;
      blk_q      <= '0;
      aes_go_q   <= 1'b0;
      mac_q      <= '0;
      tail_q     <= '0;
      overrun    <= 1'b0;
      frame_done <= 1'b0;
    end else begin
      aes_go_q   <= 1'b0;
      overrun    <= 1'b0;
      frame_done <= 1'b0;
      if (aes_rsp.done) begin
        otp_q    <= aes_rsp.result;
        otp_ok_q <= 1'b1;
      end
      if (rekey) seq_t <= '0;

      unique case (st_q)
        T_IDLE, T_MAIN: begin
          if (is_s) begin
            fseq_q   <= seq_t;
            if (!rekey) seq_t <= seq_t + 32'd1;
            ctr_q    <= '0;
            blk_q    <= '0;
            otp_ok_q <= 1'b0;
            aes_go_q <= 1'b1;
            st_q     <= T_MAIN;
          end else if (st_q == T_MAIN && is_e) begin
            st_q <= T_WAITMAC;
          end else if (st_q == T_MAIN && is_d) begin
            ctr_q <= ctr_q + 32'd1;
            if (ctr_q[3:0] == 4'hF) begin
              blk_q    <= blk_q + 32'd1;
              otp_ok_q <= 1'b0;
              aes_go_q <= 1'b1;
            end
          end
        end
        T_WAITMAC: begin
          if (in_valid) overrun <= 1'b1;
          if (auth_rsp.mac_done) begin
            mac_q  <= auth_rsp.mac;
            tail_q <= '0;
            st_q   <= T_TAIL;
          end
        end
        T_TAIL: begin
          if (in_valid) overrun <= 1'b1;
          tail_q <= tail_q + 4'd1;
          if (tail_q == 4'd14) begin
            st_q       <= T_IDLE;
            frame_done <= 1'b1;
          end
        end
        default: st_q <= T_IDLE;
      endcase
    end
  end

  assign active = (st_q != T_IDLE);

  // The keystream octet must be ready when a content octet arrives.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (st_q == T_MAIN && is_d && encrypt_en) |-> otp_ok_q)
    else $error("yasir_tx: content octet arrived before its keystream block");

endmodule
