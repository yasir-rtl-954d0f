// yasir_rx: YASIR Receiver controller.
//
// Takes a protected frame S || CTXT' || E || mac' || seq' || E from the link and
// relays S || H' || P' || E to the local SCADA device, delayed by exactly 10 octets
// rather than held back until the tag is known. Each ciphertext octet is decrypted
// with the AES-128 counter-mode keystream for the Receiver's predicted sequence
// number SEQ_R, written into a 10-octet circular delay buffer, and the octet written
// 10 octets earlier is sent out; the ciphertext octet also feeds the running SHA-1.
// At the middle E the hash is finished and mac'' = HMAC-SHA-1-80_HK(SEQ_R || digest)
// is computed. The 10 mac' octets that follow push the last 10 plaintext octets out
// of the buffer and take their places, so after them the buffer holds mac' (rotated
// by the write position) and all of H' || P' has been relayed.
//
//  * Case I, mac' = mac'': the closing E is sent and SEQ_R is incremented
//    (`mac_ok`). The seq' octets that follow are ignored.
//  * Case II, otherwise: err0, err1, E are sent on three consecutive clocks, where err
//    is the complement of the CRC over the octets relayed (yasir_err_gen), so the
//    device's CRC or length check rejects the frame (`mac_bad`). The Receiver then
//    collects the 4 seq' octets (most significant first) and, if seq' > SEQ_R and
//    HMAC_HK(seq' || digest) equals mac', sets SEQ_R = seq' + 1 (`resync`).
// A start symbol at any point abandons the frame in progress and starts a new one.
//
// The algorithm, the 10-octet buffer reuse and the sequence re-synchronisation follow
// the document; the token interface, the keystream block layout
// AES_SK(seq || i || 0^64), the CRC choice and the timing below are this design's.
// Interfaces as in yasir_tx. Timing assumptions: input tokens at least 12 clocks
// apart (keystream ready in time; asserted); if the HMAC is not yet done when the
// tenth mac' octet arrives the decision waits for it, while seq' octets are still
// collected. `encrypt_en` low means the link carries cleartext (integrity only).
module yasir_rx
  import yasir_pkg::*;
#(
  parameter logic [15:0] CRC_POLY = 16'hA001,
  parameter logic [15:0] CRC_INIT = 16'hFFFF
) (
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
  output logic         active,   // a frame is being handled (for role arbitration)
  output logic [31:0]  seq_r,    // predicted sequence number SEQ_R
  output logic         mac_ok,   // pulse: Case I, frame relayed intact
  output logic         mac_bad,  // pulse: Case II, frame spoiled with err
  output logic         resync    // pulse: SEQ_R re-synchronised from seq'
);

  typedef enum logic [2:0] {
    R_IDLE, R_MAIN, R_MAC, R_DECIDE, R_ERR0, R_ERR1, R_ERRE, R_SYNC
  } rstate_e;

  rstate_e      st_q;
  logic [31:0]  ctr_q;       // ciphertext octets received
  logic [3:0]   pos_q;       // ctr_q mod 10: delay-buffer slot
  logic [3:0]   ctrm_q;      // mac' octets received
  logic [7:0]   buf_q [L_M];
  logic [127:0] otp_q;
  logic         otp_ok_q;
  logic [31:0]  blk_q;
  logic         aes_go_q;
  logic         mac_rdy_q;   // mac'' computed
  logic         early_e_q;   // E arrived before all mac' octets
  logic [31:0]  seqp_q;      // seq' collected
  logic [2:0]   ctrs_q;      // seq' octets collected
  logic         sync_req_q;  // re-sync HMAC requested
  logic         sync_go_q;

  logic         is_s, is_e, is_d;
  logic [7:0]   ks, pt;
  logic [3:0]   slot;        // (ctr + ctrM) mod 10
  logic         filled;      // ctr + ctrM >= 10
  logic         tag_eq;
  logic [15:0]  crc;
  logic [7:0]   err0, err1;
  logic         crc_upd;

  assign is_s = in_valid && in_tok.kind == TOK_START;
  assign is_e = in_valid && in_tok.kind == TOK_END;
  assign is_d = in_valid && in_tok.kind == TOK_DATA;
  assign ks   = otp_q[127 - 8*ctr_q[3:0] -: 8];
  assign pt   = encrypt_en ? (in_tok.data ^ ks) : in_tok.data;

  always_comb begin
    logic [4:0] s;
    s      = {1'b0, pos_q} + {1'b0, ctrm_q};
    slot   = (s >= 5'd10) ? 4'(s - 5'd10) : s[3:0];
    filled = (ctr_q + 32'(ctrm_q)) >= 32'(L_M);
  end

  // mac' octet i sits in slot (pos + i) mod 10, pos = ctr mod 10 at the middle E.
  always_comb begin
    logic [4:0] k;
    tag_eq = 1'b1;
    for (int i = 0; i < L_M; i++) begin
      k = {1'b0, pos_q} + 5'(i);
      if (k >= 5'd10) k = k - 5'd10;
      if (buf_q[k[3:0]] != auth_rsp.mac[79 - 8*i -: 8]) tag_eq = 1'b0;
    end
  end

  assign aes_req.start = aes_go_q;
  assign aes_req.key   = sk;
  assign aes_req.block = {seq_r, blk_q, 64'd0};

  always_comb begin
    auth_req           = '0;
    auth_req.mac_key   = hk;
    auth_req.mac_seq   = sync_go_q ? seqp_q : seq_r;
    auth_req.upd_data  = in_tok.data;
    auth_req.init      = is_s;
    auth_req.upd_valid = (st_q == R_MAIN) && is_d;
    auth_req.fin       = (st_q == R_MAIN) && is_e;
    auth_req.mac_start = ((st_q == R_MAIN) && is_e) || sync_go_q;
  end

  // Relay path.
  always_comb begin
    out_valid = 1'b0;
    out_tok   = '{kind: TOK_DATA, data: 8'h00};
    crc_upd   = 1'b0;
    if (is_s) begin
      out_valid = 1'b1; out_tok.kind = TOK_START;
    end else begin
      unique case (st_q)
        R_MAIN: if (is_d && ctr_q >= 32'(L_M)) begin
          out_valid = 1'b1; out_tok.data = buf_q[pos_q]; crc_upd = 1'b1;
        end
        R_MAC: if (is_d && filled) begin
          out_valid = 1'b1; out_tok.data = buf_q[slot]; crc_upd = 1'b1;
        end
        R_DECIDE: if (mac_rdy_q && tag_eq && !early_e_q) begin
          out_valid = 1'b1; out_tok.kind = TOK_END;
        end
        R_ERR0: begin out_valid = 1'b1; out_tok.data = err0; end
        R_ERR1: begin out_valid = 1'b1; out_tok.data = err1; end
        R_ERRE: begin out_valid = 1'b1; out_tok.kind = TOK_END; end
        default: ;
      endcase
    end
  end

  yasir_err_gen #(.POLY(CRC_POLY), .INIT(CRC_INIT)) u_err (
    .clk       (clk),
    .rst_n     (rst_n),
    .clr       (is_s),
    .upd_valid (crc_upd),
    .upd_data  (out_tok.data),
    .crc       (crc),
    .err0      (err0),
    .err1      (err1)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q       <= R_IDLE;
      ctr_q      <= '0;
      pos_q      <= '0;
      ctrm_q     <= '0;
      for (int i = 0; i < L_M; i++) buf_q[i] <= '0;
      otp_q      <= '0;
      otp_ok_q   <= 1'b0;
      blk_q      <= '0;
      aes_go_q   <= 1'b0;
      mac_rdy_q  <= 1'b0;
      early_e_q  <= 1'b0;
      seqp_q     <= '0;
      ctrs_q     <= '0;
      sync_req_q <= 1'b0;
      sync_go_q  <= 1'b0;
      seq_r      <= '0;
      mac_ok     <= 1'b0;
      mac_bad    <= 1'b0;
      resync     <= 1'b0;
    end else begin
      aes_go_q  <= 1'b0;
      sync_go_q <= 1'b0;
      mac_ok    <= 1'b0;
      mac_bad   <= 1'b0;
      resync    <= 1'b0;
      if (aes_rsp.done) begin
        otp_q    <= aes_rsp.result;
        otp_ok_q <= 1'b1;
      end
      if (auth_rsp.mac_done) mac_rdy_q <= 1'b1;

      // seq' octets after the tag: collected in whatever state the decision is in.
      if ((st_q == R_DECIDE || st_q == R_ERR0 || st_q == R_ERR1 || st_q == R_ERRE ||
           st_q == R_SYNC) && is_d && ctrs_q != 3'(L_S)) begin
        seqp_q <= {seqp_q[23:0], in_tok.data};
        ctrs_q <= ctrs_q + 3'd1;
      end

      if (is_s) begin
        st_q       <= R_MAIN;
        ctr_q      <= '0;
        pos_q      <= '0;
        ctrm_q     <= '0;
        blk_q      <= '0;
        otp_ok_q   <= 1'b0;
        aes_go_q   <= 1'b1;
        mac_rdy_q  <= 1'b0;
        early_e_q  <= 1'b0;
        ctrs_q     <= '0;
        sync_req_q <= 1'b0;
      end else begin
        unique case (st_q)
          R_MAIN: begin
            if (is_e) begin
              st_q <= R_MAC;
            end else if (is_d) begin
              buf_q[pos_q] <= pt;
              ctr_q <= ctr_q + 32'd1;
              pos_q <= (pos_q == 4'(L_M - 1)) ? 4'd0 : pos_q + 4'd1;
              if (ctr_q[3:0] == 4'hF) begin
                blk_q    <= blk_q + 32'd1;
                otp_ok_q <= 1'b0;
                aes_go_q <= 1'b1;
              end
            end
          end
          R_MAC: begin
            if (is_d) begin
              buf_q[slot] <= in_tok.data;
              ctrm_q <= ctrm_q + 4'd1;
              if (ctrm_q == 4'(L_M - 1)) st_q <= R_DECIDE;
            end else if (is_e) begin
              early_e_q <= 1'b1;
              st_q      <= R_DECIDE;
            end
          end
          R_DECIDE: begin
            if (mac_rdy_q) begin
              if (tag_eq && !early_e_q) begin
                mac_ok <= 1'b1;
                seq_r  <= seq_r + 32'd1;
                st_q   <= R_IDLE;
              end else begin
                mac_bad <= 1'b1;
                st_q    <= R_ERR0;
              end
            end
          end
          R_ERR0: st_q <= R_ERR1;
          R_ERR1: st_q <= R_ERRE;
          R_ERRE: begin
            st_q      <= R_SYNC;
            mac_rdy_q <= 1'b0;
          end
          R_SYNC: begin
            if (early_e_q) begin
              st_q <= R_IDLE;
            end else if (!sync_req_q && ctrs_q == 3'(L_S)) begin
              if (seqp_q > seq_r) begin
                sync_req_q <= 1'b1;
                sync_go_q  <= 1'b1;
              end else begin
                st_q <= R_IDLE;
              end
            end else if (sync_req_q && mac_rdy_q) begin
              if (tag_eq) begin
                seq_r  <= seqp_q + 32'd1;
                resync <= 1'b1;
              end
              st_q <= R_IDLE;
            end
          end
          default: ;
        endcase
      end
      if (rekey) seq_r <= '0;
    end
  end

  assign active = (st_q != R_IDLE);

  assert property (@(posedge clk) disable iff (!rst_n)
                   (st_q == R_MAIN && is_d && encrypt_en) |-> otp_ok_q)
    else $error("yasir_rx: ciphertext octet arrived before its keystream block");

endmodule
