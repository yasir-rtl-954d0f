// yasir_auth: running SHA-1 of a frame's ciphertext plus HMAC-SHA-1-80 on one SHA-1 core.
//
// YASIR authenticates a frame as mac = HMAC_HK(seq || Hash(CTXT)). The hash is built
// on the fly while the frame streams through: `init` starts a new hash, each
// `upd_valid` octet is written into a 64-octet message buffer, and every time the
// buffer fills it is compressed in the background (the core copies the block, so
// octets keep arriving). `fin` pads the last partial block (0x80, zeros, 64-bit bit
// count) in one or two compressions, latches the 20-octet digest and pulses
// `digest_done`. `mac_start` computes HMAC-SHA-1 with the 160-bit key padded by zeros
// to 64 octets over the 24-octet string seq || digest (sequence number most
// significant octet first), keeps the first 80 bits and pulses `mac_done`.
//
// HMAC key states: the compressions of the key blocks K^ipad and K^opad depend only
// on the key, so their results are kept in a two-entry cache tagged with the key
// (two entries because a module uses one HMAC key per direction; least recently used
// entry replaced). With the key cached, an HMAC is two compressions (inner data
// block, outer data block), as the document's cost estimate assumes; with a new key
// the two key blocks are compressed first and cached. Because the HMAC input always
// fits in one block, its time does not depend on the frame length, and the digest
// stays available so that a second HMAC with a different sequence number (the
// Receiver's re-synchronisation check) needs no re-hash.
//
// Requests may be issued while the unit is busy: a `fin` or `mac_start` is held
// pending and served in the order hash-finish, then HMAC. `init` aborts whatever is
// running. Timing: a full block compresses in 82 clocks; `fin` -> `digest_done` takes
// 83 or 165 clocks once the core is free; `mac_start` -> `mac_done` 165 clocks with
// the key cached, 329 clocks with a new key. Octets must not fill a second block
// before the first is compressed (an assertion checks this); at one octet per
// byte-time of a serial line that is never close. The buffer/digest sizes and the
// reuse of the SHA-1 core for the HMAC follow the document; the pending-request
// scheme, the key cache and the fixed zero-padded key are this design's choices.
module yasir_auth
  import yasir_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  auth_req_t req,
  output auth_rsp_t rsp
);

  localparam logic [159:0] SHA1_IV = 160'h67452301_EFCDAB89_98BADCFE_10325476_C3D2E1F0;

  typedef enum logic [2:0] {
    A_IDLE, A_BLK, A_FIN1, A_FIN2, A_I1, A_I2, A_O1, A_O2
  } astate_e;

  astate_e      st_q;
  logic         go_q;
  logic [511:0] buf_q;
  logic [5:0]   idx_q;        // octets in buf_q
  logic [31:0]  len_q;        // octets hashed so far
  logic [159:0] h_q;          // running hash chaining value
  logic [159:0] ih_q;         // HMAC chaining value after K^ipad
  logic [159:0] oh_q;         // HMAC chaining value after K^opad
  logic [1:0]   kc_vld_q;     // key cache: entry valid
  logic [159:0] kc_key_q [2]; // key cache: key
  logic [159:0] kc_ih_q  [2]; // key cache: K^ipad state
  logic [159:0] kc_oh_q  [2]; // key cache: K^opad state
  logic         kc_lru_q;     // key cache: entry to replace next
  logic         kc_hit;
  logic         kc_way;
  logic [159:0] inner_q;      // HMAC inner hash
  logic [159:0] digest_q;
  logic [79:0]  mac_q;
  logic [31:0]  seq_q;
  logic [159:0] key_q;
  logic         fin_pend_q, mac_pend_q, two_blk_q;
  logic         dig_done_q, mac_done_q;

  logic         core_busy, core_done;
  logic [159:0] core_hin, core_hout;
  logic [511:0] core_blk, padded;

  sha1_core u_core (
    .clk   (clk),
    .rst_n (rst_n),
    .start (go_q),
    .h_in  (core_hin),
    .block (core_blk),
    .busy  (core_busy),
    .done  (core_done),
    .h_out (core_hout)
  );

  always_comb begin
    kc_hit = 1'b0;
    kc_way = kc_lru_q;
    for (int e = 0; e < 2; e++)
      if (kc_vld_q[e] && kc_key_q[e] == key_q) begin
        kc_hit = 1'b1;
        kc_way = 1'(e);
      end
  end

  // Last data block: octets below idx, then 0x80, then zeros; with the bit count in
  // octets 56..63 when it fits (idx <= 55).
  always_comb begin
    padded = '0;
    for (int j = 0; j < 64; j++) begin
      if (j < int'(idx_q))       padded[511 - 8*j -: 8] = buf_q[511 - 8*j -: 8];
      else if (j == int'(idx_q)) padded[511 - 8*j -: 8] = 8'h80;
    end
    if (idx_q <= 6'd55) padded[63:0] = {29'd0, len_q, 3'b000};
  end

  always_comb begin
    core_hin = SHA1_IV;
    core_blk = buf_q;
    unique case (st_q)
      A_BLK:  begin core_hin = h_q; core_blk = buf_q; end
      A_FIN1: begin core_hin = h_q; core_blk = padded; end
      A_FIN2: begin
        core_hin = h_q;
        core_blk = two_blk_q ? {448'd0, 29'd0, len_q, 3'b000} : padded;
      end
      A_I1:   begin core_hin = SHA1_IV; core_blk = {key_q, 352'd0} ^ {64{8'h36}}; end
      A_I2:   begin core_hin = ih_q; core_blk = {seq_q, digest_q, 8'h80, 248'd0, 64'd704}; end
      A_O1:   begin core_hin = SHA1_IV; core_blk = {key_q, 352'd0} ^ {64{8'h5c}}; end
      A_O2:   begin core_hin = oh_q; core_blk = {inner_q, 8'h80, 280'd0, 64'd672}; end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q       <= A_IDLE;
      go_q       <= 1'b0;
      buf_q      <= '0;
      idx_q      <= '0;
      len_q      <= '0;
      h_q        <= SHA1_IV;
      ih_q       <= '0;
      oh_q       <= '0;
      kc_vld_q   <= '0;
      kc_lru_q   <= 1'b0;
      for (int e = 0; e < 2; e++) begin
        kc_key_q[e] <= '0;
        kc_ih_q[e]  <= '0;
        kc_oh_q[e]  <= '0;
      end
      inner_q    <= '0;
      digest_q   <= '0;
      mac_q      <= '0;
      seq_q      <= '0;
      key_q      <= '0;
      fin_pend_q <= 1'b0;
      mac_pend_q <= 1'b0;
      two_blk_q  <= 1'b0;
      dig_done_q <= 1'b0;
      mac_done_q <= 1'b0;
    end else begin
      go_q            <= 1'b0;
      dig_done_q <= 1'b0;
      mac_done_q <= 1'b0;

      if (req.init) begin
        st_q       <= A_IDLE;
        idx_q      <= '0;
        len_q      <= '0;
        h_q        <= SHA1_IV;
        fin_pend_q <= 1'b0;
        mac_pend_q <= 1'b0;
      end else begin
        if (req.upd_valid) begin
          buf_q[511 - 8*idx_q -: 8] <= req.upd_data;
          idx_q <= idx_q + 6'd1;
          len_q <= len_q + 32'd1;
        end
        if (req.fin) fin_pend_q <= 1'b1;
        if (req.mac_start) begin
          mac_pend_q <= 1'b1;
          seq_q      <= req.mac_seq;
          key_q      <= req.mac_key;
        end

        unique case (st_q)
          A_IDLE: begin
            if (req.upd_valid && idx_q == 6'd63) begin
              st_q <= A_BLK;
              go_q <= 1'b1;
            end else if (fin_pend_q) begin
              fin_pend_q <= 1'b0;
              two_blk_q  <= (idx_q > 6'd55);
              st_q       <= (idx_q > 6'd55) ? A_FIN1 : A_FIN2;
              go_q       <= 1'b1;
            end else if (mac_pend_q) begin
              mac_pend_q <= 1'b0;
              go_q       <= 1'b1;
              if (kc_hit) begin
                ih_q     <= kc_ih_q[kc_way];
                oh_q     <= kc_oh_q[kc_way];
                kc_lru_q <= ~kc_way;
                st_q     <= A_I2;
              end else begin
                st_q     <= A_I1;
              end
            end
          end
          A_BLK: if (core_done) begin
            h_q  <= core_hout;
            st_q <= A_IDLE;
          end
          A_FIN1: if (core_done) begin
            h_q  <= core_hout;
            st_q <= A_FIN2;
            go_q <= 1'b1;
          end
          A_FIN2: if (core_done) begin
            h_q             <= core_hout;
            digest_q        <= core_hout;
            dig_done_q <= 1'b1;
            st_q            <= A_IDLE;
          end
          A_I1: if (core_done) begin
            ih_q <= core_hout;
            st_q <= A_O1;
            go_q <= 1'b1;
          end
          A_O1: if (core_done) begin
            oh_q               <= core_hout;
            kc_vld_q[kc_lru_q] <= 1'b1;
            kc_key_q[kc_lru_q] <= key_q;
            kc_ih_q[kc_lru_q]  <= ih_q;
            kc_oh_q[kc_lru_q]  <= core_hout;
            kc_lru_q           <= ~kc_lru_q;
            st_q               <= A_I2;
            go_q               <= 1'b1;
          end
          A_I2: if (core_done) begin
            inner_q <= core_hout;
            st_q    <= A_O2;
            go_q    <= 1'b1;
          end
          A_O2: if (core_done) begin
            mac_q        <= core_hout[159:80];
            mac_done_q <= 1'b1;
            st_q         <= A_IDLE;
          end
          default: st_q <= A_IDLE;
        endcase
      end
    end
  end

  assign rsp.digest_done = dig_done_q;
  assign rsp.mac_done    = mac_done_q;
  assign rsp.busy   = (st_q != A_IDLE) || go_q || fin_pend_q || mac_pend_q;
  assign rsp.digest = digest_q;
  assign rsp.mac    = mac_q;

  // A block that fills while the previous one is still being compressed would be lost.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (req.upd_valid && idx_q == 6'd63 && !req.init) |-> st_q == A_IDLE)
    else $error("yasir_auth: message block filled while the SHA-1 core was busy");

endmodule
