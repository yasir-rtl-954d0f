// aes128_core: iterative AES-128 block encryption (FIPS-197), one round per clock.
//
// YASIR encrypts frame content with AES-128 in counter mode, so only the forward
// cipher is needed: the same keystream decrypts at the Receiver. This core takes a
// 128-bit key and a 128-bit block on `start`, applies the initial AddRoundKey in that
// cycle, then runs rounds 1..10 on the next ten clocks, expanding the round key on the
// fly. `done` pulses for one cycle when `result` holds the ciphertext; `result` keeps
// it until the next start. Latency: done is high 11 clocks after the clock edge that
// samples start (initial key addition, then 10 rounds). A start while busy
// restarts the computation.
//
// Byte order: byte 0 of a block is bits [127:120], and bytes fill the AES state
// column by column, as in FIPS-197. The S-box is not stored as a table: it is
// computed as the multiplicative inverse in GF(2^8) (x^254 modulo x^8+x^4+x^3+x+1)
// followed by the AES affine map. The iterative structure is this design's choice;
// the document only requires "an AES core".
module aes128_core (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [127:0] key,
  input  logic [127:0] block,
  output logic         busy,
  output logic         done,
  output logic [127:0] result
);

  function automatic logic [7:0] xtime(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] gmul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p, aa;
    p  = 8'h00;
    aa = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ aa;
      aa = xtime(aa);
    end
    return p;
  endfunction

  function automatic logic [7:0] sbox(input logic [7:0] x);
    logic [7:0] x2, x3, x6, x7, x14, x15, x30, x31, x62, x63, x126, x127, inv;
    x2   = gmul(x, x);
    x3   = gmul(x2, x);
    x6   = gmul(x3, x3);
    x7   = gmul(x6, x);
    x14  = gmul(x7, x7);
    x15  = gmul(x14, x);
    x30  = gmul(x15, x15);
    x31  = gmul(x30, x);
    x62  = gmul(x31, x31);
    x63  = gmul(x62, x);
    x126 = gmul(x63, x63);
    x127 = gmul(x126, x);
    inv  = gmul(x127, x127);  // x^254 = x^-1, and 0 maps to 0
    return inv ^ {inv[6:0], inv[7]} ^ {inv[5:0], inv[7:6]} ^ {inv[4:0], inv[7:5]}
               ^ {inv[3:0], inv[7:4]} ^ 8'h63;
  endfunction

  function automatic logic [31:0] sub_word(input logic [31:0] w);
    return {sbox(w[31:24]), sbox(w[23:16]), sbox(w[15:8]), sbox(w[7:0])};
  endfunction

  function automatic logic [127:0] next_round_key(input logic [127:0] k, input logic [7:0] rcon);
    logic [31:0] w0, w1, w2, w3, t;
    w0 = k[127:96]; w1 = k[95:64]; w2 = k[63:32]; w3 = k[31:0];
    t  = sub_word({w3[23:0], w3[31:24]}) ^ {rcon, 24'h0};
    w0 = w0 ^ t;
    w1 = w1 ^ w0;
    w2 = w2 ^ w1;
    w3 = w3 ^ w2;
    return {w0, w1, w2, w3};
  endfunction

  // SubBytes and ShiftRows: out byte (r,c) = S(in byte (r, c+r mod 4)).
  function automatic logic [127:0] sub_shift(input logic [127:0] s);
    logic [127:0] o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127 - 8*(r + 4*c) -: 8] = sbox(s[127 - 8*(r + 4*((c + r) % 4)) -: 8]);
    return o;
  endfunction

  function automatic logic [127:0] mix_columns(input logic [127:0] s);
    logic [127:0] o;
    logic [7:0] a0, a1, a2, a3;
    for (int c = 0; c < 4; c++) begin
      a0 = s[127 - 32*c -: 8];
      a1 = s[119 - 32*c -: 8];
      a2 = s[111 - 32*c -: 8];
      a3 = s[103 - 32*c -: 8];
      o[127 - 32*c -: 8] = xtime(a0) ^ (xtime(a1) ^ a1) ^ a2 ^ a3;
      o[119 - 32*c -: 8] = a0 ^ xtime(a1) ^ (xtime(a2) ^ a2) ^ a3;
      o[111 - 32*c -: 8] = a0 ^ a1 ^ xtime(a2) ^ (xtime(a3) ^ a3);
      o[103 - 32*c -: 8] = (xtime(a0) ^ a0) ^ a1 ^ a2 ^ xtime(a3);
    end
    return o;
  endfunction

  logic [127:0] state_q, rk_q;
  logic [7:0]   rcon_q;
  logic [3:0]   round_q;
  logic [127:0] rk_next, ss, round_out;

  always_comb begin
    rk_next   = next_round_key(rk_q, rcon_q);
    ss        = sub_shift(state_q);
    round_out = ((round_q == 4'd10) ? ss : mix_columns(ss)) ^ rk_next;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= '0;
      rk_q    <= '0;
      rcon_q  <= 8'h01;
      round_q <= '0;
      busy    <= 1'b0;
      done    <= 1'b0;
      result  <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        state_q <= block ^ key;
        rk_q    <= key;
        rcon_q  <= 8'h01;
        round_q <= 4'd1;
        busy    <= 1'b1;
      end else if (busy) begin
        state_q <= round_out;
        rk_q    <= rk_next;
        rcon_q  <= xtime(rcon_q);
        round_q <= round_q + 4'd1;
        if (round_q == 4'd10) begin
          busy   <= 1'b0;
          done   <= 1'b1;
          result <= round_out;
        end
      end
    end
  end

endmodule
