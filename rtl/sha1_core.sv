// sha1_core: SHA-1 compression function (FIPS 180), one round per clock.
//
// On `start` the core latches a 160-bit chaining value `h_in` and a 512-bit message
// block (word 0 in bits [511:480], big-endian as SHA-1 defines). It then runs the 80
// rounds on 80 clocks, generating the message schedule in a 16-word shift register,
// and adds the working variables to the chaining value. `done` pulses for one clock
// with `h_out` valid; `h_out` holds until the next start. Latency: start -> done =
// 81 clocks. The core copies the block on start, so the caller may refill its
// message buffer right away.
//
// The document only asks for "a SHA-1 core" that is reused for HMAC; the
// round-per-clock structure is this design's choice.
module sha1_core (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [159:0] h_in,
  input  logic [511:0] block,
  output logic         busy,
  output logic         done,
  output logic [159:0] h_out
);

  logic [31:0]  w_q [16];
  logic [31:0]  a_q, b_q, c_q, d_q, e_q;
  logic [159:0] h_q;
  logic [6:0]   t_q;

  logic [31:0] f, k, temp, w_new;

  always_comb begin
    if (t_q < 7'd20) begin
      f = (b_q & c_q) | (~b_q & d_q);
      k = 32'h5A827999;
    end else if (t_q < 7'd40) begin
      f = b_q ^ c_q ^ d_q;
      k = 32'h6ED9EBA1;
    end else if (t_q < 7'd60) begin
      f = (b_q & c_q) | (b_q & d_q) | (c_q & d_q);
      k = 32'h8F1BBCDC;
    end else begin
      f = b_q ^ c_q ^ d_q;
      k = 32'hCA62C1D6;
    end
    temp  = {a_q[26:0], a_q[31:27]} + f + e_q + k + w_q[0];
    w_new = w_q[13] ^ w_q[8] ^ w_q[2] ^ w_q[0];
    w_new = {w_new[30:0], w_new[31]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 16; i++) w_q[i] <= '0;
      {a_q, b_q, c_q, d_q, e_q} <= '0;
      h_q   <= '0;
      t_q   <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
      h_out <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        for (int i = 0; i < 16; i++) w_q[i] <= block[511 - 32*i -: 32];
        {a_q, b_q, c_q, d_q, e_q} <= h_in;
        h_q  <= h_in;
        t_q  <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        for (int i = 0; i < 15; i++) w_q[i] <= w_q[i+1];
        w_q[15] <= w_new;
        e_q <= d_q;
        d_q <= c_q;
        c_q <= {b_q[1:0], b_q[31:2]};
        b_q <= a_q;
        a_q <= temp;
        t_q <= t_q + 7'd1;
        if (t_q == 7'd79) begin
          busy  <= 1'b0;
          done  <= 1'b1;
          h_out <= {h_q[159:128] + temp,
                    h_q[127:96]  + a_q,
                    h_q[95:64]   + {b_q[1:0], b_q[31:2]},
                    h_q[63:32]   + c_q,
                    h_q[31:0]    + d_q};
        end
      end
    end
  end

endmodule
