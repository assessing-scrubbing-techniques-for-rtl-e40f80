// aes128_core: iterative AES-128 encryption, one round per clock.
//
// This is the payload application of the test platform: a 128-bit AES
// encryption block, checked by the Fault Monitor with known-answer vectors.
// The document names the application but not its micro-architecture; the
// round-per-cycle structure with on-the-fly key expansion is this design's
// choice.  The S-box is computed, not tabulated: the multiplicative inverse
// in GF(2^8) (as a^254) followed by the FIPS-197 affine transform.
//
// Interface: pulse `start` with `key` and `pt` valid; the core copies them
// and raises `busy`.  Counting the cycle in which `start` is high as the
// first, `done` is high for one cycle in the 11th, with the ciphertext on
// `ct` (held until the next `done`).  `start` while busy is ignored.  Byte 0 of a block is bits [127:120].
module aes128_core (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [127:0] key,
  input  logic [127:0] pt,
  output logic         busy,
  output logic         done,
  output logic [127:0] ct
);

  function automatic logic [7:0] xtime(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] gmul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] r, x;
    r = '0;
    x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= x;
      x = xtime(x);
    end
    return r;
  endfunction

  function automatic logic [7:0] sbox(input logic [7:0] a);
    logic [7:0] sq, inv, s;
    // a^254 = a^2 * a^4 * ... * a^128 (0 maps to 0)
    sq  = gmul(a, a);
    inv = sq;
    for (int i = 0; i < 6; i++) begin
      sq  = gmul(sq, sq);
      inv = gmul(inv, sq);
    end
    s = inv ^ {inv[6:0], inv[7]} ^ {inv[5:0], inv[7:6]} ^ {inv[4:0], inv[7:5]}
            ^ {inv[3:0], inv[7:4]} ^ 8'h63;
    return s;
  endfunction

  function automatic logic [7:0] byte_of(input logic [127:0] b, input int i);
    return b[127 - 8*i -: 8];
  endfunction

  // SubBytes, ShiftRows and (unless last) MixColumns of one round.
  function automatic logic [127:0] round_fn(input logic [127:0] s, input logic last);
    logic [7:0] sb [16];
    logic [7:0] sr [16];
    logic [127:0] o;
    for (int i = 0; i < 16; i++) sb[i] = sbox(byte_of(s, i));
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        sr[c*4 + r] = sb[((c + r) % 4)*4 + r];
    for (int c = 0; c < 4; c++) begin
      logic [7:0] a0, a1, a2, a3;
      a0 = sr[c*4]; a1 = sr[c*4+1]; a2 = sr[c*4+2]; a3 = sr[c*4+3];
      if (last) begin
        o[127 - 32*c -: 32] = {a0, a1, a2, a3};
      end else begin
        o[127 - 32*c -: 32] = {xtime(a0) ^ gmul(a1, 8'h03) ^ a2 ^ a3,
                               a0 ^ xtime(a1) ^ gmul(a2, 8'h03) ^ a3,
                               a0 ^ a1 ^ xtime(a2) ^ gmul(a3, 8'h03),
                               gmul(a0, 8'h03) ^ a1 ^ a2 ^ xtime(a3)};
      end
    end
    return o;
  endfunction

  // Next round key from the current one and the round constant.
  function automatic logic [127:0] next_key(input logic [127:0] k, input logic [7:0] rcon);
    logic [31:0] w0, w1, w2, w3, t;
    {w0, w1, w2, w3} = k;
    t  = {sbox(w3[23:16]) ^ rcon, sbox(w3[15:8]), sbox(w3[7:0]), sbox(w3[31:24])};
    w0 = w0 ^ t;
    w1 = w1 ^ w0;
    w2 = w2 ^ w1;
    w3 = w3 ^ w2;
    return {w0, w1, w2, w3};
  endfunction

  logic [127:0] state_q, rkey_q;
  logic [7:0]   rcon_q;
  logic [3:0]   round_q;
  logic [127:0] rkey_next, state_next;

  assign rkey_next  = next_key(rkey_q, rcon_q);
  assign state_next = round_fn(state_q, round_q == 4'd10) ^ rkey_next;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= '0;
      rkey_q  <= '0;
      rcon_q  <= 8'h01;
      round_q <= '0;
      busy    <= 1'b0;
      done    <= 1'b0;
      ct      <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          state_q <= pt ^ key;
          rkey_q  <= key;
          rcon_q  <= 8'h01;
          round_q <= 4'd1;
          busy    <= 1'b1;
        end
      end else begin
        state_q <= state_next;
        rkey_q  <= rkey_next;
        rcon_q  <= xtime(rcon_q);
        round_q <= round_q + 4'd1;
        if (round_q == 4'd10) begin
          busy <= 1'b0;
          done <= 1'b1;
          ct   <= state_next;
        end
      end
    end
  end

endmodule
