// aes128_core: iterative AES-128 encryption (FIPS-197), one round per cycle.
//
// Every encryption unit of the chip is built from this core. The document
// uses an existing small AES core and gives no internals; this is a plain
// iterative implementation of the standard cipher: the S-box is computed as
// the GF(2^8) inverse followed by the affine map, and the round keys are
// expanded on the fly alongside the data rounds, so no tables are stored.
//
// Interface: pulse `start` with `key` and `block_in` valid while `busy` is
// low. `done` pulses for one cycle, with `block_out` holding the ciphertext,
// 11 cycles after `start` (one cycle for the initial AddRoundKey, ten for the
// rounds). `block_out` stays stable until the next start. Only encryption is
// needed: every unit uses AES in counter mode.
module aes128_core (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [127:0] key,
  input  logic [127:0] block_in,
  output logic         busy,
  output logic         done,
  output logic [127:0] block_out
);

  function automatic logic [7:0] xtime(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] gf_mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p, aa;
    p  = '0;
    aa = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ aa;
      aa = xtime(aa);
    end
    return p;
  endfunction

  // S-box: multiplicative inverse (a^254, 0 maps to 0) then the affine map.
  function automatic logic [7:0] sbox(input logic [7:0] a);
    logic [7:0] sq, inv, r;
    sq  = a;
    inv = 8'h01;
    for (int i = 1; i < 8; i++) begin
      sq  = gf_mul(sq, sq);     // a^(2^i)
      inv = gf_mul(inv, sq);    // product of a^2 .. a^128 = a^254
    end
    r = inv ^ {inv[6:0], inv[7]} ^ {inv[5:0], inv[7:6]} ^
        {inv[4:0], inv[7:5]} ^ {inv[3:0], inv[7:4]} ^ 8'h63;
    return r;
  endfunction

  function automatic logic [31:0] sub_word(input logic [31:0] w);
    return {sbox(w[31:24]), sbox(w[23:16]), sbox(w[15:8]), sbox(w[7:0])};
  endfunction

  // Byte n of a 128-bit block, byte 0 being the most significant.
  function automatic logic [7:0] byte_of(input logic [127:0] s, input int n);
    return s[127-8*n -: 8];
  endfunction

  function automatic logic [127:0] sub_shift(input logic [127:0] s);
    logic [127:0] r;
    // State byte (row r, column c) sits at index r + 4c; ShiftRows moves row r
    // left by r columns.
    for (int c = 0; c < 4; c++)
      for (int rr = 0; rr < 4; rr++)
        r[127-8*(rr+4*c) -: 8] = sbox(byte_of(s, rr + 4*((c + rr) % 4)));
    return r;
  endfunction

  function automatic logic [127:0] mix_columns(input logic [127:0] s);
    logic [127:0] r;
    logic [7:0] a0, a1, a2, a3;
    for (int c = 0; c < 4; c++) begin
      a0 = byte_of(s, 4*c);   a1 = byte_of(s, 4*c+1);
      a2 = byte_of(s, 4*c+2); a3 = byte_of(s, 4*c+3);
      r[127-8*(4*c)   -: 8] = xtime(a0) ^ (xtime(a1) ^ a1) ^ a2 ^ a3;
      r[127-8*(4*c+1) -: 8] = a0 ^ xtime(a1) ^ (xtime(a2) ^ a2) ^ a3;
      r[127-8*(4*c+2) -: 8] = a0 ^ a1 ^ xtime(a2) ^ (xtime(a3) ^ a3);
      r[127-8*(4*c+3) -: 8] = (xtime(a0) ^ a0) ^ a1 ^ a2 ^ xtime(a3);
    end
    return r;
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

  logic [127:0] state_q, rkey_q;
  logic [7:0]   rcon_q;
  logic [3:0]   round_q;     // 1..10 while busy
  logic [127:0] rkey_next, state_next;

  always_comb begin
    rkey_next  = next_round_key(rkey_q, rcon_q);
    state_next = sub_shift(state_q);
    if (round_q != 4'd10) state_next = mix_columns(state_next);
    state_next = state_next ^ rkey_next;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      round_q <= '0;
      rcon_q  <= 8'h01;
      state_q <= '0;
      rkey_q  <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        state_q <= block_in ^ key;
        rkey_q  <= key;
        rcon_q  <= 8'h01;
        round_q <= 4'd1;
        busy    <= 1'b1;
      end else if (busy) begin
        state_q <= state_next;
        rkey_q  <= rkey_next;
        rcon_q  <= xtime(rcon_q);
        round_q <= round_q + 4'd1;
        if (round_q == 4'd10) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign block_out = state_q;

endmodule
