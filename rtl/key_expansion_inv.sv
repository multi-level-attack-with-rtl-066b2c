// key_expansion_inv - one backward step of the AES-128 key schedule: from
// the round key of round r (words n0..n3) it recovers that of round r-1:
//   w3 = n3 ^ n2,  w2 = n2 ^ n1,  w1 = n1 ^ n0,
//   w0 = n0 ^ SubWord(RotWord(w3)) ^ {Rcon[r], 00, 00, 00}.
// This lets the decryption core start from the last round key and walk the
// schedule back one round per clock without storing all eleven keys.
// Combinational.
module key_expansion_inv
  import aes_pkg::*;
(
  input  block_t     key_in,   // round key r
  input  logic [3:0] round,    // r, 1..10, selects Rcon
  output block_t     key_out   // round key r-1
);

  word_t n [4];
  word_t w [4];
  word_t rot, sub;

  always_comb begin
    for (int i = 0; i < 4; i++) n[i] = key_in[127-32*i -: 32];
    for (int i = 1; i < 4; i++) w[i] = n[i] ^ n[i-1];
    rot = {w[3][23:0], w[3][31:24]};
  end

  for (genvar b = 0; b < 4; b++) begin : g_subword
    sbox u_sbox (.in_byte(rot[31-8*b -: 8]), .out_byte(sub[31-8*b -: 8]));
  end

  always_comb begin
    w[0] = n[0] ^ sub ^ {rcon(round), 24'h0};
    for (int i = 0; i < 4; i++) key_out[127-32*i -: 32] = w[i];
  end

endmodule
