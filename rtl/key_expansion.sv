// key_expansion - one step of the AES-128 key schedule: from the round key
// of round r-1 (words w0..w3) it forms the round key of round r:
//   t  = SubWord(RotWord(w3)) ^ {Rcon[r], 00, 00, 00}
//   n0 = w0 ^ t,  n1 = w1 ^ n0,  n2 = w2 ^ n1,  n3 = w3 ^ n2.
// RotWord rotates the word left by one byte, SubWord applies the S-box to its
// four bytes (four sbox instances). The cores call it once per clock so the
// round keys are made on the fly and never stored. Combinational.
module key_expansion
  import aes_pkg::*;
(
  input  block_t     key_in,   // round key r-1
  input  logic [3:0] round,    // r, 1..10, selects Rcon
  output block_t     key_out   // round key r
);

  word_t w [4];
  word_t n [4];
  word_t rot, sub;

  always_comb begin
    for (int i = 0; i < 4; i++) w[i] = key_in[127-32*i -: 32];
    rot = {w[3][23:0], w[3][31:24]};
  end

  for (genvar b = 0; b < 4; b++) begin : g_subword
    sbox u_sbox (.in_byte(rot[31-8*b -: 8]), .out_byte(sub[31-8*b -: 8]));
  end

  always_comb begin
    n[0] = w[0] ^ sub ^ {rcon(round), 24'h0};
    for (int i = 1; i < 4; i++) n[i] = w[i] ^ n[i-1];
    for (int i = 0; i < 4; i++) key_out[127-32*i -: 32] = n[i];
  end

endmodule
