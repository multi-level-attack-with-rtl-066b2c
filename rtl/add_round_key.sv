// add_round_key - AddRoundKey step: the state is XORed with the round key.
// Column c of the state is combined with key word w(i+c) (key bits
// [127-32c -: 32]), which on a flat 128-bit bus is a plain bitwise XOR.
// The same step opens encryption (initial key) and closes every round, and
// is used unchanged by decryption. Combinational.
module add_round_key
  import aes_pkg::*;
(
  input  block_t state_in,
  input  block_t round_key,
  output block_t state_out
);

  always_comb begin
    for (int c = 0; c < NB; c++)
      state_out[127-32*c -: 32] = state_in[127-32*c -: 32] ^ round_key[127-32*c -: 32];
  end

endmodule
