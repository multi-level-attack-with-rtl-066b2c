// inv_mix_columns - InvMixColumns step for decryption: each column is
// multiplied over GF(2^8) by the inverse of the MixColumns matrix,
//   0e 0b 0d 09
//   09 0e 0b 0d
//   0d 09 0e 0b
//   0b 0d 09 0e
// Combinational; the constant products use the general GF multiplier, which
// synthesis reduces to XOR trees.
module inv_mix_columns
  import aes_pkg::*;
(
  input  block_t state_in,
  output block_t state_out
);

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      logic [7:0] s [4];
      for (int r = 0; r < 4; r++) s[r] = state_in[127-8*(4*c+r) -: 8];
      for (int r = 0; r < 4; r++)
        state_out[127-8*(4*c+r) -: 8] =
            gf_mul(s[r], 8'h0e) ^ gf_mul(s[(r+1)%4], 8'h0b) ^
            gf_mul(s[(r+2)%4], 8'h0d) ^ gf_mul(s[(r+3)%4], 8'h09);
    end
  end

endmodule
