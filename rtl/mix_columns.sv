// mix_columns - MixColumns step: each 4-byte column (s0..s3, row 0 on top)
// is multiplied over GF(2^8) by the constant matrix
//   02 03 01 01
//   01 02 03 01
//   01 01 02 03
//   03 01 01 02
// i.e. by the polynomial 03*y^3 + 01*y^2 + 01*y + 02 modulo y^4 + 1.
// Multiplication by 02 is xtime; by 03 is xtime plus the byte itself.
// Combinational.
module mix_columns
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
            xtime(s[r]) ^ (xtime(s[(r+1)%4]) ^ s[(r+1)%4]) ^ s[(r+2)%4] ^ s[(r+3)%4];
    end
  end

endmodule
