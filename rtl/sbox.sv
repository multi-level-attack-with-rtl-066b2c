// sbox - forward AES S-box as combinational logic.
//
// The byte is first replaced by its multiplicative inverse in GF(2^8)
// (0 maps to 0), then passed through the affine transform
//   b = M * a_inv + c,
// where row i of M (output bit 7 on top, input bits a7..a0 left to right) is
// the 8x8 circulant 11111000, 01111100, ..., 11110001 and c = 8'h63.
// The matrix follows the cipher's algorithm description; the constant 8'h63 is
// the standard AES one that the cipher's published test vectors require.
// Purely combinational: no clock, no latency.
module sbox
  import aes_pkg::*;
(
  input  logic [7:0] in_byte,
  output logic [7:0] out_byte
);

  // Rows of the affine matrix, row 0 produces output bit 7. Columns are
  // input bits 7..0 from left to right.
  localparam logic [7:0] AFFINE_ROW [8] = '{
    8'b1111_1000, 8'b0111_1100, 8'b0011_1110, 8'b0001_1111,
    8'b1000_1111, 8'b1100_0111, 8'b1110_0011, 8'b1111_0001
  };
  localparam logic [7:0] AFFINE_C = 8'h63;

  logic [7:0] inv;

  always_comb begin
    inv = gf_inv(in_byte);
    for (int r = 0; r < 8; r++)
      out_byte[7-r] = ^(AFFINE_ROW[r] & inv) ^ AFFINE_C[7-r];
  end

endmodule
