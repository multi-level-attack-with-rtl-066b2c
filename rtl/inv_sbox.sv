// inv_sbox - inverse AES S-box as combinational logic, used by decryption.
//
// Undoes sbox: the inverse affine transform a = M^-1 * (b + 8'h63) is
// applied first, then the GF(2^8) multiplicative inverse. Row i of M^-1
// (output bit 7 on top, input bits 7..0 left to right) is the circulant
// 01010010, 00101001, 10010100, 01001010, 00100101, 10010010, 01001001,
// 10100100. The cipher's description only says decryption runs the forward
// steps in reverse; this realisation of the inverse is the standard one.
// Purely combinational: no clock, no latency.
module inv_sbox
  import aes_pkg::*;
(
  input  logic [7:0] in_byte,
  output logic [7:0] out_byte
);

  localparam logic [7:0] INV_AFFINE_ROW [8] = '{
    8'b0101_0010, 8'b0010_1001, 8'b1001_0100, 8'b0100_1010,
    8'b0010_0101, 8'b1001_0010, 8'b0100_1001, 8'b1010_0100
  };
  localparam logic [7:0] AFFINE_C = 8'h63;

  logic [7:0] pre;

  always_comb begin
    for (int r = 0; r < 8; r++)
      pre[7-r] = ^(INV_AFFINE_ROW[r] & (in_byte ^ AFFINE_C));
    out_byte = gf_inv(pre);
  end

endmodule
