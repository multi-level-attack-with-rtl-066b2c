// aes_pkg - types, constants and GF(2^8) arithmetic shared by the AES-128
// datapath of the variable-key cipher.
//
// State layout: the 128-bit block is read as 16 bytes, byte 0 in bits
// [127:120] and byte 15 in bits [7:0]. Byte n sits in column n/4, row n%4 of
// the 4x4 AES state, so a 32-bit column word is four consecutive bytes. This
// is the usual AES byte order and makes the test vectors of the cipher
// (block 00112233..eeff, key 000102..0e0f) read left to right as printed.
//
// The field is GF(2^8) with the AES reduction polynomial x^8+x^4+x^3+x+1.
// The multiplicative inverse is computed as a^254 (a^-1 for a != 0, and 0
// for 0), with a fixed chain of squarings and multiplications, so the S-box
// is plain combinational logic rather than a stored 256-byte table.
package aes_pkg;

  typedef logic [127:0] block_t;
  typedef logic [31:0]  word_t;

  localparam int unsigned NR_AES128 = 10;   // rounds for a 128-bit key
  localparam int unsigned NB        = 4;    // columns in the state

  // Round constants Rcon[1..10] (top byte of the Rcon word); each is the
  // previous one multiplied by x in GF(2^8).
  function automatic logic [7:0] rcon(input logic [3:0] round);
    unique case (round)
      4'd1:    return 8'h01;
      4'd2:    return 8'h02;
      4'd3:    return 8'h04;
      4'd4:    return 8'h08;
      4'd5:    return 8'h10;
      4'd6:    return 8'h20;
      4'd7:    return 8'h40;
      4'd8:    return 8'h80;
      4'd9:    return 8'h1b;
      4'd10:   return 8'h36;
      default: return 8'h00;
    endcase
  endfunction

  // Multiplication by x (02) in GF(2^8).
  function automatic logic [7:0] xtime(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // General GF(2^8) multiplication, shift-and-add.
  function automatic logic [7:0] gf_mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p, aa;
    p  = 8'h00;
    aa = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ aa;
      aa = xtime(aa);
    end
    return p;
  endfunction

  // Multiplicative inverse a^254: a^2, a^3, a^6, a^12, a^15, a^30, a^60,
  // a^120, a^126, a^127, a^254.
  function automatic logic [7:0] gf_inv(input logic [7:0] a);
    logic [7:0] a2, a3, a6, a12, a15, a30, a60, a120, a126, a127;
    a2   = gf_mul(a, a);
    a3   = gf_mul(a2, a);
    a6   = gf_mul(a3, a3);
    a12  = gf_mul(a6, a6);
    a15  = gf_mul(a12, a3);
    a30  = gf_mul(a15, a15);
    a60  = gf_mul(a30, a30);
    a120 = gf_mul(a60, a60);
    a126 = gf_mul(a120, a6);
    a127 = gf_mul(a126, a);
    return gf_mul(a127, a127);
  endfunction

  // Byte n of a block (n = 4*column + row).
  function automatic logic [7:0] get_byte(input block_t b, input int n);
    return b[127-8*n -: 8];
  endfunction

endpackage
