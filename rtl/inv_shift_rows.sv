// inv_shift_rows - InvShiftRows step for decryption: row r of the state is
// rotated right by r byte positions, so output byte (r, c) takes input byte
// (r, (c-r) mod 4). Pure wiring, combinational.
module inv_shift_rows
  import aes_pkg::*;
(
  input  block_t state_in,
  output block_t state_out
);

  always_comb begin
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        state_out[127-8*(4*c+r) -: 8] = state_in[127-8*(4*((c+4-r)%4)+r) -: 8];
  end

endmodule
