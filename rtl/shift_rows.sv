// shift_rows - ShiftRows step: row r of the 4x4 state is rotated left by r
// byte positions (row 0 unchanged, row 1 by one, row 2 by two, row 3 by
// three). With byte n at column n/4, row n%4, output byte (r, c) takes input
// byte (r, (c+r) mod 4). Pure wiring, combinational.
module shift_rows
  import aes_pkg::*;
(
  input  block_t state_in,
  output block_t state_out
);

  always_comb begin
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        state_out[127-8*(4*c+r) -: 8] = state_in[127-8*(4*((c+r)%4)+r) -: 8];
  end

endmodule
