// inv_sub_bytes - InvSubBytes step for decryption: every one of the 16 state
// bytes goes through its own inverse S-box. Combinational.
module inv_sub_bytes
  import aes_pkg::*;
(
  input  block_t state_in,
  output block_t state_out
);

  for (genvar n = 0; n < 16; n++) begin : g_byte
    inv_sbox u_inv_sbox (
      .in_byte (state_in [127-8*n -: 8]),
      .out_byte(state_out[127-8*n -: 8])
    );
  end

endmodule
