// sub_bytes - SubBytes step: every one of the 16 state bytes goes through
// its own forward S-box (16 sbox instances side by side, as in the cipher's
// byte-substitution figure where each s(r,c) is replaced by S(s(r,c))).
// Combinational: no clock, no latency.
module sub_bytes
  import aes_pkg::*;
(
  input  block_t state_in,
  output block_t state_out
);

  for (genvar n = 0; n < 16; n++) begin : g_byte
    sbox u_sbox (
      .in_byte (state_in [127-8*n -: 8]),
      .out_byte(state_out[127-8*n -: 8])
    );
  end

endmodule
