// vkp_keygen - variable key pattern generator: gives every message block its
// own pseudorandom 128-bit sub key, derived from one symmetric key.
//
// The generator is a Fibonacci linear feedback shift register of KEY_BITS
// bits. One register step shifts left by one bit and feeds in the XOR
// (parity) of the bits selected by TAPS. A new sub key is the register
// advanced by STEPS such steps, unrolled into one combinational XOR network
// so that a whole new key is ready in a single clock.
//
// Sequence: 'seed_load' takes the symmetric key as seed and produces the
// first sub key one clock later (the seed itself is never used as a sub
// key). Each 'advance' pulse replaces the sub key by the next one. Two
// generators loaded with the same key and advanced once per block stay in
// step, which is how the encrypting and decrypting ends agree on keys.
// seed_load has priority over advance. An all-zero seed is the one state an
// LFSR cannot leave, so it produces all-zero sub keys.
//
// That the key comes from feedback taps and a seed, and that each block gets
// a fresh pseudorandom sub key, follows the cipher's description; the
// register length, the tap set (x^128 + x^126 + x^101 + x^99 + 1, a
// maximal-length polynomial) and the number of steps per sub key are this
// design's choices. Synchronous active-low reset clears the sub key.
module vkp_keygen #(
  parameter int unsigned             KEY_BITS = 128,
  parameter logic [KEY_BITS-1:0]     TAPS     = KEY_BITS'((128'h1 << 127) | (128'h1 << 125) |
                                                          (128'h1 << 100) | (128'h1 << 98)),
  parameter int unsigned             STEPS    = 128
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                seed_load,
  input  logic [KEY_BITS-1:0] seed,
  input  logic                advance,
  output logic [KEY_BITS-1:0] sub_key
);

  function automatic logic [KEY_BITS-1:0] lfsr_steps(input logic [KEY_BITS-1:0] s_in);
    logic [KEY_BITS-1:0] s;
    s = s_in;
    for (int i = 0; i < int'(STEPS); i++)
      s = {s[KEY_BITS-2:0], ^(s & TAPS)};
    return s;
  endfunction

  logic [KEY_BITS-1:0] key_q, next_src, next_key;

  assign next_src = seed_load ? seed : key_q;
  assign next_key = lfsr_steps(next_src);

  always_ff @(posedge clk) begin
    if (!rst_n)                     key_q <= '0;
    else if (seed_load || advance)  key_q <= next_key;
  end

  assign sub_key = key_q;

endmodule
