// aes_vkp_top - key-cohort AES-128 cipher with variable key pattern
// generation: an encryption channel and a decryption channel that derive a
// fresh sub key for every block from one shared symmetric key.
//
// Structure: each channel pairs an iterative AES core (aes_encrypt or
// aes_decrypt) with its own variable key generator (vkp_keygen). A pulse on
// key_load stores sym_key and seeds both generators with it. Every block a
// channel accepts while vkp_en is high is processed with that channel's
// current sub key, and the generator then steps to the next one. Because the
// two generators start from the same seed and step once per block, the n-th
// block decrypted uses the same sub key as the n-th block encrypted, so a
// ciphertext stream fed in order through the decryption channel comes back
// as the plaintext. With vkp_en low a channel instead uses the stored
// symmetric key unchanged for every block (plain AES-128) and its generator
// does not step, which is the mode in which the standard AES test vectors
// apply.
//
// Interfaces: both channels use valid/ready handshakes on input and output.
// While key_load is high neither channel accepts a block. Encryption takes
// 11 clocks per block and decryption 21 (see the cores). Synchronous
// active-low reset.
//
// The split into key expansion, data path and control, and the per-block
// pseudorandom sub keys, follow the cipher's architecture; the pairing of two
// synchronised channels, the fixed-key mode switch and all handshakes are
// this design's choices.
module aes_vkp_top
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  // key management
  input  logic   key_load,
  input  block_t sym_key,
  input  logic   vkp_en,
  // encryption channel
  input  logic   enc_in_valid,
  output logic   enc_in_ready,
  input  block_t enc_in_block,
  output logic   enc_out_valid,
  input  logic   enc_out_ready,
  output block_t enc_out_block,
  // decryption channel
  input  logic   dec_in_valid,
  output logic   dec_in_ready,
  input  block_t dec_in_block,
  output logic   dec_out_valid,
  input  logic   dec_out_ready,
  output block_t dec_out_block
);

  block_t sym_key_q;
  block_t enc_sub_key, dec_sub_key;
  logic   enc_core_ready, dec_core_ready;
  logic   enc_take, dec_take;

  always_ff @(posedge clk) begin
    if (!rst_n)        sym_key_q <= '0;
    else if (key_load) sym_key_q <= sym_key;
  end

  assign enc_in_ready = enc_core_ready && !key_load;
  assign dec_in_ready = dec_core_ready && !key_load;
  assign enc_take     = enc_in_valid && enc_in_ready;
  assign dec_take     = dec_in_valid && dec_in_ready;

  vkp_keygen u_enc_keygen (
    .clk, .rst_n, .seed_load(key_load), .seed(sym_key),
    .advance(enc_take && vkp_en), .sub_key(enc_sub_key)
  );

  vkp_keygen u_dec_keygen (
    .clk, .rst_n, .seed_load(key_load), .seed(sym_key),
    .advance(dec_take && vkp_en), .sub_key(dec_sub_key)
  );

  aes_encrypt u_enc (
    .clk, .rst_n,
    .in_valid (enc_in_valid && !key_load),
    .in_ready (enc_core_ready),
    .block    (enc_in_block),
    .key      (vkp_en ? enc_sub_key : sym_key_q),
    .out_valid(enc_out_valid),
    .out_ready(enc_out_ready),
    .result   (enc_out_block)
  );

  aes_decrypt u_dec (
    .clk, .rst_n,
    .in_valid (dec_in_valid && !key_load),
    .in_ready (dec_core_ready),
    .block    (dec_in_block),
    .key      (vkp_en ? dec_sub_key : sym_key_q),
    .out_valid(dec_out_valid),
    .out_ready(dec_out_ready),
    .result   (dec_out_block)
  );

endmodule
