// aes_encrypt - iterative AES-128 encryption core, one round per clock.
//
// On the accepting clock the plaintext is XORed with the cipher key (the
// initial AddRoundKey) and the key is loaded into the round-key register.
// In each of the next NR = 10 clocks the round-key register advances one
// key-schedule step and the state goes through SubBytes, ShiftRows,
// MixColumns and AddRoundKey; the last round skips MixColumns. The result is
// then held on 'result' with out_valid high until out_ready.
//
// Timing: with out_ready high a block is accepted every 11 clocks and its
// result appears 11 clocks after the accepting edge. The key is sampled
// with the block, so every block may use a different key (the variable-key
// generator relies on this). Port names block/key/result follow the
// cipher's simulation waveforms; the valid/ready handshake, the
// one-round-per-clock schedule and the on-the-fly key schedule are this
// design's choices. Synchronous active-low reset.
module aes_encrypt
  import aes_pkg::*;
#(
  parameter int unsigned NR = NR_AES128
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  output logic   in_ready,
  input  block_t block,      // plaintext
  input  block_t key,        // cipher key for this block
  output logic   out_valid,
  input  logic   out_ready,
  output block_t result      // ciphertext
);

  logic       load, run, last;
  logic [3:0] cnt;

  aes_ctrl #(.PRE_CYCLES(0), .NR(NR)) u_ctrl (
    .clk, .rst_n, .in_valid, .in_ready, .out_valid, .out_ready,
    .load, .pre(), .run, .cnt, .last
  );

  block_t state_q, rkey_q;
  block_t rkey_next, s_sub, s_shift, s_mix, s_round, s_init;

  key_expansion u_kexp (.key_in(rkey_q), .round(cnt), .key_out(rkey_next));

  sub_bytes     u_sub   (.state_in(state_q), .state_out(s_sub));
  shift_rows    u_shift (.state_in(s_sub),   .state_out(s_shift));
  mix_columns   u_mix   (.state_in(s_shift), .state_out(s_mix));
  add_round_key u_ark   (.state_in(last ? s_shift : s_mix), .round_key(rkey_next),
                         .state_out(s_round));
  add_round_key u_ark0  (.state_in(block), .round_key(key), .state_out(s_init));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= '0;
      rkey_q  <= '0;
    end else if (load) begin
      state_q <= s_init;
      rkey_q  <= key;
    end else if (run) begin
      state_q <= s_round;
      rkey_q  <= rkey_next;
    end
  end

  assign result = state_q;

endmodule
