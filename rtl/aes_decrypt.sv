// aes_decrypt - iterative AES-128 decryption core (inverse cipher), one
// round per clock.
//
// Decryption needs the round keys in reverse order. Since every block may
// come with a new key, no key table is kept: after accepting a block the
// core first runs the key schedule forward for NR = 10 clocks (preparation
// phase) to reach the last round key, and on the last of those clocks it
// also XORs the ciphertext with that key. It then runs NR rounds, walking
// the key schedule backwards one step per clock: InvShiftRows, InvSubBytes,
// AddRoundKey with the previous round key and InvMixColumns (omitted in the
// last round). The plaintext is held on 'result' with out_valid high until
// out_ready.
//
// Timing: with out_ready high a block is accepted every 21 clocks and its
// result appears 21 clocks after the accepting edge. Ports mirror
// aes_encrypt. The reverse walk of the key schedule and the handshake are
// this design's choices. Synchronous active-low reset.
module aes_decrypt
  import aes_pkg::*;
#(
  parameter int unsigned NR = NR_AES128
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  output logic   in_ready,
  input  block_t block,      // ciphertext
  input  block_t key,        // cipher key for this block
  output logic   out_valid,
  input  logic   out_ready,
  output block_t result      // plaintext
);

  logic       load, pre, run, last;
  logic [3:0] cnt;

  aes_ctrl #(.PRE_CYCLES(NR), .NR(NR)) u_ctrl (
    .clk, .rst_n, .in_valid, .in_ready, .out_valid, .out_ready,
    .load, .pre, .run, .cnt, .last
  );

  block_t state_q, rkey_q;
  block_t rkey_fwd, rkey_back, s_ishift, s_isub, s_ark, s_imix, s_round, s_init;
  logic [3:0] back_round;

  // Round key r currently held during the round phase is r = NR+1-cnt.
  assign back_round = 4'(NR + 1) - cnt;

  key_expansion     u_kexp  (.key_in(rkey_q), .round(cnt),        .key_out(rkey_fwd));
  key_expansion_inv u_kinv  (.key_in(rkey_q), .round(back_round), .key_out(rkey_back));

  inv_shift_rows  u_ishift (.state_in(state_q),  .state_out(s_ishift));
  inv_sub_bytes   u_isub   (.state_in(s_ishift), .state_out(s_isub));
  add_round_key   u_ark    (.state_in(s_isub),   .round_key(rkey_back), .state_out(s_ark));
  inv_mix_columns u_imix   (.state_in(s_ark),    .state_out(s_imix));
  add_round_key   u_ark0   (.state_in(state_q),  .round_key(rkey_fwd),  .state_out(s_init));

  assign s_round = last ? s_ark : s_imix;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= '0;
      rkey_q  <= '0;
    end else if (load) begin
      state_q <= block;
      rkey_q  <= key;
    end else if (pre) begin
      rkey_q  <= rkey_fwd;
      if (last) state_q <= s_init;
    end else if (run) begin
      state_q <= s_round;
      rkey_q  <= rkey_back;
    end
  end

  assign result = state_q;

endmodule
