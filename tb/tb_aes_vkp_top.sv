// tb_aes_vkp_top - end-to-end self-checking test of the key-cohort cipher at
// its default (full) size.
//
// 1. Fixed-key mode (vkp_en low): the published AES-128 vector, key
//    000102..0f, is encrypted (00112233..ff -> 69c4e0d8..c55a) and decrypted
//    back.
// 2. Variable-key mode: a random symmetric key is loaded and 12 copies of
//    one plaintext block are encrypted while, at the same time, the
//    decryption channel decrypts the ciphertexts as they appear. Block n
//    must equal AES-128 under the n-th sub key of the reference LFSR model,
//    all 12 ciphertexts must differ, and every block must decrypt to the
//    plaintext.
// 3. The key is reloaded mid-session and the sub key sequence must restart
//    from the new seed.
// Outputs are taken late at random (stalls), and blocks are offered while
// key_load is high, which must not be accepted. Each mechanism is counted
// and one that never happened counts as a failure.
module tb_aes_vkp_top;
  import aes_pkg::block_t;
  int checks = 0, failures = 0;
  int n_bypass = 0, n_key_refresh = 0, n_stall = 0, n_reload = 0, n_load_block = 0,
      n_overlap = 0;

  logic   clk = 0;
  logic   rst_n, key_load, vkp_en;
  block_t sym_key;
  logic   enc_in_valid, enc_in_ready, enc_out_valid, enc_out_ready;
  logic   dec_in_valid, dec_in_ready, dec_out_valid, dec_out_ready;
  block_t enc_in_block, enc_out_block, dec_in_block, dec_out_block;

  always #5 clk = ~clk;

  aes_vkp_top dut (.*);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk)
    if (dut.u_enc.u_ctrl.run && (dut.u_dec.u_ctrl.run || dut.u_dec.u_ctrl.pre)) n_overlap++;

  task automatic check(input string what, input block_t got, input block_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%032h exp=%032h", what, got, exp);
    end
  endtask

  task automatic load_key(input block_t k, input bit vkp);
    @(negedge clk);
    key_load = 1; sym_key = k; vkp_en = vkp;
    enc_in_valid = 1; dec_in_valid = 1;   // offered during key_load
    #1;
    checks++;
    if (enc_in_ready || dec_in_ready) begin
      failures++;
      $display("FAIL block accepted during key_load");
    end else n_load_block++;
    @(negedge clk);
    key_load = 0; enc_in_valid = 0; dec_in_valid = 0;
  endtask

  task automatic encrypt(input block_t p, input int stall, output block_t c);
    @(negedge clk);
    enc_in_valid = 1; enc_in_block = p;
    while (!enc_in_ready) @(negedge clk);
    @(negedge clk);
    enc_in_valid = 0;
    while (!enc_out_valid) @(negedge clk);
    repeat (stall) begin
      @(negedge clk);
      if (enc_out_valid) n_stall++;
    end
    enc_out_ready = 1;
    c = enc_out_block;
    @(negedge clk);
    enc_out_ready = 0;
  endtask

  task automatic decrypt(input block_t c, input int stall, output block_t p);
    @(negedge clk);
    dec_in_valid = 1; dec_in_block = c;
    while (!dec_in_ready) @(negedge clk);
    @(negedge clk);
    dec_in_valid = 0;
    while (!dec_out_valid) @(negedge clk);
    repeat (stall) begin
      @(negedge clk);
      if (dec_out_valid) n_stall++;
    end
    dec_out_ready = 1;
    p = dec_out_block;
    @(negedge clk);
    dec_out_ready = 0;
  endtask

  task automatic session(input block_t k, input int nblk);
    block_t p, sk;
    block_t ct_q [$];
    block_t ct_all [$];
    p  = aes_ref_pkg::rand128();
    sk = k;
    load_key(k, 1);
    fork
      begin : enc_side
        block_t c;
        for (int n = 0; n < nblk; n++) begin
          encrypt(p, $urandom_range(0, 3), c);
          sk = aes_ref_pkg::lfsr(sk, 128);
          check($sformatf("variable-key cipher block %0d", n), c, aes_ref_pkg::encrypt(p, sk));
          foreach (ct_all[j]) begin
            checks++;
            if (ct_all[j] === c) begin failures++; $display("FAIL repeated ciphertext"); end
          end
          ct_all.push_back(c);
          ct_q.push_back(c);
          n_key_refresh++;
        end
      end
      begin : dec_side
        block_t q;
        for (int n = 0; n < nblk; n++) begin
          wait (ct_q.size() > 0);
          decrypt(ct_q.pop_front(), $urandom_range(0, 3), q);
          check($sformatf("variable-key plaintext block %0d", n), q, p);
        end
      end
    join
  endtask

  initial begin
    block_t c, q;
    rst_n = 0; key_load = 0; vkp_en = 0; sym_key = '0;
    enc_in_valid = 0; enc_out_ready = 0; enc_in_block = '0;
    dec_in_valid = 0; dec_out_ready = 0; dec_in_block = '0;
    aes_ref_pkg::init();
    repeat (3) @(negedge clk);
    rst_n = 1;

    // 1. fixed-key mode with the published vector
    load_key(128'h000102030405060708090a0b0c0d0e0f, 0);
    encrypt(128'h00112233445566778899aabbccddeeff, 2, c);
    check("fixed-key encryption", c, 128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    n_bypass++;
    decrypt(128'h69c4e0d86a7b0430d8cdb78070b4c55a, 0, q);
    check("fixed-key decryption", q, 128'h00112233445566778899aabbccddeeff);
    n_bypass++;

    // 2. variable-key session, 3. reload with a new key
    session(aes_ref_pkg::rand128(), 12);
    session(aes_ref_pkg::rand128(), 4);
    n_reload++;

    $display("mechanisms: fixed-key blocks=%0d sub-key refreshes=%0d stalls=%0d key reloads=%0d blocked-during-load=%0d overlap clocks=%0d",
             n_bypass, n_key_refresh, n_stall, n_reload, n_load_block, n_overlap);
    if (n_bypass == 0)      begin failures++; $display("FAIL no fixed-key block"); end
    if (n_key_refresh == 0) begin failures++; $display("FAIL no sub key refresh"); end
    if (n_stall == 0)       begin failures++; $display("FAIL no output stall"); end
    if (n_reload == 0)      begin failures++; $display("FAIL no key reload"); end
    if (n_load_block == 0)  begin failures++; $display("FAIL no blocked offer"); end
    if (n_overlap == 0)     begin failures++; $display("FAIL channels never overlapped"); end
    checks += 6;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
