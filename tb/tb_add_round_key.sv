// tb_add_round_key - self-checking test of AddRoundKey: the first AddRoundKey
// of the worked AES-128 example and 500 random state/key pairs, compared with
// a byte-by-byte XOR.
module tb_add_round_key;
  import aes_pkg::block_t;
  int checks = 0, failures = 0;
  block_t s, k, dout;

  add_round_key dut (.state_in(s), .round_key(k), .state_out(dout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input block_t a, input block_t b, input block_t exp);
    s = a; k = b;
    #1;
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("FAIL s=%032h k=%032h got=%032h exp=%032h", a, b, dout, exp);
    end
  endtask

  initial begin
    aes_ref_pkg::bytes_t ba, bb, bo;
    block_t a, b;
    check(128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c,
          128'h193de3bea0f4e22b9ac68d2ae9f84808);
    for (int i = 0; i < 500; i++) begin
      a = aes_ref_pkg::rand128();
      b = aes_ref_pkg::rand128();
      ba = aes_ref_pkg::to_bytes(a);
      bb = aes_ref_pkg::to_bytes(b);
      foreach (bo[j]) bo[j] = ba[j] ^ bb[j];
      check(a, b, aes_ref_pkg::from_bytes(bo));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
