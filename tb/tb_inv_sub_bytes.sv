// tb_inv_sub_bytes - self-checking test of the InvSubBytes step: one vector from the
// worked AES-128 example (first round of FIPS-197 appendix B) and 500
// random states compared with the reference model.
module tb_inv_sub_bytes;
  import aes_pkg::block_t;
  int checks = 0, failures = 0;
  block_t din, dout;

  inv_sub_bytes dut (.state_in(din), .state_out(dout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input block_t x, input block_t exp);
    din = x;
    #1;
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("FAIL in=%032h got=%032h exp=%032h", x, dout, exp);
    end
  endtask

  initial begin
    block_t x;
    aes_ref_pkg::init();
    check(128'hd42711aee0bf98f1b8b45de51e415230, 128'h193de3bea0f4e22b9ac68d2ae9f84808);
    for (int i = 0; i < 500; i++) begin
      x = aes_ref_pkg::rand128();
      check(x, aes_ref_pkg::sub(x, 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
