// tb_mix_columns - self-checking test of the MixColumns step: one vector from the
// worked AES-128 example (first round of FIPS-197 appendix B) and 500
// random states compared with the reference model.
module tb_mix_columns;
  import aes_pkg::block_t;
  int checks = 0, failures = 0;
  block_t din, dout;

  mix_columns dut (.state_in(din), .state_out(dout));

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
    check(128'hd4bf5d30e0b452aeb84111f11e2798e5, 128'h046681e5e0cb199a48f8d37a2806264c);
    for (int i = 0; i < 500; i++) begin
      x = aes_ref_pkg::rand128();
      check(x, aes_ref_pkg::mix(x, 0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
