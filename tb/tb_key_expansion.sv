// tb_key_expansion - self-checking test of one forward key-schedule step: for the
// FIPS-197 example key and 50 random keys every round r = 1..10 is checked
// against the round keys the reference model expands ahead of time.
module tb_key_expansion;
  import aes_pkg::block_t;
  int checks = 0, failures = 0;
  block_t kin, kout;
  logic [3:0] round;

  key_expansion dut (.key_in(kin), .round(round), .key_out(kout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_key(input block_t key);
    block_t rk [11];
    aes_ref_pkg::expand(key, rk);
    for (int r = 1; r <= 10; r++) begin
      kin = rk[r-1];
      round = 4'(r);
      #1;
      checks++;
      if (kout !== rk[r]) begin
        failures++;
        $display("FAIL key=%032h r=%0d got=%032h exp=%032h", key, r, kout, rk[r]);
      end
    end
  endtask

  initial begin
    block_t rk [11];
    aes_ref_pkg::init();
    // Published values for key 2b7e1516..: round keys 1 and 10.
    aes_ref_pkg::expand(128'h2b7e151628aed2a6abf7158809cf4f3c, rk);
    checks++;
    if (rk[1] !== 128'ha0fafe1788542cb123a339392a6c7605 ||
        rk[10] !== 128'hd014f9a8c9ee2589e13f0cc8b6630ca6) begin
      failures++;
      $display("FAIL reference key schedule");
    end
    check_key(128'h2b7e151628aed2a6abf7158809cf4f3c);
    check_key(128'h000102030405060708090a0b0c0d0e0f);
    for (int i = 0; i < 50; i++) check_key(aes_ref_pkg::rand128());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
