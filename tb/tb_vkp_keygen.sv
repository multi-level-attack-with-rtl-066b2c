// tb_vkp_keygen - self-checking test of the variable key pattern generator.
// For several random seeds (symmetric keys) it loads the seed, then advances
// the generator at random moments, and compares every sub key with a
// bit-serial LFSR model advanced 128 steps per key. It also checks that the
// first sub key is not the seed itself, that sub keys stay put without an
// advance, that seed_load wins over a simultaneous advance, and that
// successive sub keys differ.
module tb_vkp_keygen;
  int checks = 0, failures = 0;

  logic         clk = 0;
  logic         rst_n, seed_load, advance;
  logic [127:0] seed, sub_key, exp_key;

  always #5 clk = ~clk;

  vkp_keygen dut (.clk, .rst_n, .seed_load, .seed, .advance, .sub_key);

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_key(input string what);
    checks++;
    if (sub_key !== exp_key) begin
      failures++;
      $display("FAIL %s got=%032h exp=%032h", what, sub_key, exp_key);
    end
  endtask

  initial begin
    logic [127:0] prev;
    rst_n = 0; seed_load = 0; advance = 0; seed = '0;
    repeat (2) @(negedge clk);
    exp_key = '0;
    expect_key("reset");
    rst_n = 1;
    for (int s = 0; s < 8; s++) begin
      seed = aes_ref_pkg::rand128();
      seed_load = 1;
      advance = (s == 3);             // seed_load has priority
      @(negedge clk);
      seed_load = 0; advance = 0;
      exp_key = aes_ref_pkg::lfsr(seed, 128);
      expect_key("first sub key");
      checks++;
      if (sub_key === seed) begin failures++; $display("FAIL sub key equals seed"); end
      for (int k = 0; k < 30; k++) begin
        prev = sub_key;
        repeat ($urandom_range(0, 2)) begin
          @(negedge clk);
          expect_key("hold without advance");
        end
        advance = 1;
        @(negedge clk);
        advance = 0;
        exp_key = aes_ref_pkg::lfsr(exp_key, 128);
        expect_key("next sub key");
        checks++;
        if (sub_key === prev) begin failures++; $display("FAIL sub key repeated"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
