// tb_aes_decrypt - self-checking test of the iterative AES-128 decryption core.
// Checks the published AES-128 vectors (key 000102..0f with block
// 00112233..ff, and the FIPS-197 appendix B example), then 40 blocks with
// random data and a different random key each, compared with the reference
// model. The clock count from the accepting edge to out_valid must be 21
// for every block. In the random part out_ready is withheld at random to
// check that the result is held, and a new block is offered as soon as the
// core is ready again.
module tb_aes_decrypt;
  import aes_pkg::block_t;
  localparam int LATENCY = 21;
  localparam int N = 42;
  int checks = 0, failures = 0;

  logic   clk = 0;
  logic   rst_n, in_valid, in_ready, out_valid, out_ready;
  block_t blk, key, result;
  block_t pt [N], key_v [N], exp_v [N];

  always #5 clk = ~clk;

  aes_decrypt dut (.clk, .rst_n, .in_valid, .in_ready, .block(blk), .key,
          .out_valid, .out_ready, .result);

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Driver: offers block i until accepted.
  int sent = 0;
  longint t_load [N];
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    rst_n = 0; in_valid = 0; out_ready = 0; blk = '0; key = '0;
    aes_ref_pkg::init();
    pt[0] = 128'h69c4e0d86a7b0430d8cdb78070b4c55a; key_v[0] = 128'h000102030405060708090a0b0c0d0e0f; exp_v[0] = 128'h00112233445566778899aabbccddeeff;
    pt[1] = 128'h3925841d02dc09fbdc118597196a0b32; key_v[1] = 128'h2b7e151628aed2a6abf7158809cf4f3c; exp_v[1] = 128'h3243f6a8885a308d313198a2e0370734;
    for (int i = 2; i < N; i++) begin
      pt[i]    = aes_ref_pkg::rand128();
      key_v[i] = aes_ref_pkg::rand128();
    end
    // the published vectors are also checked against the reference model
    for (int i = 0; i < 2; i++) begin
      checks++;
      if (aes_ref_pkg::decrypt(pt[i], key_v[i]) !== exp_v[i]) begin
        failures++; $display("FAIL reference model vector %0d", i);
      end
    end
    for (int i = 2; i < N; i++) exp_v[i] = aes_ref_pkg::decrypt(pt[i], key_v[i]);
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (sent < N) begin
      @(negedge clk);
      in_valid = 1; blk = pt[sent]; key = key_v[sent];
      @(posedge clk);
      if (in_ready) begin
        t_load[sent] = cyc;
        sent++;
      end
    end
    @(negedge clk);
    in_valid = 0;
  end

  // Monitor: takes results, sometimes late.
  int got = 0;
  initial begin
    @(posedge rst_n);
    while (got < N) begin
      @(negedge clk);
      out_ready = (got < 2) ? 1'b1 : ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (out_valid && out_ready) begin
        checks++;
        if (result !== exp_v[got]) begin
          failures++;
          $display("FAIL block %0d got=%032h exp=%032h", got, result, exp_v[got]);
        end
        got++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Latency: out_valid must rise exactly LATENCY clocks after the load.
  int lat_idx = 0;
  logic ov_q = 0;
  always @(posedge clk) begin
    ov_q <= out_valid && !(out_ready);
    if (rst_n && out_valid && !ov_q && lat_idx < N) begin
      checks++;
      if (cyc - t_load[lat_idx] != LATENCY) begin
        failures++;
        $display("FAIL latency block %0d: %0d clocks", lat_idx, cyc - t_load[lat_idx]);
      end
      lat_idx++;
    end
  end
endmodule
