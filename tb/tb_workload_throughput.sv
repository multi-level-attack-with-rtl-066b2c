// tb_workload_throughput - streaming workload through aes_vkp_top at its
// default size: 32 blocks are pushed back-to-back through the encryption
// channel and then through the decryption channel with the outputs always
// ready, once in fixed-key mode and once with a new sub key per block. The
// steady-state spacing between results must be 11 clocks for encryption and
// 21 for decryption, and every result is checked against the reference model.
// The throughput this gives at 348.295 MHz is printed for comparison with a
// 2.86 Gbit/s target.
module tb_workload_throughput;
  import aes_pkg::block_t;
  localparam int    N      = 32;
  localparam real   F_MHZ  = 348.295;
  int checks = 0, failures = 0;

  logic   clk = 0;
  logic   rst_n, key_load, vkp_en;
  block_t sym_key;
  logic   enc_in_valid, enc_in_ready, enc_out_valid, enc_out_ready;
  logic   dec_in_valid, dec_in_ready, dec_out_valid, dec_out_ready;
  block_t enc_in_block, enc_out_block, dec_in_block, dec_out_block;

  always #5 clk = ~clk;

  aes_vkp_top dut (.*);

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  block_t pt [N], ct [N];

  // Streams N blocks through one channel; returns the clock count between
  // the first and the last result.
  task automatic stream(input bit dec, input bit vkp, input block_t k, output longint span);
    int sent = 0, got = 0;
    longint t_first = 0;
    block_t sk = k;
    fork
      begin
        while (sent < N) begin
          @(negedge clk);
          if (dec) begin dec_in_valid = 1; dec_in_block = ct[sent]; end
          else     begin enc_in_valid = 1; enc_in_block = pt[sent]; end
          @(posedge clk);
          if (dec ? dec_in_ready : enc_in_ready) sent++;
        end
        @(negedge clk);
        enc_in_valid = 0; dec_in_valid = 0;
      end
      begin
        while (got < N) begin
          @(posedge clk);
          if (dec ? dec_out_valid : enc_out_valid) begin
            block_t exp;
            if (vkp) sk = aes_ref_pkg::lfsr(sk, 128);
            if (got == 0) t_first = cyc;
            span = cyc - t_first;
            if (dec) exp = pt[got];
            else     exp = aes_ref_pkg::encrypt(pt[got], vkp ? sk : k);
            checks++;
            if ((dec ? dec_out_block : enc_out_block) !== exp) begin
              failures++;
              $display("FAIL %s block %0d", dec ? "dec" : "enc", got);
            end
            if (!dec) ct[got] = enc_out_block;
            got++;
          end
        end
      end
    join
  endtask

  task automatic run_mode(input bit vkp);
    block_t k;
    longint span;
    real per_blk, gbps;
    string dir_s, mode_s;
    k = aes_ref_pkg::rand128();
    @(negedge clk);
    key_load = 1; sym_key = k; vkp_en = vkp;
    @(negedge clk);
    key_load = 0;
    for (int i = 0; i < N; i++) pt[i] = aes_ref_pkg::rand128();
    for (int d = 0; d < 2; d++) begin
      stream(d[0], vkp, k, span);
      per_blk = real'(span) / real'(N - 1);
      gbps    = 128.0 * F_MHZ / per_blk / 1000.0;
      dir_s  = d ? "decryption" : "encryption";
      mode_s = vkp ? "variable-key" : "fixed-key";
      $display("%s, %s: %0.1f clocks/block, %0.2f Gbit/s at %0.3f MHz",
               dir_s, mode_s, per_blk, gbps, F_MHZ);
      checks++;
      if (span != (N - 1) * (d ? 21 : 11)) begin
        failures++;
        $display("FAIL spacing %0d clocks over %0d blocks", span, N - 1);
      end
    end
  endtask

  initial begin
    rst_n = 0; key_load = 0; vkp_en = 0; sym_key = '0;
    enc_in_valid = 0; enc_in_block = '0; enc_out_ready = 1;
    dec_in_valid = 0; dec_in_block = '0; dec_out_ready = 1;
    aes_ref_pkg::init();
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_mode(0);
    run_mode(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
