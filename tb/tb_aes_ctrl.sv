// tb_aes_ctrl - self-checking test of the round sequencer in both of its
// configurations: with a 10-clock preparation phase (as the decryption core
// uses it) and without one (as the encryption core uses it). For every block
// the phase flags, the in-phase counter and the 'last' flag are compared
// clock by clock with the expected schedule; the result must then stay valid
// while out_ready is held low, and a new block must be taken in the same
// clock as the old result (back-to-back operation).
module tb_aes_ctrl;
  localparam int PRE = 10;
  localparam int NR  = 10;
  int checks = 0, failures = 0;

  logic clk = 0;
  logic rst_n;
  logic in_valid, out_ready;
  logic in_ready [2], out_valid [2], load [2], pre [2], run [2], last [2];
  logic [3:0] cnt [2];

  always #5 clk = ~clk;

  aes_ctrl #(.PRE_CYCLES(PRE), .NR(NR)) dut_pre (
    .clk, .rst_n, .in_valid, .in_ready(in_ready[0]), .out_valid(out_valid[0]),
    .out_ready, .load(load[0]), .pre(pre[0]), .run(run[0]), .cnt(cnt[0]), .last(last[0]));
  aes_ctrl #(.PRE_CYCLES(0), .NR(NR)) dut_nopre (
    .clk, .rst_n, .in_valid, .in_ready(in_ready[1]), .out_valid(out_valid[1]),
    .out_ready, .load(load[1]), .pre(pre[1]), .run(run[1]), .cnt(cnt[1]), .last(last[1]));

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_bit(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%0b exp=%0b at %0t", what, got, exp, $time);
    end
  endtask

  // Runs one block through instance d (p = its preparation length), holding
  // the result for 'hold' clocks before taking it. Sampling is at negedge.
  task automatic one_block(input int d, input int p, input int hold, input bit back_to_back);
    in_valid = 1;
    #1;
    expect_bit("load", load[d], 1'b1);
    @(negedge clk);
    in_valid = 0;
    for (int k = 1; k <= p + NR; k++) begin
      expect_bit("pre",  pre[d], k <= p);
      expect_bit("run",  run[d], k > p);
      expect_bit("in_ready busy", in_ready[d], 1'b0);
      expect_bit("last", last[d], (k == p) || (k == p + NR));
      checks++;
      if (cnt[d] !== 4'(k <= p ? k : k - p)) begin
        failures++;
        $display("FAIL cnt=%0d at phase clock %0d", cnt[d], k);
      end
      @(negedge clk);
    end
    for (int h = 0; h < hold; h++) begin
      expect_bit("out_valid held", out_valid[d], 1'b1);
      expect_bit("no accept while held", in_ready[d], 1'b0);
      @(negedge clk);
    end
    expect_bit("out_valid", out_valid[d], 1'b1);
    out_ready = 1;
    if (back_to_back) in_valid = 1;
    #1;
    if (back_to_back) expect_bit("back-to-back load", load[d], 1'b1);
    @(negedge clk);
    out_ready = 0;
    in_valid = 0;
  endtask

  initial begin
    rst_n = 0; in_valid = 0; out_ready = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // Both instances see the same inputs; check each one in turn.
    one_block(0, PRE, 3, 0);
    // instance 0 is now idle, instance 1 finished long ago and holds its result
    expect_bit("idle after take", out_valid[0], 1'b0);
    expect_bit("idle ready", in_ready[0], 1'b1);
    out_ready = 1;
    @(negedge clk);
    out_ready = 0;
    one_block(1, 0, 2, 0);
    // instance 1 back-to-back: the next block is taken in the clock the
    // result leaves, so the second block must start at once
    one_block(1, 0, 0, 1);
    expect_bit("second block running", run[1], 1'b1);
    checks++;
    if (cnt[1] !== 4'd1) begin failures++; $display("FAIL back-to-back cnt=%0d", cnt[1]); end
    repeat (NR) @(negedge clk);
    expect_bit("second block done after NR+1 clocks", out_valid[1], 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
