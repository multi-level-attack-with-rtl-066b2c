// tb_sbox - exhaustive self-checking test of the forward S-box: all 256 inputs
// are compared with a table generated by the reference model, plus a few
// entries from the published AES S-box written out by hand.
module tb_sbox;
  int checks = 0, failures = 0;
  logic [7:0] din, dout;

  sbox dut (.in_byte(din), .out_byte(dout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [7:0] x, input logic [7:0] exp);
    din = x;
    #1;
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("FAIL in=%02h got=%02h exp=%02h", x, dout, exp);
    end
  endtask

  initial begin
    aes_ref_pkg::init();
    for (int i = 0; i < 256; i++) check(8'(i), aes_ref_pkg::sbox_tab[i]);
    check(8'h00, 8'h63); check(8'h01, 8'h7c); check(8'h53, 8'hed);
    check(8'h19, 8'hd4); check(8'hff, 8'h16); check(8'h10, 8'hca);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
