// tb_rlgcd_decrypt: checks the decryption block. The testbench encrypts
// with the reference model and checks that the block returns the original
// pixel, and separately that its output matches the reference decryption
// (an exhaustive search over all pixels). For the first four keys all 256
// encrypted values are swept with the clock held; then 1000 random pixels
// follow, one per clock, checked in the same cycle.
module tb_rlgcd_decrypt;
  import rlgcd_ref_pkg::*;
  logic       clk = 1'b0, rst = 1'b1;
  logic [7:0] e, d, key, plain;
  int checks = 0, failures = 0;

  rlgcd_decrypt dut (.clk(clk), .rst(rst), .e(e), .d(d));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d watchdog", checks, failures);
    $finish;
  end

  task automatic tick();
    #5 clk = 1'b1;
    #5 clk = 1'b0;
  endtask

  task automatic check_plain();
    e = ref_encrypt(plain, key);
    #1;
    checks++;
    if (d !== plain) begin
      failures++;
      $display("FAIL plain=%h key=%h e=%h d=%h", plain, key, e, d);
    end
  endtask

  initial begin
    e = '0;
    tick(); tick();
    rst = 1'b0;
    key = REF_SEED;
    for (int k = 0; k < 4; k++) begin
      for (int v = 0; v < 256; v++) begin
        plain = 8'(v);
        check_plain();
        // same output, approached from the cipher side
        e = 8'(v);
        #1;
        checks++;
        if (d !== ref_decrypt(e, key)) begin
          failures++;
          $display("FAIL e=%h key=%h d=%h exp=%h", e, key, d, ref_decrypt(e, key));
        end
      end
      tick();
      key = ref_lfsr_next(key);
    end
    for (int n = 0; n < 1000; n++) begin
      plain = 8'($urandom);
      check_plain();
      tick();
      key = ref_lfsr_next(key);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
