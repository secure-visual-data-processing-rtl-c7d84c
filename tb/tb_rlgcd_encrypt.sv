// tb_rlgcd_encrypt: checks the encryption block against the flat Boolean
// reference model. In the first key cycles after reset every one of the 256
// pixel values is applied (the clock is held while they are swept, since
// the output is combinational), and the test checks each result and that
// the 256 results are all different (the cipher is a bijection for every
// key). Then 1000 random pixels are applied one per clock, checking the
// output in the same cycle (zero-cycle latency) with the key advancing.
module tb_rlgcd_encrypt;
  import rlgcd_ref_pkg::*;
  logic       clk = 1'b0, rst = 1'b1;
  logic [7:0] a, e, key;
  logic [255:0] seen;
  int checks = 0, failures = 0;

  rlgcd_encrypt dut (.clk(clk), .rst(rst), .a(a), .e(e));

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

  task automatic check_pix();
    #1;
    checks++;
    if (e !== ref_encrypt(a, key)) begin
      failures++;
      $display("FAIL a=%h key=%h e=%h exp=%h", a, key, e, ref_encrypt(a, key));
    end
  endtask

  initial begin
    a = '0;
    tick(); tick();
    rst = 1'b0;
    key = REF_SEED;
    // exhaustive sweeps for the first four keys
    for (int k = 0; k < 4; k++) begin
      seen = '0;
      for (int v = 0; v < 256; v++) begin
        a = 8'(v);
        check_pix();
        seen[e] = 1'b1;
      end
      checks++;
      if (seen !== {256{1'b1}}) begin
        failures++;
        $display("FAIL key=%h: encryption is not a bijection", key);
      end
      tick();
      key = ref_lfsr_next(key);
    end
    // random stream, one pixel per clock
    for (int n = 0; n < 1000; n++) begin
      a = 8'($urandom);
      check_pix();
      tick();
      key = ref_lfsr_next(key);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
