// tb_lfsr_key_gen: checks the key LFSR against a reference model for two
// full periods, checks that the period is 255 (all non-zero keys visited
// once), that the key is the seed in the first cycle after reset, and that
// a reset in mid-sequence restarts it.
module tb_lfsr_key_gen;
  import rlgcd_ref_pkg::*;
  logic       clk = 1'b0, rst = 1'b1;
  logic [7:0] key, model;
  logic [255:0] seen;
  int checks = 0, failures = 0;

  lfsr_key_gen dut (.clk(clk), .rst(rst), .key(key));

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d watchdog", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s key=%h model=%h t=%0t", what, key, model, $time);
    end
  endtask

  initial begin
    seen = '0;
    @(negedge clk); @(negedge clk);
    rst = 1'b0;
    model = REF_SEED;
    check("seed after reset", key == REF_SEED);
    for (int n = 0; n < 510; n++) begin
      if (n < 255) begin
        check("key repeated within one period", !seen[key]);
        seen[key] = 1'b1;
      end
      check("key sequence", key == model);
      check("key non-zero", key != 8'h00);
      @(negedge clk);
      model = ref_lfsr_next(model);
      if (n == 254) check("period is 255", key == REF_SEED);
    end
    // reset in mid-sequence
    rst = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    model = REF_SEED;
    check("seed after second reset", key == REF_SEED);
    @(negedge clk);
    model = ref_lfsr_next(model);
    check("sequence after second reset", key == model);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
