// tb_lsb_watermark: exhaustive check of the LSB watermark embedder: with
// wm_en = 1 the LSB becomes wm_bit and the other seven bits are kept; with
// wm_en = 0 the pixel is unchanged.
module tb_lsb_watermark;
  logic [7:0] pix_in, pix_out, expect_pix;
  logic       wm_en, wm_bit;
  int checks = 0, failures = 0;

  lsb_watermark dut (.pix_in(pix_in), .wm_en(wm_en), .wm_bit(wm_bit), .pix_out(pix_out));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d watchdog", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1024; i++) begin
      pix_in = i[7:0];
      wm_bit = i[8];
      wm_en  = i[9];
      #1;
      expect_pix = wm_en ? ((pix_in & 8'hFE) | {7'd0, wm_bit}) : pix_in;
      checks++;
      if (pix_out !== expect_pix) begin
        failures++;
        $display("FAIL pix=%h en=%b bit=%b out=%h exp=%h", pix_in, wm_en, wm_bit, pix_out, expect_pix);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
