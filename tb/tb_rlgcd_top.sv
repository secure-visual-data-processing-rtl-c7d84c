// tb_rlgcd_top: end-to-end test of the image cipher at its default sizes.
// Streams two generated images through the top, one 8-bit pixel per clock:
// a 256x256 grey-scale image with a one-bit checkerboard watermark embedded
// in its LSBs, and a 128x128 colour image (R, G, B bytes in turn) without
// a watermark. For each pixel it checks in the same cycle that the
// encrypted value matches the reference model, that the decrypted value is
// the (watermarked) plain pixel and that the watermark bit comes back.
// A reset is applied between the images to show that both key generators
// restart together. Per image it also checks that the cipher image does
// not resemble the plain one (few pixels left equal, most byte values
// used). Mechanisms counted, each must occur: watermark embedded, watermark
// off, key stream wrapped past its 255-pixel period, reset mid-stream.
module tb_rlgcd_top;
  import rlgcd_ref_pkg::*;
  logic       clk = 1'b0, rst = 1'b1;
  logic [7:0] pix_in, enc_out, dec_out, key, marked;
  logic       wm_en, wm_bit, wm_out;
  int checks = 0, failures = 0;
  int n_wm_on = 0, n_wm_off = 0, n_wraps = 0, n_resets = 0;
  int key_count;
  int unchanged;
  logic [255:0] used;

  rlgcd_top dut (.clk(clk), .rst(rst), .pix_in(pix_in), .wm_en(wm_en), .wm_bit(wm_bit),
                 .enc_out(enc_out), .dec_out(dec_out), .wm_out(wm_out));

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d watchdog", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s pix=%h key=%h enc=%h dec=%h t=%0t", what, pix_in, key, enc_out, dec_out, $time);
    end
  endtask

  task automatic tick();
    #5 clk = 1'b1;
    #5 clk = 1'b0;
  endtask

  task automatic do_reset();
    rst = 1'b1;
    tick();
    rst = 1'b0;
    key = REF_SEED;
    key_count = 0;
    n_resets++;
  endtask

  // One pixel: apply, check in the same cycle, clock.
  task automatic send(input logic [7:0] p, input logic en, input logic bit_in);
    pix_in = p;
    wm_en  = en;
    wm_bit = bit_in;
    #1;
    marked = en ? {p[7:1], bit_in} : p;
    check("encrypted pixel", enc_out == ref_encrypt(marked, key));
    check("decrypted pixel", dec_out == marked);
    if (en) begin
      check("watermark bit", wm_out == bit_in);
      n_wm_on++;
    end else begin
      n_wm_off++;
    end
    if (enc_out == marked) unchanged++;
    used[enc_out] = 1'b1;
    tick();
    key = ref_lfsr_next(key);
    key_count++;
    if (key_count == 255) begin
      n_wraps++;
      key_count = 0;
    end
  endtask

  task automatic check_image(input string name, input int pixels);
    // an 8-bit cipher leaves about 1/256 of the pixels unchanged by chance
    check({name, ": cipher image too close to plain image"}, unchanged < pixels / 64);
    check({name, ": cipher image uses too few byte values"}, $countones(used) > 240);
    $display("%s: %0d pixels, %0d unchanged, %0d byte values used", name, pixels,
             unchanged, $countones(used));
  endtask

  initial begin
    pix_in = '0; wm_en = 1'b0; wm_bit = 1'b0;
    tick();
    do_reset();

    // 256x256 grey-scale image with an 8x8-cell checkerboard watermark
    unchanged = 0; used = '0;
    for (int y = 0; y < 256; y++)
      for (int x = 0; x < 256; x++)
        send(8'((x + y) / 2 + ((x * y) >> 10)), 1'b1, 1'((x >> 3) ^ (y >> 3)));
    check_image("grey 256x256", 65536);

    do_reset();

    // 128x128 colour image, R, G, B bytes in turn, no watermark
    unchanged = 0; used = '0;
    for (int y = 0; y < 128; y++)
      for (int x = 0; x < 128; x++) begin
        send(8'(2 * x), 1'b0, 1'b0);
        send(8'(2 * y), 1'b0, 1'b0);
        send(8'(255 - x - y), 1'b0, 1'b0);
      end
    check_image("colour 128x128", 49152);

    $display("mechanisms: watermark_on=%0d watermark_off=%0d key_wraps=%0d resets=%0d",
             n_wm_on, n_wm_off, n_wraps, n_resets);
    check("watermark embedding exercised", n_wm_on > 0);
    check("watermark bypass exercised", n_wm_off > 0);
    check("key period wrap exercised", n_wraps > 0);
    check("reset mid-stream exercised", n_resets > 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
