// lsb_watermark: least-significant-bit watermark embedder.
// When wm_en is 1 the LSB of the pixel is replaced by the watermark bit
// wm_bit, so a one-bit-per-pixel watermark image rides in the lowest bit
// plane while the visible image changes by at most one grey level. When
// wm_en is 0 the pixel passes unchanged. The watermark is read back as the
// LSB of the pixel after decryption.
// Interface: pix_in, wm_en, wm_bit in; pix_out out. Purely combinational.
// LSB watermarking is part of the design description; embedding it in the
// plain pixel ahead of the encryptor and the wm_en control are this
// design's choices.
module lsb_watermark
  import rlgcd_pkg::*;
(
  input  pixel_t pix_in,
  input  logic   wm_en,
  input  logic   wm_bit,
  output pixel_t pix_out
);
  always_comb begin
    pix_out = pix_in;
    if (wm_en) pix_out[0] = wm_bit;
  end
endmodule
