// rlgcd_top: reversible-logic image cipher, encryption and decryption in
// loop-back.
// Each clock one plain pixel enters. lsb_watermark optionally writes a
// watermark bit into its LSB; rlgcd_encrypt turns the result into the
// encrypted pixel enc_out; rlgcd_decrypt, fed directly by enc_out, gives
// back the watermarked pixel dec_out, whose LSB is the recovered watermark
// bit wm_out. Encryptor and decryptor each hold their own key LFSR; both
// are reset by rst and therefore run through the same key sequence.
// Interface: clk, rst (synchronous, active high), pix_in, wm_en, wm_bit in;
// enc_out, dec_out, wm_out out.
// Timing: all outputs are combinational from the inputs of the same cycle
// and the current key; the key advances on every clock edge after reset.
// Feeding the encryptor output straight into the decryptor follows the
// design description; the watermark placement is this design's choice.
module rlgcd_top
  import rlgcd_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  pixel_t pix_in,
  input  logic   wm_en,
  input  logic   wm_bit,
  output pixel_t enc_out,
  output pixel_t dec_out,
  output logic   wm_out
);
  pixel_t marked;

  lsb_watermark u_wm  (.pix_in(pix_in), .wm_en(wm_en), .wm_bit(wm_bit), .pix_out(marked));
  rlgcd_encrypt u_enc (.clk(clk), .rst(rst), .a(marked), .e(enc_out));
  rlgcd_decrypt u_dec (.clk(clk), .rst(rst), .e(enc_out), .d(dec_out));

  always_comb wm_out = dec_out[0];
endmodule
