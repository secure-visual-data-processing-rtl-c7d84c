// rlgcd_decrypt: decryption block of the reversible-logic image cipher.
// The exact reverse of rlgcd_encrypt: the encrypted pixel e[7:0] is first
// XORed with the key from an LFSR identical to the encryptor's, then runs
// backwards through the gate network. Every gate used is its own inverse,
// so the reverse network has the same gates in the opposite order:
//   - bits [2:0] and [7:5] pass a Fredkin gate, then a Toffoli gate;
//   - bits [3] and [4] pass the Feynman gate, whose outputs are bit 3 of the
//     lower nibble and bit 0 of the upper nibble;
//   - each rebuilt nibble passes an SCL gate and gives d[3:0] and d[7:4].
// Interface: clk, rst (synchronous, active high, reloads the key LFSR),
// e (encrypted pixel), d (decrypted pixel).
// Timing: d is combinational from e. The key advances on every clock edge,
// so the decryptor must be reset together with the encryptor and be given
// the pixels in the same cycles, one per clock, for the keys to line up.
// The order key XOR, Fredkin, Toffoli/Feynman, SCL follows the design
// description; the bit wiring mirrors the choices made in rlgcd_encrypt.
module rlgcd_decrypt
  import rlgcd_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  pixel_t e,
  output pixel_t d
);
  pixel_t     key;
  pixel_t     unkeyed;
  logic [2:0] lo_fre, hi_fre;   // Fredkin outputs (inverse network)
  logic [2:0] lo_tof, hi_tof;   // Toffoli outputs
  logic [3:0] lo_scl, hi_scl;   // rebuilt SCL-gate outputs of the encryptor
  logic [3:0] lo_pix, hi_pix;   // recovered nibbles

  lfsr_key_gen u_lfsr (.clk(clk), .rst(rst), .key(key));

  // Stage 1: remove the key.
  always_comb unkeyed = e ^ key;

  // Stage 2: Fredkin gates undo the encryptor's Fredkin gates.
  fredkin_gate u_fre_lo (.c_in(unkeyed[0]), .i1(unkeyed[1]), .i2(unkeyed[2]),
                         .c_out(lo_fre[0]), .o1(lo_fre[1]), .o2(lo_fre[2]));
  fredkin_gate u_fre_hi (.c_in(unkeyed[5]), .i1(unkeyed[6]), .i2(unkeyed[7]),
                         .c_out(hi_fre[0]), .o1(hi_fre[1]), .o2(hi_fre[2]));

  // Stage 3: Toffoli gates and the Feynman gate.
  toffoli_gate u_tof_lo (.a(lo_fre[0]), .b(lo_fre[1]), .c(lo_fre[2]),
                         .p(lo_tof[0]), .q(lo_tof[1]), .r(lo_tof[2]));
  toffoli_gate u_tof_hi (.a(hi_fre[0]), .b(hi_fre[1]), .c(hi_fre[2]),
                         .p(hi_tof[0]), .q(hi_tof[1]), .r(hi_tof[2]));
  feynman_gate u_fey (.a(unkeyed[3]), .b(unkeyed[4]), .p(lo_scl[3]), .q(hi_scl[0]));

  always_comb begin
    lo_scl[2:0] = lo_tof;
    hi_scl[3:1] = hi_tof;
  end

  // Stage 4: SCL gates give back the two nibbles.
  scl_gate u_scl_lo (.a(lo_scl[0]), .b(lo_scl[1]), .c(lo_scl[2]), .d(lo_scl[3]),
                     .p(lo_pix[0]), .q(lo_pix[1]), .r(lo_pix[2]), .s(lo_pix[3]));
  scl_gate u_scl_hi (.a(hi_scl[0]), .b(hi_scl[1]), .c(hi_scl[2]), .d(hi_scl[3]),
                     .p(hi_pix[0]), .q(hi_pix[1]), .r(hi_pix[2]), .s(hi_pix[3]));

  always_comb d = {hi_pix, lo_pix};
endmodule
