// rlgcd_encrypt: encryption block of the reversible-logic image cipher.
// One 8-bit pixel a[7:0] is scrambled by a network of reversible gates and
// then XORed with the current key of an LFSR:
//   - a[3:0] enters the lower SCL gate, a[7:4] the upper SCL gate;
//   - the three low outputs of the lower SCL gate drive one Toffoli gate,
//     the three high outputs of the upper SCL gate another;
//   - the remaining output of each SCL gate (lower bit 3, upper bit 4)
//     drives the Feynman gate;
//   - each Toffoli gate is followed by a Fredkin gate;
//   - Fredkin and Feynman outputs are XORed with the key to give e[7:0]:
//     e[2:0] lower Fredkin, e[3] Feynman P, e[4] Feynman Q, e[7:5] upper
//     Fredkin.
// Every gate is reversible, so the map from a to e is a bijection for each
// key, and rlgcd_decrypt undoes it.
// Interface: clk, rst (synchronous, active high, reloads the key LFSR),
// a (plain pixel), e (encrypted pixel).
// Timing: e is combinational from a (four gate levels and the key XOR);
// the key changes on every clock edge, so one pixel is taken per clock.
// The gate types, their order and the split into nibbles follow the design
// description; which output bit of each gate is wired where, and the use of
// one Fredkin gate per Toffoli gate, are this design's choices.
module rlgcd_encrypt
  import rlgcd_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  pixel_t a,
  output pixel_t e
);
  pixel_t     key;
  logic [3:0] lo_scl, hi_scl;   // SCL outputs, index 0 = gate output P
  logic [2:0] lo_tof, hi_tof;   // Toffoli outputs
  logic [2:0] lo_fre, hi_fre;   // Fredkin outputs
  logic       fey_p, fey_q;     // Feynman outputs
  pixel_t     scrambled;

  lfsr_key_gen u_lfsr (.clk(clk), .rst(rst), .key(key));

  // Stage 1: SCL gates on the two nibbles.
  scl_gate u_scl_lo (.a(a[0]), .b(a[1]), .c(a[2]), .d(a[3]),
                     .p(lo_scl[0]), .q(lo_scl[1]), .r(lo_scl[2]), .s(lo_scl[3]));
  scl_gate u_scl_hi (.a(a[4]), .b(a[5]), .c(a[6]), .d(a[7]),
                     .p(hi_scl[0]), .q(hi_scl[1]), .r(hi_scl[2]), .s(hi_scl[3]));

  // Stage 2: Toffoli gates on three bits of each SCL gate, Feynman gate on
  // the fourth bit of each.
  toffoli_gate u_tof_lo (.a(lo_scl[0]), .b(lo_scl[1]), .c(lo_scl[2]),
                         .p(lo_tof[0]), .q(lo_tof[1]), .r(lo_tof[2]));
  toffoli_gate u_tof_hi (.a(hi_scl[1]), .b(hi_scl[2]), .c(hi_scl[3]),
                         .p(hi_tof[0]), .q(hi_tof[1]), .r(hi_tof[2]));
  feynman_gate u_fey (.a(lo_scl[3]), .b(hi_scl[0]), .p(fey_p), .q(fey_q));

  // Stage 3: Fredkin gates after the Toffoli gates.
  fredkin_gate u_fre_lo (.c_in(lo_tof[0]), .i1(lo_tof[1]), .i2(lo_tof[2]),
                         .c_out(lo_fre[0]), .o1(lo_fre[1]), .o2(lo_fre[2]));
  fredkin_gate u_fre_hi (.c_in(hi_tof[0]), .i1(hi_tof[1]), .i2(hi_tof[2]),
                         .c_out(hi_fre[0]), .o1(hi_fre[1]), .o2(hi_fre[2]));

  // Stage 4: key XOR.
  always_comb begin
    scrambled = {hi_fre, fey_q, fey_p, lo_fre};
    e         = scrambled ^ key;
  end
endmodule
