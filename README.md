# Reversible-logic image cipher (RLGCD)

This is a small stream cipher for image pixels, built only from reversible
logic gates. Each 8-bit pixel (one grey level, or one colour channel) goes
through a fixed network of reversible gates: SCL, Toffoli, Feynman and
Fredkin. The result is XORed with an 8-bit key from a linear feedback shift
register (LFSR). Every gate maps its inputs one-to-one onto its outputs, so
the whole network is a permutation of the 256 pixel values and can be run
backwards. Run backwards, with the same key, it is the decryptor.
A least-significant-bit (LSB) watermark can be written into each plain
pixel before encryption. It reappears in the decrypted pixel.

The motivation for reversible gates is low power: a gate that loses no
information need not, in principle, dissipate the kT·ln2 per erased bit that
Landauer's bound sets for ordinary logic. In this RTL the gates are ordinary
synthesizable logic. The reversible structure shows up as the design's
algebra (bijective, self-inverse stages), not as a physical property of the
netlist.

The cipher is weak by modern standards. It is a fixed 8-bit permutation,
followed by a key stream with a period of 255 pixels. Treat it as a
demonstration of reversible-logic design, not as a means of protecting data.

## The gates

All four gates are their own inverse: feed the outputs back in and you get
the inputs.

| gate    | size | outputs                                        | module          |
|---------|------|------------------------------------------------|-----------------|
| Feynman | 2x2  | P = A, Q = A ⊕ B                               | `feynman_gate`  |
| Toffoli | 3x3  | P = A, Q = B, R = C ⊕ AB                       | `toffoli_gate`  |
| Fredkin | 3x3  | C passes; I1, I2 swapped when C = 1            | `fredkin_gate`  |
| SCL     | 4x4  | P = A, Q = B, R = C, S = D ⊕ (A + B + C)       | `scl_gate`      |

The Fredkin gate is written as S = (I1 ⊕ I2)·C, O1 = I1 ⊕ S, O2 = I2 ⊕ S.
The SCL gate is the 4x4 gate of that name from the reversible-logic
literature. Its equations are this design's reading; the rest of the
cipher's description only names it.

## The encryption network

This part takes the most care to follow. The pixel is split into nibbles,
and each nibble runs through SCL → Toffoli → Fredkin. One bit of each
nibble leaves that chain after the SCL gate and goes through the shared
Feynman gate instead:

```
 a[0..3] ─► SCL(lo) ─ P,Q,R ─► Toffoli(lo) ─► Fredkin(lo) ─► scr[0..2]
                    └ S ───────────────┐
                                       ├─► Feynman ─ P ─► scr[3]
                    ┌ P ───────────────┘           └ Q ─► scr[4]
 a[4..7] ─► SCL(hi) ─ Q,R,S ─► Toffoli(hi) ─► Fredkin(hi) ─► scr[5..7]

 e = scr ⊕ key
```

Bit by bit, with gate inputs in the order (A, B, C, D) or (C, I1, I2):

* SCL(lo) takes a0, a1, a2, a3. SCL(hi) takes a4, a5, a6, a7.
* Toffoli(lo) takes SCL(lo) P, Q, R. Toffoli(hi) takes SCL(hi) Q, R, S.
* Feynman takes A = SCL(lo) S and B = SCL(hi) P.
* Each Fredkin gate takes its Toffoli gate's P as the control and Q, R as
  the data pair.
* The scrambled word is `{Fredkin(hi) O2,O1,C, Feynman Q, Feynman P,
  Fredkin(lo) O2,O1,C}`, bit 7 down to bit 0.

Some things follow the design description: the nibble split, the gate types
and their order, and the final key XOR. Some are this design's own choices,
because the description gives none:

* which gate pin each bit drives;
* the bit order of the result;
* one Fredkin gate per Toffoli gate. The description speaks of "the"
  Fredkin gate, but a 3-input gate cannot take the six Toffoli outputs.

Example with key 0xA5: a = 0xC3 scrambles to 0x5F and encrypts to 0xFA.
a = 0x00 scrambles to 0x00, so it encrypts to the key itself.

## Decryption

`rlgcd_decrypt` removes the key first (e ⊕ key). It then runs the same
gates in the opposite order: Fredkin, then Toffoli, then SCL on each
nibble, with the Feynman gate on bits 3 and 4. Each gate is self-inverse,
so no special inverse gates are needed. Feynman (P, Q) gives back SCL(lo)
S = P and SCL(hi) P = P ⊕ Q.

## Key stream and synchronisation

`lfsr_key_gen` is an 8-bit Fibonacci LFSR with polynomial
x⁸ + x⁶ + x⁵ + x⁴ + 1:

* The state shifts one place towards the MSB on every clock.
* The new bit 0 is s7 ⊕ s5 ⊕ s4 ⊕ s3.
* The whole state is the key of the current pixel.
* The polynomial is primitive, so the key visits all 255 non-zero values
  before it repeats.
* Reset (synchronous, active high) loads the seed, 0xA5. The key sequence
  starts 0xA5, 0x4A, 0x95, 0x2A, …
* An assertion flags an all-zero state, which would freeze the key.

The encryptor and the decryptor each hold their own LFSR. Decryption works
only if both register chains are reset in the same cycle and both see one
pixel on every clock after that. Nothing in the interface checks this. A
pixel dropped or inserted on one side shifts the key stream and garbles
every later pixel, until both sides are reset again.

The width, polynomial, seed and reset style are not given by the design
description; they are choices made here and can be set as parameters
(`WIDTH`, `TAPS`, `SEED`). The defaults come from `rlgcd_pkg`.

## Watermark

`lsb_watermark` replaces bit 0 of the plain pixel with `wm_bit` while
`wm_en` is 1. Otherwise the pixel passes through unchanged. The watermark is
embedded before encryption, so it is hidden in the cipher image and comes
back as bit 0 of the decrypted pixel (`wm_out` of the top). The design
description calls for LSB watermarking but does not place it. Its position,
the enable, and one watermark bit per pixel are choices made here.

## Top level: `rlgcd_top`

| port      | dir | width | meaning                                         |
|-----------|-----|-------|-------------------------------------------------|
| `clk`     | in  | 1     | clock, one pixel per rising edge                |
| `rst`     | in  | 1     | synchronous, active high; reloads both LFSRs    |
| `pix_in`  | in  | 8     | plain pixel                                     |
| `wm_en`   | in  | 1     | embed `wm_bit` in the pixel LSB                 |
| `wm_bit`  | in  | 1     | watermark bit for this pixel                    |
| `enc_out` | out | 8     | encrypted pixel                                 |
| `dec_out` | out | 8     | decrypted pixel (the pixel after watermarking)  |
| `wm_out`  | out | 1     | recovered watermark bit, `dec_out[0]`           |

The encryptor's output drives the decryptor directly, as a loop-back.

**Timing.** The pixel path is purely combinational. The only flip-flops are
the two 8-bit key registers: 16 bits in all. The key for a pixel is the one
held during the cycle in which the pixel is applied. Results are valid in
the same cycle, so the latency is zero clocks and the throughput is one
pixel per clock. Each direction has four gate levels plus the key XOR.

Coarse synthesis gives 22 word-level cells per direction: gates, XORs and
the LFSR feedback. The original FPGA implementation of this scheme was
reported at 12 LUTs for the encryptor and 14 LUTs for the decryptor, with
pad-to-pad delays of about 7 ns on a Spartan-3E. Those figures were not
reproduced with this RTL.

## Files

* `rtl/rlgcd_pkg.sv`: pixel type, LFSR taps and seed.
* `rtl/feynman_gate.sv`, `rtl/toffoli_gate.sv`, `rtl/fredkin_gate.sv`,
  `rtl/scl_gate.sv`: the gates.
* `rtl/lfsr_key_gen.sv`: the key register.
* `rtl/rlgcd_encrypt.sv`, `rtl/rlgcd_decrypt.sv`: the two directions.
* `rtl/lsb_watermark.sv`: the watermark embedder.
* `rtl/rlgcd_top.sv`: everything wired together.
* `tb/rlgcd_ref_pkg.sv`: the reference model. The network is written as
  flat Boolean equations. Decryption is an exhaustive search for the
  pre-image, so it does not reuse any RTL structure.
* `tb/tb_*.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M` and has a watchdog.

## Simulating

With Verilator 5, from the project root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/rlgcd_pkg.sv tb/rlgcd_ref_pkg.sv tb/tb_rlgcd_top.sv \
    --top-module tb_rlgcd_top --Mdir obj_top -o sim
./obj_top/sim
```

Replace `tb_rlgcd_top` with any other `tb_<module>` to test one block.

The gate testbenches are exhaustive. They compare against the truth
tables, and they check that each gate is self-inverse and a permutation.
The Fredkin testbench also checks that the number of ones is conserved.

The encryptor and decryptor testbenches:

* sweep all 256 pixels under each of the first four keys, holding the clock
  while they sweep;
* check that each sweep is a bijection;
* then stream 1000 random pixels, one per clock.

The top-level testbench runs at the default sizes and streams two generated
images: a 256x256 grey-scale image and a 128x128 RGB image. The sizes are
choices made here, since none are specified.

* The grey-scale image carries a checkerboard watermark.
* The RGB image is sent as three bytes per pixel, without a watermark.
* A reset between the two images shows that the two key streams restart
  together.

For every pixel the top-level testbench checks the cipher value, the round
trip and the watermark bit. For each image it checks that:

* under 1/64 of the pixels survive encryption unchanged (chance alone leaves
  about 1/256);
* more than 240 byte values occur in the cipher image.

It also checks that four mechanisms each occurred at least once: watermark
on, watermark off, a wrap of the key period, and a reset in mid-stream. The
whole run takes well under a second.

## Where this departs from, or adds to, the design description

* The SCL gate's equations, the pin-level wiring and the output bit order
  are this design's choices, as described above. Another wiring gives a
  different, equally reversible, cipher. Cipher text is therefore not
  expected to match any other implementation of the scheme bit for bit.
* The design description also discusses Peres, double Feynman and TSG
  gates, and a full adder built from Peres gates. The described cipher
  network does not use them, so they are not built.
* The LFSR width, polynomial, seed and reset polarity are choices made
  here.
* The watermark's position in the datapath and its `wm_en` control are
  choices made here.
* The design has no valid/ready handshake, because none is described. The
  key advances on every clock, so a source that cannot deliver a pixel
  every cycle must still clock in a (dummy) pixel, or hold the whole design
  in reset.
