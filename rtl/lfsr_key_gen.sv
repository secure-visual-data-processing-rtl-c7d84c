// lfsr_key_gen: key-stream generator of the image cipher.
// A Fibonacci linear feedback shift register: every clock the state shifts
// one place towards the MSB and the XOR of the bits selected by TAPS enters
// at bit 0. The whole state is the key applied to the current pixel, so a
// new key is used for every pixel. With the default taps (x^8+x^6+x^5+x^4+1)
// the sequence visits all 255 non-zero values before repeating.
// Interface: clk, rst (synchronous, active high, loads SEED), key (the
// current state). Timing: key is SEED in the first cycle after reset and
// advances on every rising clock edge after that.
// That the key comes from an LFSR follows the design description; width of
// the state, polynomial, seed and reset style are this design's choices.
module lfsr_key_gen #(
  parameter int unsigned          WIDTH = rlgcd_pkg::PIXEL_W,
  parameter logic [WIDTH-1:0]     TAPS  = rlgcd_pkg::LFSR_TAPS,
  parameter logic [WIDTH-1:0]     SEED  = rlgcd_pkg::LFSR_SEED
) (
  input  logic             clk,
  input  logic             rst,
  output logic [WIDTH-1:0] key
);
  logic [WIDTH-1:0] state;
  logic             fb;

  always_comb fb = ^(state & TAPS);

  always_ff @(posedge clk) begin
    if (rst) state <= SEED;
    else     state <= {state[WIDTH-2:0], fb};
  end

  always_comb key = state;

  // An all-zero state would lock the register and make the key constant.
  a_state_nonzero: assert property (@(posedge clk) disable iff (rst) state != '0)
    else $error("lfsr_key_gen: state reached all zeros");
endmodule
