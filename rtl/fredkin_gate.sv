// fredkin_gate: 3x3 reversible Fredkin (controlled-swap) gate.
// The control C passes through; when C = 1 the data inputs I1 and I2 are
// swapped onto O1/O2, otherwise they pass straight. Written in the
// XOR/AND form S = (I1 xor I2) and C, O1 = I1 xor S, O2 = I2 xor S.
// The gate is its own inverse and conserves the number of ones.
// Purely combinational.
module fredkin_gate (
  input  logic c_in,
  input  logic i1,
  input  logic i2,
  output logic c_out,
  output logic o1,
  output logic o2
);
  logic s;
  always_comb begin
    s     = (i1 ^ i2) & c_in;
    c_out = c_in;
    o1    = i1 ^ s;
    o2    = i2 ^ s;
  end
endmodule
