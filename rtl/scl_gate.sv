// scl_gate: 4x4 reversible SCL gate.
// P = A, Q = B, R = C, S = D xor (A or B or C). The first three inputs pass
// through and the fourth is flipped when any of them is 1; since A, B and C
// reach the outputs unchanged, the gate is its own inverse. Only the gate's
// name is given in the cipher description; this is the gate as it is
// usually defined in the reversible-logic literature. Purely combinational.
module scl_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  always_comb begin
    p = a;
    q = b;
    r = c;
    s = d ^ (a | b | c);
  end
endmodule
