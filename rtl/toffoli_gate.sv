// toffoli_gate: 3x3 reversible Toffoli (controlled-controlled-NOT) gate.
// P = A, Q = B, R = C xor (A and B): the third bit is flipped when both
// control bits are 1. The gate is its own inverse. Purely combinational.
module toffoli_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  always_comb begin
    p = a;
    q = b;
    r = c ^ (a & b);
  end
endmodule
