// feynman_gate: 2x2 reversible Feynman (controlled-NOT) gate.
// P = A, Q = A xor B. The gate is its own inverse: applying it twice gives
// back (A, B). Quantum cost 1. Purely combinational, no clock.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  always_comb begin
    p = a;
    q = a ^ b;
  end
endmodule
