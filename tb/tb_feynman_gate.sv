// tb_feynman_gate: exhaustive check of the Feynman gate against its truth
// table (P = A, Q = A xor B), and a check that two gates in series give the
// inputs back (reversibility).
module tb_feynman_gate;
  logic a, b, p, q, p2, q2;
  int checks = 0, failures = 0;
  // expected {P,Q} for {A,B} = 00, 01, 10, 11
  logic [1:0] exp_tab [4] = '{2'b00, 2'b01, 2'b11, 2'b10};

  feynman_gate dut  (.a(a), .b(b), .p(p), .q(q));
  feynman_gate dut2 (.a(p), .b(q), .p(p2), .q(q2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if ({p, q} !== exp_tab[i]) begin
        failures++;
        $display("FAIL in=%b out=%b exp=%b", 2'(i), {p, q}, exp_tab[i]);
      end
      checks++;
      if ({p2, q2} !== 2'(i)) begin
        failures++;
        $display("FAIL not self-inverse for in=%b", 2'(i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
