// tb_scl_gate: exhaustive check of the SCL gate (P = A, Q = B, R = C,
// S = D xor (A or B or C)) against a table, of its self-inverse property
// and of its being a permutation of the 16 input patterns.
module tb_scl_gate;
  logic a, b, c, d, p, q, r, s, p2, q2, r2, s2;
  int checks = 0, failures = 0;
  logic [15:0] seen;
  // expected {P,Q,R,S} for {A,B,C,D} = 0000 .. 1111
  logic [3:0] exp_tab [16] = '{4'h0, 4'h1, 4'h3, 4'h2, 4'h5, 4'h4, 4'h7, 4'h6,
                               4'h9, 4'h8, 4'hB, 4'hA, 4'hD, 4'hC, 4'hF, 4'hE};

  scl_gate dut  (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));
  scl_gate dut2 (.a(p), .b(q), .c(r), .d(s), .p(p2), .q(q2), .r(r2), .s(s2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int i = 0; i < 16; i++) begin
      {a, b, c, d} = 4'(i);
      #1;
      checks++;
      if ({p, q, r, s} !== exp_tab[i]) begin
        failures++;
        $display("FAIL in=%h out=%h exp=%h", 4'(i), {p, q, r, s}, exp_tab[i]);
      end
      checks++;
      if ({p2, q2, r2, s2} !== 4'(i)) begin
        failures++;
        $display("FAIL not self-inverse for in=%h", 4'(i));
      end
      seen[{p, q, r, s}] = 1'b1;
    end
    checks++;
    if (seen !== 16'hFFFF) begin
      failures++;
      $display("FAIL outputs are not a permutation: %h", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
