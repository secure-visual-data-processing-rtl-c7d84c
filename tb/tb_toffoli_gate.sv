// tb_toffoli_gate: exhaustive check of the Toffoli gate against its truth
// table (third bit flipped when the first two are 1) and of its
// self-inverse property.
module tb_toffoli_gate;
  logic a, b, c, p, q, r, p2, q2, r2;
  int checks = 0, failures = 0;
  // expected {P,Q,R} for {A,B,C} = 000 .. 111
  logic [2:0] exp_tab [8] = '{3'b000, 3'b001, 3'b010, 3'b011,
                              3'b100, 3'b101, 3'b111, 3'b110};

  toffoli_gate dut  (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));
  toffoli_gate dut2 (.a(p), .b(q), .c(r), .p(p2), .q(q2), .r(r2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      #1;
      checks++;
      if ({p, q, r} !== exp_tab[i]) begin
        failures++;
        $display("FAIL in=%b out=%b exp=%b", 3'(i), {p, q, r}, exp_tab[i]);
      end
      checks++;
      if ({p2, q2, r2} !== 3'(i)) begin
        failures++;
        $display("FAIL not self-inverse for in=%b", 3'(i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
