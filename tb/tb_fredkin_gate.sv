// tb_fredkin_gate: exhaustive check of the Fredkin gate against its truth
// table (swap I1 and I2 when C = 1), of its self-inverse property and of
// the conservation of the number of ones.
module tb_fredkin_gate;
  logic c, i1, i2, co, o1, o2, co2, o12, o22;
  int checks = 0, failures = 0;
  // expected {C,O1,O2} for {C,I1,I2} = 000 .. 111
  logic [2:0] exp_tab [8] = '{3'b000, 3'b001, 3'b010, 3'b011,
                              3'b100, 3'b110, 3'b101, 3'b111};

  fredkin_gate dut  (.c_in(c), .i1(i1), .i2(i2), .c_out(co), .o1(o1), .o2(o2));
  fredkin_gate dut2 (.c_in(co), .i1(o1), .i2(o2), .c_out(co2), .o1(o12), .o2(o22));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {c, i1, i2} = 3'(i);
      #1;
      checks++;
      if ({co, o1, o2} !== exp_tab[i]) begin
        failures++;
        $display("FAIL in=%b out=%b exp=%b", 3'(i), {co, o1, o2}, exp_tab[i]);
      end
      checks++;
      if ({co2, o12, o22} !== 3'(i)) begin
        failures++;
        $display("FAIL not self-inverse for in=%b", 3'(i));
      end
      checks++;
      if ($countones({co, o1, o2}) != $countones(3'(i))) begin
        failures++;
        $display("FAIL ones not conserved for in=%b", 3'(i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
