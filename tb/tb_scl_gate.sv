// tb_scl_gate: exhaustive check of the SCL gate. All 16 input patterns are
// applied; the outputs are compared with P=A, Q=B, R=C, S=D flipped when A
// and (B or C). A second gate fed with the first one's outputs must give the
// inputs back (the gate is its own inverse).
module tb_scl_gate;
  logic a, b, c, d, p, q, r, s, p2, q2, r2, s2;
  int checks = 0, failures = 0;

  scl_gate dut  (.a, .b, .c, .d, .p, .q, .r, .s);
  scl_gate dut2 (.a(p), .b(q), .c(r), .d(s), .p(p2), .q(q2), .r(r2), .s(s2));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic exp_s;
      {a, b, c, d} = 4'(v);
      #1;
      exp_s = (a && (b || c)) ? !d : d;
      checks++;
      if ({p, q, r, s} !== {a, b, c, exp_s}) begin
        failures++;
        $display("FAIL in=%b out=%b exp=%b", {a, b, c, d}, {p, q, r, s}, {a, b, c, exp_s});
      end
      checks++;
      if ({p2, q2, r2, s2} !== {a, b, c, d}) begin
        failures++;
        $display("FAIL not self-inverse for in=%b", {a, b, c, d});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
