// tb_feynman_gate: exhaustive check of the Feynman gate (4 patterns):
// P = A, Q = 1 exactly when A and B differ; plus its self-inverse property.
module tb_feynman_gate;
  logic a, b, p, q, p2, q2;
  int checks = 0, failures = 0;

  feynman_gate dut  (.a, .b, .p, .q);
  feynman_gate dut2 (.a(p), .b(q), .p(p2), .q(q2));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if ({p, q} !== {a, (a != b)}) begin
        failures++;
        $display("FAIL in=%b out=%b", {a, b}, {p, q});
      end
      checks++;
      if ({p2, q2} !== {a, b}) begin
        failures++;
        $display("FAIL not self-inverse for in=%b", {a, b});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
