// tb_toffoli_gate: exhaustive check of the Toffoli gate (8 patterns) against
// "third line inverted when both controls are 1", plus its self-inverse
// property through a second gate.
module tb_toffoli_gate;
  logic a, b, c, p, q, r, p2, q2, r2;
  int checks = 0, failures = 0;

  toffoli_gate dut  (.a, .b, .c, .p, .q, .r);
  toffoli_gate dut2 (.a(p), .b(q), .c(r), .p(p2), .q(q2), .r(r2));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic exp_r;
      {a, b, c} = 3'(v);
      #1;
      exp_r = (a && b) ? !c : c;
      checks++;
      if ({p, q, r} !== {a, b, exp_r}) begin
        failures++;
        $display("FAIL in=%b out=%b", {a, b, c}, {p, q, r});
      end
      checks++;
      if ({p2, q2, r2} !== {a, b, c}) begin
        failures++;
        $display("FAIL not self-inverse for in=%b", {a, b, c});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
