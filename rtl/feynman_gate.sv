// feynman_gate: 2-input, 2-output reversible Feynman (controlled NOT) gate.
// P = A, Q = A ^ B. Self-inverse. Combinational.
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
